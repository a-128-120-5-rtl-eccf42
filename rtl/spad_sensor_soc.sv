// spad_sensor_soc: digital core of a 128 x 120 SPAD time-resolved image
// sensor for microendoscopy.
//
// The chip needs only five wires: a system clock, one bidirectional data line
// (both used as an ARM Serial Wire Debug port) and supplies. Each 8 um pixel
// counts photons in a 14-bit counter. To reach a high dynamic range, many
// short frames are read out at an oversampled internal rate and summed
// without added noise into two 262 kb SRAM banks, either as 32-bit integers
// (both banks together; integration pauses while the host reads) or as 16-bit
// floats (the banks alternate as ping-pong buffers, so the sensor keeps
// integrating while the host reads). Time gates generated from a ring
// oscillator open the pixels only in a programmable window after each system
// clock edge, for fluorescence lifetime imaging; gate C triggers the external
// pulsed light source.
//
// Blocks: swd_target (host interface) -> mcu (registers, shutter sequencer,
// oversampling, drift compensation) -> pixel_array -> column_readout ->
// image_proc (read / add-transform / write, two sram_bank) ; time_gate_gen in
// the ring oscillator clock domain.
//
// Ports the analog parts connect to:
//   por_n       - output of the power-on reset circuit (active low)
//   ro_clk      - the ring oscillator output (about 390 ps period)
//   ro_en       - enables the ring oscillator (only needed while gating)
//   spad        - pulses of the SPAD front ends, spad[row][col]
//   swdio_*     - the bidirectional data pad, split into input/output/enable
//   gate_c      - drive for the pulsed light source
module spad_sensor_soc
  import sensor_pkg::acc_mode_e;
#(
  parameter int unsigned COLS       = sensor_pkg::COLS,
  parameter int unsigned ROWS       = sensor_pkg::ROWS,
  parameter int unsigned CNT_W      = sensor_pkg::CNT_W,
  parameter int unsigned TAP_W      = sensor_pkg::TAP_W,
  parameter logic [31:0] IDCODE     = 32'h0BA0_1477,
  localparam int unsigned RW        = $clog2(ROWS),
  localparam int unsigned PW        = $clog2(COLS/2),
  localparam int unsigned AW        = RW + PW
) (
  input  logic                      sys_clk,
  input  logic                      por_n,
  input  logic                      swdio_i,
  output logic                      swdio_o,
  output logic                      swdio_oe,
  input  logic                      ro_clk,
  output logic                      ro_en,
  input  logic [ROWS-1:0][COLS-1:0] spad,
  output logic                      gate_c
);

  logic rst_n, ro_rst_n;

  reset_sync u_rst_sys (.clk(sys_clk), .rst_n_i(por_n), .rst_n_o(rst_n));
  reset_sync u_rst_ro  (.clk(ro_clk),  .rst_n_i(por_n), .rst_n_o(ro_rst_n));

  // ---------------- SWD host interface ----------------
  logic        bus_rd, bus_wr, bus_wait;
  logic [5:0]  bus_addr;
  logic [31:0] bus_wdata, bus_rdata;

  swd_target #(.IDCODE(IDCODE)) u_swd (
    .clk       (sys_clk),
    .rst_n     (rst_n),
    .swdio_i   (swdio_i),
    .swdio_o   (swdio_o),
    .swdio_oe  (swdio_oe),
    .bus_rd    (bus_rd),
    .bus_wr    (bus_wr),
    .bus_addr  (bus_addr),
    .bus_wdata (bus_wdata),
    .bus_rdata (bus_rdata),
    .bus_wait  (bus_wait)
  );

  // ---------------- controller ----------------
  logic                  exposure, rst_all, gate_en, interleave, col_latch;
  logic [ROWS-1:0]       row_rst;
  logic [RW-1:0]         row_sel;
  logic [PW-1:0]         pair_addr;
  acc_mode_e             acc_mode;
  logic                  act_bank, pix_valid, pix_first;
  logic [AW-1:0]         pix_addr;
  logic                  host_rd_en, host_rd_bank;
  logic [AW-1:0]         host_rd_addr;
  logic [31:0]           host_rd_data;
  logic [TAP_W-1:0]      ro_count;
  logic [5:0][TAP_W-1:0] taps;
  logic                  ev_image_done, ev_stall, ev_swap;

  mcu #(.COLS(COLS), .ROWS(ROWS), .TAP_W(TAP_W)) u_mcu (
    .clk           (sys_clk),
    .rst_n         (rst_n),
    .bus_rd        (bus_rd),
    .bus_wr        (bus_wr),
    .bus_addr      (bus_addr),
    .bus_wdata     (bus_wdata),
    .bus_rdata     (bus_rdata),
    .bus_wait      (bus_wait),
    .exposure      (exposure),
    .rst_all       (rst_all),
    .row_rst       (row_rst),
    .row_sel       (row_sel),
    .gate_en       (gate_en),
    .interleave    (interleave),
    .col_latch     (col_latch),
    .pair_addr     (pair_addr),
    .acc_mode      (acc_mode),
    .act_bank      (act_bank),
    .pix_valid     (pix_valid),
    .pix_first     (pix_first),
    .pix_addr      (pix_addr),
    .host_rd_en    (host_rd_en),
    .host_rd_addr  (host_rd_addr),
    .host_rd_bank  (host_rd_bank),
    .host_rd_data  (host_rd_data),
    .ro_count      (ro_count),
    .ro_en         (ro_en),
    .taps          (taps),
    .ev_image_done (ev_image_done),
    .ev_stall      (ev_stall),
    .ev_swap       (ev_swap)
  );

  // ---------------- time gate generator (RO clock domain) ----------------
  logic gate_a, gate_b;

  time_gate_gen #(.TAP_W(TAP_W)) u_gate (
    .ro_clk   (ro_clk),
    .rst_n    (ro_rst_n),
    .sys_clk  (sys_clk),
    .a_start  (taps[0]), .a_stop (taps[1]),
    .b_start  (taps[2]), .b_stop (taps[3]),
    .c_start  (taps[4]), .c_stop (taps[5]),
    .gate_a   (gate_a),
    .gate_b   (gate_b),
    .gate_c   (gate_c),
    .ro_count (ro_count)
  );

  // ---------------- pixel array and readout ----------------
  logic [COLS-1:0][CNT_W-1:0] col_data;
  logic [CNT_W-1:0]           pix0, pix1;

  pixel_array #(.COLS(COLS), .ROWS(ROWS), .CNT_W(CNT_W)) u_array (
    .spad       (spad),
    .exposure   (exposure),
    .gate_en    (gate_en),
    .interleave (interleave),
    .gate_a     (gate_a),
    .gate_b     (gate_b),
    .row_rst    (row_rst),
    .rst_all    (rst_all | ~rst_n),
    .row_sel    (row_sel),
    .col_data   (col_data)
  );

  column_readout #(.COLS(COLS), .CNT_W(CNT_W)) u_colro (
    .clk       (sys_clk),
    .rst_n     (rst_n),
    .col_latch (col_latch),
    .col_data  (col_data),
    .pair_addr (pair_addr),
    .pix0      (pix0),
    .pix1      (pix1)
  );

  image_proc #(.DEPTH(1 << AW), .CNT_W(CNT_W)) u_improc (
    .clk          (sys_clk),
    .rst_n        (rst_n),
    .mode         (acc_mode),
    .act_bank     (act_bank),
    .pix_valid    (pix_valid),
    .pix_first    (pix_first),
    .pix_addr     (pix_addr),
    .pix0         (pix0),
    .pix1         (pix1),
    .host_rd_en   (host_rd_en),
    .host_rd_addr (host_rd_addr),
    .host_rd_bank (host_rd_bank),
    .host_rd_data (host_rd_data)
  );

endmodule
