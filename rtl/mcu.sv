// mcu: the sensor's controller. It holds the registers the host writes over
// SWD, sequences the pixel array for rolling or global shutter, runs the
// oversampled HDR frame summation, hands finished images to the host and
// keeps the time gates compensated for ring oscillator drift.
//
// One image is the sum of NFRAMES oversampled frames. Per frame:
//  * global shutter: reset all rows (8 cycles, during which the ring
//    oscillator warms up), expose all rows for EXPOSURE cycles, then read
//    every row out;
//  * rolling shutter: exposure stays on and rows are read and reset one after
//    the other, so each row is exposed for one frame time; EXPOSURE adds
//    cycles after each row. The first sweep after a start only resets the
//    rows (its counts are discarded).
// Reading a row: select it (1 cycle), latch its counts in the column latch
// (1 cycle), reset the row (1 cycle), then send pixel pairs 0..63 to the image
// processing block, one per cycle. The first frame of an image is written
// into the SRAM without adding the old contents.
//
// When an image is complete:
//  * 32-bit lossless mode: integration pauses (exposure off, ring oscillator
//    stopped) until the host has read all 15360 pixels; then, in continuous
//    mode, the next image starts.
//  * 16-bit float mode: the banks swap roles (ping-pong); the new image is
//    read by the host from one bank while the next is summed into the other.
//    If the host has not finished reading when the next image is done, the
//    controller stalls until it has.
// Reading RD_DATA while no image is ready answers WAIT on SWD (bus_wait).
// The ring oscillator is enabled (ro_en) only while gating is on and the
// pixels are exposed or about to be; in between, the last RO period count
// and the taps derived from it are kept.
// bus_rdata is valid the cycle after bus_rd.
//
// Following the sensor description: the shutter modes, the oversampling, the
// two summation modes with pause/ping-pong, and drift compensation by the
// controller. This design's own: a hard-wired state machine instead of a
// programmable core, the register map (sensor_pkg), the row timing and the
// stall policy.
module mcu
  import sensor_pkg::acc_mode_e, sensor_pkg::shutter_e, sensor_pkg::reg_idx_e,
         sensor_pkg::MODE_LOSSLESS32, sensor_pkg::MODE_FLOAT16,
         sensor_pkg::SHUTTER_ROLLING, sensor_pkg::SHUTTER_GLOBAL,
         sensor_pkg::REG_CTRL, sensor_pkg::REG_NFRAMES, sensor_pkg::REG_EXPOSURE,
         sensor_pkg::REG_STATUS, sensor_pkg::REG_GATE_A, sensor_pkg::REG_GATE_B,
         sensor_pkg::REG_GATE_C, sensor_pkg::REG_RO_COUNT, sensor_pkg::REG_RD_ADDR,
         sensor_pkg::REG_RD_DATA, sensor_pkg::REG_FRAMES, sensor_pkg::REG_TAPS_A,
         sensor_pkg::REG_SCRATCH;
#(
  parameter int unsigned COLS  = sensor_pkg::COLS,
  parameter int unsigned ROWS  = sensor_pkg::ROWS,
  parameter int unsigned TAP_W = sensor_pkg::TAP_W,
  localparam int unsigned RW   = $clog2(ROWS),
  localparam int unsigned PW   = $clog2(COLS/2),
  localparam int unsigned AW   = RW + PW
) (
  input  logic              clk,
  input  logic              rst_n,
  // register bus from the SWD target
  input  logic              bus_rd,
  input  logic              bus_wr,
  input  logic [5:0]        bus_addr,
  input  logic [31:0]       bus_wdata,
  output logic [31:0]       bus_rdata,
  output logic              bus_wait,
  // pixel array
  output logic              exposure,
  output logic              rst_all,
  output logic [ROWS-1:0]   row_rst,
  output logic [RW-1:0]     row_sel,
  output logic              gate_en,
  output logic              interleave,
  // column readout
  output logic              col_latch,
  output logic [PW-1:0]     pair_addr,
  // image processing
  output acc_mode_e         acc_mode,
  output logic              act_bank,
  output logic              pix_valid,
  output logic              pix_first,
  output logic [AW-1:0]     pix_addr,
  output logic              host_rd_en,
  output logic [AW-1:0]     host_rd_addr,
  output logic              host_rd_bank,
  input  logic [31:0]       host_rd_data,
  // time gate generator
  input  logic [TAP_W-1:0]  ro_count,
  output logic              ro_en,
  output logic [5:0][TAP_W-1:0] taps,
  // event flags for observation (one-cycle pulses)
  output logic              ev_image_done,
  output logic              ev_stall,
  output logic              ev_swap
);

  localparam int unsigned NPIX        = ROWS * COLS;
  localparam int unsigned GRST_CYCLES = 8;   // global reset / RO warm-up

  typedef enum logic [3:0] {
    S_IDLE, S_FRAME, S_GRST, S_GEXP, S_ROW_SEL, S_LATCH, S_RRST, S_PAIRS,
    S_ROW_WAIT, S_FRAME_END, S_STALL, S_WAIT_HOST
  } state_e;

  // ---------------- registers ----------------
  acc_mode_e   cfg_mode;
  shutter_e    cfg_shutter;
  logic        cfg_gate_en, cfg_interleave, cfg_cont;
  logic [15:0] cfg_nframes;
  logic [23:0] cfg_exposure;
  logic [5:0][7:0] gate_cfg;          // a_start, a_stop, b_start, b_stop, c_start, c_stop
  logic [31:0] scratch;
  logic        start_req;

  // ---------------- sequencer state ----------------
  state_e      state;
  logic [RW-1:0]  row;
  logic [PW-1:0]  pair;
  logic [15:0] frame_cnt;
  logic [23:0] wait_cnt;
  logic        first, discard;
  logic        data_ready;
  logic        rd_bank;
  logic [$clog2(NPIX+1)-1:0] rd_ptr, rd_count;
  logic [15:0] images_done;

  // host image read
  logic        img_rd;
  logic        img_rd_q;
  logic [31:0] reg_rdata_q;
  logic [$clog2(NPIX+1)-1:0] img_words;

  assign img_words = (cfg_mode == MODE_LOSSLESS32) ? ($clog2(NPIX+1))'(NPIX) : ($clog2(NPIX+1))'(NPIX/2);
  assign bus_wait  = (bus_addr == 6'(REG_RD_DATA)) && !data_ready;
  assign img_rd    = bus_rd && (bus_addr == 6'(REG_RD_DATA)) && data_ready;

  assign host_rd_en   = img_rd;
  assign host_rd_addr = (cfg_mode == MODE_LOSSLESS32) ? AW'(rd_ptr >> 1) : AW'(rd_ptr);
  assign host_rd_bank = (cfg_mode == MODE_LOSSLESS32) ? rd_ptr[0] : rd_bank;
  assign bus_rdata    = img_rd_q ? host_rd_data : reg_rdata_q;

  // register read mux
  logic [31:0] reg_rdata;
  always_comb begin
    reg_rdata = '0;
    unique case (bus_addr)
      6'(REG_CTRL):     reg_rdata = {25'd0, cfg_cont, cfg_interleave, cfg_gate_en, cfg_shutter, cfg_mode, 2'b00};
      6'(REG_NFRAMES):  reg_rdata = {16'd0, cfg_nframes};
      6'(REG_EXPOSURE): reg_rdata = {8'd0, cfg_exposure};
      6'(REG_STATUS):   reg_rdata = {frame_cnt, 7'd0, state, 1'b0, (state == S_STALL), rd_bank, data_ready, (state != S_IDLE)};
      6'(REG_GATE_A):   reg_rdata = {16'd0, gate_cfg[1], gate_cfg[0]};
      6'(REG_GATE_B):   reg_rdata = {16'd0, gate_cfg[3], gate_cfg[2]};
      6'(REG_GATE_C):   reg_rdata = {16'd0, gate_cfg[5], gate_cfg[4]};
      6'(REG_RO_COUNT): reg_rdata = 32'(ro_count);
      6'(REG_RD_ADDR):  reg_rdata = 32'(rd_ptr);
      6'(REG_FRAMES):   reg_rdata = {16'd0, images_done};
      6'(REG_TAPS_A):   reg_rdata = {16'd0, 8'(taps[1]), 8'(taps[0])};
      6'(REG_SCRATCH):  reg_rdata = scratch;
      default:          reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_mode <= MODE_LOSSLESS32; cfg_shutter <= SHUTTER_GLOBAL;
      cfg_gate_en <= 1'b0; cfg_interleave <= 1'b0; cfg_cont <= 1'b0;
      cfg_nframes <= 16'd1; cfg_exposure <= 24'd100;
      gate_cfg <= '0; scratch <= '0; start_req <= 1'b0;
      reg_rdata_q <= '0; img_rd_q <= 1'b0;
    end else begin
      img_rd_q <= img_rd;
      if (bus_rd) reg_rdata_q <= reg_rdata;
      if (state != S_IDLE) start_req <= 1'b0;
      if (bus_wr) begin
        unique case (bus_addr)
          6'(REG_CTRL): begin
            // mode and shutter can only change while idle
            if (state == S_IDLE) begin
              cfg_mode    <= acc_mode_e'(bus_wdata[2]);
              cfg_shutter <= shutter_e'(bus_wdata[3]);
              start_req   <= bus_wdata[0];
            end
            cfg_gate_en    <= bus_wdata[4];
            cfg_interleave <= bus_wdata[5];
            cfg_cont       <= bus_wdata[6];
          end
          6'(REG_NFRAMES):  cfg_nframes  <= (bus_wdata[15:0] == 0) ? 16'd1 : bus_wdata[15:0];
          6'(REG_EXPOSURE): cfg_exposure <= bus_wdata[23:0];
          6'(REG_GATE_A):   {gate_cfg[1], gate_cfg[0]} <= bus_wdata[15:0];
          6'(REG_GATE_B):   {gate_cfg[3], gate_cfg[2]} <= bus_wdata[15:0];
          6'(REG_GATE_C):   {gate_cfg[5], gate_cfg[4]} <= bus_wdata[15:0];
          6'(REG_SCRATCH):  scratch <= bus_wdata;
          default: ;
        endcase
      end
    end
  end

  // ---------------- shutter / oversampling sequencer ----------------
  logic frame_last, row_last, pair_last, host_done;
  assign frame_last = (frame_cnt == cfg_nframes - 16'd1);
  assign row_last   = (row == RW'(ROWS - 1));
  assign pair_last  = (pair == PW'(COLS/2 - 1));
  assign host_done  = data_ready && (rd_count == img_words);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; row <= '0; pair <= '0; frame_cnt <= '0; wait_cnt <= '0;
      first <= 1'b1; discard <= 1'b0; data_ready <= 1'b0; rd_bank <= 1'b1;
      act_bank <= 1'b0; rd_ptr <= '0; rd_count <= '0; images_done <= '0;
      exposure <= 1'b0;
    end else begin
      // host reads
      if (bus_wr && bus_addr == 6'(REG_RD_ADDR)) rd_ptr <= ($clog2(NPIX+1))'(bus_wdata);
      if (img_rd) begin
        rd_ptr   <= rd_ptr + 1'b1;
        rd_count <= rd_count + 1'b1;
      end
      if (host_done && state != S_WAIT_HOST) data_ready <= 1'b0;

      unique case (state)
        S_IDLE: begin
          exposure <= 1'b0;
          if (start_req) begin
            frame_cnt <= '0;
            first     <= 1'b1;
            discard   <= (cfg_shutter == SHUTTER_ROLLING);
            state     <= S_FRAME;
          end
        end
        S_FRAME: begin
          row      <= '0;
          pair     <= '0;
          wait_cnt <= '0;
          if (cfg_shutter == SHUTTER_GLOBAL) state <= S_GRST;
          else begin
            exposure <= 1'b1;
            state    <= S_ROW_SEL;
          end
        end
        S_GRST: begin
          // all rows held in reset; the ring oscillator warms up so that
          // the drift loop has a fresh period count before exposure
          wait_cnt <= wait_cnt + 24'd1;
          if (wait_cnt == 24'(GRST_CYCLES - 1)) begin
            wait_cnt <= '0;
            exposure <= 1'b1;
            state    <= S_GEXP;
          end
        end
        S_GEXP: begin
          wait_cnt <= wait_cnt + 24'd1;
          if (wait_cnt + 24'd1 >= cfg_exposure) begin
            exposure <= 1'b0;
            state    <= S_ROW_SEL;
          end
        end
        S_ROW_SEL: state <= S_LATCH;
        S_LATCH:   state <= S_RRST;
        S_RRST: begin
          pair  <= '0;
          state <= S_PAIRS;
        end
        S_PAIRS: begin
          pair <= pair + 1'b1;
          if (pair_last) begin
            wait_cnt <= '0;
            if (cfg_shutter == SHUTTER_ROLLING && cfg_exposure != 0) state <= S_ROW_WAIT;
            else if (row_last) state <= S_FRAME_END;
            else begin
              row   <= row + 1'b1;
              state <= S_ROW_SEL;
            end
          end
        end
        S_ROW_WAIT: begin
          wait_cnt <= wait_cnt + 24'd1;
          if (wait_cnt + 24'd1 >= cfg_exposure) begin
            if (row_last) state <= S_FRAME_END;
            else begin
              row   <= row + 1'b1;
              state <= S_ROW_SEL;
            end
          end
        end
        S_FRAME_END: begin
          if (discard) begin
            discard <= 1'b0;
            state   <= S_FRAME;
          end else if (!frame_last) begin
            first     <= 1'b0;
            frame_cnt <= frame_cnt + 16'd1;
            state     <= S_FRAME;
          end else if (cfg_mode == MODE_LOSSLESS32) begin
            exposure    <= 1'b0;
            data_ready  <= 1'b1;
            rd_ptr      <= '0;
            rd_count    <= '0;
            images_done <= images_done + 16'd1;
            state       <= S_WAIT_HOST;
          end else begin
            state <= S_STALL;   // float mode: swap banks, waiting for the host if needed
          end
        end
        S_STALL: begin
          // ping-pong swap once the host has released the previous image
          if (!data_ready || host_done) begin
            rd_bank     <= act_bank;
            act_bank    <= ~act_bank;
            data_ready  <= 1'b1;
            rd_ptr      <= '0;
            rd_count    <= '0;
            images_done <= images_done + 16'd1;
            frame_cnt   <= '0;
            first       <= 1'b1;
            state       <= cfg_cont ? S_FRAME : S_IDLE;
          end
        end
        S_WAIT_HOST: begin
          if (host_done) begin
            data_ready <= 1'b0;
            frame_cnt  <= '0;
            first      <= 1'b1;
            discard    <= (cfg_shutter == SHUTTER_ROLLING);
            state      <= cfg_cont ? S_FRAME : S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- array and pipeline controls ----------------
  always_comb begin
    row_rst = '0;
    if (state == S_RRST) row_rst[row] = 1'b1;
  end

  assign rst_all    = (state == S_GRST);
  assign row_sel    = row;
  assign col_latch  = (state == S_LATCH);
  assign pair_addr  = pair;
  assign pix_valid  = (state == S_PAIRS) && !discard;
  assign pix_first  = first;
  assign pix_addr   = {row, pair};
  assign acc_mode   = cfg_mode;
  assign gate_en    = cfg_gate_en;
  assign interleave = cfg_interleave;
  assign ro_en      = cfg_gate_en && (exposure || state == S_GRST);

  assign ev_image_done = (state == S_FRAME_END) && !discard && frame_last;
  assign ev_stall      = (state == S_STALL) && data_ready && !host_done;
  assign ev_swap       = (state == S_STALL) && (!data_ready || host_done);

  // ---------------- ring oscillator drift compensation ----------------
  drift_comp #(.TAP_W(TAP_W)) u_drift (
    .clk      (clk),
    .rst_n    (rst_n),
    .ro_count (ro_count),
    .cfg      (gate_cfg),
    .taps     (taps)
  );

endmodule
