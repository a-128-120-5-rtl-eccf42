// image_proc: image processing block between the column readout and the two
// SRAM banks, running at the oversampled internal frame rate.
//
// It is a two-stage pipeline made of a memory read block, the adder/transform
// block (hdr_adder) and a memory write block. In the cycle a pixel pair is
// presented (pix_valid) the old sums at word pix_addr are read; in the next
// cycle they come out of the SRAM, the counts are added and the result is
// written back to the same word. One pixel pair is processed per clock.
//
//  * 32-bit lossless mode: both banks work in parallel; bank 0 holds the sum
//    of the even pixel, bank 1 the sum of the odd pixel of each pair.
//  * 16-bit float mode: only bank act_bank is summed into (two floats per
//    word); the other bank holds the last finished image for the host
//    (ping-pong).
//
// Host path: host_rd_en reads word host_rd_addr of bank host_rd_bank;
// host_rd_data is valid one cycle later. A bank's read port belongs to the
// pipeline whenever a pair is being read from it, otherwise to the host; the
// MCU only lets the host read a bank that is not being summed into.
module image_proc
  import sensor_pkg::acc_mode_e, sensor_pkg::MODE_LOSSLESS32, sensor_pkg::MODE_FLOAT16;
#(
  parameter int unsigned DEPTH = sensor_pkg::SRAM_DEPTH,
  parameter int unsigned CNT_W = sensor_pkg::CNT_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  acc_mode_e         mode,
  input  logic              act_bank,
  input  logic              pix_valid,
  input  logic              pix_first,
  input  logic [AW-1:0]     pix_addr,
  input  logic [CNT_W-1:0]  pix0,
  input  logic [CNT_W-1:0]  pix1,
  input  logic              host_rd_en,
  input  logic [AW-1:0]     host_rd_addr,
  input  logic              host_rd_bank,
  output logic [31:0]       host_rd_data
);

  // ---------------- memory read block ----------------
  logic [1:0]          bank_use;            // banks touched by the current pair
  logic [1:0]          rd_en;
  logic [1:0][AW-1:0]  rd_addr;
  logic [1:0][31:0]    rd_data;

  always_comb begin
    if (mode == MODE_LOSSLESS32) bank_use = 2'b11;
    else                         bank_use = act_bank ? 2'b10 : 2'b01;
    for (int b = 0; b < 2; b++) begin
      if (pix_valid && bank_use[b]) begin
        rd_en[b]   = 1'b1;
        rd_addr[b] = pix_addr;
      end else begin
        rd_en[b]   = host_rd_en && (host_rd_bank == b[0]);
        rd_addr[b] = host_rd_addr;
      end
    end
  end

  // pipeline register between read and write
  logic              v_q, first_q, bank_q;
  acc_mode_e         mode_q;
  logic [AW-1:0]     addr_q;
  logic [CNT_W-1:0]  pix0_q, pix1_q;
  logic [1:0]        use_q;
  logic              host_bank_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; first_q <= 1'b0; bank_q <= 1'b0; mode_q <= MODE_LOSSLESS32;
      addr_q <= '0; pix0_q <= '0; pix1_q <= '0; use_q <= '0; host_bank_q <= 1'b0;
    end else begin
      v_q     <= pix_valid;
      first_q <= pix_first;
      bank_q  <= act_bank;
      mode_q  <= mode;
      addr_q  <= pix_addr;
      pix0_q  <= pix0;
      pix1_q  <= pix1;
      use_q   <= bank_use;
      if (host_rd_en) host_bank_q <= host_rd_bank;
    end
  end

  // ---------------- adder / transform block ----------------
  logic [31:0] old_lo, old_hi, new_lo, new_hi;

  assign old_lo = (mode_q == MODE_FLOAT16 && bank_q) ? rd_data[1] : rd_data[0];
  assign old_hi = rd_data[1];

  hdr_adder #(.CNT_W(CNT_W)) u_adder (
    .mode   (mode_q),
    .first  (first_q),
    .pix0   (pix0_q),
    .pix1   (pix1_q),
    .old_lo (old_lo),
    .old_hi (old_hi),
    .new_lo (new_lo),
    .new_hi (new_hi)
  );

  // ---------------- memory write block ----------------
  logic [1:0]       wr_en;
  logic [1:0][31:0] wr_data;

  always_comb begin
    wr_en = v_q ? use_q : 2'b00;
    if (mode_q == MODE_LOSSLESS32) begin
      wr_data[0] = new_lo;
      wr_data[1] = new_hi;
    end else begin
      wr_data[0] = new_lo;
      wr_data[1] = new_lo;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    sram_bank #(.DEPTH(DEPTH), .WIDTH(32)) u_sram (
      .clk     (clk),
      .rd_en   (rd_en[b]),
      .rd_addr (rd_addr[b]),
      .rd_data (rd_data[b]),
      .wr_en   (wr_en[b]),
      .wr_addr (addr_q),
      .wr_data (wr_data[b])
    );
  end

  assign host_rd_data = rd_data[host_bank_q];

endmodule
