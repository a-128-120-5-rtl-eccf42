// sram_bank: one 262 kb frame-summation SRAM bank, 8192 words x 32 bits.
//
// Modelled as a memory array with one synchronous read port and one
// synchronous write port, so that the image processing block can read the
// sum of one pixel pair while it writes back the sum of the previous pair.
// The read data appear on the clock edge after rd_en. A write and a read of
// the same address in the same cycle return the old contents. The 262 kb size
// follows the sensor description; the 8192 x 32 organisation and the
// two-port (1R1W) access are this design's assumptions. Contents are not
// initialised; the first frame of every summation overwrites them.
module sram_bank #(
  parameter int unsigned DEPTH = sensor_pkg::SRAM_DEPTH,
  parameter int unsigned WIDTH = sensor_pkg::SRAM_W
) (
  input  logic                      clk,
  input  logic                      rd_en,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output logic [WIDTH-1:0]          rd_data,
  input  logic                      wr_en,
  input  logic [$clog2(DEPTH)-1:0]  wr_addr,
  input  logic [WIDTH-1:0]          wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
