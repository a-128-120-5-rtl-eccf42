// column_readout: column latch and pixel-pair multiplexer.
//
// When the MCU pulses col_latch, the 128 counts of the currently selected row
// are captured in a column latch, so that the row can be reset and exposed
// again while its values are transferred. The pixel-pair address (0..63)
// then picks columns 2p and 2p+1 from the latch, one pair per system clock,
// for the image processing block. The latch and the two-pixels-per-cycle
// transfer follow the sensor's readout timing; the registered latch and the
// combinational pair selection are this design's choices.
//
// Timing: col_data is captured on the clock edge where col_latch is high;
// pix0/pix1 follow pair_addr combinationally from the latch.
module column_readout #(
  parameter int unsigned COLS  = sensor_pkg::COLS,
  parameter int unsigned CNT_W = sensor_pkg::CNT_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          col_latch,
  input  logic [COLS-1:0][CNT_W-1:0]    col_data,
  input  logic [$clog2(COLS/2)-1:0]     pair_addr,
  output logic [CNT_W-1:0]              pix0,   // even column 2p
  output logic [CNT_W-1:0]              pix1    // odd column 2p+1
);

  logic [COLS-1:0][CNT_W-1:0] latch_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         latch_q <= '0;
    else if (col_latch) latch_q <= col_data;
  end

  assign pix0 = latch_q[{pair_addr, 1'b0}];
  assign pix1 = latch_q[{pair_addr, 1'b1}];

endmodule
