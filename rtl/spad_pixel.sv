// spad_pixel: the digital part of one 8 um SPAD pixel.
//
// Each rising edge of the SPAD pulse that arrives while the pixel is enabled
// (exposure active and the pixel's time gate open) increments a 14-bit
// counter. Overflow protection stops counting once the four top bits are all
// one, i.e. at 15 x 1024 = 15360 events, the pixel's full well; the count
// then holds until the row is reset. As in a real in-pixel ripple counter,
// the counter is clocked by the gated SPAD pulse itself, so the time gate acts
// with sub-system-clock resolution; rst clears it asynchronously.
//
// Interface: spad  - pulse from the SPAD front end (one rising edge per event)
//            en    - exposure AND time gate, from the array
//            rst   - row reset (active high, asynchronous)
//            count - counter value, read through the row select multiplexer
// The 14-bit width and the 15360 limit follow the sensor description; using
// the top-bit detect as the limit is this design's reading of that number.
module spad_pixel #(
  parameter int unsigned CNT_W    = sensor_pkg::CNT_W,
  parameter int unsigned SAT_BITS = sensor_pkg::SAT_BITS
) (
  input  logic             spad,
  input  logic             en,
  input  logic             rst,
  output logic [CNT_W-1:0] count
);

  logic cnt_clk;
  logic full;

  assign cnt_clk = spad & en;
  assign full    = &count[CNT_W-1 -: SAT_BITS];

  always_ff @(posedge cnt_clk or posedge rst) begin
    if (rst)        count <= '0;
    else if (!full) count <= count + 1'b1;
  end

endmodule
