// hdr_adder: the adder/transform stage of the image processing block.
//
// Adds the counts of one pixel pair (two 14-bit values) to the sums read from
// SRAM. In 32-bit lossless mode old_lo/new_lo hold the sum of the even pixel
// and old_hi/new_hi the sum of the odd pixel (one word in each bank); the
// sums saturate at 2^32-1. In 16-bit floating point mode old_lo holds both
// pixels as {float(odd), float(even)}: each float is decoded, the count is
// added and the result re-encoded (mantissa truncated), and new_hi is unused.
// With first set the old sums are taken as zero, which starts a new summation
// without clearing the SRAM. Purely combinational.
//
// The two modes and their word sizes follow the sensor description; the float
// format (see sensor_pkg), the truncation and the saturation are this
// design's choices.
module hdr_adder
  import sensor_pkg::acc_mode_e, sensor_pkg::MODE_LOSSLESS32, sensor_pkg::MODE_FLOAT16, sensor_pkg::FLT_VAL_W, sensor_pkg::flt_encode, sensor_pkg::flt_decode;
#(
  parameter int unsigned CNT_W = sensor_pkg::CNT_W
) (
  input  acc_mode_e          mode,
  input  logic               first,
  input  logic [CNT_W-1:0]   pix0,
  input  logic [CNT_W-1:0]   pix1,
  input  logic [31:0]        old_lo,
  input  logic [31:0]        old_hi,
  output logic [31:0]        new_lo,
  output logic [31:0]        new_hi
);

  function automatic logic [31:0] sat_add(input logic [31:0] a, input logic [CNT_W-1:0] b);
    logic [32:0] s;
    s = {1'b0, a} + 33'(b);
    return s[32] ? 32'hFFFF_FFFF : s[31:0];
  endfunction

  logic [31:0] base_lo, base_hi;
  logic [FLT_VAL_W-1:0] dec0, dec1;

  always_comb begin
    base_lo = first ? '0 : old_lo;
    base_hi = first ? '0 : old_hi;
    dec0    = flt_decode(base_lo[15:0]);
    dec1    = flt_decode(base_lo[31:16]);
    if (mode == MODE_LOSSLESS32) begin
      new_lo = sat_add(base_lo, pix0);
      new_hi = sat_add(base_hi, pix1);
    end else begin
      new_lo = {flt_encode({1'b0, dec1} + (FLT_VAL_W+1)'(pix1)),
                flt_encode({1'b0, dec0} + (FLT_VAL_W+1)'(pix0))};
      new_hi = base_hi;
    end
  end

endmodule
