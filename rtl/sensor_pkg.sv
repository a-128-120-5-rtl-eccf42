// sensor_pkg: constants, types and helper functions shared by the SPAD image
// sensor SoC. Array geometry (128 columns x 120 rows), the 14-bit pixel
// counter and the two 262 kb SRAM banks follow the sensor description; the
// SWD register map, the control field layout and the 16-bit floating point
// format (4-bit exponent, 12-bit mantissa, value = mantissa << exponent) are
// choices of this design.
package sensor_pkg;

  // ---------------- geometry ----------------
  localparam int unsigned COLS       = 128;
  localparam int unsigned ROWS       = 120;
  localparam int unsigned CNT_W      = 14;     // in-pixel counter width
  localparam int unsigned SAT_BITS   = 4;      // counting stops when the top 4 bits are all 1 (15360)

  // ---------------- SRAM ----------------
  localparam int unsigned SRAM_DEPTH = 8192;   // 8192 x 32 = 262144 bits per bank
  localparam int unsigned SRAM_W     = 32;

  // ---------------- 16-bit floating point ----------------
  localparam int unsigned FLT_EXP_W  = 4;
  localparam int unsigned FLT_MAN_W  = 12;

  // ---------------- time gate ----------------
  localparam int unsigned TAP_W      = 8;      // RO periods counted within one system clock period

  // accumulation modes
  typedef enum logic {
    MODE_LOSSLESS32 = 1'b0,  // both banks in parallel, 32-bit sums
    MODE_FLOAT16    = 1'b1   // ping-pong banks, two 16-bit floats per word
  } acc_mode_e;

  typedef enum logic {
    SHUTTER_ROLLING = 1'b0,
    SHUTTER_GLOBAL  = 1'b1
  } shutter_e;

  // register indices on the MCU register bus ({SELECT.APBANKSEL, A[3:2]})
  typedef enum logic [5:0] {
    REG_CTRL      = 6'd0,   // [0] start (self-clearing) [1] stop [2] mode [3] shutter
                            // [4] gate enable [5] interleave [6] continuous
    REG_NFRAMES   = 6'd1,   // number of oversampled frames summed per output image
    REG_EXPOSURE  = 6'd2,   // global: exposure cycles; rolling: extra cycles per row
    REG_STATUS    = 6'd3,   // read only
    REG_GATE_A    = 6'd4,   // [7:0] start, [15:8] stop, 1/256 of a system clock period
    REG_GATE_B    = 6'd5,
    REG_GATE_C    = 6'd6,
    REG_RO_COUNT  = 6'd7,   // read only: RO periods per system clock period
    REG_RD_ADDR   = 6'd8,   // host read pointer (pixel index in 32-bit mode, word index in float mode)
    REG_RD_DATA   = 6'd9,   // read: image data, pointer auto-increments
    REG_FRAMES    = 6'd10,  // read only: output images completed
    REG_TAPS_A    = 6'd11,  // read only: compensated RO taps of gate A {stop,start}
    REG_SCRATCH   = 6'd12
  } reg_idx_e;

  // 16-bit float: value = man << exp. Encoding picks the smallest exponent
  // whose mantissa fits (most precision), truncates the dropped low bits and
  // saturates at 4095 << 15.
  localparam int unsigned FLT_VAL_W = FLT_MAN_W + (1 << FLT_EXP_W) - 1;  // 27 bits

  function automatic logic [FLT_VAL_W-1:0] flt_decode(input logic [15:0] f);
    logic [FLT_VAL_W-1:0] m;
    m = FLT_VAL_W'(f[FLT_MAN_W-1:0]);
    return m << f[15 -: FLT_EXP_W];
  endfunction

  function automatic logic [15:0] flt_encode(input logic [FLT_VAL_W:0] v);
    logic [15:0] r;
    r = {{FLT_EXP_W{1'b1}}, {FLT_MAN_W{1'b1}}};   // saturate by default
    for (int e = (1 << FLT_EXP_W) - 1; e >= 0; e--) begin
      if ((v >> e) < (FLT_VAL_W+1)'(1 << FLT_MAN_W)) begin
        r = {FLT_EXP_W'(e), FLT_MAN_W'(v >> e)};
      end
    end
    return r;
  endfunction

  // SWD acknowledge codes, first bit sent in bit 0
  localparam logic [2:0] SWD_ACK_OK    = 3'b001;
  localparam logic [2:0] SWD_ACK_WAIT  = 3'b010;
  localparam logic [2:0] SWD_ACK_FAULT = 3'b100;

endpackage
