// tb_hdr_adder: self-checking test of the adder/transform stage.
// 32-bit mode: checks saturating sums of both pixels and the 'first' clear.
// Float mode: a reference float (value = m << e, smallest e with m < 4096,
// truncated) is computed here by normalising with a shift loop, independent
// of the package functions, and compared for random and edge values.
module tb_hdr_adder;
  import sensor_pkg::*;
  acc_mode_e mode;
  logic first;
  logic [13:0] pix0, pix1;
  logic [31:0] old_lo, old_hi, new_lo, new_hi;
  int checks = 0, failures = 0;

  hdr_adder dut (.*);

  function automatic logic [15:0] ref_enc(input longint v);
    int e = 0;
    while (v >= 4096 && e < 15) begin v = v >> 1; e++; end
    if (v >= 4096) return 16'hFFFF;
    return {4'(e), 12'(v)};
  endfunction
  function automatic longint ref_dec(input logic [15:0] f);
    return longint'(f[11:0]) << f[15:12];
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // lossless 32-bit
    mode = MODE_LOSSLESS32;
    for (int i = 0; i < 2000; i++) begin
      longint s0, s1;
      first = ($urandom_range(9) == 0);
      pix0 = 14'($urandom_range(15360)); pix1 = 14'($urandom_range(15360));
      old_lo = (i % 50 == 0) ? 32'hFFFF_F000 : $urandom; old_hi = $urandom;
      #1;
      s0 = (first ? 0 : longint'(old_lo)) + pix0; if (s0 > 64'hFFFF_FFFF) s0 = 64'hFFFF_FFFF;
      s1 = (first ? 0 : longint'(old_hi)) + pix1; if (s1 > 64'hFFFF_FFFF) s1 = 64'hFFFF_FFFF;
      check(new_lo, 32'(s0), "lossless lo");
      check(new_hi, 32'(s1), "lossless hi");
    end
    // float 16-bit
    mode = MODE_FLOAT16;
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] f0, f1;
      first = ($urandom_range(9) == 0);
      pix0 = 14'($urandom_range(15360)); pix1 = 14'($urandom_range(15360));
      f0 = 16'($urandom); f1 = 16'($urandom);
      if (i < 20) begin f0 = 16'hFFFF; f1 = 16'h0FFF; end   // saturation and exponent step
      old_lo = {f1, f0}; old_hi = $urandom;
      #1;
      check(new_lo, {ref_enc((first ? 0 : ref_dec(f1)) + pix1), ref_enc((first ? 0 : ref_dec(f0)) + pix0)}, "float");
    end
    // accumulate a known sequence in float: 100 frames of 1000 counts; the
    // truncation may lose less than one mantissa step (32 at this size) per addition
    begin
      logic [31:0] acc = 0;
      longint exact = 0;
      mode = MODE_FLOAT16;
      for (int f = 0; f < 100; f++) begin
        first = (f == 0); pix0 = 14'd1000; pix1 = 14'd15360; old_lo = acc; #1;
        acc = new_lo; exact += 1000;
      end
      checks++;
      if (ref_dec(acc[15:0]) > exact || ref_dec(acc[15:0]) < exact - 3200) begin
        failures++; $display("FAIL float accumulation %0d vs %0d", ref_dec(acc[15:0]), exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
