// tb_spad_pixel: self-checking test of one pixel counter.
// Checks that pulses count only while enabled, that reset clears the count,
// and that counting stops at exactly 15360 (top four bits all one) and holds.
module tb_spad_pixel;
  logic spad, en, rst;
  logic [13:0] count;
  int checks = 0, failures = 0;

  spad_pixel dut (.*);

  task automatic pulses(input int n);
    for (int i = 0; i < n; i++) begin spad = 1; #1; spad = 0; #1; end
  endtask
  task automatic expect_cnt(input int e, input string what);
    checks++;
    if (count != 14'(e)) begin
      failures++; $display("FAIL %s: count %0d expected %0d", what, count, e);
    end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    spad = 0; en = 0; rst = 0; #1; rst = 1; #2; rst = 0; #2;
    expect_cnt(0, "after reset");
    pulses(9);  expect_cnt(0, "disabled");
    en = 1; pulses(37); expect_cnt(37, "enabled");
    en = 0; pulses(5);  expect_cnt(37, "disabled again");
    // enable toggling while spad high must not add a count on its own edge
    en = 1; pulses(1000); expect_cnt(1037, "1037");
    rst = 1; #1; rst = 0; #1; expect_cnt(0, "row reset");
    pulses(15359); expect_cnt(15359, "one below full");
    pulses(1);     expect_cnt(15360, "full well");
    pulses(500);   expect_cnt(15360, "held at full well");
    rst = 1; #1; rst = 0; #1; expect_cnt(0, "reset after full");
    pulses(3); expect_cnt(3, "counting after full reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
