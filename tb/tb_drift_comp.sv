// tb_drift_comp: self-checking test of the RO drift compensation.
// For random user fractions and RO period counts, waits for one full
// round-robin pass and checks every tap equals floor(f * count / 256).
// Also checks that a change of the RO count is followed within six cycles.
module tb_drift_comp;
  logic clk = 0, rst_n;
  logic [7:0] ro_count;
  logic [5:0][7:0] cfg;
  logic [5:0][7:0] taps;
  int checks = 0, failures = 0;

  drift_comp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; ro_count = 205; cfg = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      ro_count = 8'($urandom_range(150, 255));
      for (int i = 0; i < 6; i++) cfg[i] = 8'($urandom);
      repeat (6) @(negedge clk);
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (taps[i] != 8'((int'(cfg[i]) * int'(ro_count)) >> 8)) begin
          failures++;
          $display("FAIL edge %0d: cfg %0d count %0d tap %0d", i, cfg[i], ro_count, taps[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
