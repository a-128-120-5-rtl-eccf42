// tb_column_readout: self-checking test of the column latch and pair mux.
// Latches random rows, changes the column lines afterwards and checks that
// every pixel pair 0..63 returns the latched even/odd column values.
module tb_column_readout;
  localparam int COLS = 128;
  logic clk = 0, rst_n, col_latch;
  logic [COLS-1:0][13:0] col_data, ref_row;
  logic [5:0] pair_addr;
  logic [13:0] pix0, pix1;
  int checks = 0, failures = 0;

  column_readout dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst_n = 0; col_latch = 0; pair_addr = 0;
    for (int c = 0; c < COLS; c++) col_data[c] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) col_data[c] = 14'($urandom);
      ref_row = col_data;
      col_latch = 1;
      @(negedge clk);
      col_latch = 0;
      for (int c = 0; c < COLS; c++) col_data[c] = 14'($urandom);   // row changes after the latch
      for (int p = 0; p < COLS/2; p++) begin
        pair_addr = 6'(p);
        @(negedge clk);
        checks += 2;
        if (pix0 != ref_row[2*p])   begin failures++; $display("FAIL pair %0d even", p); end
        if (pix1 != ref_row[2*p+1]) begin failures++; $display("FAIL pair %0d odd", p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
