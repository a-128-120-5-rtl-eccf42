// tb_pixel_array: self-checking test of the pixel array.
// Sends a known number of SPAD pulses to chosen pixels, with and without the
// time gates open, reads every touched row back through the row select and
// compares with the expected counts. Also checks row reset, the 15360
// saturation of a pixel, gate A/B interleaving and that a pixel with its gate
// closed does not count.
module tb_pixel_array;
  localparam int COLS = 128, ROWS = 120, CW = 14;
  logic [ROWS-1:0][COLS-1:0] spad;
  logic exposure, gate_en, interleave, gate_a, gate_b, rst_all;
  logic [ROWS-1:0] row_rst;
  logic [6:0] row_sel;
  logic [COLS-1:0][CW-1:0] col_data;
  int checks = 0, failures = 0;
  int exp_cnt [ROWS][COLS];

  pixel_array dut (.*);

  task automatic pulse(input int r, input int c, input int n);
    for (int i = 0; i < n; i++) begin
      spad[r][c] = 1'b1; #1; spad[r][c] = 1'b0; #1;
    end
  endtask

  task automatic check_row(input int r);
    row_sel = 7'(r); #1;
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (col_data[c] != CW'(exp_cnt[r][c])) begin
        failures++;
        $display("FAIL row %0d col %0d: got %0d exp %0d", r, c, col_data[c], exp_cnt[r][c]);
      end
    end
  endtask

  initial begin
    #2_000_000; failures++; $display("watchdog"); 
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    spad = '0; exposure = 0; gate_en = 0; interleave = 0; gate_a = 0; gate_b = 0;
    row_rst = '0; rst_all = 1; row_sel = '0;
    foreach (exp_cnt[r, c]) exp_cnt[r][c] = 0;
    #5 rst_all = 0; #5;
    // exposure off: nothing counts
    pulse(3, 4, 5);
    check_row(3);
    // ungated exposure
    exposure = 1;
    for (int k = 0; k < 200; k++) begin
      int r, c, n;
      r = $urandom_range(ROWS-1); c = $urandom_range(COLS-1); n = $urandom_range(1, 20);
      pulse(r, c, n); exp_cnt[r][c] += n;
    end
    for (int r = 0; r < ROWS; r++) check_row(r);
    // time gates: gate A open, B closed, no interleave -> all columns count
    gate_en = 1; gate_a = 1; gate_b = 0; interleave = 0;
    pulse(10, 0, 3); exp_cnt[10][0] += 3;
    pulse(10, 1, 4); exp_cnt[10][1] += 4;
    // interleave: odd columns use gate B (closed)
    interleave = 1;
    pulse(10, 2, 2); exp_cnt[10][2] += 2;
    pulse(10, 3, 7);
    gate_a = 0; gate_b = 1;
    pulse(10, 4, 6);
    pulse(10, 5, 1); exp_cnt[10][5] += 1;
    check_row(10);
    // row reset of one row only
    row_rst[10] = 1; #1; row_rst[10] = 0; #1;
    for (int c = 0; c < COLS; c++) exp_cnt[10][c] = 0;
    check_row(10); check_row(11);
    // saturation at 15360
    gate_en = 0;
    pulse(7, 9, 16000); exp_cnt[7][9] = 15360;
    check_row(7);
    rst_all = 1; #1; rst_all = 0; #1;
    foreach (exp_cnt[r, c]) exp_cnt[r][c] = 0;
    check_row(7); check_row(119);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
