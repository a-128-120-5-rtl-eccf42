// tb_spad_sensor_soc: end-to-end test of the sensor SoC at a reduced array
// size (8 rows x 16 columns) running every scenario of soc_test_bench.
module tb_spad_sensor_soc;
  timeunit 1ps; timeprecision 1ps;
  soc_test_bench #(.FULL(1'b0), .ROWS(8), .COLS(16)) u_bench ();
  initial begin
    #(64'd80000 * 400000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", u_bench.checks, u_bench.failures + 1);
    $finish;
  end
endmodule
