// ring_osc_model: behavioural model of the open-loop ring oscillator that
// clocks the time gate generator (an analog block; not synthesizable).
// While en is high it restarts on every rising edge of sys_clk (self-reset:
// output low at the edge, first rising edge half a period later) and runs
// for as many whole periods as fit before the next system clock edge.
// half_period can be changed at run time to model frequency drift.
// Times are in simulation time units (1 ps with the default time unit).
module ring_osc_model #(
  parameter int SYS_PERIOD = 80000
) (
  input  logic sys_clk,
  input  logic en,
  output logic ro_clk
);
  timeunit 1ps; timeprecision 1ps;

  int half_period = 195;

  initial ro_clk = 1'b0;

  always @(posedge sys_clk) begin
    ro_clk = 1'b0;
    if (en) begin
      for (int t = 0; t + 2 * half_period < SYS_PERIOD; t += 2 * half_period) begin
        #(half_period) ro_clk = 1'b1;
        #(half_period) ro_clk = 1'b0;
      end
    end
  end

endmodule
