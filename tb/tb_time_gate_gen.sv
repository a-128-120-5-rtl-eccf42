// tb_time_gate_gen: self-checking test of the time gate generator logic,
// clocked by a behavioural 390 ps ring oscillator restarted on every 80 ns
// system clock edge. Checks the RO period count (205 periods), and for gates
// A, B and C the position of the rising edge after the system clock edge,
// (start + 3) RO periods plus half a period, and the width, (stop - start)
// periods, i.e. 390 ps resolution. Then slows the oscillator (drift) and
// checks the period count follows.
module tb_time_gate_gen;
  timeunit 1ps; timeprecision 1ps;
  localparam int SYS = 80000;
  logic sys_clk = 0, ro_clk, rst_n, en;
  logic [7:0] a_start, a_stop, b_start, b_stop, c_start, c_stop;
  logic gate_a, gate_b, gate_c;
  logic [7:0] ro_count;
  int checks = 0, failures = 0;
  longint t_sys;
  longint rise[3], fall[3];

  time_gate_gen dut (.*);
  ring_osc_model #(.SYS_PERIOD(SYS)) u_ro (.sys_clk(sys_clk), .en(en), .ro_clk(ro_clk));
  always #(SYS/2) sys_clk = ~sys_clk;

  always @(posedge sys_clk) t_sys = $time;
  always @(posedge gate_a) rise[0] = $time - t_sys;
  always @(negedge gate_a) fall[0] = $time - t_sys;
  always @(posedge gate_b) rise[1] = $time - t_sys;
  always @(negedge gate_b) fall[1] = $time - t_sys;
  always @(posedge gate_c) rise[2] = $time - t_sys;
  always @(negedge gate_c) fall[2] = $time - t_sys;

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #(SYS * 400); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int st[3], sp[3];
    rst_n = 0; en = 1;
    a_start = 0; a_stop = 0; b_start = 0; b_stop = 0; c_start = 0; c_stop = 0;
    repeat (2) @(posedge sys_clk); rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      for (int g = 0; g < 3; g++) begin
        st[g] = $urandom_range(0, 150);
        sp[g] = st[g] + $urandom_range(1, 50);
      end
      if (trial == 0) begin st[0] = 10; sp[0] = 11; end   // one-period gate
      @(negedge sys_clk);
      a_start = 8'(st[0]); a_stop = 8'(sp[0]);
      b_start = 8'(st[1]); b_stop = 8'(sp[1]);
      c_start = 8'(st[2]); c_stop = 8'(sp[2]);
      repeat (3) @(posedge sys_clk);
      @(negedge sys_clk);
      check(ro_count, 205, "RO periods per system clock");
      for (int g = 0; g < 3; g++) begin
        check(rise[g], 195 + 390 * (st[g] + 3), $sformatf("gate %0d rise", g));
        check(fall[g] - rise[g], 390 * (sp[g] - st[g]), $sformatf("gate %0d width", g));
      end
    end
    // drift: slower oscillator -> fewer periods
    u_ro.half_period = 240;
    repeat (3) @(posedge sys_clk);
    @(negedge sys_clk);
    check(ro_count, 166, "RO periods after drift");
    // a gate beyond the end of the period never opens
    a_start = 8'd200; a_stop = 8'd210; rise[0] = -1;
    repeat (3) @(posedge sys_clk);
    check(rise[0], -1, "gate beyond the period stays closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
