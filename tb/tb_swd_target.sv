// tb_swd_target: self-checking test of the SWD target.
// A behavioural host performs line reset, IDCODE read, CTRL/STAT power-up
// handshake, SELECT, AP writes and reads to a register model attached to the
// bus, a WAIT answer, a request with bad parity (no answer: the line reads
// all ones) and a write with bad data parity (dropped). It also checks the
// cycle count of one read transfer (49 clocks: 2 idle, 8 request, turnaround, 3
// acknowledge, 33 data, turnaround, 1 idle).
module tb_swd_target;
  logic clk = 0, rst_n;
  logic swdio_i, swdio_o, swdio_oe;
  logic bus_rd, bus_wr, bus_wait;
  logic [5:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic [31:0] regs [64];
  logic wait_on;
  int checks = 0, failures = 0, bus_writes = 0;

  swd_target dut (.*);
  swd_host_model host (.clk(clk), .t_o(swdio_o), .t_oe(swdio_oe), .swdio(swdio_i));
  always #5 clk = ~clk;

  // bus model: registered read data, wait on index 9 when enabled
  assign bus_wait = wait_on && (bus_addr == 6'd9);
  always_ff @(posedge clk) begin
    if (bus_rd) bus_rdata <= regs[bus_addr] ^ 32'h5A5A_0000;
    if (bus_wr) begin regs[bus_addr] <= bus_wdata; bus_writes++; end
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d; logic [2:0] ack; logic ok;
    int t0, t1;
    for (int i = 0; i < 64; i++) regs[i] = 32'(i * 32'h01010101);
    rst_n = 0; wait_on = 0; bus_rdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    host.line_reset();
    host.transfer(1'b0, 1'b1, 2'd0, '0, ack, d, ok);
    check(32'(ack), 32'(sensor_pkg::SWD_ACK_OK), "IDCODE ack");
    check(d, 32'h0BA0_1477, "IDCODE");
    check(32'(ok), 1, "IDCODE parity");
    // power-up request is acknowledged
    host.dp_write(2'd1, 32'h5000_0000);
    host.dp_read(2'd1, d);
    check(d, 32'hF000_0000, "CTRL/STAT ack bits");
    // AP writes in two banks
    host.dp_write(2'd2, 32'h0000_0010);        // bank 1 -> indices 4..7
    host.ap_write(2'd3, 32'hDEAD_BEEF);
    repeat (2) @(posedge clk);
    check(regs[7], 32'hDEAD_BEEF, "AP write bank1 idx3");
    host.dp_write(2'd2, 32'h0000_0020);        // bank 2 -> indices 8..11
    host.ap_write(2'd0, 32'h1234_5678);
    repeat (2) @(posedge clk);
    check(regs[8], 32'h1234_5678, "AP write bank2 idx0");
    // AP reads
    host.ap_read(2'd0, d);
    check(d, 32'h1234_5678 ^ 32'h5A5A_0000, "AP read idx8");
    host.dp_read(2'd3, d);
    check(d, 32'h1234_5678 ^ 32'h5A5A_0000, "RDBUFF");
    host.dp_write(2'd2, 32'h0000_0010);
    host.ap_read(2'd3, d);
    check(d, 32'hDEAD_BEEF ^ 32'h5A5A_0000, "AP read idx7");
    // cycle count of one read transfer
    @(negedge clk); t0 = $time;
    host.transfer(1'b1, 1'b1, 2'd2, '0, ack, d, ok);
    t1 = $time;
    check(32'((t1 - t0) / 10), 32'd49, "read transfer length in clocks");
    check(d, regs[6] ^ 32'h5A5A_0000, "AP read idx6");
    // WAIT on index 9
    wait_on = 1;
    host.dp_write(2'd2, 32'h0000_0020);
    host.transfer(1'b1, 1'b1, 2'd1, '0, ack, d, ok);
    check(32'(ack), 32'(sensor_pkg::SWD_ACK_WAIT), "WAIT ack");
    wait_on = 0;
    host.transfer(1'b1, 1'b1, 2'd1, '0, ack, d, ok);
    check(32'(ack), 32'(sensor_pkg::SWD_ACK_OK), "OK after WAIT");
    check(d, regs[9] ^ 32'h5A5A_0000, "read after WAIT");
    // bad request parity: no response
    host.transfer(1'b1, 1'b1, 2'd1, '0, ack, d, ok, 1'b1);
    check(32'(ack), 32'h7, "no answer to bad parity");
    // target recovers after a line reset
    host.line_reset();
    host.dp_read(2'd0, d);
    check(d, 32'h0BA0_1477, "IDCODE after recovery");
    // write with bad data parity is dropped
    begin
      int wb;
      logic [7:0] req;
      wb = bus_writes;
      req = {1'b1, 1'b0, ^{1'b1, 1'b0, 2'd2}, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1};
      host.drive(0); host.drive(0);
      for (int i = 0; i < 8; i++) host.drive(req[i]);
      @(negedge clk); host.host_oe = 0;
      repeat (3) @(negedge clk);
      for (int i = 0; i < 32; i++) host.drive(1'b0);
      host.drive(1'b1);                  // wrong parity for all-zero data
      host.drive(0); host.drive(0);
      repeat (4) @(posedge clk);
      check(32'(bus_writes - wb), 0, "write with bad parity dropped");
      check(regs[10], 32'(10 * 32'h01010101), "register unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
