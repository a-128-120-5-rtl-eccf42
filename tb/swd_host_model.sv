// swd_host_model: behavioural SWD host used by the testbenches.
// Drives the data line on the falling clock edge and samples the target on
// the falling edge, one clock after the target changed it. When neither side
// drives, the line reads 1 (pull-up). Tasks:
//   line_reset()                       - 56 ones then two idle zeros
//   transfer(ap, rnw, a, wdata, ack, rdata, par_ok, bad_parity)
//                                      - one SWD transfer
//   ap_read / ap_write / dp_read / dp_write - convenience wrappers that retry on WAIT
module swd_host_model (
  input  logic clk,
  input  logic t_o,
  input  logic t_oe,
  output logic swdio
);

  logic host_oe = 1'b1;
  logic host_val = 1'b0;
  int   waits = 0;

  assign swdio = host_oe ? host_val : (t_oe ? t_o : 1'b1);

  task automatic drive(input logic b);
    @(negedge clk); host_oe = 1'b1; host_val = b;
  endtask

  task automatic line_reset();
    for (int i = 0; i < 56; i++) drive(1'b1);
    drive(1'b0); drive(1'b0);
  endtask

  task automatic transfer(input logic ap, input logic rnw, input logic [1:0] a,
                          input logic [31:0] wdata, output logic [2:0] ack,
                          output logic [31:0] rdata, output logic par_ok,
                          input logic bad_parity = 1'b0);
    logic [7:0] req;
    logic p;
    req = {1'b1, 1'b0, (^{ap, rnw, a}) ^ bad_parity, a[1], a[0], rnw, ap, 1'b1};
    drive(1'b0); drive(1'b0);
    for (int i = 0; i < 8; i++) drive(req[i]);
    @(negedge clk); host_oe = 1'b0;                 // turnaround
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); ack[i] = swdio;
    end
    rdata = '0; par_ok = 1'b1;
    if (ack == sensor_pkg::SWD_ACK_OK && rnw) begin
      for (int i = 0; i < 32; i++) begin @(negedge clk); rdata[i] = swdio; end
      @(negedge clk); p = swdio;
      par_ok = (p == ^rdata);
      @(negedge clk); host_oe = 1'b0;               // turnaround
      drive(1'b0);
    end else if (ack == sensor_pkg::SWD_ACK_OK) begin
      for (int i = 0; i < 32; i++) drive(wdata[i]);
      drive(^wdata);
      drive(1'b0);
    end else begin
      drive(1'b0);
    end
  endtask

  task automatic ap_read(input logic [1:0] a, output logic [31:0] rdata);
    logic [2:0] ack; logic ok;
    forever begin
      transfer(1'b1, 1'b1, a, '0, ack, rdata, ok);
      if (ack != sensor_pkg::SWD_ACK_WAIT) break;
      waits++;
      repeat (8) drive(1'b0);
    end
    if (ack != sensor_pkg::SWD_ACK_OK || !ok) $display("swd_host_model: bad AP read ack=%b par=%b", ack, ok);
  endtask

  task automatic ap_write(input logic [1:0] a, input logic [31:0] wdata);
    logic [2:0] ack; logic [31:0] d; logic ok;
    transfer(1'b1, 1'b0, a, wdata, ack, d, ok);
    if (ack != sensor_pkg::SWD_ACK_OK) $display("swd_host_model: bad AP write ack=%b", ack);
  endtask

  task automatic dp_write(input logic [1:0] a, input logic [31:0] wdata);
    logic [2:0] ack; logic [31:0] d; logic ok;
    transfer(1'b0, 1'b0, a, wdata, ack, d, ok);
  endtask

  task automatic dp_read(input logic [1:0] a, output logic [31:0] rdata);
    logic [2:0] ack; logic ok;
    transfer(1'b0, 1'b1, a, '0, ack, rdata, ok);
  endtask

  // sensor register access: selects the bank of four, then accesses the AP
  task automatic reg_write(input int idx, input logic [31:0] wdata);
    dp_write(2'd2, 32'(idx >> 2) << 4);
    ap_write(2'(idx), wdata);
  endtask

  task automatic reg_read(input int idx, output logic [31:0] rdata);
    dp_write(2'd2, 32'(idx >> 2) << 4);
    ap_read(2'(idx), rdata);
  endtask

endmodule
