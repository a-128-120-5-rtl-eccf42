// swd_target: ARM Serial Wire Debug target, the sensor's only data interface.
//
// The host drives the single bidirectional data line (SWDIO) and the system
// clock; the whole chip runs on that clock. The target samples SWDIO on the
// rising edge and changes its own output just after the rising edge. A
// transfer is
//   request (8 bits: start=1, APnDP, RnW, A[2], A[3], parity, stop=0, park=1),
//   one turnaround cycle, a 3-bit acknowledge (OK 1-0-0, WAIT 0-1-0, sent
//   first bit first), then either 32 read data bits + parity and a turnaround,
//   or a turnaround and 32 write data bits + parity from the host.
// All fields are sent LSB first; parity is even over the bits it covers.
// A request with a bad parity, stop or park bit gets no answer. 50 or more
// consecutive ones (line reset) return the target to the idle state; a start
// bit is only accepted after at least one idle 0 has been seen.
//
// Debug port registers: IDCODE (read, A=0x0), ABORT (write, A=0x0, ignored),
// CTRL/STAT (A=0x4, power-up requests mirrored as acknowledged), SELECT (write,
// A=0x8, bits [7:4] select a bank of four access port registers) and RDBUFF
// (read, A=0xC, last access port read). Access port transfers go to the
// sensor register bus with index {SELECT[7:4], A[3:2]}. Unlike ARM's
// memory access port, reads are not posted: an AP read returns its own data.
// bus_addr is set from A[3:2] two clocks before the request ends. The bus
// answers a read one cycle after bus_rd; bus_wait, sampled with the
// request, turns the acknowledge into WAIT and suppresses the access.
// The use of SWD follows the sensor description; the register map, non-posted
// reads and the absence of a JTAG-to-SWD switch sequence are this design's
// choices.
module swd_target
  import sensor_pkg::SWD_ACK_OK, sensor_pkg::SWD_ACK_WAIT;
#(
  parameter logic [31:0] IDCODE = 32'h0BA0_1477
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        swdio_i,
  output logic        swdio_o,
  output logic        swdio_oe,
  // sensor register bus
  output logic        bus_rd,
  output logic        bus_wr,
  output logic [5:0]  bus_addr,
  output logic [31:0] bus_wdata,
  input  logic [31:0] bus_rdata,
  input  logic        bus_wait
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_TRN, S_ACK, S_RDATA, S_WDATA} state_e;

  state_e      state;
  logic [5:0]  bit_cnt;
  logic [5:0]  req;           // request bits after the start bit, bit 0 = APnDP
  logic        armed;         // an idle 0 was seen
  logic [5:0]  ones;          // consecutive ones, saturating at 50
  logic [2:0]  ack;
  logic        is_read, is_ap;
  logic [1:0]  a32;
  logic [32:0] shreg;         // read data + parity, or write data being received
  logic        rd_pending;    // latch bus_rdata in the next cycle
  logic [31:0] ctrl_stat, rdbuff;
  logic [3:0]  apbank;

  // request fields once all 8 bits are in (last bit arrives now)
  logic [6:0]  req_full;
  logic        req_ok;
  assign req_full = {swdio_i, req};           // {park, stop, parity, A3, A2, RnW, APnDP}
  assign req_ok   = (^req_full[4:0] == 1'b0) && !req_full[5] && req_full[6];

  logic line_reset;
  assign line_reset = (ones == 6'd49) && swdio_i && !swdio_oe;

  // data word for a debug port read
  logic [31:0] dp_rdata;
  always_comb begin
    unique case (req_full[3:2])
      2'd0:    dp_rdata = IDCODE;
      2'd1:    dp_rdata = {ctrl_stat[30], ctrl_stat[30], ctrl_stat[28], ctrl_stat[28], ctrl_stat[27:0]};
      2'd2:    dp_rdata = 32'h0;
      default: dp_rdata = rdbuff;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; bit_cnt <= '0; req <= '0; armed <= 1'b0; ones <= '0;
      ack <= SWD_ACK_OK; is_read <= 1'b0; is_ap <= 1'b0; a32 <= '0; shreg <= '0;
      rd_pending <= 1'b0; ctrl_stat <= '0; rdbuff <= '0; apbank <= '0;
      swdio_o <= 1'b0; swdio_oe <= 1'b0;
      bus_rd <= 1'b0; bus_wr <= 1'b0; bus_addr <= '0; bus_wdata <= '0;
    end else begin
      bus_rd     <= 1'b0;
      bus_wr     <= 1'b0;
      rd_pending <= bus_rd;
      if (rd_pending) begin
        shreg  <= {^bus_rdata, bus_rdata};
        rdbuff <= bus_rdata;
      end

      if (!swdio_oe) ones <= swdio_i ? ((ones == 6'd50) ? ones : ones + 6'd1) : '0;

      if (line_reset) begin
        state <= S_IDLE;
        armed <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: begin
            if (swdio_i && armed) begin
              state   <= S_REQ;
              bit_cnt <= '0;
            end
            armed <= !swdio_i;
          end
          S_REQ: begin
            if (bit_cnt < 6'd6) req[bit_cnt[2:0]] <= swdio_i;
            bit_cnt <= bit_cnt + 6'd1;
            // A[3:2] are known from here on: present the address early so
            // that bus_wait is valid when the request completes
            if (bit_cnt == 6'd4) bus_addr <= {apbank, req[3:2]};
            if (bit_cnt == 6'd6) begin
              if (req_ok) begin
                state   <= S_TRN;
                is_ap   <= req_full[0];
                is_read <= req_full[1];
                a32     <= req_full[3:2];
                if (req_full[0] && bus_wait) begin
                  ack <= SWD_ACK_WAIT;
                end else begin
                  ack <= SWD_ACK_OK;
                  if (req_full[1]) begin
                    if (req_full[0]) begin
                      bus_rd   <= 1'b1;
                    end else begin
                      shreg <= {^dp_rdata, dp_rdata};
                    end
                  end
                end
              end else begin
                state <= S_IDLE;          // protocol error: no response
                armed <= 1'b0;
              end
            end
          end
          S_TRN: begin
            swdio_oe <= 1'b1;
            swdio_o  <= ack[0];
            bit_cnt  <= 6'd1;
            state    <= S_ACK;
          end
          S_ACK: begin
            bit_cnt <= bit_cnt + 6'd1;
            if (bit_cnt == 6'd3) begin
              bit_cnt <= '0;
              if (ack == SWD_ACK_OK && is_read) begin
                state   <= S_RDATA;
                swdio_o <= shreg[0];
                shreg   <= {1'b0, shreg[32:1]};
                bit_cnt <= 6'd1;
              end else begin
                swdio_oe <= 1'b0;
                swdio_o  <= 1'b0;
                state    <= (ack == SWD_ACK_OK) ? S_WDATA : S_IDLE;
                armed    <= 1'b0;
              end
            end else begin
              swdio_o <= ack[bit_cnt[1:0]];
            end
          end
          S_RDATA: begin
            bit_cnt <= bit_cnt + 6'd1;
            if (bit_cnt == 6'd33) begin
              swdio_oe <= 1'b0;
              swdio_o  <= 1'b0;
              state    <= S_IDLE;
              armed    <= 1'b0;
            end else begin
              swdio_o <= shreg[0];
              shreg   <= {1'b0, shreg[32:1]};
            end
          end
          S_WDATA: begin
            shreg   <= {swdio_i, shreg[32:1]};
            bit_cnt <= bit_cnt + 6'd1;
            if (bit_cnt == 6'd32) begin
              state <= S_IDLE;
              armed <= 1'b0;
              if (^{swdio_i, shreg[32:1]} == 1'b0) begin   // parity good
                if (is_ap) begin
                  bus_wr    <= 1'b1;
                  bus_wdata <= shreg[32:1];
                end else if (a32 == 2'd1) begin
                  ctrl_stat <= shreg[32:1];
                end else if (a32 == 2'd2) begin
                  apbank <= shreg[8:5];
                end
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
