// drift_comp: background frequency-drift compensation of the ring oscillator.
//
// The user programs each gate edge as a fraction of the system clock period
// (8 bits, units of 1/256 period). The oscillator's speed drifts with
// voltage and temperature, so the number of RO periods per system clock
// period (ro_count, measured by the gate generator) varies. This block turns
// every user fraction f into an RO tap number, tap = (f * ro_count) >> 8, so
// a gate stays at the same place in time however fast the oscillator runs.
// One multiplier is time-shared: the six edges (start/stop of gates A, B, C)
// are updated in turn, one per system clock, so every tap follows the
// measurement within six cycles. Compensation by the controller through the
// RO period count follows the sensor description; the fractional register
// format and the round-robin schedule are this design's choices.
//
// Interface: cfg[i]  - user fractions, order a_start, a_stop, b_start, b_stop,
//                      c_start, c_stop
//            taps[i] - compensated tap numbers, same order, registered
module drift_comp #(
  parameter int unsigned TAP_W = sensor_pkg::TAP_W,
  parameter int unsigned FRAC_W = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [TAP_W-1:0]            ro_count,
  input  logic [5:0][FRAC_W-1:0]      cfg,
  output logic [5:0][TAP_W-1:0]       taps
);

  logic [2:0]               idx;
  logic [TAP_W+FRAC_W-1:0]  prod;

  assign prod = (TAP_W+FRAC_W)'(cfg[idx]) * (TAP_W+FRAC_W)'(ro_count);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      taps <= '0;
    end else begin
      taps[idx] <= prod[FRAC_W +: TAP_W];
      idx       <= (idx == 3'd5) ? 3'd0 : idx + 3'd1;
    end
  end

endmodule
