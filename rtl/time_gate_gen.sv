// time_gate_gen: digital part of the on-chip time gate generator.
//
// The ring oscillator (an analog block outside this module, period about
// 390 ps) clocks a tap counter. The oscillator and the counter restart on
// every rising edge of the system clock, so jitter cannot accumulate from one
// system clock period to the next. Each gate output is high while the tap
// count lies in [start, stop); gates A and B go to the pixel array, gate C
// drives the external pulsed light source. The number of RO periods in the
// last system clock period is kept in ro_count for the MCU's drift
// compensation loop.
//
// Timing: the system clock is sampled by a two-flop synchroniser in the RO
// domain, so tap 0 begins three RO periods after the system clock edge; the
// gate outputs are registered, adding one more period. These fixed offsets
// are the same for every cycle and are absorbed by the start/stop values.
// The taps are written by the MCU and change rarely (quasi-static), and
// ro_count is stable for most of a system clock period after it is updated,
// so both cross the clock boundary without further synchronisation.
// Restart per system clock, start/stop registers, the three gates and the
// period count follow the sensor description; the counter and comparator
// structure is this design's own.
module time_gate_gen #(
  parameter int unsigned TAP_W = sensor_pkg::TAP_W
) (
  input  logic             ro_clk,
  input  logic             rst_n,      // asynchronous, already synchronised to release in ro_clk
  input  logic             sys_clk,
  input  logic [TAP_W-1:0] a_start, a_stop,
  input  logic [TAP_W-1:0] b_start, b_stop,
  input  logic [TAP_W-1:0] c_start, c_stop,
  output logic             gate_a,
  output logic             gate_b,
  output logic             gate_c,
  output logic [TAP_W-1:0] ro_count
);

  logic [2:0]       sys_sync;
  logic             restart;
  logic [TAP_W-1:0] tap;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) sys_sync <= '0;
    else        sys_sync <= {sys_sync[1:0], sys_clk};
  end

  assign restart = sys_sync[1] & ~sys_sync[2];

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      tap      <= '0;
      ro_count <= '0;
    end else if (restart) begin
      tap      <= '0;
      ro_count <= tap + 1'b1;             // periods since the previous restart
    end else if (tap != '1) begin
      tap      <= tap + 1'b1;
    end
  end

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_a <= 1'b0; gate_b <= 1'b0; gate_c <= 1'b0;
    end else begin
      gate_a <= (tap >= a_start) && (tap < a_stop);
      gate_b <= (tap >= b_start) && (tap < b_stop);
      gate_c <= (tap >= c_start) && (tap < c_stop);
    end
  end

endmodule
