// soc_test_bench: end-to-end test environment of the sensor SoC, shared by
// the reduced-size and the full-size testbenches.
//
// The SoC is driven only through its pins: a behavioural SWD host on the
// clock and data line, a behavioural ring oscillator (self-reset on every
// system clock edge, adjustable period for drift), and SPAD pulses. Photons
// are fired at a few random pixels every system clock, each at a fixed
// time inside gate A's window (25-33 ns after the clock edge), inside gate
// B's window (54-62 ns) or outside both (66-74 ns). A reference model decides
// for every pulse whether the pixel should count it (exposure on, the
// column's gate open, row not in reset, below full well), follows the row
// latch/reset sequence of the controller to form each frame's counts, sums
// frames into images, and compares the images read back over SWD with it.
//
// FULL = 1 instantiates the SoC with its default parameters (ROWS and COLS
// must then be 120 and 128) and runs one complete float-mode operation;
// FULL = 0 builds the SoC with ROWS x COLS and runs
// all scenarios: global shutter with gates and interleave, pixel saturation,
// 32-bit summation with integration paused for read-out, float ping-pong with
// a host stall, rolling shutter, RO drift, WAIT answers and line reset.
// Every mechanism is counted and one that never happened is a failure.
module soc_test_bench #(
  parameter bit FULL = 1'b0,
  parameter int ROWS = 8,
  parameter int COLS = 16
) ();
  timeunit 1ps; timeprecision 1ps;
  import sensor_pkg::*;
  localparam int SYS  = 80000;               // 12.5 MHz system clock, 1 ps units
  localparam int NPIX = ROWS * COLS;
  localparam int HITS = FULL ? 24 : 6;       // photon pulses per clock

  logic sys_clk = 1'b0, por_n = 1'b0;
  logic swdio_i, swdio_o, swdio_oe, ro_clk, ro_en, gate_c;
  logic [ROWS-1:0][COLS-1:0] spad = '0;
  int checks = 0, failures = 0;

  always #(SYS/2) sys_clk = ~sys_clk;

  swd_host_model host (.clk(sys_clk), .t_o(swdio_o), .t_oe(swdio_oe), .swdio(swdio_i));
  ring_osc_model #(.SYS_PERIOD(SYS)) u_ro (.sys_clk(sys_clk), .en(ro_en), .ro_clk(ro_clk));

  if (FULL) begin : g_dut
    spad_sensor_soc u (.*);
  end else begin : g_dut
    spad_sensor_soc #(.ROWS(ROWS), .COLS(COLS)) u (.*);
  end

  // ---------------- observation of the controller ----------------
  logic mon_exposure, mon_rst_all, mon_latch, mon_first, mon_discard, mon_gate_en, mon_il;
  logic mon_done, mon_stall, mon_swap, mon_rst_n;
  logic [ROWS-1:0] mon_row_rst;
  int   mon_row;
  logic [7:0] mon_tap0;
  assign mon_exposure = g_dut.u.u_mcu.exposure;
  assign mon_rst_all  = g_dut.u.u_mcu.rst_all;
  assign mon_row_rst  = g_dut.u.u_mcu.row_rst;
  assign mon_latch    = g_dut.u.u_mcu.col_latch;
  assign mon_row      = int'(g_dut.u.u_mcu.row_sel);
  assign mon_first    = g_dut.u.u_mcu.first;
  assign mon_discard  = g_dut.u.u_mcu.discard;
  assign mon_gate_en  = g_dut.u.u_mcu.cfg_gate_en;
  assign mon_il       = g_dut.u.u_mcu.cfg_interleave;
  assign mon_done     = g_dut.u.u_mcu.ev_image_done;
  assign mon_stall    = g_dut.u.u_mcu.ev_stall;
  assign mon_swap     = g_dut.u.u_mcu.ev_swap;
  assign mon_rst_n    = g_dut.u.rst_n;
  assign mon_tap0     = g_dut.u.u_mcu.taps[0];

  // ---------------- reference model ----------------
  int pending [ROWS][COLS];                  // what each pixel counter should hold
  longint acc [ROWS][COLS];                  // image being summed
  longint images [$];                        // finished images, pixel after pixel
  int n_counted = 0, n_gated_out = 0, n_lost_reset = 0, n_gate_b = 0, n_saturated = 0;
  int n_global_frames = 0, n_rolling_rows = 0, n_discard_rows = 0;
  int n_images = 0, n_wait = 0, n_stall = 0, n_swap = 0, n_gate_c = 0, n_tap_change = 0;
  logic [7:0] last_tap0 = '0;
  bit fire_on = 1'b0;
  bit prev_rst_all = 1'b0;
  bit sat_pixel = 1'b0;                      // pixel (0,0) fires inside gate A every clock

  task automatic fire(input int r, input int c, input int cls);
    bit open;
    if (!mon_gate_en) open = 1'b1;
    else if (mon_il && (c % 2 == 1)) open = (cls == 1);
    else open = (cls == 0);
    if (mon_row_rst[r] || mon_rst_all || !mon_rst_n) n_lost_reset++;
    else if (mon_exposure && open) begin
      if (pending[r][c] == 15360) n_saturated++;
      else pending[r][c]++;
      n_counted++;
      if (cls == 1) n_gate_b++;
    end else if (mon_exposure) n_gated_out++;
    spad[r][c] = 1'b1;
    #100 spad[r][c] = 1'b0;
  endtask

  always @(posedge sys_clk) begin
    // at full size photons are only fired while they can count (or be
    // rejected by the gates): every SPAD edge costs simulation time
    if (fire_on && (!FULL || mon_exposure || mon_rst_all)) begin
      for (int i = 0; i < HITS; i++) begin
        automatic int r = $urandom_range(ROWS - 1);
        automatic int c = $urandom_range(COLS - 1);
        automatic int cls = $urandom_range(2);
        automatic int off = (cls == 0 ? 25000 : cls == 1 ? 54000 : 66000) + 300 * i;
        if (!(sat_pixel && r == 0 && c == 0))
          fork begin #(off) fire(r, c, cls); end join_none
      end
      if (sat_pixel) fork begin #(24000) fire(0, 0, 0); end join_none
    end
    // row latch: the frame's counts of that row; row reset: counters cleared
    if (mon_latch) begin
      if (mon_discard) n_discard_rows++;
      else begin
        if (!mon_exposure) ; else n_rolling_rows++;
        for (int c = 0; c < COLS; c++)
          acc[mon_row][c] = (mon_first ? 0 : acc[mon_row][c]) + pending[mon_row][c];
      end
    end
    if (mon_rst_all) begin
      foreach (pending[r, c]) pending[r][c] = 0;
    end
    for (int r = 0; r < ROWS; r++) if (mon_row_rst[r]) for (int c = 0; c < COLS; c++) pending[r][c] = 0;
    if (mon_rst_all && !prev_rst_all) n_global_frames++;
    prev_rst_all = mon_rst_all;
    if (mon_done) begin
      n_images++;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) images.push_back(acc[r][c]);
    end
    if (mon_stall) n_stall++;
    if (mon_swap) n_swap++;
    if (mon_tap0 != last_tap0) n_tap_change++;
    last_tap0 = mon_tap0;
  end
  always @(posedge gate_c) n_gate_c++;

  // ---------------- host helpers ----------------
  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic wait_image();
    logic [31:0] d;
    do host.reg_read(REG_STATUS, d); while (!d[1]);
  endtask

  // read one 32-bit image and compare with the oldest reference image
  task automatic read_image32();
    logic [31:0] d;
    longint ref_img [$];
    for (int k = 0; k < NPIX; k++) ref_img.push_back(images.pop_front());
    host.reg_write(REG_RD_ADDR, 0);
    for (int k = 0; k < NPIX; k++) begin
      host.ap_read(2'(REG_RD_DATA), d);
      check(d, ref_img[k], $sformatf("32-bit pixel %0d", k));
    end
  endtask

  // read one float image (two pixels per word)
  task automatic read_image16();
    logic [31:0] d;
    longint ref_img [$];
    for (int k = 0; k < NPIX; k++) ref_img.push_back(images.pop_front());
    host.reg_write(REG_RD_DATA, 0);     // selects the bank of RD_DATA (write is ignored)
    for (int k = 0; k < NPIX / 2; k++) begin
      host.ap_read(2'(REG_RD_DATA), d);
      check(flt_decode(d[15:0]),  ref_img[2*k],     $sformatf("float pixel %0d", 2*k));
      check(flt_decode(d[31:16]), ref_img[2*k + 1], $sformatf("float pixel %0d", 2*k + 1));
    end
  endtask

  task automatic report_and_finish();
    $display("mechanisms: counted=%0d gated_out=%0d gate_b=%0d lost_in_reset=%0d saturated=%0d",
             n_counted, n_gated_out, n_gate_b, n_lost_reset, n_saturated);
    $display("mechanisms: global_frames=%0d rolling_rows=%0d discard_rows=%0d images=%0d swaps=%0d stall_cycles=%0d waits=%0d/%0d gate_c=%0d tap_changes=%0d",
             n_global_frames, n_rolling_rows, n_discard_rows, n_images, n_swap, n_stall, n_wait, host.waits, n_gate_c, n_tap_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  // ---------------- scenarios ----------------
  initial begin
    logic [31:0] d;
    if (FULL && (ROWS != sensor_pkg::ROWS || COLS != sensor_pkg::COLS)) $fatal(1, "FULL needs the default array size");
    foreach (pending[r, c]) begin pending[r][c] = 0; acc[r][c] = 0; end
    #(SYS * 3 + 1000) por_n = 1'b1;
    host.line_reset();
    host.dp_read(2'd0, d);
    check(d, 32'h0BA0_1477, "IDCODE");
    host.dp_write(2'd1, 32'h5000_0000);
    host.reg_write(REG_GATE_A, {8'd128, 8'd64});      // 20 ns .. 40 ns
    host.reg_write(REG_GATE_B, {8'd200, 8'd160});     // 50 ns .. 62.5 ns
    host.reg_write(REG_GATE_C, {8'd16, 8'd0});        // light pulse 0 .. 5 ns
    fire_on = 1'b1;

    if (FULL) begin
      // one complete operation at full size: 2 gated, interleaved global
      // shutter frames summed as floats, then the whole image read out
      host.reg_write(REG_NFRAMES, 2);
      host.reg_write(REG_EXPOSURE, 60);
      host.reg_write(REG_CTRL, 32'h0000_003D);        // start, float, global, gates, interleave
      wait_image();
      read_image16();
      need(n_counted, "counted photons");
      need(n_gated_out, "photons rejected by the time gate");
      need(n_gate_b, "gate B on odd columns");
      need(n_global_frames, "global shutter frames");
      need(n_swap, "ping-pong swap");
      report_and_finish();
    end

    // ---- 1. global shutter, gated + interleaved, 32-bit, 3 frames, saturation ----
    sat_pixel = 1'b1;
    host.reg_write(REG_NFRAMES, 3);
    host.reg_write(REG_EXPOSURE, 15400);               // long enough for pixel (0,0) to fill
    begin                                              // no image yet: WAIT
      logic [2:0] ack; logic ok;
      host.dp_write(2'd2, 32'(REG_RD_DATA >> 2) << 4);
      host.transfer(1'b1, 1'b1, 2'(REG_RD_DATA), '0, ack, d, ok);
      check(ack, SWD_ACK_WAIT, "WAIT while no image is ready");
      if (ack == SWD_ACK_WAIT) n_wait++;
    end
    host.reg_write(REG_CTRL, 32'h0000_0039);           // start, 32-bit, global, gates, interleave
    wait_image();
    sat_pixel = 1'b0;
    read_image32();
    // ---- 2. RO drift, float ping-pong, continuous, with a late host ----
    u_ro.half_period = 180;
    host.reg_write(REG_NFRAMES, 2);
    host.reg_write(REG_EXPOSURE, 200);
    host.reg_write(REG_CTRL, 32'h0000_007D);           // start, float, global, gates, interleave, continuous
    wait_image();
    repeat (3000) @(posedge sys_clk);                  // late: the next image stalls
    read_image16();
    wait_image();
    host.reg_write(REG_CTRL, 32'h0000_003C);           // clear continuous
    read_image16();
    do host.reg_read(REG_STATUS, d); while (d[0]);
    while (images.size() > 0) begin
      // an image finished after continuous was cleared
      read_image16();
    end
    // ---- 3. rolling shutter, ungated, 32-bit, 2 frames ----
    host.reg_write(REG_NFRAMES, 2);
    host.reg_write(REG_EXPOSURE, 10);
    host.reg_write(REG_CTRL, 32'h0000_0001);           // start, 32-bit, rolling, no gates
    wait_image();
    read_image32();
    do host.reg_read(REG_STATUS, d); while (d[0]);
    // ---- mechanisms ----
    need(n_counted, "counted photons");
    need(n_gated_out, "photons rejected by the time gate");
    need(n_gate_b, "gate B on odd columns (interleave)");
    need(n_saturated, "pixel overflow protection");
    need(n_lost_reset, "photons during row reset");
    need(n_global_frames, "global shutter frames");
    need(n_rolling_rows, "rolling shutter rows");
    need(n_discard_rows, "rolling reset sweep");
    need(n_swap, "ping-pong swap");
    need(n_stall, "stall on late host");
    need(n_wait, "SWD WAIT");
    need(n_gate_c, "gate C light pulses");
    need(n_tap_change > 1 ? 1 : 0, "drift compensation tap update");
    report_and_finish();
  end
endmodule
