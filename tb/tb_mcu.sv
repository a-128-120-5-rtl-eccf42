// tb_mcu: self-checking test of the controller at a reduced array size
// (4 rows x 8 columns), driving its register bus directly.
// A monitor checks every pixel pair handed to the image processing block
// against the expected row/pair order and counts rows, frames and images.
// Checked: global shutter (global reset, EXPOSURE cycles of exposure, row
// sequence select/latch/reset/pairs and the frame length in clocks),
// oversampling (pix_first only in the first of NFRAMES frames), 32-bit mode
// pause and host read addressing with WAIT before data is ready, rolling
// shutter (reset-only first sweep, exposure kept on, extra row cycles),
// float ping-pong in continuous mode with bank swaps and a stall while the
// host is late, and drift-compensated gate taps.
module tb_mcu;
  import sensor_pkg::*;
  localparam int ROWS = 4, COLS = 8, NPIX = ROWS * COLS;
  logic clk = 0, rst_n;
  logic bus_rd, bus_wr, bus_wait;
  logic [5:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata;
  logic exposure, rst_all, gate_en, interleave, col_latch;
  logic [ROWS-1:0] row_rst;
  logic [1:0] row_sel;
  logic [1:0] pair_addr;
  acc_mode_e acc_mode;
  logic act_bank, pix_valid, pix_first, host_rd_en, host_rd_bank;
  logic [3:0] pix_addr, host_rd_addr;
  logic [31:0] host_rd_data;
  logic [7:0] ro_count;
  logic ro_en;
  logic [5:0][7:0] taps;
  logic ev_image_done, ev_stall, ev_swap;
  int checks = 0, failures = 0;
  int n_pairs = 0, n_first = 0, n_images = 0, n_stall = 0, n_swap = 0, n_grst = 0, n_latch = 0;
  int exp_cycles = 0;

  mcu #(.COLS(COLS), .ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  // image data model: registered, depends on address and bank
  always_ff @(posedge clk) if (host_rd_en) host_rd_data <= {16'hA5A5, 7'd0, host_rd_bank, 4'd0, host_rd_addr};

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic wr(input reg_idx_e r, input logic [31:0] d);
    @(negedge clk); bus_wr = 1; bus_addr = 6'(r); bus_wdata = d;
    @(negedge clk); bus_wr = 0;
  endtask
  task automatic rd(input reg_idx_e r, output logic [31:0] d, output logic w);
    @(negedge clk); bus_rd = 1; bus_addr = 6'(r); #1 w = bus_wait;
    @(negedge clk); bus_rd = 0; d = bus_rdata;
  endtask

  // monitor of the array / pipeline sequence
  int exp_row = 0, exp_pair = 0, lat_row = 0;
  logic latched = 0, row_was_reset = 0;
  always @(posedge clk) if (rst_n) begin
    if (rst_all) n_grst++;
    if (exposure && !rst_all) exp_cycles++;
    if (col_latch) begin
      n_latch++; latched <= 1;
      if (row_sel != 2'(lat_row)) begin failures++; $display("FAIL latch of row %0d, expected %0d", row_sel, lat_row); end
      lat_row = (lat_row + 1) % ROWS;
    end
    if (row_rst != 0) begin
      row_was_reset <= 1;
      if (row_rst != (1 << row_sel) || !latched) begin failures++; $display("FAIL row reset %b", row_rst); end
    end
    if (pix_valid) begin
      n_pairs++;
      if (pix_first) n_first++;
      checks++;
      if (pix_addr != {2'(exp_row), 2'(exp_pair)} || pair_addr != 2'(exp_pair) || !row_was_reset) begin
        failures++; $display("FAIL pair addr %0d expected row %0d pair %0d", pix_addr, exp_row, exp_pair);
      end
      if (exp_pair == COLS/2 - 1) begin
        exp_pair = 0; exp_row = (exp_row + 1) % ROWS; latched <= 0; row_was_reset <= 0;
      end else exp_pair++;
    end
    if (ev_image_done) n_images++;
    if (ev_stall) n_stall++;
    if (ev_swap) n_swap++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] d; logic w;
    int t0, t1;
    rst_n = 0; bus_rd = 0; bus_wr = 0; bus_addr = 0; bus_wdata = 0; ro_count = 8'd205;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- drift compensated taps ----
    wr(REG_GATE_A, {8'd128, 8'd64});       // start 1/4, stop 1/2 of the clock period
    repeat (8) @(negedge clk);
    check(taps[0], (64 * 205) >> 8, "tap a_start");
    check(taps[1], (128 * 205) >> 8, "tap a_stop");
    ro_count = 8'd180;
    repeat (8) @(negedge clk);
    check(taps[1], (128 * 180) >> 8, "tap a_stop after drift");
    rd(REG_TAPS_A, d, w);
    check(d, {16'd0, 8'((128 * 180) >> 8), 8'((64 * 180) >> 8)}, "TAPS_A register");

    // ---- global shutter, 32-bit, 3 frames ----
    rd(REG_RD_DATA, d, w);
    check(w, 1, "WAIT before any image");
    wr(REG_NFRAMES, 3);
    wr(REG_EXPOSURE, 20);
    exp_cycles = 0;
    @(negedge clk); t0 = $time / 10;
    wr(REG_CTRL, 32'h0000_0019);             // start, global, gate enable, 32-bit
    repeat (3) @(negedge clk);
    check(ro_en, 1, "RO enabled for the global reset with gating");
    repeat (10) @(negedge clk);
    check(ro_en & exposure, 1, "RO enabled while exposing with gating");
    wait (ev_image_done); @(negedge clk); t1 = $time / 10; @(negedge clk);
    check(n_grst, 3 * 8, "global reset cycles");
    check(exp_cycles, 60, "exposure cycles (3 x 20)");
    check(n_pairs, 3 * ROWS * COLS / 2, "pairs in 3 frames");
    check(n_first, ROWS * COLS / 2, "pairs flagged first");
    // frame: FRAME + 8 GRST + 20 EXP + rows*(3 + 4) + FRAME_END = 58 clocks,
    // plus the register write and the start request
    check(t1 - t0, 3 * (1 + 8 + 20 + ROWS * (3 + COLS / 2) + 1) + 2, "clocks for 3 frames");
    check(exposure, 0, "integration paused");
    check(ro_en, 0, "RO stopped while paused");
    for (int k = 0; k < NPIX; k++) begin
      rd(REG_RD_DATA, d, w);
      check(w, 0, "no WAIT when ready");
      check(d, {16'hA5A5, 7'd0, 1'(k % 2), 4'd0, 4'(k / 2)}, "32-bit pixel address/bank");
    end
    repeat (3) @(negedge clk);
    rd(REG_STATUS, d, w);
    check(d[1:0], 0, "idle and no data after host read all pixels");
    rd(REG_RD_DATA, d, w);
    check(w, 1, "WAIT again after read-out");

    // ---- rolling shutter, float, continuous ping-pong ----
    n_pairs = 0; n_first = 0; n_images = 0; n_latch = 0;
    wr(REG_NFRAMES, 2);
    wr(REG_EXPOSURE, 5);
    wr(REG_CTRL, 32'h0000_0045);             // start, float, rolling, continuous
    wait (n_latch == ROWS); @(negedge clk);
    check(n_pairs, 0, "first rolling sweep only resets rows");
    wait (n_images == 1); @(negedge clk);
    check(exposure, 1, "rolling exposure stays on");
    check(n_pairs, 2 * ROWS * COLS / 2, "pairs in rolling image");
    wait (n_swap == 1); @(negedge clk);
    check(act_bank, 1, "bank swapped to 1");
    // read half of the image, then let the next image finish: stall
    for (int k = 0; k < NPIX / 4; k++) begin
      rd(REG_RD_DATA, d, w);
      check(d, {16'hA5A5, 7'd0, 1'b0, 4'd0, 4'(k)}, "float word from bank 0");
    end
    wait (n_stall > 20); @(negedge clk);
    check(n_swap, 1, "no swap while the host is late");
    for (int k = NPIX / 4; k < NPIX / 2; k++) rd(REG_RD_DATA, d, w);
    wait (n_swap == 2); @(negedge clk);
    check(act_bank, 0, "bank swapped back to 0");
    for (int k = 0; k < NPIX / 2; k++) begin
      rd(REG_RD_DATA, d, w);
      check(d, {16'hA5A5, 7'd0, 1'b1, 4'd0, 4'(k)}, "float word from bank 1");
    end
    wr(REG_CTRL, 32'h0000_0004);             // clear continuous
    do rd(REG_STATUS, d, w); while (d[0]);
    check(n_images >= 2, 1, "images in continuous mode");
    $display("mechanisms: images=%0d swaps=%0d stall_cycles=%0d global_resets=%0d", n_images, n_swap, n_stall, n_grst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
