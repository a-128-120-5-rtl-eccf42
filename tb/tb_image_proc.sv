// tb_image_proc: self-checking test of the image processing block with its
// two SRAM banks at full size (8192 words each, 7680 pixel pairs per frame).
//  1. 32-bit mode: three frames of random pixel pairs (with random bubbles)
//     are summed; the host reads both banks and compares with a reference.
//  2. Float mode, ping-pong: two frames summed into bank 0; then while the
//     pipeline sums a frame into bank 1 the host reads bank 0 in the same
//     cycles, checking the read port arbitration and the float sums.
// The pipeline rate (one pair per clock) is checked by counting cycles.
module tb_image_proc;
  import sensor_pkg::*;
  localparam int NW = 7680;
  logic clk = 0, rst_n;
  acc_mode_e mode;
  logic act_bank, pix_valid, pix_first, host_rd_en, host_rd_bank;
  logic [12:0] pix_addr, host_rd_addr;
  logic [13:0] pix0, pix1;
  logic [31:0] host_rd_data;
  longint ref0 [NW], ref1 [NW];
  logic [15:0] rf0 [NW], rf1 [NW];
  int checks = 0, failures = 0;

  image_proc dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] ref_enc(input longint v);
    int e = 0;
    while (v >= 4096 && e < 15) begin v = v >> 1; e++; end
    if (v >= 4096) return 16'hFFFF;
    return {4'(e), 12'(v)};
  endfunction
  function automatic longint ref_dec(input logic [15:0] f);
    return longint'(f[11:0]) << f[15:12];
  endfunction

  // send one frame; returns the number of clocks used
  task automatic frame(input logic first, input logic bubbles, output int cycles);
    cycles = 0;
    for (int w = 0; w < NW; w++) begin
      if (bubbles && $urandom_range(7) == 0) begin
        @(negedge clk); pix_valid = 0; cycles++;
      end
      @(negedge clk);
      pix_valid = 1; pix_first = first; pix_addr = 13'(w);
      pix0 = 14'($urandom_range(15360)); pix1 = 14'($urandom_range(15360));
      cycles++;
      if (mode == MODE_LOSSLESS32) begin
        ref0[w] = (first ? 0 : ref0[w]) + pix0;
        ref1[w] = (first ? 0 : ref1[w]) + pix1;
      end else begin
        rf0[w] = ref_enc((first ? 0 : ref_dec(rf0[w])) + pix0);
        rf1[w] = ref_enc((first ? 0 : ref_dec(rf1[w])) + pix1);
      end
    end
    @(negedge clk); pix_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    rst_n = 0; mode = MODE_LOSSLESS32; act_bank = 0; pix_valid = 0; pix_first = 0;
    pix_addr = 0; pix0 = 0; pix1 = 0; host_rd_en = 0; host_rd_addr = 0; host_rd_bank = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // ---- 1. lossless 32-bit ----
    frame(1'b1, 1'b0, cyc);
    checks++;
    if (cyc != NW) begin failures++; $display("FAIL rate: %0d clocks for %0d pairs", cyc, NW); end
    frame(1'b0, 1'b1, cyc);
    frame(1'b0, 1'b0, cyc);
    for (int w = 0; w < NW; w++) begin
      for (int b = 0; b < 2; b++) begin
        @(negedge clk); host_rd_en = 1; host_rd_addr = 13'(w); host_rd_bank = b[0];
        @(negedge clk); host_rd_en = 0;
        checks++;
        if (host_rd_data != 32'(b == 0 ? ref0[w] : ref1[w])) begin
          failures++;
          if (failures < 10) $display("FAIL 32-bit word %0d bank %0d: %0d vs %0d", w, b, host_rd_data, b == 0 ? ref0[w] : ref1[w]);
        end
      end
    end
    // ---- 2. float ping-pong ----
    mode = MODE_FLOAT16; act_bank = 0;
    frame(1'b1, 1'b0, cyc);
    frame(1'b0, 1'b1, cyc);
    // keep the finished image, sum the next one into bank 1 while reading bank 0
    begin
      logic [15:0] img0 [NW], img1 [NW];
      int rd_w = 0;
      img0 = rf0; img1 = rf1;
      act_bank = 1;
      fork
        frame(1'b1, 1'b0, cyc);
        begin
          while (rd_w < NW) begin
            @(negedge clk); host_rd_en = 1; host_rd_addr = 13'(rd_w); host_rd_bank = 1'b0;
            @(posedge clk); #1 host_rd_en = 0;
            @(negedge clk);
            checks++;
            if (host_rd_data != {img1[rd_w], img0[rd_w]}) begin
              failures++;
              if (failures < 10) $display("FAIL float word %0d: %h vs %h", rd_w, host_rd_data, {img1[rd_w], img0[rd_w]});
            end
            rd_w++;
          end
        end
      join
      // bank 1 now holds the single new frame
      for (int w = 0; w < NW; w += 97) begin
        @(negedge clk); host_rd_en = 1; host_rd_addr = 13'(w); host_rd_bank = 1'b1; act_bank = 0;
        @(negedge clk); host_rd_en = 0;
        checks++;
        if (host_rd_data != {rf1[w], rf0[w]}) begin
          failures++; $display("FAIL bank1 word %0d", w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
