// tb_sram_bank: self-checking test of one SRAM bank (8192 x 32).
// Writes random data to every address, reads it back with the one-cycle read
// latency, and checks read-during-write returns the old word.
module tb_sram_bank;
  localparam int DEPTH = 8192;
  logic clk = 0, rd_en, wr_en;
  logic [12:0] rd_addr, wr_addr;
  logic [31:0] rd_data, wr_data;
  logic [31:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sram_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 13'(a); wr_data = $urandom; ref_mem[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1; rd_addr = 13'((a * 37) % DEPTH);
      @(negedge clk);
      checks++;
      if (rd_data != ref_mem[(a * 37) % DEPTH]) begin
        failures++; if (failures < 10) $display("FAIL addr %0d", (a * 37) % DEPTH);
      end
    end
    // read and write the same address in one cycle: old data comes out
    rd_en = 1; rd_addr = 13'd100; wr_en = 1; wr_addr = 13'd100; wr_data = ~ref_mem[100];
    @(negedge clk);
    checks++; if (rd_data != ref_mem[100]) begin failures++; $display("FAIL read-during-write"); end
    wr_en = 0;
    @(negedge clk);
    checks++; if (rd_data != ~ref_mem[100]) begin failures++; $display("FAIL write after read-during-write"); end
    // rd_en low holds the output
    rd_en = 0; rd_addr = 13'd5; @(negedge clk);
    checks++; if (rd_data != ~ref_mem[100]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
