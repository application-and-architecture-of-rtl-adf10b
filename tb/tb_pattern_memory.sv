// tb_pattern_memory: writes 64 patterns by pattern number and reads both
// banks back: bank 1 must hold even-numbered and bank 2 odd-numbered
// patterns, with one clock of read latency.
module tb_pattern_memory;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0;
  logic [9:0] wdata = '0, rdata1, rdata2;
  logic [4:0] raddr = '0;
  logic [9:0] ref_mem [64];

  pattern_memory #(.W(10), .NUM_PATTERNS(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 64; i++) begin
      ref_mem[i] = 10'($urandom);
      we = 1; waddr = 6'(i); wdata = ref_mem[i];
      @(posedge clk); #1;
    end
    we = 0;
    // a write with we low must not land
    waddr = 6'd10; wdata = ~ref_mem[10]; @(posedge clk); #1;
    for (int r = 0; r < 32; r++) begin
      raddr = 5'(r);
      @(posedge clk); #1;
      checks++;
      if (rdata1 !== ref_mem[2*r] || rdata2 !== ref_mem[2*r+1]) begin
        failures++; $display("r %0d got %h %h", r, rdata1, rdata2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
