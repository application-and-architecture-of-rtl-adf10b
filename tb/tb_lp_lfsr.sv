// tb_lp_lfsr: checks that the low-power LFSR starts from the Gray code of the
// seed and then follows the XOR feedback sequence, for several random seeds.
module tb_lp_lfsr;
  import atpg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, step = 0;
  logic [9:0] seed = '0, pattern;
  int unsigned model;

  lp_lfsr #(.W(10), .TAPS(10'b10_0000_0001)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 20; s++) begin
      seed = (s == 0) ? 10'b0100101011 : 10'($urandom_range(1, 1023));
      load = 1; @(posedge clk); #1 load = 0;
      model = ref_gray(seed, 10);
      checks++;
      if (pattern !== 10'(model)) begin failures++; $display("seed %b -> %b", seed, pattern); end
      step = 1;
      for (int i = 0; i < 100; i++) begin
        @(posedge clk); #1;
        model = ref_lfsr_next(model, 10'h201, 10);
        checks++;
        if (pattern !== 10'(model)) failures++;
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
