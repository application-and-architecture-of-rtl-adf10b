// tb_misr: random response stream into the 10-bit MISR, signature checked
// every clock against the per-stage reference; also checks hold with en low,
// clear, and that a single flipped input bit changes the final signature.
module tb_misr;
  import atpg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic [9:0] d = '0, sig;
  int unsigned model;

  misr #(.W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] good_sig;
    logic [9:0] stream [64];
    @(posedge clk); #1 rst = 0;
    checks++; if (sig !== '0) failures++;
    model = 0;
    for (int i = 0; i < 1000; i++) begin
      d = 10'($urandom); en = ($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      if (en) model = ref_misr_next(model, d, 0, 10);
      checks++;
      if (sig !== 10'(model)) begin failures++; $display("sig %b exp %b", sig, 10'(model)); end
    end
    // aliasing check: one flipped bit in a 64-response stream
    for (int i = 0; i < 64; i++) stream[i] = 10'($urandom);
    for (int pass = 0; pass < 2; pass++) begin
      clear = 1; en = 1; @(posedge clk); #1 clear = 0;
      checks++; if (sig !== '0) failures++;
      for (int i = 0; i < 64; i++) begin
        d = stream[i];
        if (pass == 1 && i == 20) d[3] = ~d[3];
        @(posedge clk); #1;
      end
      if (pass == 0) good_sig = sig;
      else begin checks++; if (sig === good_sig) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
