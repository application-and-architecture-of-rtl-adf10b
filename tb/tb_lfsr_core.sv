// tb_lfsr_core: checks the 10-bit LFSR against the reference pattern
// sequence 0101100000, 1011000000, 0110000001, 1100000011, 1000000110,
// 0000001101, then against a model for a full cycle (889 states for the
// {9,0} tap mask), and checks that load has priority and step=0 holds.
module tb_lfsr_core;
  import atpg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, step = 0;
  logic [9:0] load_val = '0, q;
  int unsigned model;
  logic [9:0] seq [6] = '{10'b0101100000, 10'b1011000000, 10'b0110000001,
                          10'b1100000011, 10'b1000000110, 10'b0000001101};

  lfsr_core #(.W(10), .TAPS(10'b10_0000_0001)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [9:0] exp);
    checks++;
    if (q !== exp) begin failures++; $display("q=%b exp=%b", q, exp); end
  endtask

  initial begin
    @(posedge clk); #1 rst = 0;
    chk('0);
    load = 1; load_val = seq[0]; step = 1;   // load wins over step
    @(posedge clk); #1 load = 0;
    chk(seq[0]);
    for (int i = 1; i < 6; i++) begin
      @(posedge clk); #1 chk(seq[i]);
    end
    step = 0;
    repeat (3) @(posedge clk);
    #1 chk(seq[5]);
    // full cycle from a fixed start
    load = 1; load_val = 10'h001; @(posedge clk); #1 load = 0; step = 1;
    model = 1;
    for (int i = 1; i <= 889; i++) begin
      @(posedge clk); #1;
      model = ref_lfsr_next(model, 10'h201, 10);
      chk(10'(model));
      if (i < 889) begin checks++; if (q == 10'h001) failures++; end
    end
    checks++; if (q !== 10'h001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
