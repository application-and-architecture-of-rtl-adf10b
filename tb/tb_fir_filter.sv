// tb_fir_filter: drives random 10-bit samples and checks y(n) against the
// real-coefficient reference (0, 0.1083, 0.5, 0.1081, 0 scaled by 4096),
// including the hold behaviour with step low, clear, a unit impulse
// (which must reproduce the quantised coefficients) and the fault port.
module tb_fir_filter;
  import atpg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, step = 0, fault_inject = 0;
  logic [9:0] x = '0, y;
  int unsigned h [5];   // h[k] = x(n-k) in the model

  fir_filter #(.W(10), .FAULT_BIT(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk();
    logic [9:0] exp;
    exp = 10'(ref_fir(x, h[1], h[2], h[3], h[4]));
    if (fault_inject) exp[0] = 1'b0;
    checks++;
    if (y !== exp) begin failures++; $display("x %0d y %0d exp %0d", x, y, exp); end
  endtask

  task automatic shift_model();
    for (int k = 4; k > 0; k--) h[k] = (k == 1) ? x : h[k-1];
  endtask

  initial begin
    for (int k = 0; k < 5; k++) h[k] = 0;
    @(posedge clk); #1 rst = 0;
    // impulse of 1023: output follows the coefficient profile
    step = 1; x = 10'd1023; #1 chk();
    @(posedge clk); shift_model(); #1 x = 0; chk();
    for (int i = 0; i < 4; i++) begin @(posedge clk); shift_model(); #1 chk(); end
    // random stream
    for (int i = 0; i < 500; i++) begin
      x = 10'($urandom); step = ($urandom_range(0, 3) != 0);
      fault_inject = ($urandom_range(0, 7) == 0);
      #1 chk();
      @(posedge clk); if (step) shift_model(); #1;
    end
    fault_inject = 0;
    clear = 1; @(posedge clk); #1 clear = 0;
    for (int k = 0; k < 5; k++) h[k] = 0;
    x = 10'd600; #1 chk();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
