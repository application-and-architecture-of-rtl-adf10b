// tb_tpa: checks the analyzer's registered compare: fail follows
// (sig != golden) only on check, valid is a one-clock pulse after check,
// a difference in any single bit is caught, and clear resets both.
module tb_tpa;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, clear = 0, check = 0;
  logic [9:0] sig = '0, golden = '0;
  logic fail, valid;

  tpa #(.W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_fail;
    @(posedge clk); #1 rst = 0;
    checks++; if (fail !== 0 || valid !== 0) failures++;
    exp_fail = 0;
    for (int i = 0; i < 300; i++) begin
      sig = 10'($urandom); golden = ($urandom_range(0, 1) != 0) ? sig : 10'($urandom);
      check = ($urandom_range(0, 2) == 0);
      @(posedge clk); #1;
      if (check) exp_fail = (sig != golden);
      checks++;
      if (valid !== check || fail !== exp_fail) begin
        failures++; $display("i %0d valid %b fail %b exp %b", i, valid, fail, exp_fail);
      end
    end
    // a difference in any single bit must be caught
    for (int b = 0; b < 10; b++) begin
      sig = 10'($urandom); golden = sig; golden[b] = ~golden[b]; check = 1;
      @(posedge clk); #1;
      checks++; if (fail !== 1) begin failures++; $display("bit %0d missed", b); end
    end
    check = 1; sig = 10'h3; golden = 10'h5; @(posedge clk); #1 check = 0;
    checks++; if (fail !== 1) failures++;
    clear = 1; @(posedge clk); #1 clear = 0;
    checks++; if (fail !== 0 || valid !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
