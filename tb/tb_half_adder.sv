// tb_half_adder: exhaustive truth-table check of the one-bit half adder.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic a, b, s, c;

  half_adder dut (.*);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int t;
      {a, b} = 2'(v); #1;
      t = int'(a) + int'(b);
      checks++;
      if ({c, s} !== 2'(t)) begin failures++; $display("%b%b -> c%b s%b", a, b, c, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
