// tb_half_adder_cut: all 1024 patterns through the five half adders, checked
// against integer addition of the two 5-bit halves; then the stuck-at-0
// fault port on response bit 5.
module tb_half_adder_cut;
  import atpg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [9:0] pattern, response;
  logic fault_inject = 0;

  half_adder_cut #(.W(10), .FAULT_BIT(5)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      logic [9:0] exp;
      pattern = 10'(v); fault_inject = 0; #1;
      exp = 10'(ref_ha(v, 10));
      checks++;
      if (response !== exp) begin failures++; $display("p %b r %b exp %b", pattern, response, exp); end
      fault_inject = 1; #1;
      exp[5] = 1'b0;
      checks++;
      if (response !== exp) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
