// tb_gray_code_gen: exhaustive check of the 10-bit binary-to-Gray converter
// against a bit-by-bit reference, plus the 5-bit example 01001 -> 01101 and
// the one-bit-change property of consecutive Gray codes.
module tb_gray_code_gen;
  import atpg_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [9:0] bin, gray;
  logic [4:0] bin5, gray5;
  logic [9:0] prev;

  gray_code_gen #(.W(10)) dut (.bin, .gray);
  gray_code_gen #(.W(5))  dut5 (.bin(bin5), .gray(gray5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bin5 = 5'b01001; #1;
    checks++; if (gray5 !== 5'b01101) begin failures++; $display("example: %b", gray5); end
    for (int v = 0; v < 1024; v++) begin
      bin = 10'(v); #1;
      checks++;
      if (gray !== 10'(ref_gray(v, 10))) begin
        failures++; $display("bin %b gray %b", bin, gray);
      end
      if (v > 0) begin
        checks++;
        if ($countones(gray ^ prev) != 1) failures++;
      end
      prev = gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
