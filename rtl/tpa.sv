// tpa: test pattern analyzer.
//
// At the end of a test session the controller pulses check; on that clock
// the analyzer compares the MISR signature sig with the expected fault-free
// signature golden and registers the outcome: fail = 1 when they differ.
// valid pulses for one clock together with the new fail value, and fail is
// held until the next check or clear. clear and rst are synchronous.
// That the reference is a stored fault-free signature (supplied from outside)
// rather than the raw pattern stream is this design's choice: it lets one
// analyzer serve any circuit under test.
module tpa #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         check,
  input  logic [W-1:0] sig,
  input  logic [W-1:0] golden,
  output logic         fail,
  output logic         valid
);
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      fail  <= 1'b0;
      valid <= 1'b0;
    end else begin
      valid <= check;
      if (check) fail <= (sig != golden);
    end
  end
endmodule
