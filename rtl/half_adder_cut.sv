// half_adder_cut: half-adder circuit under test (CUT).
//
// The W-bit test pattern is split into two W/2-bit operands: the upper half
// is A and the lower half is B. W/2 half adders work bit by bit, and the W/2
// sum bits and W/2 carry bits are packed back into a W-bit response,
// {sum, carry}, that feeds the MISR. The split follows the description of the
// half-adder experiment; the order sum-then-carry in the response is this
// design's choice.
//
// fault_inject forces response bit FAULT_BIT to 0 (a stuck-at-0 fault on
// that output), so the test logic can be shown to flag a faulty CUT. This
// port is this design's addition. Combinational, no clock.
module half_adder_cut #(
  parameter int unsigned W = 10,
  parameter int unsigned FAULT_BIT = 5
) (
  input  logic [W-1:0] pattern,
  input  logic         fault_inject,
  output logic [W-1:0] response
);
  localparam int unsigned H = W / 2;

  logic [H-1:0] a, b, sum, carry;
  logic [W-1:0] good;

  assign a = pattern[W-1:H];
  assign b = pattern[H-1:0];

  for (genvar i = 0; i < H; i++) begin : g_ha
    half_adder u_ha (.a(a[i]), .b(b[i]), .s(sum[i]), .c(carry[i]));
  end

  assign good = {sum, carry};

  always_comb begin
    response = good;
    if (fault_inject) response[FAULT_BIT] = 1'b0;
  end
endmodule
