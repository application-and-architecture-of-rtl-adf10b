// fir_filter: 5-tap low-pass FIR filter used as a circuit under test.
//
// Direct form: the input sample x(n) runs through a chain of four delay
// registers, each tap x(n-k) is multiplied by coefficient h(k) and the
// products are summed in an adder chain. The coefficients are the low-pass
// set 0.0000, 0.1083, 0.5000, 0.1081, 0.0000 held in atpg_pkg as unsigned
// fixed point with 12 fractional bits (0, 444, 2048, 443, 0). The input is a
// W-bit unsigned sample (the test pattern); the output y is the integer part
// of the sum, y = floor(sum_k h_k * x(n-k) / 4096). Because the coefficients
// add up to less than 1, y always fits in W bits.
//
// Timing: y is combinational in x and the delay line; the delay line shifts
// on each clock with step high and is cleared by clear or rst (synchronous).
// fault_inject forces output bit FAULT_BIT to 0 (stuck-at-0), an addition of
// this design for showing detection. Number format, clearing and the fault
// port are this design's choices; structure and coefficients follow the
// filter description.
module fir_filter
  import atpg_pkg::*;
#(
  parameter int unsigned W = 10,
  parameter int unsigned FAULT_BIT = 0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         step,
  input  logic [W-1:0] x,
  input  logic         fault_inject,
  output logic [W-1:0] y
);
  localparam int unsigned ACC_W = W + FIR_COEF_W + 3;

  logic [W-1:0]     taps [FIR_NTAPS];    // taps[0] = x(n), taps[k] = x(n-k)
  logic [W-1:0]     dline [FIR_NTAPS-1];
  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int k = 0; k < FIR_NTAPS - 1; k++) dline[k] <= '0;
    end else if (step) begin
      dline[0] <= x;
      for (int k = 1; k < FIR_NTAPS - 1; k++) dline[k] <= dline[k-1];
    end
  end

  always_comb begin
    taps[0] = x;
    for (int k = 1; k < FIR_NTAPS; k++) taps[k] = dline[k-1];
    acc = '0;
    for (int k = 0; k < FIR_NTAPS; k++)
      acc = acc + ACC_W'(taps[k]) * ACC_W'(FIR_COEF[k]);
    y = acc[FIR_FRAC +: W];
    if (fault_inject) y[FAULT_BIT] = 1'b0;
  end
endmodule
