// lp_lfsr: low-power LFSR (LP-LFSR) pattern generator.
//
// The binary seed passes through a Gray code generator and the Gray-coded
// value becomes the initial LFSR state; every later pattern comes from the
// ordinary XOR feedback of lfsr_core. Only the seed is Gray coded.
// Interface: load (one clock) takes gray(seed); each clock with step high
// advances one pattern; pattern is the register output, valid the clock after
// load and changing one clock after each step.
module lp_lfsr #(
  parameter int unsigned W = 10,
  parameter logic [W-1:0] TAPS = 10'b10_0000_0001
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] seed,
  input  logic         load,
  input  logic         step,
  output logic [W-1:0] pattern
);
  logic [W-1:0] seed_gray;

  gray_code_gen #(.W(W)) u_gray (.bin(seed), .gray(seed_gray));

  lfsr_core #(.W(W), .TAPS(TAPS)) u_lfsr (
    .clk, .rst, .load, .load_val(seed_gray), .step, .q(pattern)
  );
endmodule
