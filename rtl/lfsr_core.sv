// lfsr_core: Fibonacci linear feedback shift register.
//
// On each clock with step high the state shifts one place towards the most
// significant bit and bit 0 takes the XOR of the state bits selected by TAPS
// (the chain of D flip-flops with an XOR in the feedback path). load has
// priority over step and writes load_val directly. Synchronous active-high
// reset clears the state to zero; an all-zero state is a lock-up state, so
// a session must load a non-zero value before stepping (an assertion
// flags a step taken from zero).
// Shift direction and tap mask follow the reference pattern sequence; reset
// and the load port are this design's choice.
module lfsr_core #(
  parameter int unsigned W = 10,
  parameter logic [W-1:0] TAPS = 10'b10_0000_0001
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         step,
  output logic [W-1:0] q
);
  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= load_val;
    else if (step) q <= {q[W-2:0], fb};
  end

  // Stepping the all-zero state would lock the register at zero.
  a_no_lockup: assert property (@(posedge clk) disable iff (rst)
    (step && !load) |-> q != '0);
endmodule
