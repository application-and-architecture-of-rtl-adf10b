// misr: multiple input signature register.
//
// A ring of W D flip-flops with an XOR in front of every stage: on each
// clock with en high, stage i takes stage i-1 XOR input bit d[i], and stage 0
// takes the last stage XOR d[0] (the end-around feedback). Additional
// feedback taps into stage 0 can be selected with TAPS (default none, i.e.
// the plain ring). After N clocks the register holds a signature that
// compacts all N CUT responses.
// clear (or rst) sets the signature to zero, synchronously; clear has
// priority over en. The ring-with-XOR structure follows the MISR drawing;
// clear, reset and the TAPS option are this design's choices.
module misr #(
  parameter int unsigned W = 10,
  parameter logic [W-1:0] TAPS = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);
  logic fb;
  assign fb = sig[W-1] ^ (^(sig & TAPS));

  always_ff @(posedge clk) begin
    if (rst || clear) sig <= '0;
    else if (en)      sig <= {sig[W-2:0], fb} ^ d;
  end
endmodule
