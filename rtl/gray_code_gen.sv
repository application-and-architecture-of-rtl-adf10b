// gray_code_gen: binary to Gray code converter.
//
// The most significant Gray bit equals the most significant binary bit; every
// lower Gray bit is the XOR of the binary bit at the same position and the
// binary bit just above it, so gray = bin ^ (bin >> 1). Example: 01001 -> 01101.
// Purely combinational; the converter is the one given for the low-power LFSR,
// where it turns the binary seed into the Gray-coded initial state.
module gray_code_gen #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] bin,
  output logic [W-1:0] gray
);
  always_comb begin
    gray[W-1] = bin[W-1];
    for (int i = W - 2; i >= 0; i--) gray[i] = bin[i+1] ^ bin[i];
  end
endmodule
