// sign_extend: widens the 16-bit instruction immediate to 32 bits.
//
// The low 16 bits pass unchanged and bit 15 is replicated into bits 31:16,
// so negative offsets and immediates keep their two's-complement value.
// Purely combinational.
module sign_extend (
  input  logic [15:0] in,
  output logic [31:0] out
);
  always_comb out = {{16{in[15]}}, in};
endmodule
