// aes_sbox: one "mixed SubBytes" byte substitution, forward or inverse.
// Combinational.  Forward (inv=0): affine(inverse(x)).  Inverse (inv=1):
// inverse(inv_affine(x)).  Both directions share the single GF(2^8)
// inverter, which is how the combined encryption/decryption S-box saves
// logic compared with two lookup tables.
// Computing the S-box instead of storing it follows the published core; the
// x^254 exponentiation chain is this design's choice.
module aes_sbox
  import aes_pkg::*;
(
  input  logic [7:0] din,
  input  logic       inv,
  output logic [7:0] dout
);
  logic [7:0] pre, inverted;
  always_comb begin
    pre      = inv ? inv_affine(din) : din;
    inverted = gf_inv(pre);
    dout     = inv ? inverted : affine(inverted);
  end
endmodule
