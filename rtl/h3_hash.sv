// h3_hash: one hash function of the H3 universal class.
//
// For a key x = <x_1 .. x_b> the hash is h(x) = (d_1 & {x_1}) ^ ... ^ (d_b & {x_b}):
// every key bit that is set contributes its own pre-generated random value
// d_i, and the contributions are combined with exclusive-or. The d_i are
// HASH_W-bit values held outside (the host loads them), so the hash can be
// changed without touching the logic. Purely combinational.
//
// The hash class and the d_i ranging over the bit vector size follow the
// design; the original description names the combining operator "bitwise OR"
// while writing it as the exclusive-or symbol, and this module uses
// exclusive-or, which is what makes the class universal.
module h3_hash #(
  parameter int unsigned KEY_W  = 32,
  parameter int unsigned HASH_W = 14
) (
  input  logic [KEY_W-1:0]             key,
  input  logic [KEY_W-1:0][HASH_W-1:0] d,      // d[i] belongs to key bit i
  output logic [HASH_W-1:0]            hash
);
  always_comb begin
    hash = '0;
    for (int i = 0; i < KEY_W; i++)
      if (key[i]) hash = hash ^ d[i];
  end
endmodule
