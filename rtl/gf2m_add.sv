// gf2m_add: GF(2^M) addition unit. Addition of two field elements in
// polynomial basis is the bitwise XOR of their coefficients; the ECC processor
// holds two of these units (Addition 1 and Addition 2). Combinational.
module gf2m_add #(
  parameter int unsigned M = 409
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);
  assign y = a ^ b;
endmodule
