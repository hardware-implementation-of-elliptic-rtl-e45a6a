// gf2m_pe: processing element of the polynomial-basis GF(2^M) multiplier.
// One PE performs one step of the LSB-first shift-and-add multiplication
// modulo the trinomial f(x) = x^M + x^K + 1:
//   x1_out = x1_in * x mod f   (unity-degree reduction cell, URC)
//   x2_out = x2_in + y_in * x1_in
// The three cells follow the paper: a URC that shifts A up by one place,
// feeds a[M-1] back into bit 0 and XORs it into bit K; a NAND cell of M gates
// combining the bit y_in of B with every bit of A; and an XOR cell of M gates.
// The XOR cell receives x2_in complemented, so that NAND followed by XOR adds
// the AND product y_in & a_j to the partial product (the net function is
// AND-XOR). Purely combinational, no clock. Most bits of x1_out are wires
// from x1_in (the URC is a one-place shift), so a synthesis report lists
// them as outputs driven straight from inputs; that is the URC's nature.
module gf2m_pe #(
  parameter int unsigned M = 409,
  parameter int unsigned K = 87
) (
  input  logic [M-1:0] x1_in,
  input  logic [M-1:0] x2_in,
  input  logic         y_in,
  output logic [M-1:0] x1_out,
  output logic [M-1:0] x2_out
);
  logic [M-1:0] nand_cell;
  logic [M-1:0] urc;

  // unity-degree reduction cell: multiply by x and reduce once
  always_comb begin
    urc    = {x1_in[M-2:0], 1'b0};
    urc[0] = x1_in[M-1];
    urc[K] = x1_in[K-1] ^ x1_in[M-1];
  end

  assign nand_cell = ~(x1_in & {M{y_in}});
  assign x1_out    = urc;
  assign x2_out    = ~x2_in ^ nand_cell;
endmodule
