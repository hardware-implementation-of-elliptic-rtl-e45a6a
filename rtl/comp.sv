// comp: comparison block of the ECDSA core. For the value a on Bus 2 it
// reports whether a is zero (r = 0 or s = 0 after signing) and whether it
// lies in the interval [1, n-1] (checks of k, d, r' and s'); it also reports
// whether a equals b (the final test r' = v of verification). The checks
// follow the paper's algorithms; combinational.
module comp
  import ecdsa_pkg::N_ORDER;
#(
  parameter int unsigned M = 409,
  parameter logic [M-1:0] N = N_ORDER
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         is_zero,
  output logic         in_range,
  output logic         equal
);
  assign is_zero  = (a == '0);
  assign in_range = !is_zero && (a < N);
  assign equal    = (a == b);
endmodule
