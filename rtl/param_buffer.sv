// param_buffer: parameter buffer of the ECDSA core. Parameters arrive as
// 64-bit words, most significant word first; each valid word shifts the
// buffer left by 64 bits, so after ceil(M/64) = 7 words the buffer holds the
// M-bit value (the top word contributes its low M - 6*64 = 25 bits). The
// value is then written into the RAM over Bus 1. The 64-bit input width and
// the shift-to-409-bit behaviour follow the paper; the word order is
// this design's choice (the same order in which the signature block emits).
module param_buffer #(
  parameter int unsigned M = 409,
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic [M-1:0] value
);
  always_ff @(posedge clk) begin
    if (!rst_n)        value <= '0;
    else if (in_valid) value <= {value[M-W-1:0], in_data};
  end
endmodule
