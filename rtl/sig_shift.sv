// sig_shift: signature output block, a shift register with an M-bit
// parallel input and a W-bit output. 'load' takes din as a ceil(M/W)*W-bit
// word, zero-extended at the top; dout always shows the most significant W
// bits and each 'shift' moves the next W bits up. So the first word out is
// the top M - 6*64 = 25 bits of the value, zero-extended, followed by six
// full 64-bit words in descending order, which is the order seen on the
// signatureOut trace of the paper. words_left counts the words still to
// be shifted out (7 after a load).
module sig_shift #(
  parameter int unsigned M = 409,
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] din,
  input  logic         shift,
  output logic [W-1:0] dout,
  output logic [2:0]   words_left
);
  localparam int unsigned NW = (M + W - 1) / W;
  logic [NW*W-1:0] sreg;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sreg <= '0; words_left <= '0;
    end else if (load) begin
      sreg <= (NW*W)'(din);
      words_left <= 3'(NW);
    end else if (shift && words_left != 0) begin
      sreg <= sreg << W;
      words_left <= words_left - 1'b1;
    end
  end
  assign dout = sreg[NW*W-1 -: W];
endmodule
