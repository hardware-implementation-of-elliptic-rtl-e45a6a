// gf2m_mult: sequential GF(2^M) multiplier, c = a * b mod (x^M + x^K + 1).
// Structure after the paper's sequential PE multiplier: operand A is held
// in Areg, operand B in the right-shifting register Breg whose LSB drives the
// active PE. PE[1] starts from a zero partial product and writes the stage
// registers S2/S3; PE[i] is then reused M-2 times, its 2:1 multiplexers taking
// S2/S3 on the first pass and its own outputs S8/S9 afterwards; PE[M] finishes
// the product into Creg.
// Timing: 'start' loads Areg/Breg (one cycle), then M cycles of PE work, so
// 'done' pulses M+1 cycles after 'start' with 'c' valid from then on (Creg
// holds it until the next product). 'start' is ignored while busy.
module gf2m_mult #(
  parameter int unsigned M = 409,
  parameter int unsigned K = 87
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);
  typedef enum logic [1:0] {S_IDLE, S_PE1, S_PEI, S_PEM} state_e;
  state_e state;

  logic [M-1:0] areg, breg;
  logic [M-1:0] s2, s3, s8, s9;
  logic [$clog2(M+1)-1:0] cnt;     // remaining PE[i] passes
  logic first;                     // PE[i] reads S2/S3 on its first pass

  logic [M-1:0] pe1_x1, pe1_x2, pei_x1, pei_x2, pem_x1, pem_x2;
  logic [M-1:0] mux_x1, mux_x2;

  gf2m_pe #(.M(M), .K(K)) u_pe1 (.x1_in(areg), .x2_in('0), .y_in(breg[0]),
                                 .x1_out(pe1_x1), .x2_out(pe1_x2));
  assign mux_x1 = first ? s2 : s8;
  assign mux_x2 = first ? s3 : s9;
  gf2m_pe #(.M(M), .K(K)) u_pei (.x1_in(mux_x1), .x2_in(mux_x2), .y_in(breg[0]),
                                 .x1_out(pei_x1), .x2_out(pei_x2));
  gf2m_pe #(.M(M), .K(K)) u_pem (.x1_in(s8), .x2_in(s9), .y_in(breg[0]),
                                 .x1_out(pem_x1), .x2_out(pem_x2));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      cnt   <= '0;
      first <= 1'b0;
      areg  <= '0; breg <= '0;
      s2 <= '0; s3 <= '0; s8 <= '0; s9 <= '0;
      c  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          areg  <= a;
          breg  <= b;
          state <= S_PE1;
        end
        S_PE1: begin
          s2    <= pe1_x1;
          s3    <= pe1_x2;
          breg  <= breg >> 1;
          first <= 1'b1;
          cnt   <= ($clog2(M+1))'(M-2);
          state <= S_PEI;
        end
        S_PEI: begin
          s8    <= pei_x1;
          s9    <= pei_x2;
          breg  <= breg >> 1;
          first <= 1'b0;
          cnt   <= cnt - 1'b1;
          if (cnt == 1) state <= S_PEM;
        end
        S_PEM: begin
          c     <= pem_x2;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end
  // pem_x1 (A * x^M) is not needed: the last PE only closes the sum
  logic unused_pem;
  assign unused_pem = ^pem_x1;
endmodule
