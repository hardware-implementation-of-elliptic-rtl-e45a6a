// gf2m_inv: GF(2^M) inversion by the Itoh-Tsujii algorithm, y = a^-1
// (a^(2^M - 2)); an input of zero returns zero.
// With beta_k = a^(2^k - 1) the unit walks the bits of M-1 from the top:
//   beta_2k   = (beta_k)^(2^k) * beta_k      (k squarings, one multiplication)
//   beta_k+1  = (beta_k)^2 * a               (when the bit is set)
// and finally y = (beta_(M-1))^2. For M = 409 that is 408 squarings plus one,
// and 11 multiplications. The paper names Itoh-Tsujii; the schedule, the
// use of one combinational squarer (one squaring per cycle) and one
// sequential PE multiplier (gf2m_mult) are this design's choices.
// Timing: 'start' samples 'a'; 'done' pulses when 'y' is valid (about
// 409 + 11*(M+2) cycles for M = 409). 'start' is ignored while busy.
module gf2m_inv #(
  parameter int unsigned M = 409,
  parameter int unsigned K = 87
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] y
);
  localparam int unsigned E  = M - 1;            // exponent chain target
  localparam int unsigned EB = $clog2(E + 1);    // bits of E
  localparam int unsigned CW = $clog2(M + 1);

  typedef enum logic [2:0] {S_IDLE, S_SQK, S_MULK, S_SQ1, S_MULA, S_FINAL, S_WAIT} state_e;
  state_e state, ret_state;

  logic [M-1:0] a_r, beta, t;
  logic [CW-1:0] k;          // current chain exponent
  logic [CW-1:0] sq_cnt;     // squarings left
  logic [$clog2(EB)-1:0] bitpos;  // bit of E being processed
  logic [M-1:0] t_sq;
  logic         m_start, m_busy, m_done;
  logic [M-1:0] m_a, m_b, m_c;

  localparam logic [EB-1:0] E_BITS = EB'(E);

  gf2m_sqr  #(.M(M), .K(K)) u_sqr (.a(t), .y(t_sq));
  gf2m_mult #(.M(M), .K(K)) u_mul (.clk, .rst_n, .start(m_start), .a(m_a), .b(m_b),
                                   .busy(m_busy), .done(m_done), .c(m_c));

  assign busy = (state != S_IDLE);
  logic unused_busy;
  assign unused_busy = m_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; ret_state <= S_IDLE;
      a_r <= '0; beta <= '0; t <= '0; y <= '0;
      k <= '0; sq_cnt <= '0; bitpos <= '0;
      m_start <= 1'b0; m_a <= '0; m_b <= '0;
      done <= 1'b0;
    end else begin
      done    <= 1'b0;
      m_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_r    <= a;
          beta   <= a;                 // beta_1
          t      <= a;
          k      <= CW'(1);
          sq_cnt <= CW'(1);
          bitpos <= ($clog2(EB))'(EB - 2);       // next bit below the leading one of E
          state  <= S_SQK;
        end
        // t = beta^(2^k): one squaring per cycle
        S_SQK: begin
          t      <= t_sq;
          sq_cnt <= sq_cnt - 1'b1;
          if (sq_cnt == 1) begin
            m_a <= t_sq; m_b <= beta; m_start <= 1'b1;
            ret_state <= S_MULK;
            state <= S_WAIT;
          end
        end
        S_MULK: begin                  // beta_2k ready in m_c
          beta <= m_c;
          t    <= m_c;
          k    <= k << 1;
          if (E_BITS[bitpos]) state <= S_SQ1;
          else if (bitpos == 0) state <= S_FINAL;
          else begin
            bitpos <= bitpos - 1'b1;
            sq_cnt <= k << 1;
            state  <= S_SQK;
          end
        end
        S_SQ1: begin                   // beta_k^2 * a
          m_a <= t_sq; m_b <= a_r; m_start <= 1'b1;
          ret_state <= S_MULA;
          state <= S_WAIT;
        end
        S_MULA: begin
          beta <= m_c;
          t    <= m_c;
          k    <= k + 1'b1;
          if (bitpos == 0) state <= S_FINAL;
          else begin
            bitpos <= bitpos - 1'b1;
            sq_cnt <= k + 1'b1;
            state  <= S_SQK;
          end
        end
        S_FINAL: begin
          y     <= t_sq;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_WAIT: if (m_done) state <= ret_state;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
