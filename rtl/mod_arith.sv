// mod_arith: modular arithmetic processor for the ECDSA integer operations
// modulo the group order n (all operands < n unless noted):
//   MOD_RED  y = a mod n for any M-bit a (ModuleP): since 2^M < 2n for B-409,
//            one conditional subtraction of n suffices;
//   MOD_ADD  y = a + b mod n (AdderP): add, subtract n if the sum >= n;
//   MOD_MUL  y = a * b mod n (MultiplierP): two Montgomery products,
//            t = a*b*R^-1 then y = t*R2*R^-1, with R = 2^M and R2 = R^2 mod n;
//   MOD_INV  y = a^-1 mod n (InverterP, Montgomery inversion).
// R2 is not stored as a constant: after reset the processor derives it by
// 2M modular doublings of 1 (2M cycles, 'busy' meanwhile). The operation
// set and the reduction/addition rule follow the paper; the R2 start-up
// computation and the op encoding are this design's choices.
// Timing: 'start' samples op, a and b when not busy; 'done' pulses with y
// valid (RED/ADD: 2 cycles, MUL: 2(M+3) cycles, INV: up to about 4M cycles).
module mod_arith
  import ecdsa_pkg::N_ORDER;
  import ecdsa_pkg::mod_op_e;
  import ecdsa_pkg::MOD_RED;
  import ecdsa_pkg::MOD_ADD;
  import ecdsa_pkg::MOD_MUL;
  import ecdsa_pkg::MOD_INV;
#(
  parameter int unsigned M = 409,
  parameter logic [M-1:0] N = N_ORDER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  mod_op_e      op,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] y
);
  typedef enum logic [2:0] {S_R2, S_IDLE, S_SIMPLE, S_MUL1, S_MUL2, S_INV, S_OUT} state_e;
  state_e state;

  logic [M-1:0] a_r, b_r, r2, res;
  logic [$clog2(2*M+1)-1:0] r2_cnt;
  logic [M:0]   sum, sum_red;
  logic [M-1:0] dbl;
  logic         mm_start, mm_done, inv_start, inv_done;
  logic [M-1:0] mm_a, mm_b, mm_y, inv_y;
  mod_op_e      op_r;

  mod_mont_mult #(.M(M), .N(N)) u_mont (.clk, .rst_n, .start(mm_start), .a(mm_a), .b(mm_b),
                                        .done(mm_done), .y(mm_y));
  mod_inv       #(.M(M), .N(N)) u_inv  (.clk, .rst_n, .start(inv_start), .a(a_r),
                                        .done(inv_done), .y(inv_y));

  // AdderP / ModuleP datapath: (a + b) or a, then one conditional subtraction
  assign sum     = {1'b0, a_r} + ((op_r == MOD_ADD) ? {1'b0, b_r} : '0);
  assign sum_red = (sum >= {1'b0, N}) ? sum - {1'b0, N} : sum;
  // doubling used to derive R2
  assign dbl     = (r2 >= N - r2) ? r2 - (N - r2) : r2 + r2;   // 2*r2 mod n, r2 < n

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_R2; r2 <= M'(1); r2_cnt <= ($clog2(2*M+1))'(2*M);
      a_r <= '0; b_r <= '0; op_r <= MOD_RED; res <= '0; y <= '0; done <= 1'b0;
      mm_start <= 1'b0; inv_start <= 1'b0; mm_a <= '0; mm_b <= '0;
    end else begin
      done      <= 1'b0;
      mm_start  <= 1'b0;
      inv_start <= 1'b0;
      unique case (state)
        S_R2: begin
          r2     <= dbl;
          r2_cnt <= r2_cnt - 1'b1;
          if (r2_cnt == 1) state <= S_IDLE;
        end
        S_IDLE: if (start) begin
          a_r <= a; b_r <= b; op_r <= op;
          unique case (op)
            MOD_RED, MOD_ADD: state <= S_SIMPLE;
            MOD_MUL: begin
              mm_a <= a; mm_b <= b; mm_start <= 1'b1;
              state <= S_MUL1;
            end
            MOD_INV: begin
              inv_start <= 1'b1;
              state <= S_INV;
            end
            default: state <= S_IDLE;
          endcase
        end
        S_SIMPLE: begin
          res   <= sum_red[M-1:0];
          state <= S_OUT;
        end
        S_MUL1: if (mm_done) begin
          mm_a <= mm_y; mm_b <= r2; mm_start <= 1'b1;
          state <= S_MUL2;
        end
        S_MUL2: if (mm_done) begin
          res   <= mm_y;
          state <= S_OUT;
        end
        S_INV: if (inv_done) begin
          res   <= inv_y;
          state <= S_OUT;
        end
        S_OUT: begin
          y     <= res;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  logic unused_sum;
  assign unused_sum = sum_red[M];
endmodule
