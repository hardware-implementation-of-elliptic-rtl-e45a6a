// mod_inv: modular inversion modulo the group order n, y = a^-1 mod n
// (a = 0 gives 0). Montgomery inversion in two phases:
//  phase 1 (almost-inverse, binary extended GCD on u = n, v = a):
//    u even: u/=2, s*=2;  v even: v/=2, r*=2;
//    u > v:  u=(u-v)/2, r+=s, s*=2;  else v=(v-u)/2, s+=r, r*=2;  k++
//    until v = 0, then r = n - (r mod n) = a^-1 * 2^k mod n, M <= k <= 2M;
//  phase 2 (the modification that returns a plain inverse): k halvings
//    mod n, r = r/2 or (r+n)/2, which removes the factor 2^k.
// One step per clock, so at most about 4M cycles. The paper names a
// "modified Montgomery inversion"; the exact modification is not given and
// phase 2 above is this design's reading of it.
// Timing: 'start' samples a; 'done' pulses when y is valid.
module mod_inv
  import ecdsa_pkg::N_ORDER;
#(
  parameter int unsigned M = 409,
  parameter logic [M-1:0] N = N_ORDER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         done,
  output logic [M-1:0] y
);
  typedef enum logic [2:0] {S_IDLE, S_P1, S_FIX, S_P2, S_OUT} state_e;
  state_e state;
  logic [M+1:0] u, v, r, s;
  logic [$clog2(2*M+2)-1:0] k;
  localparam logic [M+1:0] NW = {2'b00, N};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; u <= '0; v <= '0; r <= '0; s <= '0; k <= '0;
      done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          u <= NW; v <= {2'b00, a}; r <= '0; s <= (M+2)'(1); k <= '0;
          if (a == '0) begin
            y <= '0;
            state <= S_OUT;
          end else state <= S_P1;
        end
        S_P1: begin
          if (v == '0) state <= S_FIX;
          else begin
            k <= k + 1'b1;
            if (!u[0]) begin
              u <= u >> 1; s <= s << 1;
            end else if (!v[0]) begin
              v <= v >> 1; r <= r << 1;
            end else if (u > v) begin
              u <= (u - v) >> 1; r <= r + s; s <= s << 1;
            end else begin
              v <= (v - u) >> 1; s <= s + r; r <= r << 1;
            end
          end
        end
        S_FIX: begin
          r <= NW - ((r >= NW) ? r - NW : r);
          state <= S_P2;
        end
        S_P2: begin
          if (k == '0) begin
            y <= r[M-1:0];
            state <= S_OUT;
          end else begin
            k <= k - 1'b1;
            r <= r[0] ? (r + NW) >> 1 : r >> 1;
          end
        end
        S_OUT: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  logic unused_s;
  assign unused_s = ^s[M+1:M];
endmodule
