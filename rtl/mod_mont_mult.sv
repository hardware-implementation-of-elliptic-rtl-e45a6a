// mod_mont_mult: bit-serial radix-2 Montgomery multiplier modulo the group
// order n of B-409: y = a * b * 2^-M mod n, for a, b < n.
// Each cycle adds a_i * b to the running sum t, adds n when t is odd so that
// the low bit clears, and halves t; after M cycles t < 2n and one conditional
// subtraction brings it below n. The paper states only that the modular
// multiplication uses Montgomery's algorithm; the radix-2, one-bit-per-cycle
// form is this design's choice.
// Timing: 'start' samples a and b, 'done' pulses M+2 cycles later with y
// valid (held until the next start).
module mod_mont_mult
  import ecdsa_pkg::N_ORDER;
#(
  parameter int unsigned M = 409,
  parameter logic [M-1:0] N = N_ORDER
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         done,
  output logic [M-1:0] y
);
  logic [M-1:0] a_sh, b_r;
  logic [M+1:0] t, t_add, t_odd;
  logic [$clog2(M+1)-1:0] cnt;
  logic running, fin;

  assign t_add = t + (a_sh[0] ? {2'b00, b_r} : '0);
  assign t_odd = t_add + (t_add[0] ? {2'b00, N} : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_sh <= '0; b_r <= '0; t <= '0; cnt <= '0;
      running <= 1'b0; fin <= 1'b0; done <= 1'b0; y <= '0;
    end else begin
      done <= 1'b0;
      fin  <= 1'b0;
      if (start && !running && !fin) begin
        a_sh <= a; b_r <= b; t <= '0;
        cnt <= ($clog2(M+1))'(M);
        running <= 1'b1;
      end else if (running) begin
        t    <= t_odd >> 1;
        a_sh <= a_sh >> 1;
        cnt  <= cnt - 1'b1;
        if (cnt == 1) begin
          running <= 1'b0;
          fin     <= 1'b1;
        end
      end else if (fin) begin
        y    <= (t >= {2'b00, N}) ? M'(t - {2'b00, N}) : t[M-1:0];
        done <= 1'b1;
      end
    end
  end
endmodule
