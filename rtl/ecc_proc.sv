// ecc_proc: elliptic curve cryptoprocessor over GF(2^409), curve B-409.
// Two operations:
//   ECC_SMUL  (xo, yo) = key * (PX, PY)   Lopez-Dahab Montgomery ladder in
//             projective x-only coordinates, then affine y recovery, which
//             needs one field inversion at the end;
//   ECC_PADD  (xo, yo) = (PX, PY) + (QX, QY) in affine coordinates, with the
//             doubling and point-at-infinity cases.
// Datapath, following the paper's processor: register files A (16 words)
// and B (8 words), two PE multipliers, one Itoh-Tsujii inversion unit, two
// squarers and two adders. The double-and-add FSM issues micro-instructions
// from a small ROM; each micro-instruction has two slots (slot 1 drives
// Mult 1 / Squarer 1 / Addition 1 / Inversion, slot 2 drives Mult 2 /
// Squarer 2 / Addition 2), so two field operations run in parallel. A
// ladder step takes 7 micro-instructions with three multiplier rounds. The
// main controller holds the key register: it skips the leading zero bits,
// then shifts one key bit per ladder step; the key bit chooses which pair of
// ladder registers is added into and which is doubled by renaming register
// addresses, so every step runs the same instruction sequence.
// Which register holds what, the micro-program, the two-slot issue and the
// handling of the special cases are this design's choices: the paper
// gives the units, the register files, the FSM/controller split and the
// Lopez-Dahab method, not their sequencing.
// Interface: input registers are written with ld_en/ld_sel/ld_data (key, PX,
// PY, QX, QY); 'start' with 'op' (and p_inf/q_inf for additions) runs an
// operation; 'done' pulses when xo/yo/inf (the output register) are valid.
// A full 409-bit scalar multiplication takes about 409 * 1250 cycles.
module ecc_proc
  import ecdsa_pkg::K;
  import ecdsa_pkg::CURVE_B;
  import ecdsa_pkg::ecc_op_e;
  import ecdsa_pkg::ECC_SMUL;
  import ecdsa_pkg::ECC_PADD;
  import ecdsa_pkg::ecc_ld_e;
  import ecdsa_pkg::LD_KEY;
  import ecdsa_pkg::LD_PX;
  import ecdsa_pkg::LD_PY;
  import ecdsa_pkg::LD_QX;
  import ecdsa_pkg::LD_QY;
#(
  parameter int unsigned M = 409
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld_en,
  input  ecc_ld_e      ld_sel,
  input  logic [M-1:0] ld_data,
  input  logic         start,
  input  ecc_op_e      op,
  input  logic         p_inf,
  input  logic         q_inf,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] xo,
  output logic [M-1:0] yo,
  output logic         inf
);
  // ---------------- register names ----------------
  typedef logic [4:0] raddr_t;
  localparam raddr_t R_ZERO = 5'd0,  R_ONE = 5'd1,  R_CB = 5'd2,
                     R_PX   = 5'd3,  R_PY  = 5'd4,  R_QX = 5'd5,  R_QY = 5'd6,
                     R_X1   = 5'd7,  R_Z1  = 5'd8,  R_X2 = 5'd9,  R_Z2 = 5'd10,
                     R_XO   = 5'd11, R_YO  = 5'd12,
                     R_T1   = 5'd13, R_T2  = 5'd14, R_T3 = 5'd15,
                     R_T4   = 5'd16, R_T5  = 5'd17, R_T6 = 5'd18, R_T7 = 5'd19, R_T8 = 5'd20;

  // ---------------- micro-instructions ----------------
  typedef enum logic [2:0] {U_NOP, U_ADD, U_SQR, U_MUL, U_INV} uop_e;
  typedef struct packed {
    uop_e   op1; raddr_t d1; raddr_t a1; raddr_t b1;
    uop_e   op2; raddr_t d2; raddr_t a2; raddr_t b2;
    logic   last;
  } uinstr_t;
  // the part of an instruction kept past ISSUE: operations and destinations
  typedef struct packed {
    uop_e op1; raddr_t d1; uop_e op2; raddr_t d2; logic last;
  } uwb_t;
  typedef logic [5:0] upc_t;

  localparam upc_t P_INIT = 6'd0,  P_STEP = 6'd3,  P_MXY = 6'd10, P_NEG = 6'd20,
                   P_CPYP = 6'd21, P_CPYQ = 6'd22, P_ADD1 = 6'd23, P_ADD2 = 6'd24,
                   P_DBL  = 6'd33;

  function automatic uinstr_t ui(uop_e o1, raddr_t d1, raddr_t a1, raddr_t b1,
                                 uop_e o2, raddr_t d2, raddr_t a2, raddr_t b2, logic last);
    return '{o1, d1, a1, b1, o2, d2, a2, b2, last};
  endfunction
  localparam raddr_t Z = R_ZERO;

  // slots write d <= a op b ; SQR uses a only, INV uses a only (slot 1)
  function automatic uinstr_t urom(upc_t pc);
    unique case (pc)
      // ladder set-up: X1 = x, Z1 = 1, X2 = x^4 + b, Z2 = x^2
      6'd0:  return ui(U_SQR, R_Z2, R_PX, Z,    U_ADD, R_X1, R_PX, Z,    1'b0);
      6'd1:  return ui(U_SQR, R_X2, R_Z2, Z,    U_ADD, R_Z1, R_ONE, Z,   1'b0);
      6'd2:  return ui(U_ADD, R_X2, R_X2, R_CB, U_NOP, Z, Z, Z,          1'b1);
      // ladder step, A = (X1,Z1) and B = (X2,Z2) after renaming:
      // A <- A + B (differential addition), B <- 2B
      6'd3:  return ui(U_MUL, R_T1, R_X1, R_Z2, U_MUL, R_T2, R_X2, R_Z1, 1'b0);
      6'd4:  return ui(U_ADD, R_T3, R_T1, R_T2, U_SQR, R_T4, R_X2, Z,    1'b0);
      6'd5:  return ui(U_SQR, R_Z1, R_T3, Z,    U_SQR, R_T5, R_Z2, Z,    1'b0);
      6'd6:  return ui(U_SQR, R_T6, R_T4, Z,    U_SQR, R_T7, R_T5, Z,    1'b0);
      6'd7:  return ui(U_MUL, R_T3, R_PX, R_Z1, U_MUL, R_X1, R_T1, R_T2, 1'b0);
      6'd8:  return ui(U_MUL, R_T7, R_CB, R_T7, U_MUL, R_Z2, R_T4, R_T5, 1'b0);
      6'd9:  return ui(U_ADD, R_X1, R_X1, R_T3, U_ADD, R_X2, R_T6, R_T7, 1'b1);
      // affine recovery of (x3, y3) from (X1,Z1), (X2,Z2) and P
      6'd10: return ui(U_MUL, R_T1, R_Z1, R_Z2, U_MUL, R_T2, R_PX, R_Z1, 1'b0);
      6'd11: return ui(U_MUL, R_T3, R_PX, R_Z2, U_MUL, R_T4, R_PX, R_T1, 1'b0);
      6'd12: return ui(U_INV, R_T5, R_T4, Z,    U_ADD, R_T2, R_X1, R_T2, 1'b0);
      6'd13: return ui(U_ADD, R_T6, R_X2, R_T3, U_SQR, R_T7, R_PX, Z,    1'b0);
      6'd14: return ui(U_ADD, R_T7, R_T7, R_PY, U_MUL, R_T3, R_T3, R_X1, 1'b0);
      6'd15: return ui(U_MUL, R_T6, R_T2, R_T6, U_MUL, R_T7, R_T7, R_T1, 1'b0);
      6'd16: return ui(U_ADD, R_T6, R_T6, R_T7, U_MUL, R_XO, R_T3, R_T5, 1'b0);
      6'd17: return ui(U_MUL, R_T6, R_T6, R_T5, U_ADD, R_T2, R_XO, R_PX, 1'b0);
      6'd18: return ui(U_MUL, R_T6, R_T6, R_T2, U_NOP, Z, Z, Z,          1'b0);
      6'd19: return ui(U_ADD, R_YO, R_T6, R_PY, U_NOP, Z, Z, Z,          1'b1);
      // k*P = -P when (k+1)*P is the point at infinity
      6'd20: return ui(U_ADD, R_XO, R_PX, Z,    U_ADD, R_YO, R_PX, R_PY, 1'b1);
      // copies for additions with the point at infinity
      6'd21: return ui(U_ADD, R_XO, R_PX, Z,    U_ADD, R_YO, R_PY, Z,    1'b1);
      6'd22: return ui(U_ADD, R_XO, R_QX, Z,    U_ADD, R_YO, R_QY, Z,    1'b1);
      // affine addition: T1 = x1 + x2, T2 = y1 + y2, then lambda = T2 / T1
      6'd23: return ui(U_ADD, R_T1, R_PX, R_QX, U_ADD, R_T2, R_PY, R_QY, 1'b1);
      6'd24: return ui(U_INV, R_T3, R_T1, Z,    U_NOP, Z, Z, Z,          1'b0);
      6'd25: return ui(U_MUL, R_T4, R_T2, R_T3, U_NOP, Z, Z, Z,          1'b0);
      6'd26: return ui(U_SQR, R_T5, R_T4, Z,    U_ADD, R_T6, R_T4, R_T1, 1'b0);
      6'd27: return ui(U_ADD, R_T5, R_T5, R_T6, U_NOP, Z, Z, Z,          1'b0);
      6'd28: return ui(U_ADD, R_XO, R_T5, R_ONE, U_NOP, Z, Z, Z,         1'b0);
      6'd29: return ui(U_ADD, R_T7, R_PX, R_XO, U_NOP, Z, Z, Z,          1'b0);
      6'd30: return ui(U_MUL, R_T7, R_T4, R_T7, U_NOP, Z, Z, Z,          1'b0);
      6'd31: return ui(U_ADD, R_T7, R_T7, R_XO, U_NOP, Z, Z, Z,          1'b0);
      6'd32: return ui(U_ADD, R_YO, R_T7, R_PY, U_NOP, Z, Z, Z,          1'b1);
      // affine doubling: lambda = x + y/x, x3 = l^2 + l + a, y3 = x^2 + (l+1) x3
      6'd33: return ui(U_INV, R_T3, R_PX, Z,    U_NOP, Z, Z, Z,          1'b0);
      6'd34: return ui(U_MUL, R_T4, R_PY, R_T3, U_NOP, Z, Z, Z,          1'b0);
      6'd35: return ui(U_ADD, R_T4, R_T4, R_PX, U_NOP, Z, Z, Z,          1'b0);
      6'd36: return ui(U_SQR, R_T5, R_T4, Z,    U_ADD, R_T6, R_T4, R_ONE, 1'b0);
      6'd37: return ui(U_ADD, R_T5, R_T5, R_T4, U_NOP, Z, Z, Z,          1'b0);
      6'd38: return ui(U_ADD, R_XO, R_T5, R_ONE, U_NOP, Z, Z, Z,         1'b0);
      6'd39: return ui(U_MUL, R_T7, R_T6, R_XO, U_SQR, R_T8, R_PX, Z,    1'b0);
      6'd40: return ui(U_ADD, R_YO, R_T7, R_T8, U_NOP, Z, Z, Z,          1'b1);
      default: return ui(U_NOP, Z, Z, Z, U_NOP, Z, Z, Z, 1'b1);
    endcase
  endfunction

  // ---------------- register files ----------------
  logic [M-1:0] rf_a [16];   // addresses 0..15 (0..2 are constants, not stored)
  logic [M-1:0] rf_b [8];    // addresses 16..23
  logic         swap;        // ladder renaming (key bit = 0)

  function automatic raddr_t ren(raddr_t r, logic sw);
    if (!sw) return r;
    unique case (r)
      R_X1: return R_X2;
      R_X2: return R_X1;
      R_Z1: return R_Z2;
      R_Z2: return R_Z1;
      default: return r;
    endcase
  endfunction

  function automatic logic [M-1:0] rd(raddr_t r);
    unique case (r)
      R_ZERO: return '0;
      R_ONE:  return M'(1);
      R_CB:   return CURVE_B;
      default: return r[4] ? rf_b[r[2:0]] : rf_a[r[3:0]];
    endcase
  endfunction

  // ---------------- functional units ----------------
  logic [M-1:0] opa1, opb1, opa2, opb2;
  logic [M-1:0] add1_y, add2_y, sqr1_y, sqr2_y, mul1_c, mul2_c, inv_y;
  logic         mul1_start, mul2_start, inv_start;
  logic         mul1_done, mul2_done, inv_done, mul1_busy, mul2_busy, inv_busy;

  gf2m_add  #(.M(M))        u_add1 (.a(opa1), .b(opb1), .y(add1_y));
  gf2m_add  #(.M(M))        u_add2 (.a(opa2), .b(opb2), .y(add2_y));
  gf2m_sqr  #(.M(M), .K(K)) u_sqr1 (.a(opa1), .y(sqr1_y));
  gf2m_sqr  #(.M(M), .K(K)) u_sqr2 (.a(opa2), .y(sqr2_y));
  gf2m_mult #(.M(M), .K(K)) u_mul1 (.clk, .rst_n, .start(mul1_start), .a(opa1), .b(opb1),
                                    .busy(mul1_busy), .done(mul1_done), .c(mul1_c));
  gf2m_mult #(.M(M), .K(K)) u_mul2 (.clk, .rst_n, .start(mul2_start), .a(opa2), .b(opb2),
                                    .busy(mul2_busy), .done(mul2_done), .c(mul2_c));
  gf2m_inv  #(.M(M), .K(K)) u_inv  (.clk, .rst_n, .start(inv_start), .a(opa1),
                                    .busy(inv_busy), .done(inv_done), .y(inv_y));

  // ---------------- sequencing ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_MSB, S_LOOP, S_FIN, S_PCHK, S_ISSUE, S_EXEC, S_WB, S_DONE
  } state_e;
  state_e state, ret_state;

  upc_t        pc;
  uwb_t        ir;
  logic [M-1:0] key;
  logic [$clog2(M+1)-1:0] bits_left;
  logic        ok1, ok2;                  // slot results available
  logic [M-1:0] res1, res2;
  logic        padd_phase;                // 0: after P_ADD1, 1: after P_ADD2/DBL

  assign busy = (state != S_IDLE);

  // slot results
  always_comb begin
    unique case (ir.op1)
      U_ADD:   res1 = add1_y;
      U_SQR:   res1 = sqr1_y;
      U_MUL:   res1 = mul1_c;
      U_INV:   res1 = inv_y;
      default: res1 = '0;
    endcase
    unique case (ir.op2)
      U_ADD:   res2 = add2_y;
      U_SQR:   res2 = sqr2_y;
      U_MUL:   res2 = mul2_c;
      default: res2 = '0;
    endcase
  end

  raddr_t wd1, wd2;
  assign wd1 = ren(ir.d1, swap);
  assign wd2 = ren(ir.d2, swap);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; ret_state <= S_IDLE;
      pc <= '0; ir <= '0; key <= '0; bits_left <= '0; swap <= 1'b0;
      ok1 <= 1'b0; ok2 <= 1'b0; padd_phase <= 1'b0;
      opa1 <= '0; opb1 <= '0; opa2 <= '0; opb2 <= '0;
      mul1_start <= 1'b0; mul2_start <= 1'b0; inv_start <= 1'b0;
      xo <= '0; yo <= '0; inf <= 1'b0; done <= 1'b0;
      for (int i = 0; i < 16; i++) rf_a[i] <= '0;
      for (int i = 0; i < 8; i++)  rf_b[i] <= '0;
    end else begin
      done       <= 1'b0;
      mul1_start <= 1'b0;
      mul2_start <= 1'b0;
      inv_start  <= 1'b0;
      if (ld_en && state == S_IDLE) begin
        unique case (ld_sel)
          LD_KEY: key <= ld_data;
          LD_PX:  rf_a[R_PX[3:0]] <= ld_data;
          LD_PY:  rf_a[R_PY[3:0]] <= ld_data;
          LD_QX:  rf_a[R_QX[3:0]] <= ld_data;
          LD_QY:  rf_a[R_QY[3:0]] <= ld_data;
          default: ;
        endcase
      end
      unique case (state)
        S_IDLE: if (start) begin
          swap <= 1'b0;
          if (op == ECC_SMUL) begin
            bits_left <= ($clog2(M+1))'(M);
            state     <= S_MSB;
          end else begin
            padd_phase <= 1'b0;
            if (p_inf && q_inf) begin
              inf   <= 1'b1;
              state <= S_DONE;
            end else begin
              pc        <= p_inf ? P_CPYQ : (q_inf ? P_CPYP : P_ADD1);
              padd_phase <= p_inf || q_inf;
              ret_state <= S_PCHK;
              state     <= S_ISSUE;
            end
          end
        end
        // main controller: drop leading zeros of the key, then set up the ladder
        S_MSB: begin
          if (bits_left == 0) begin         // key = 0
            inf   <= 1'b1;
            state <= S_DONE;
          end else begin
            key       <= key << 1;
            bits_left <= bits_left - 1'b1;
            if (key[M-1]) begin
              pc        <= P_INIT;
              ret_state <= S_LOOP;
              state     <= S_ISSUE;
            end
          end
        end
        // double-and-add FSM: one ladder step per remaining key bit
        S_LOOP: begin
          if (bits_left == 0) begin
            swap  <= 1'b0;
            state <= S_FIN;
          end else begin
            swap      <= ~key[M-1];
            key       <= key << 1;
            bits_left <= bits_left - 1'b1;
            pc        <= P_STEP;
            ret_state <= S_LOOP;
            state     <= S_ISSUE;
          end
        end
        S_FIN: begin
          if (rf_a[R_Z1[3:0]] == '0) begin
            inf   <= 1'b1;
            state <= S_DONE;
          end else begin
            pc        <= (rf_a[R_Z2[3:0]] == '0) ? P_NEG : P_MXY;
            ret_state <= S_DONE;
            inf       <= 1'b0;
            state     <= S_ISSUE;
          end
        end
        // point addition: decide between addition, doubling and infinity
        S_PCHK: begin
          if (padd_phase) begin
            inf   <= 1'b0;
            state <= S_DONE;
          end else begin
            padd_phase <= 1'b1;
            ret_state  <= S_PCHK;
            if (rf_a[R_T1[3:0]] != '0) begin
              pc    <= P_ADD2;
              state <= S_ISSUE;
            end else if (rf_a[R_T2[3:0]] == '0 && rf_a[R_PX[3:0]] != '0) begin
              pc    <= P_DBL;
              state <= S_ISSUE;
            end else begin
              inf   <= 1'b1;
              state <= S_DONE;
            end
          end
        end
        // micro-instruction engine
        S_ISSUE: begin
          ir   <= '{urom(pc).op1, urom(pc).d1, urom(pc).op2, urom(pc).d2, urom(pc).last};
          opa1 <= rd(ren(urom(pc).a1, swap));
          opb1 <= rd(ren(urom(pc).b1, swap));
          opa2 <= rd(ren(urom(pc).a2, swap));
          opb2 <= rd(ren(urom(pc).b2, swap));
          mul1_start <= (urom(pc).op1 == U_MUL);
          inv_start  <= (urom(pc).op1 == U_INV);
          mul2_start <= (urom(pc).op2 == U_MUL);
          ok1 <= (urom(pc).op1 inside {U_NOP, U_ADD, U_SQR});
          ok2 <= (urom(pc).op2 inside {U_NOP, U_ADD, U_SQR});
          state <= S_EXEC;
        end
        S_EXEC: begin
          if ((ir.op1 == U_MUL && mul1_done) || (ir.op1 == U_INV && inv_done)) ok1 <= 1'b1;
          if (ir.op2 == U_MUL && mul2_done) ok2 <= 1'b1;
          if (ok1 && ok2) state <= S_WB;
        end
        S_WB: begin
          if (ir.op1 != U_NOP) begin
            if (wd1[4]) rf_b[wd1[2:0]] <= res1;
            else        rf_a[wd1[3:0]] <= res1;
          end
          if (ir.op2 != U_NOP) begin
            if (wd2[4]) rf_b[wd2[2:0]] <= res2;
            else        rf_a[wd2[3:0]] <= res2;
          end
          pc <= pc + 1'b1;
          state <= ir.last ? ret_state : S_ISSUE;
        end
        S_DONE: begin
          xo    <= rf_a[R_XO[3:0]];
          yo    <= rf_a[R_YO[3:0]];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic unused_ok;
  assign unused_ok = mul1_busy ^ mul2_busy ^ inv_busy;
endmodule
