// ecdsa_ctrl: control unit of the ECDSA core. It runs key generation,
// signature generation and signature verification as fixed programs of
// control steps held in a small ROM; each step is one bus transaction
// sequence: a range or zero check through 'comp', a hash store, a modular
// operation (two RAM reads onto Bus 2, start, result written back over
// Bus 1), loading the ECC processor's input registers, an ECC operation,
// an ECC result store, or shifting a RAM word out through the signature
// block. It watches the done/state signals of every unit and stops with an
// error code when a check fails (r = 0, s = 0, an input outside [1, n-1], a
// point at infinity, r' != v).
// RAM map: 0 d, 1 k, 2 r (r'), 3 s (s'), 4 e, 5/6 public key Qx/Qy,
// 7/8 result point, 9 k^-1 or c = s'^-1, 10 s-partial or u1, 11 u2,
// 12/13 u1*G, 15 v. The steps follow the paper's Algorithms 1-3; the
// step encoding, the RAM map and the error codes are this design's choices.
// While idle, 'param_write' stores the parameter buffer into RAM[param_addr].
module ecdsa_ctrl
  import ecdsa_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  ecdsa_cmd_e cmd,
  input  logic       param_write,
  input  logic [3:0] param_addr,
  // comp
  input  logic       cmp_zero,
  input  logic       cmp_range,
  input  logic       cmp_equal,
  // unit status
  input  logic       sha_valid,
  input  logic       ecc_done,
  input  logic       ecc_inf,
  input  logic       mod_busy,
  input  logic       mod_done,
  input  logic [2:0] sig_words_left,
  // RAM and buses
  output logic       ram_we,
  output logic [3:0] ram_waddr,
  output logic [3:0] ram_raddr,
  output logic [2:0] bus1_sel,     // 0 param, 1 hash, 2 ecc x, 3 ecc y, 4 mod
  output logic       hold_en,      // latch Bus 2 into the operand hold register
  // ECC processor
  output logic       ecc_ld_en,
  output ecc_ld_e    ecc_ld_sel,
  output logic       ecc_ld_gen,   // load the base point G instead of Bus 2
  output logic       ecc_start,
  output ecc_op_e    ecc_op,
  output logic       ecc_p_inf,
  output logic       ecc_q_inf,
  // modular arithmetic
  output logic       mod_start,
  output mod_op_e    mod_op,
  // signature block
  output logic       sig_load,
  output logic       sig_shift,
  // status
  output logic       busy,
  output logic       done,
  output ecdsa_err_e error,
  output logic       signature_ok
);
  typedef enum logic [3:0] {
    A_END, A_RCHK, A_ZCHK, A_HASH, A_MOP, A_ELDG, A_ELD, A_ERUN, A_ICHK, A_EST, A_SIG, A_EQ
  } act_e;
  typedef struct packed {
    act_e       act;
    logic [2:0] sub;     // mod op / ECC register / ECC op slot / x-y select
    logic [3:0] a;
    logic [3:0] b;
    logic [3:0] d;
    ecdsa_err_e err;
  } step_t;
  typedef logic [5:0] spc_t;

  localparam spc_t E_KEYGEN = 6'd0, E_SIGN = 6'd10, E_VERIFY = 6'd29;
  localparam logic [2:0] X = 3'd0, Y = 3'd1;
  localparam logic [2:0] SL0 = 3'd0, SL1 = 3'd1, SLA = 3'd2;   // ERUN: u1G, u2Q, addition

  function automatic step_t s(act_e act, logic [2:0] sub, logic [3:0] a, logic [3:0] b,
                              logic [3:0] d, ecdsa_err_e err);
    return '{act, sub, a, b, d, err};
  endfunction

  function automatic step_t prog(spc_t pc);
    unique case (pc)
      // Algorithm 1: Q = d*G
      6'd0:  return s(A_RCHK, 0, 0, 0, 0, ERR_RANGE);
      6'd1:  return s(A_ELDG, 0, 0, 0, 0, ERR_NONE);
      6'd2:  return s(A_ELD,  3'(LD_KEY), 0, 0, 0, ERR_NONE);
      6'd3:  return s(A_ERUN, SL0, 0, 0, 0, ERR_NONE);
      6'd4:  return s(A_ICHK, 0, 0, 0, 0, ERR_INFINITY);
      6'd5:  return s(A_EST,  X, 0, 0, 5, ERR_NONE);
      6'd6:  return s(A_EST,  Y, 0, 0, 6, ERR_NONE);
      6'd7:  return s(A_SIG,  0, 5, 0, 0, ERR_NONE);
      6'd8:  return s(A_SIG,  0, 6, 0, 0, ERR_NONE);
      6'd9:  return s(A_END,  0, 0, 0, 0, ERR_NONE);
      // Algorithm 2: (r, s)
      6'd10: return s(A_RCHK, 0, 0, 0, 0, ERR_RANGE);
      6'd11: return s(A_RCHK, 0, 1, 0, 0, ERR_RANGE);
      6'd12: return s(A_HASH, 0, 0, 0, 4, ERR_NONE);
      6'd13: return s(A_MOP,  3'(MOD_RED), 4, 0, 4, ERR_NONE);
      6'd14: return s(A_ELDG, 0, 0, 0, 0, ERR_NONE);
      6'd15: return s(A_ELD,  3'(LD_KEY), 1, 0, 0, ERR_NONE);
      6'd16: return s(A_ERUN, SL0, 0, 0, 0, ERR_NONE);
      6'd17: return s(A_ICHK, 0, 0, 0, 0, ERR_INFINITY);
      6'd18: return s(A_EST,  X, 0, 0, 7, ERR_NONE);
      6'd19: return s(A_MOP,  3'(MOD_RED), 7, 0, 2, ERR_NONE);
      6'd20: return s(A_ZCHK, 0, 2, 0, 0, ERR_R_ZERO);
      6'd21: return s(A_MOP,  3'(MOD_INV), 1, 0, 9, ERR_NONE);
      6'd22: return s(A_MOP,  3'(MOD_MUL), 0, 2, 10, ERR_NONE);
      6'd23: return s(A_MOP,  3'(MOD_ADD), 4, 10, 10, ERR_NONE);
      6'd24: return s(A_MOP,  3'(MOD_MUL), 9, 10, 3, ERR_NONE);
      6'd25: return s(A_ZCHK, 0, 3, 0, 0, ERR_S_ZERO);
      6'd26: return s(A_SIG,  0, 2, 0, 0, ERR_NONE);
      6'd27: return s(A_SIG,  0, 3, 0, 0, ERR_NONE);
      6'd28: return s(A_END,  0, 0, 0, 0, ERR_NONE);
      // Algorithm 3: verify (r', s') against Q
      6'd29: return s(A_RCHK, 0, 2, 0, 0, ERR_RANGE);
      6'd30: return s(A_RCHK, 0, 3, 0, 0, ERR_RANGE);
      6'd31: return s(A_HASH, 0, 0, 0, 4, ERR_NONE);
      6'd32: return s(A_MOP,  3'(MOD_RED), 4, 0, 4, ERR_NONE);
      6'd33: return s(A_MOP,  3'(MOD_INV), 3, 0, 9, ERR_NONE);
      6'd34: return s(A_MOP,  3'(MOD_MUL), 4, 9, 10, ERR_NONE);
      6'd35: return s(A_MOP,  3'(MOD_MUL), 2, 9, 11, ERR_NONE);
      6'd36: return s(A_ELDG, 0, 0, 0, 0, ERR_NONE);
      6'd37: return s(A_ELD,  3'(LD_KEY), 10, 0, 0, ERR_NONE);
      6'd38: return s(A_ERUN, SL0, 0, 0, 0, ERR_NONE);
      6'd39: return s(A_EST,  X, 0, 0, 12, ERR_NONE);
      6'd40: return s(A_EST,  Y, 0, 0, 13, ERR_NONE);
      6'd41: return s(A_ELD,  3'(LD_PX), 5, 0, 0, ERR_NONE);
      6'd42: return s(A_ELD,  3'(LD_PY), 6, 0, 0, ERR_NONE);
      6'd43: return s(A_ELD,  3'(LD_KEY), 11, 0, 0, ERR_NONE);
      6'd44: return s(A_ERUN, SL1, 0, 0, 0, ERR_NONE);
      6'd45: return s(A_EST,  X, 0, 0, 7, ERR_NONE);
      6'd46: return s(A_EST,  Y, 0, 0, 8, ERR_NONE);
      6'd47: return s(A_ELD,  3'(LD_PX), 12, 0, 0, ERR_NONE);
      6'd48: return s(A_ELD,  3'(LD_PY), 13, 0, 0, ERR_NONE);
      6'd49: return s(A_ELD,  3'(LD_QX), 7, 0, 0, ERR_NONE);
      6'd50: return s(A_ELD,  3'(LD_QY), 8, 0, 0, ERR_NONE);
      6'd51: return s(A_ERUN, SLA, 0, 0, 0, ERR_NONE);
      6'd52: return s(A_ICHK, 0, 0, 0, 0, ERR_INFINITY);
      6'd53: return s(A_EST,  X, 0, 0, 7, ERR_NONE);
      6'd54: return s(A_MOP,  3'(MOD_RED), 7, 0, 15, ERR_NONE);
      6'd55: return s(A_EQ,   0, 15, 2, 0, ERR_INVALID);
      6'd56: return s(A_END,  0, 0, 0, 0, ERR_NONE);
      default: return s(A_END, 0, 0, 0, 0, ERR_BAD_CMD);
    endcase
  endfunction

  logic       run;
  spc_t       pc;
  step_t      st;
  logic [2:0] ph;
  logic       inf1, inf2, last_inf;

  assign st   = prog(pc);
  assign busy = run;

  // combinational control outputs for the current step and phase
  always_comb begin
    ram_we = 1'b0; ram_waddr = st.d; ram_raddr = st.a; bus1_sel = 3'd0; hold_en = 1'b0;
    ecc_ld_en = 1'b0; ecc_ld_sel = ecc_ld_e'(st.sub); ecc_ld_gen = 1'b0;
    ecc_start = 1'b0; ecc_op = (st.sub == SLA) ? ECC_PADD : ECC_SMUL;
    ecc_p_inf = inf1; ecc_q_inf = inf2;
    mod_start = 1'b0; mod_op = mod_op_e'(st.sub[1:0]);
    sig_load = 1'b0; sig_shift = 1'b0;
    if (!run) begin
      ram_we    = param_write;
      ram_waddr = param_addr;
    end else begin
      unique case (st.act)
        A_HASH: begin ram_we = sha_valid; bus1_sel = 3'd1; end
        A_MOP: begin
          if (ph != 3'd0) ram_raddr = st.b;
          if (ph == 3'd1) hold_en = 1'b1;
          if (ph == 3'd2) mod_start = !mod_busy;
          if (ph == 3'd3) begin ram_we = mod_done; bus1_sel = 3'd4; end
        end
        A_ELDG: begin
          ecc_ld_en = 1'b1; ecc_ld_gen = 1'b1;
          ecc_ld_sel = (ph == 3'd0) ? LD_PX : LD_PY;
        end
        A_ELD:  if (ph == 3'd1) ecc_ld_en = 1'b1;
        A_ERUN: if (ph == 3'd0) ecc_start = 1'b1;
        A_EST: begin ram_we = 1'b1; bus1_sel = (st.sub == Y) ? 3'd3 : 3'd2; end
        A_SIG: begin
          if (ph == 3'd1) sig_load = 1'b1;
          if (ph == 3'd2) sig_shift = (sig_words_left != 3'd0);
        end
        A_EQ:   if (ph == 3'd1) begin hold_en = 1'b1; ram_raddr = st.b; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run <= 1'b0; pc <= '0; ph <= '0; done <= 1'b0;
      error <= ERR_NONE; signature_ok <= 1'b0;
      inf1 <= 1'b0; inf2 <= 1'b0; last_inf <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1; ph <= '0;
          error <= ERR_NONE; signature_ok <= 1'b0;
          inf1 <= 1'b0; inf2 <= 1'b0; last_inf <= 1'b0;
          unique case (cmd)
            CMD_KEYGEN: pc <= E_KEYGEN;
            CMD_SIGN:   pc <= E_SIGN;
            CMD_VERIFY: pc <= E_VERIFY;
            default: begin
              run <= 1'b0; done <= 1'b1; error <= ERR_BAD_CMD;
            end
          endcase
        end
      end else begin
        ph <= ph + 1'b1;
        unique case (st.act)
          A_END: begin
            run <= 1'b0; done <= 1'b1;
            signature_ok <= (st.err == ERR_NONE);
            error <= st.err;
          end
          A_RCHK, A_ZCHK: if (ph == 3'd1) begin
            ph <= '0;
            if ((st.act == A_RCHK && !cmp_range) || (st.act == A_ZCHK && cmp_zero)) begin
              run <= 1'b0; done <= 1'b1; error <= st.err;
            end else pc <= pc + 1'b1;
          end
          A_HASH: begin
            ph <= '0;
            if (sha_valid) pc <= pc + 1'b1;
          end
          A_MOP: if (ph == 3'd2 && mod_busy) ph <= 3'd2;
          else if (ph == 3'd3) begin
            ph <= 3'd3;
            if (mod_done) begin ph <= '0; pc <= pc + 1'b1; end
          end
          A_ELDG, A_ELD: if (ph == 3'd1) begin ph <= '0; pc <= pc + 1'b1; end
          A_ERUN: if (ph == 3'd1) begin
            ph <= 3'd1;
            if (ecc_done) begin
              ph <= '0; pc <= pc + 1'b1;
              last_inf <= ecc_inf;
              if (st.sub == SL0) inf1 <= ecc_inf;
              if (st.sub == SL1) inf2 <= ecc_inf;
            end
          end
          A_ICHK: begin
            ph <= '0;
            if (last_inf) begin run <= 1'b0; done <= 1'b1; error <= st.err; end
            else pc <= pc + 1'b1;
          end
          A_EST: begin ph <= '0; pc <= pc + 1'b1; end
          A_SIG: if (ph == 3'd2) begin
            ph <= 3'd2;
            if (sig_words_left <= 3'd1) begin ph <= '0; pc <= pc + 1'b1; end
          end
          A_EQ: if (ph == 3'd2) begin
            ph <= '0;
            if (!cmp_equal) begin run <= 1'b0; done <= 1'b1; error <= st.err; end
            else pc <= pc + 1'b1;
          end
          default: begin run <= 1'b0; done <= 1'b1; error <= ERR_BAD_CMD; end
        endcase
      end
    end
  end
endmodule
