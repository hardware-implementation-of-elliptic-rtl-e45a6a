// ecdsa_top: ECDSA core over the NIST binary curve B-409 with SHA3-512.
// One datapath serves key generation (Q = d*G), signature generation and
// signature verification. Blocks, after the paper's architecture: a
// parameter buffer (64-bit words in, 409-bit values out), a 16 x 409-bit RAM,
// the elliptic curve processor, the modular arithmetic processor (mod n),
// the comparison block, the SHA-3 unit fed directly with the message, the
// signature shift register (409 bits in, 64 bits out) and the control unit.
// Bus 1 carries results into the RAM (from the parameter buffer, the hash,
// the ECC output register or the modular processor); Bus 2 carries the RAM
// read data to the units. A hold register keeps the first operand of a
// two-operand modular operation or comparison while the second is read.
// The paper draws four operand registers on Bus 2; here the ECC processor's
// own input registers and this one hold register take that role (own choice).
// Use: while idle, shift each parameter in with param_valid/param_data (7
// words, most significant first) and store it with param_write/param_addr
// (RAM map in ecdsa_ctrl: d at 0, k at 1, r' at 2, s' at 3, Qx/Qy at 5/6).
// Send the message to SHA-3 (msg_init, then 16-bit words) before or after
// 'start'; the control waits for the digest. 'start' with 'cmd' runs the
// operation; results leave as 7-word groups on sig_out/sig_valid (r then s,
// or Qx then Qy); 'done' pulses at the end with 'error' and 'signature_ok'.
// The hash value e is the leftmost 409 bits of the 512-bit digest (FIPS 186).
module ecdsa_top
  import ecdsa_pkg::GX;
  import ecdsa_pkg::GY;
  import ecdsa_pkg::ecc_ld_e;
  import ecdsa_pkg::LD_PY;
  import ecdsa_pkg::ecc_op_e;
  import ecdsa_pkg::mod_op_e;
  import ecdsa_pkg::ecdsa_cmd_e;
  import ecdsa_pkg::ecdsa_err_e;
#(
  parameter int unsigned M = 409
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ecdsa_cmd_e   cmd,
  input  logic         start,
  input  logic         param_valid,
  input  logic [63:0]  param_data,
  input  logic         param_write,
  input  logic [3:0]   param_addr,
  input  logic         msg_init,
  input  logic         msg_valid,
  input  logic [15:0]  msg_data,
  input  logic         msg_last,
  input  logic [1:0]   msg_bytes,
  output logic         msg_ready,
  output logic         busy,
  output logic         done,
  output ecdsa_err_e   error,
  output logic         signature_ok,
  output logic         sig_valid,
  output logic [63:0]  sig_out
);
  // ---------------- buses ----------------
  logic [M-1:0] bus1, bus2, hold, pbuf, e_val, ecc_xo, ecc_yo, mod_y, ecc_ld_data;
  logic [511:0] digest;

  // control signals
  logic       ram_we, hold_en, ecc_ld_en, ecc_ld_gen, ecc_start, ecc_p_inf, ecc_q_inf;
  logic       mod_start, sig_load, sig_shift_en, sha_valid, ecc_done, ecc_inf, ecc_busy;
  logic       mod_done, mod_busy, cmp_zero, cmp_range, cmp_equal;
  logic [3:0] ram_waddr, ram_raddr;
  logic [2:0] bus1_sel, sig_words_left;
  ecc_ld_e    ecc_ld_sel;
  ecc_op_e    ecc_op;
  mod_op_e    mod_op;

  // e = leftmost M bits of the digest read as a big-endian integer
  // (bit j of that integer, counted from its top, is bit 7 - j%8 of byte j/8)
  always_comb begin
    for (int j = 0; j < M; j++) e_val[M-1-j] = digest[8*(j/8) + 7 - (j%8)];
  end

  always_comb begin
    unique case (bus1_sel)
      3'd1:    bus1 = e_val;
      3'd2:    bus1 = ecc_xo;
      3'd3:    bus1 = ecc_yo;
      3'd4:    bus1 = mod_y;
      default: bus1 = pbuf;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       hold <= '0;
    else if (hold_en) hold <= bus2;
  end

  assign ecc_ld_data = ecc_ld_gen ? ((ecc_ld_sel == LD_PY) ? GY : GX) : bus2;

  // ---------------- blocks ----------------
  param_buffer #(.M(M), .W(64)) u_pbuf (.clk, .rst_n, .in_valid(param_valid), .in_data(param_data),
                                        .value(pbuf));

  ecdsa_ram #(.M(M), .DEPTH(16)) u_ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(bus1),
                                        .raddr(ram_raddr), .rdata(bus2));

  ecc_proc #(.M(M)) u_ecc (.clk, .rst_n, .ld_en(ecc_ld_en), .ld_sel(ecc_ld_sel), .ld_data(ecc_ld_data),
                           .start(ecc_start), .op(ecc_op), .p_inf(ecc_p_inf), .q_inf(ecc_q_inf),
                           .busy(ecc_busy), .done(ecc_done), .xo(ecc_xo), .yo(ecc_yo), .inf(ecc_inf));

  mod_arith #(.M(M)) u_mod (.clk, .rst_n, .start(mod_start), .op(mod_op), .a(hold), .b(bus2),
                            .busy(mod_busy), .done(mod_done), .y(mod_y));

  comp #(.M(M)) u_comp (.a(bus2), .b(hold), .is_zero(cmp_zero), .in_range(cmp_range), .equal(cmp_equal));

  sha3_512 u_sha (.clk, .rst_n, .init(msg_init), .in_valid(msg_valid), .in_data(msg_data),
                  .in_last(msg_last), .in_bytes(msg_bytes), .in_ready(msg_ready),
                  .digest_valid(sha_valid), .digest(digest));

  sig_shift #(.M(M), .W(64)) u_sig (.clk, .rst_n, .load(sig_load), .din(bus2), .shift(sig_shift_en),
                                    .dout(sig_out), .words_left(sig_words_left));
  assign sig_valid = sig_shift_en;

  ecdsa_ctrl u_ctrl (.clk, .rst_n, .start, .cmd, .param_write, .param_addr,
                     .cmp_zero, .cmp_range, .cmp_equal,
                     .sha_valid, .ecc_done, .ecc_inf, .mod_busy, .mod_done, .sig_words_left,
                     .ram_we, .ram_waddr, .ram_raddr, .bus1_sel, .hold_en,
                     .ecc_ld_en, .ecc_ld_sel, .ecc_ld_gen, .ecc_start, .ecc_op, .ecc_p_inf, .ecc_q_inf,
                     .mod_start, .mod_op, .sig_load, .sig_shift(sig_shift_en),
                     .busy, .done, .error, .signature_ok);

  logic unused_top;
  assign unused_top = ecc_busy;
endmodule
