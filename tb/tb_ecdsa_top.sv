// tb_ecdsa_top: end-to-end test of the ECDSA core at its default (full)
// size. It generates a key pair, signs a 100-byte message, verifies the
// signature, verifies it again against a changed message (must be
// rejected), verifies with r' = 0 (range error), signs with k = 0 (range
// error) and signs with a private key chosen so that s = 0 (s-zero error).
// Outputs are compared with the affine double-and-add, wide-integer and
// SHA3-512 reference models. Counts each mechanism (key generation, signing,
// accepted and rejected verification, range error, s = 0 error, separate
// SHA-3 padding block not needed here) and fails if one never happened.
module tb_ecdsa_top;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  ecdsa_cmd_e cmd = CMD_KEYGEN;
  logic param_valid = 0, param_write = 0, msg_init = 0, msg_valid = 0, msg_last = 0;
  logic [63:0] param_data = '0;
  logic [3:0]  param_addr = '0;
  logic [15:0] msg_data = '0;
  logic [1:0]  msg_bytes = '0;
  logic msg_ready, busy, done, signature_ok, sig_valid;
  ecdsa_err_e error;
  logic [63:0] sig_out;
  int checks = 0, failures = 0;
  longint cyc = 0, t0;
  logic [63:0] words [$];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (sig_valid) words.push_back(sig_out);
  end

  ecdsa_top dut (.clk, .rst_n, .cmd, .start, .param_valid, .param_data, .param_write, .param_addr,
                 .msg_init, .msg_valid, .msg_data, .msg_last, .msg_bytes, .msg_ready,
                 .busy, .done, .error, .signature_ok, .sig_valid, .sig_out);

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_param(logic [3:0] addr, elem_t v);
    logic [447:0] x;
    x = 448'(v);
    for (int i = 6; i >= 0; i--) begin
      @(posedge clk); param_valid <= 1; param_data <= x[64*i +: 64];
    end
    @(posedge clk); param_valid <= 0; param_write <= 1; param_addr <= addr;
    @(posedge clk); param_write <= 0;
  endtask

  task automatic send_msg(byte unsigned m [], int len);
    int w;
    @(posedge clk); msg_init <= 1;
    @(posedge clk); msg_init <= 0;
    w = 0;
    while (1) begin
      int rem;
      rem = len - 2*w;
      msg_valid <= 1;
      msg_data  <= {(rem > 1) ? m[2*w+1] : 8'h00, (rem > 0) ? m[2*w] : 8'h00};
      msg_last  <= (rem <= 2);
      msg_bytes <= (rem >= 2) ? 2'd2 : 2'(rem);
      @(posedge clk);
      while (!msg_ready) @(posedge clk);
      if (rem <= 2) break;
      w++;
    end
    msg_valid <= 0; msg_last <= 0;
  endtask

  task automatic run(ecdsa_cmd_e c);
    words.delete();
    @(posedge clk); start <= 1; cmd <= c;
    @(posedge clk); start <= 0;
    t0 = cyc;
    while (!done) @(posedge clk);
    #1;
    $display("%s finished after %0d cycles, error %s, signature_ok %0d", c.name(), cyc - t0, error.name(), signature_ok);
  endtask

  function automatic elem_t word_value(int first);
    logic [447:0] x;
    for (int i = 0; i < 7; i++) x[64*(6-i) +: 64] = words[first + i];
    return elem_t'(x);
  endfunction

  function automatic elem_t rnd_scalar();
    elem_t v;
    for (int i = 0; i < M; i += 32) v[i +: 32] = $urandom;
    v[M-1] = 1'b0;
    return v;
  endfunction

  task automatic expect_ok(string what, bit ok, ecdsa_err_e err);
    checks++;
    if (signature_ok !== ok || error !== err) begin
      failures++; $display("%s: got ok=%0d error=%s", what, signature_ok, error.name());
    end
  endtask

  byte unsigned msg [], msg2 [];
  elem_t d, k, e, r, s, r_exp, s_exp, d_bad;
  point_t q, kg;
  int n_keygen = 0, n_sign = 0, n_accept = 0, n_reject = 0, n_range = 0, n_szero = 0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1;
    msg = new[100];
    for (int i = 0; i < 100; i++) msg[i] = 8'($urandom);
    msg2 = new[100];
    foreach (msg[i]) msg2[i] = msg[i];
    msg2[37] = msg2[37] ^ 8'h01;
    e = digest_to_e(rsha3_512(msg, 100));

    // ---- key generation ----
    d = rnd_scalar();
    load_param(4'd0, d);
    run(CMD_KEYGEN); n_keygen++;
    expect_ok("keygen", 1, ERR_NONE);
    q = rpt_mul(d, gen_point());
    checks++;
    if (words.size() != 14 || word_value(0) !== q.x || word_value(7) !== q.y) begin
      failures++; $display("public key mismatch (%0d words)", words.size());
    end

    // ---- signature generation ----
    k = rnd_scalar();
    load_param(4'd1, k);
    send_msg(msg, 100);
    run(CMD_SIGN); n_sign++;
    expect_ok("sign", 1, ERR_NONE);
    kg = rpt_mul(k, gen_point());
    r_exp = rmod_red(kg.x);
    s_exp = rmod_mul(rmod_inv(k), rmod_add(rmod_red(e), rmod_mul(d, r_exp)));
    checks++;
    if (words.size() != 14) begin failures++; $display("signature: %0d words", words.size()); end
    else begin
      r = word_value(0); s = word_value(7);
      if (r !== r_exp || s !== s_exp) begin failures++; $display("signature mismatch"); end
    end

    // ---- verification: valid ----
    load_param(4'd2, r); load_param(4'd3, s);
    send_msg(msg, 100);
    run(CMD_VERIFY);
    expect_ok("verify valid", 1, ERR_NONE);
    if (signature_ok) n_accept++;

    // ---- verification: changed message ----
    load_param(4'd2, r); load_param(4'd3, s);
    send_msg(msg2, 100);
    run(CMD_VERIFY);
    expect_ok("verify changed message", 0, ERR_INVALID);
    if (error == ERR_INVALID) n_reject++;

    // ---- verification: r' = 0 ----
    load_param(4'd2, '0);
    run(CMD_VERIFY);
    expect_ok("verify r'=0", 0, ERR_RANGE);
    if (error == ERR_RANGE) n_range++;

    // ---- signing with k = 0 ----
    load_param(4'd1, '0);
    run(CMD_SIGN);
    expect_ok("sign k=0", 0, ERR_RANGE);
    if (error == ERR_RANGE) n_range++;

    // ---- signing with d = -e/r mod n, which makes s = 0 ----
    d_bad = rmod_mul(N_ORDER - rmod_red(e), rmod_inv(r));
    load_param(4'd0, d_bad);
    load_param(4'd1, k);
    send_msg(msg, 100);
    run(CMD_SIGN);
    expect_ok("sign with s=0", 0, ERR_S_ZERO);
    if (error == ERR_S_ZERO) n_szero++;

    $display("keygen %0d, sign %0d, accepted %0d, rejected %0d, range errors %0d, s=0 errors %0d",
             n_keygen, n_sign, n_accept, n_reject, n_range, n_szero);
    checks++; if (n_keygen == 0 || n_sign == 0) failures++;
    checks++; if (n_accept == 0) failures++;
    checks++; if (n_reject == 0) failures++;
    checks++; if (n_range == 0) failures++;
    checks++; if (n_szero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
