// tb_mod_arith: checks the four modular operations (reduction, addition,
// multiplication, inversion) against wide-integer references, including the
// wrap-around cases a + b >= n and a >= n, and that the R2 start-up finishes.
module tb_mod_arith;
  import ecdsa_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  mod_op_e op = MOD_RED;
  elem_t a = '0, b = '0, y, e;
  int checks = 0, failures = 0;
  int n_op [4];
  always #5 clk = ~clk;
  mod_arith #(.M(M)) dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .y);
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic run(mod_op_e o, elem_t x, elem_t z);
    @(posedge clk); start <= 1; op <= o; a <= x; b <= z;
    @(posedge clk); start <= 0;
    while (!done) begin @(posedge clk); #1; end
  endtask
  initial begin
    for (int i = 0; i < 4; i++) n_op[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    while (busy) begin @(posedge clk); #1; end
    for (int n = 0; n < 40; n++) begin
      elem_t x, z;
      mod_op_e o;
      for (int i = 0; i < M; i += 32) begin x[i +: 32] = $urandom; z[i +: 32] = $urandom; end
      o = mod_op_e'(n % 4);
      if (o != MOD_RED) begin x = rmod_red(x); z = rmod_red(z); end
      if (n == 1) begin x = N_ORDER - 1; z = N_ORDER - 1; end     // ADD wraps
      if (n == 4) x = '1;                                          // RED of 2^M-1
      unique case (o)
        MOD_RED: e = rmod_red(x);
        MOD_ADD: e = rmod_add(x, z);
        MOD_MUL: e = rmod_mul(x, z);
        default: e = rmod_inv(x);
      endcase
      run(o, x, z);
      n_op[o]++;
      checks++;
      if (y !== e) begin failures++; $display("op %s mismatch n=%0d", o.name(), n); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_op[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
