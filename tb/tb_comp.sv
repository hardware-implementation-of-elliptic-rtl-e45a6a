// tb_comp: checks zero detection, the [1, n-1] range test at its edges
// (0, 1, n-1, n, n+1, 2^409-1) and on random values, and the equality test.
module tb_comp;
  import ecdsa_pkg::*;
  elem_t a, b;
  logic is_zero, in_range, equal;
  int checks = 0, failures = 0;
  comp #(.M(M)) dut (.a, .b, .is_zero, .in_range, .equal);
  task automatic chk(elem_t x, elem_t y, bit z, bit r, bit e);
    a = x; b = y; #1;
    checks++;
    if (is_zero !== z || in_range !== r || equal !== e) begin
      failures++; $display("comp mismatch: z%0d r%0d e%0d", is_zero, in_range, equal);
    end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    elem_t v;
    chk('0, '0, 1, 0, 1);
    chk(elem_t'(1), '0, 0, 1, 0);
    chk(N_ORDER - 1, N_ORDER - 1, 0, 1, 1);
    chk(N_ORDER, '0, 0, 0, 0);
    chk(N_ORDER + 1, N_ORDER + 1, 0, 0, 1);
    chk('1, '0, 0, 0, 0);
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < M; i += 32) v[i +: 32] = $urandom;
      v[M-1] = 1'b0;                    // below 2^408 < n
      chk(v, (n % 2) ? v : v ^ elem_t'(1), v == '0, v != '0, n % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
