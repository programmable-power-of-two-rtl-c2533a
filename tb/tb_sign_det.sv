// tb_sign_det: checks the fractional-CRT sign detector on the boundary
// values 0, 1, (M-1)/2, (M+1)/2, M-1, values next to M/2, and random values.
// The y_i inputs are computed by the reference package; the expected sign
// is X > (M-1)/2.
module tb_sign_det;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  rns_t y;
  logic sign;
  int   checks = 0, failures = 0;

  sign_det dut (.y(y), .sign(sign));

  task automatic check(longint v);
    logic exp_s;
    y = crt_y(v);
    #1;
    exp_s = (v > HALF);
    checks++;
    if (sign !== exp_s) begin
      failures++;
      $display("FAIL X=%0d sign=%0d expected %0d", v, sign, exp_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint edges [5] = '{0, 1, TM - 1, TM - 2, 2};
    foreach (edges[k]) check(edges[k]);
    for (longint d = -20; d <= 20; d++) check(HALF + d);
    for (int k = 0; k < 3000; k++) check(rep(rand_v()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
