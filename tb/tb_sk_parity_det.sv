// tb_sk_parity_det: checks the Shenoy-Kumaresan parity detector.
// Feeds representatives X in [0, M) with their residue mod 5: edge values,
// random values and values whose CRT overflow alpha is 5 (the case the
// redundant modulus 5 alone cannot tell from 0). Compares the parity and
// the y_i outputs with whole-integer reference values.
module tb_sk_parity_det;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  rns_t  x, y;
  rres_t xr;
  logic  parity;
  int    checks = 0, failures = 0, n_alpha5 = 0;

  sk_parity_det dut (.x(x), .xr(xr), .parity(parity), .y(y));

  task automatic check(longint v);
    x  = enc(v);
    xr = enc_r(v);
    #1;
    if (crt_alpha(v) == 5) n_alpha5++;
    checks++;
    if (parity !== v[0]) begin
      failures++;
      $display("FAIL parity X=%0d got %0d alpha=%0d", v, parity, crt_alpha(v));
    end
    checks++;
    if (y !== crt_y(v)) begin
      failures++;
      $display("FAIL y X=%0d", v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint edges [6] = '{0, 1, HALF, HALF + 1, TM - 2, TM - 1};
    foreach (edges[k]) check(edges[k]);
    for (int k = 0; k < 3000; k++) check(rep(rand_v()));
    for (int k = 0; k < 200; k++) check(rand_alpha5());
    checks++;
    if (n_alpha5 < 200) begin
      failures++;
      $display("FAIL alpha=5 case seen only %0d times", n_alpha5);
    end
    $display("alpha=5 cases: %0d", n_alpha5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
