// tb_pow2_scaler: end-to-end test of the programmable power-of-two scaler
// at its default size (seven scale-by-2 blocks).
//
// For every exponent n = 1..7 it streams signed values into the scaler
// (one per cycle with random gaps): edge values (0, +-1, +-(M-1)/2, the
// sign boundary), values whose CRT overflow alpha is 5, and random values.
// Each result is checked against floor(ceil(v / 2^(n-1)) / 2) computed on
// whole integers, residue by residue including the residue mod 5, and the
// rounding error is checked to be at most 1/2.
// The latency must be n + 2 cycles. Counted mechanisms, each of which must
// occur: every exponent, negative inputs, inputs with alpha = 5, odd and
// even values reaching the correcting last block, back-to-back inputs.
module tb_pow2_scaler;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  logic        clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [2:0]  shift = 3'd1;
  rns_t        in_res, out_res;
  rres_t       out_xr;
  int          checks = 0, failures = 0, cycle = 0;
  int          n_shift [8];
  int          n_neg = 0, n_alpha5 = 0, n_last_odd = 0, n_last_even = 0, n_b2b = 0;
  logic        prev_valid = 0;
  longint      q_val [$];
  int          q_cyc [$];

  pow2_scaler dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    prev_valid <= in_valid;
    if (in_valid && prev_valid) n_b2b++;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint v, e, err2;
    int c, n;
    n = int'(shift);
    checks++;
    if (q_val.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      v = q_val.pop_front();
      c = q_cyc.pop_front();
      e = scale_ref(v, n);
      if (out_res !== enc(rep(e)) || out_xr !== enc_r(rep(e))) begin
        failures++;
        $display("FAIL n=%0d v=%0d expected %0d", n, v, e);
      end
      // |e - v / 2^n| <= 1/2: 2^n * e - v in [-2^(n-1), 2^(n-1)]
      err2 = (e << n) - v;
      checks++;
      if (err2 > (longint'(1) << (n - 1)) || err2 < -(longint'(1) << (n - 1))) begin
        failures++;
        $display("FAIL rounding error n=%0d v=%0d e=%0d", n, v, e);
      end
      // sampled at the edge after c, n + 2 registers, seen one edge later
      checks++;
      if (cycle - c != n + 3) begin
        failures++;
        $display("FAIL latency %0d for n=%0d", cycle - c - 1, n);
      end
    end
  end

  task automatic send(longint v);
    longint w = ceil_div(v, longint'(1) << (int'(shift) - 1));
    if (v < 0) n_neg++;
    if (crt_alpha(rep(v)) == 5) n_alpha5++;
    if (w[0]) n_last_odd++; else n_last_even++;
    n_shift[shift]++;
    in_valid <= 1;
    in_res   <= enc(rep(v));
    q_val.push_back(v);
    q_cyc.push_back(cycle);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 1; n <= 7; n++) begin
      shift <= 3'(n);
      @(posedge clk);
      for (longint d = -3; d <= 3; d++) send(d);
      for (longint d = 0; d <= 2; d++) begin send(HALF - d); send(-HALF + d); end
      for (int k = 0; k < 30; k++) send(sval(rand_alpha5()));
      for (int k = 0; k < 1500; k++) begin
        if ($urandom % 4 == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        send(rand_v());
      end
      in_valid <= 0;
      repeat (12) @(posedge clk);   // drain before the exponent changes
      checks++;
      if (q_val.size() != 0) begin
        failures++;
        $display("FAIL n=%0d: %0d results missing", n, q_val.size());
        q_val.delete();
        q_cyc.delete();
      end
    end
    for (int n = 1; n <= 7; n++) begin
      checks++;
      if (n_shift[n] == 0) begin failures++; $display("FAIL exponent %0d unused", n); end
    end
    checks++; if (n_neg == 0)       begin failures++; $display("FAIL no negative input"); end
    checks++; if (n_alpha5 == 0)    begin failures++; $display("FAIL no alpha=5 input"); end
    checks++; if (n_last_odd == 0)  begin failures++; $display("FAIL last block never odd"); end
    checks++; if (n_last_even == 0) begin failures++; $display("FAIL last block never even"); end
    checks++; if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back inputs"); end
    $display("mechanisms: negative=%0d alpha5=%0d last_odd=%0d last_even=%0d back_to_back=%0d",
             n_neg, n_alpha5, n_last_odd, n_last_even, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
