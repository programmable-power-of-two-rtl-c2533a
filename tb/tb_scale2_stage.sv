// tb_scale2_stage: checks the basic scale-by-2 block: expected result ceil(v / 2), odd values rounded up.
// Streams signed values (edges near 0, +-(M-1)/2 and the sign boundary,
// values with CRT overflow alpha = 5, random values) with their residue
// mod 5, one per cycle with random gaps, and compares every base residue
// and the redundant residue of the result with whole-integer arithmetic.
// The one-cycle latency is checked, and each of the four cases
// (even/odd times positive/negative) must occur.
module tb_scale2_stage;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  rns_t  in_x, out_x;
  rres_t in_xr, out_xr;
  int    checks = 0, failures = 0, cycle = 0;
  int    n_case [4] = '{0, 0, 0, 0};   // {negative, odd}
  longint q_val [$];
  int     q_cyc [$];

  scale2_stage dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint v, e;
    int c;
    checks++;
    if (q_val.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      v = q_val.pop_front();
      c = q_cyc.pop_front();
      e = rep(ceil_div(v, 2));
      if (out_x !== enc(e) || out_xr !== enc_r(e)) begin
        failures++;
        $display("FAIL v=%0d expected %0d", v, sval(e));
      end
      // sampled at the edge after c, registered there, seen one edge later
      checks++;
      if (cycle - c != 2) begin
        failures++;
        $display("FAIL latency %0d", cycle - c - 1);
      end
    end
  end

  task automatic send(longint v);
    longint x = rep(v);
    n_case[{v < 0, x[0] ^ (v < 0)}]++;
    in_valid <= 1;
    in_x     <= enc(x);
    in_xr    <= enc_r(x);
    q_val.push_back(v);
    q_cyc.push_back(cycle);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (longint d = -3; d <= 3; d++) send(d);
    for (longint d = 0; d <= 3; d++) begin send(HALF - d); send(-HALF + d); end
    for (int k = 0; k < 100; k++) send(sval(rand_alpha5()));
    for (int k = 0; k < 3000; k++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      send(rand_v());
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q_val.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_val.size());
    end
    foreach (n_case[k]) begin
      checks++;
      if (n_case[k] == 0) begin
        failures++;
        $display("FAIL case %0d never exercised", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
