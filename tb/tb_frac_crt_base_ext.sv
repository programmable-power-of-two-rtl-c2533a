// tb_frac_crt_base_ext: streams one number per cycle into the base
// extension and checks, two cycles later, the delayed base residues and the
// computed residue mod 5. Inputs: edge values, numbers with CRT overflow
// alpha = 5, random numbers. The latency of 2 cycles is checked by the
// cycle number at which each result appears.
module tb_frac_crt_base_ext;
  import rns_pkg::*;
  import tb_rns_ref_pkg::*;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  rns_t  in_x, out_x;
  rres_t out_xr;
  int    checks = 0, failures = 0, cycle = 0;
  longint q_val [$];
  int     q_cyc [$];

  frac_crt_base_ext dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint v;
    int c;
    checks++;
    if (q_val.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      v = q_val.pop_front();
      c = q_cyc.pop_front();
      if (out_x !== enc(v) || out_xr !== enc_r(v)) begin
        failures++;
        $display("FAIL X=%0d xr=%0d expected %0d", v, out_xr, enc_r(v));
      end
      checks++;
      // input sampled at the edge after c; result registered 2 edges later,
      // seen here one edge after that
      if (cycle - c != 3) begin
        failures++;
        $display("FAIL latency %0d", cycle - c - 1);
      end
    end
  end

  task automatic send(longint v);
    in_valid <= 1;
    in_x     <= enc(v);
    q_val.push_back(v);
    q_cyc.push_back(cycle);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send(0); send(1); send(HALF); send(HALF + 1); send(TM - 1);
    for (int k = 0; k < 100; k++) send(rand_alpha5());
    for (int k = 0; k < 3000; k++) begin
      if ($urandom % 4 == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      send(rep(rand_v()));
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q_val.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q_val.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
