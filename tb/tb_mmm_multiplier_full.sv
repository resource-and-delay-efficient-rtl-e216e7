// tb_mmm_multiplier_full: the multiplier at its default size, m = 571, with
// the field polynomial G = x^571 + x^10 + x^5 + x^2 + 1.
//
// Four random multiplications are issued back to back (one every two clocks)
// and their results compared with the bit-serial reference
// A*B*x^-285 mod G, each arriving (m+7)/2 = 289 clocks after its operands were
// taken. Then one Montgomery round trip is made: alpha*R and beta*R
// (R = x^285) are multiplied and the product multiplied by 1, which must give
// alpha*beta mod G.
module tb_mmm_multiplier_full;
  import gf2m_ref_pkg::*;
  localparam int unsigned M   = 571;
  localparam int unsigned LAT = (M + 7) / 2;
  localparam int          NOPS = 4;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_ready, out_valid;
  logic [M-1:0] a_i, b_i, t_o;
  logic [M:0]   g_i;
  int checks = 0, failures = 0;
  int cyc = 0;

  mmm_multiplier dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(negedge clk);
    cyc++;
  endtask

  initial begin
    poly_t g, a [NOPS], b [NOPS], alpha, beta, t1, one;
    logic [M-1:0] exp_t [NOPS];
    int acc [NOPS];
    int got;

    g = '0;
    g[571] = 1'b1; g[10] = 1'b1; g[5] = 1'b1; g[2] = 1'b1; g[0] = 1'b1;
    rst_n = 1'b0; in_valid = 1'b0; a_i = '0; b_i = '0; g_i = g[M:0];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;

    for (int n = 0; n < NOPS; n++) begin
      a[n] = rand_elem(M);
      b[n] = rand_elem(M);
      exp_t[n] = M'(mont(a[n], b[n], g, M));
    end

    // Back-to-back issue: operands are held until in_ready.
    for (int n = 0; n < NOPS; n++) begin
      in_valid = 1'b1;
      a_i = a[n][M-1:0];
      b_i = b[n][M-1:0];
      #1;
      while (!in_ready) begin step(); #1; end
      acc[n] = cyc;
      step();
    end
    in_valid = 1'b0;
    check(acc[NOPS-1] - acc[0] == 2 * (NOPS - 1), "one operation every two clocks");

    got = 0;
    while (got < NOPS && cyc < acc[0] + LAT + 4 * NOPS) begin
      if (out_valid) begin
        check(t_o == exp_t[got], "result value");
        check(cyc == acc[got] + LAT, "latency (m+7)/2");
        got++;
      end
      step();
    end
    check(got == NOPS, "all results delivered");

    // Montgomery round trip.
    alpha = rand_elem(M);
    beta  = rand_elem(M);
    in_valid = 1'b1;
    a_i = M'(to_mont(alpha, g, M));
    b_i = M'(to_mont(beta, g, M));
    #1;
    while (!in_ready) begin step(); #1; end
    step();
    in_valid = 1'b0;
    while (!out_valid) step();
    t1 = '0;
    t1[M-1:0] = t_o;
    one = '0; one[0] = 1'b1;
    in_valid = 1'b1;
    a_i = t1[M-1:0];
    b_i = one[M-1:0];
    #1;
    while (!in_ready) begin step(); #1; end
    step();
    in_valid = 1'b0;
    while (!out_valid) step();
    check(t_o == M'(mulmod(alpha, beta, g, M)), "round trip alpha*beta");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
