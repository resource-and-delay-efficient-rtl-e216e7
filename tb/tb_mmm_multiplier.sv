// tb_mmm_multiplier: end-to-end test of the Montgomery multiplier at m = 13.
//
// Part 1 streams random operations (random A, B and a random G with
// g_m = g_0 = 1, changing from one operation to the next) with random gaps in
// in_valid, and checks every result against the bit-serial reference
// A*B*x^-6 mod G and its arrival exactly (m+7)/2 = 10 clocks after the
// operands were taken.
// Part 2 uses the irreducible G = x^13 + x^4 + x^3 + x + 1 and the
// multiplier as it is meant to be used: alpha and beta are mapped to residues
// alpha*R and beta*R (R = x^6), multiplied, and the result is brought back
// with a second multiplication by 1; the outcome must equal alpha*beta mod G.
//
// Counted mechanisms, each of which must occur: operations accepted back to
// back (every second clock), operands held off by in_ready (stall), idle
// cycles between operations, G changed between consecutive operations, and
// Montgomery round trips.
module tb_mmm_multiplier;
  import gf2m_ref_pkg::*;
  localparam int unsigned M   = 13;
  localparam int unsigned LAT = (M + 7) / 2;
  localparam int          NRAND = 300;
  localparam int          NTRIP = 20;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_ready, out_valid;
  logic [M-1:0] a_i, b_i, t_o;
  logic [M:0]   g_i;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_stall = 0, n_idle = 0, n_gchange = 0, n_trip = 0;

  mmm_multiplier #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  // Expected results in order of acceptance.
  logic [M-1:0] exp_q [$];
  int           due_q [$];
  int           cyc = 0;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Result monitor, sampling at the falling edge.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      check(exp_q.size() > 0, "unexpected result");
      if (exp_q.size() > 0) begin
        logic [M-1:0] e;
        int d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        check(t_o === e, "result value");
        check(cyc == d, "latency (m+7)/2");
        if (t_o !== e) $display("  t=%h expected %h", t_o, e);
        if (cyc != d)  $display("  arrived cycle %0d, due %0d", cyc, d);
      end
    end
    if (rst_n && !out_valid && due_q.size() > 0) check(due_q[0] != cyc, "missing result");
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one operation, wait until it is taken; returns the acceptance cycle.
  task automatic issue(poly_t a, poly_t b, poly_t g, int max_gap);
    repeat ($urandom_range(0, max_gap)) begin
      in_valid = 1'b0;
      @(negedge clk); cyc++;
      n_idle++;
    end
    in_valid = 1'b1;
    a_i = a[M-1:0];
    b_i = b[M-1:0];
    g_i = g[M:0];
    forever begin
      #1;
      if (in_ready) break;
      n_stall++;
      @(negedge clk); cyc++;
    end
    exp_q.push_back(M'(mont(a, b, g, M)));
    due_q.push_back(cyc + LAT);
    @(negedge clk); cyc++;
    in_valid = 1'b0;
  endtask

  initial begin
    poly_t a, b, g, gprev, alpha, beta, girr, t1, t2;
    int last_acc;
    rst_n = 1'b0; in_valid = 1'b0; a_i = '0; b_i = '0; g_i = '1;
    repeat (3) @(negedge clk);
    cyc = 0;
    rst_n = 1'b1;

    // Part 1: random stream. Issuing right after the previous acceptance
    // asks one clock early, so in_ready holds the operands off for one clock
    // and they are taken back to back.
    gprev = rand_poly(M);
    last_acc = -10;
    for (int n = 0; n < NRAND; n++) begin
      a = rand_elem(M);
      b = rand_elem(M);
      g = ($urandom_range(0, 3) == 0) ? gprev : rand_poly(M);
      if (n > 0 && g != gprev) n_gchange++;
      gprev = g;
      issue(a, b, g, ($urandom_range(0, 2) == 0) ? 3 : 0);
      if (due_q[$] - LAT == last_acc + 2) n_b2b++;
      last_acc = due_q[$] - LAT;
    end
    repeat (LAT + 2) begin @(negedge clk); cyc++; end

    // Part 2: Montgomery round trip with the irreducible pentanomial
    // x^13 + x^4 + x^3 + x + 1.
    girr = '0;
    girr[13] = 1'b1; girr[4] = 1'b1; girr[3] = 1'b1; girr[1] = 1'b1; girr[0] = 1'b1;
    for (int n = 0; n < NTRIP; n++) begin
      alpha = rand_elem(M);
      beta  = rand_elem(M);
      issue(to_mont(alpha, girr, M), to_mont(beta, girr, M), girr, 0);
      while (!(out_valid && rst_n)) begin @(negedge clk); cyc++; end
      t1 = '0;
      t1[M-1:0] = t_o;
      #1;
      b = '0; b[0] = 1'b1;
      issue(t1, b, girr, 0);
      while (!(out_valid && rst_n)) begin @(negedge clk); cyc++; end
      t2 = '0;
      t2[M-1:0] = t_o;
      check(t2 == mulmod(alpha, beta, girr, M), "round trip alpha*beta");
      n_trip++;
      @(negedge clk); cyc++;
    end
    repeat (LAT + 2) begin @(negedge clk); cyc++; end

    check(exp_q.size() == 0, "all results delivered");
    check(n_b2b > 0, "back-to-back operations occurred");
    check(n_stall > 0, "in_ready stall occurred");
    check(n_idle > 0, "idle cycles occurred");
    check(n_gchange > 0, "G changed between operations");
    check(n_trip > 0, "Montgomery round trip occurred");
    $display("back_to_back=%0d stalls=%0d idle=%0d g_changes=%0d round_trips=%0d",
             n_b2b, n_stall, n_idle, n_gchange, n_trip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
