// tb_mmm_array: checks the M-cell array alone at m = 11 (6 rows).
//
// Each random operation (A, B, G) is fed as a C slot and, in the next cycle,
// a D slot, with the slot orders applied here by hand: C gets A, g_1..g_m and
// b_((m-1)/2 + r) on row r; D gets A and G bit-reversed, 0 on row 0 and
// b_((m-1)/2 - r) on row r. The bottom output is compared, (m+1)/2 clocks after
// each slot, with half-products computed one term at a time:
//   C = sum_{i=0}^{(m-1)/2} b_((m-1)/2+i) * A * x^i    mod G
//   D = sum_{i=1}^{(m-1)/2} b_((m-1)/2-i) * A * x^-i   mod G (seen bit-reversed)
// Slots follow each other in every cycle, so the test also shows that the
// array accepts a new slot per clock.
module tb_mmm_array;
  import gf2m_ref_pkg::*;
  localparam int unsigned M    = 11;
  localparam int unsigned ROWS = (M + 1) / 2;
  localparam int unsigned H    = (M - 1) / 2;
  localparam int          NOPS = 60;

  logic clk = 1'b0;
  logic [M-1:0]    a_top, g_top, col_out;
  logic [ROWS-1:0] b_rows;
  logic [M-1:0]    exp_col [2*NOPS];
  int checks = 0, failures = 0;

  mmm_array #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] rev(logic [M-1:0] v);
    logic [M-1:0] r;
    for (int k = 0; k < M; k++) r[k] = v[M-1-k];
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: slot s (0, 1, 2, ...) is presented in cycle s.
  initial begin
    poly_t a, b, g, p, c, d;
    for (int op = 0; op < NOPS; op++) begin
      a = rand_elem(M);
      b = rand_elem(M);
      g = rand_poly(M);
      c = '0;
      p = a;
      for (int i = 0; i <= H; i++) begin
        if (b[H+i]) c ^= p;
        p = mulx(p, g, M);
      end
      d = '0;
      p = a;
      for (int i = 1; i <= H; i++) begin
        p = divx(p, g, M);
        if (b[H-i]) d ^= p;
      end
      exp_col[2*op]   = c[M-1:0];
      exp_col[2*op+1] = rev(d[M-1:0]);
      // C slot
      a_top = a[M-1:0];
      for (int k = 0; k < M; k++) g_top[k] = g[k+1];
      for (int r = 0; r < ROWS; r++) b_rows[r] = b[H+r];
      @(posedge clk); #1;
      // D slot
      for (int k = 0; k < M; k++) begin
        a_top[k] = a[M-1-k];
        g_top[k] = g[M-1-k];
      end
      for (int r = 0; r < ROWS; r++) b_rows[r] = (r == 0) ? 1'b0 : b[H-r];
      @(posedge clk); #1;
    end
  end

  // Checker: after the s-th + ROWS rising edge, slot s is on col_out.
  initial begin
    for (int e = 1; e <= 2 * NOPS - 1 + ROWS; e++) begin
      @(posedge clk); #2;
      if (e >= ROWS) begin
        checks++;
        if (col_out !== exp_col[e-ROWS]) begin
          failures++;
          $display("slot %0d: col_out=%b expected %b", e - ROWS, col_out, exp_col[e-ROWS]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
