// tb_cd_slot_gen: checks the operand scheduler at m = 7 with random gaps in
// in_valid. For each accepted operation it expects, in the next two cycles,
// a C slot (A, g_(k+1) on column k, b_(3+r) on row r) and then a D slot
// (A and G bit-reversed, 0 on row 0, b_(3-r) on row r), and checks that
// in_ready is low exactly while a C slot is presented and that no slot is
// flagged valid when nothing was accepted.
module tb_cd_slot_gen;
  import gf2m_pkg::*;
  localparam int unsigned M    = 7;
  localparam int unsigned ROWS = (M + 1) / 2;
  localparam int unsigned H    = (M - 1) / 2;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_ready, slot_valid;
  logic [M-1:0] a_i, b_i, a_top, g_top;
  logic [M:0]   g_i;
  slot_e        slot_kind;
  logic [ROWS-1:0] b_rows;
  int checks = 0, failures = 0;

  cd_slot_gen #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] ea, eb;
    logic [M:0]   eg;
    int           phase;  // 0 idle, 1 expect C, 2 expect D
    rst_n = 1'b0; in_valid = 1'b0; a_i = '0; b_i = '0; g_i = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    phase = 0;
    for (int n = 0; n < 400; n++) begin
      // Drive this cycle's inputs.
      in_valid = ($urandom_range(0, 3) != 0);
      a_i = M'($urandom);
      b_i = M'($urandom);
      g_i = (M+1)'($urandom) | (M+1)'(1) | ((M+1)'(1) << M);
      #1;
      // Check the slot presented in this cycle.
      if (phase == 1) begin
        check(slot_valid && slot_kind == SLOT_C, "C slot flagged");
        check(!in_ready, "in_ready low during C slot");
        check(a_top == ea, "C slot a");
        for (int k = 0; k < M; k++) check(g_top[k] == eg[k+1], "C slot g");
        for (int r = 0; r < ROWS; r++) check(b_rows[r] == eb[H+r], "C slot b");
      end else if (phase == 2) begin
        check(slot_valid && slot_kind == SLOT_D, "D slot flagged");
        check(in_ready, "in_ready high during D slot");
        for (int k = 0; k < M; k++) check(a_top[k] == ea[M-1-k], "D slot a");
        for (int k = 0; k < M; k++) check(g_top[k] == eg[M-1-k], "D slot g");
        check(b_rows[0] == 1'b0, "D slot row 0 b");
        for (int r = 1; r < ROWS; r++) check(b_rows[r] == eb[H-r], "D slot b");
      end else begin
        check(!slot_valid, "no slot when idle");
        check(in_ready, "in_ready high when idle");
      end
      // Next phase.
      if (phase == 1) phase = 2;
      else if (in_valid) begin
        phase = 1; ea = a_i; eb = b_i; eg = g_i;
      end else phase = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
