// tb_m_cell: exhaustive check of the M-cell. All 32 input combinations are
// applied one per clock and each registered output is compared, one clock
// later, with a_in ^ (a_msb & g_in), c_in ^ (b & a_in) and g_in.
module tb_m_cell;
  logic clk = 1'b0;
  logic a_in, c_in, g_in, a_msb, b;
  logic a_out, c_out, g_out;
  int checks = 0, failures = 0;

  m_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_a, exp_c, exp_g;
    for (int v = 0; v < 32; v++) begin
      {a_in, c_in, g_in, a_msb, b} = 5'(v);
      exp_a = (a_msb && g_in) ? !a_in : a_in;
      exp_c = (b && a_in) ? !c_in : c_in;
      exp_g = g_in;
      @(posedge clk);
      #1;
      checks += 3;
      if (a_out !== exp_a) begin failures++; $display("a mismatch v=%0d", v); end
      if (c_out !== exp_c) begin failures++; $display("c mismatch v=%0d", v); end
      if (g_out !== exp_g) begin failures++; $display("g mismatch v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
