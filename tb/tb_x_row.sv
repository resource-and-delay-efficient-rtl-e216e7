// tb_x_row: drives the X-cell row (m = 7) with a C vector followed one clock
// later by a D vector in bit-reversed order, as the array delivers them, and
// checks that the sum appears one clock after the D vector with
// t[k] = c[k] ^ d[k]. Back-to-back pairs are used so that stale values of the
// previous pair would show up as errors.
module tb_x_row;
  localparam int unsigned M = 7;
  logic clk = 1'b0;
  logic [M-1:0] col_in, t_out;
  logic [M-1:0] c, d, exp_t;
  int checks = 0, failures = 0;

  x_row #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] rev(logic [M-1:0] v);
    logic [M-1:0] r;
    for (int k = 0; k < M; k++) r[k] = v[M-1-k];
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col_in = '0;
    for (int n = 0; n < 100; n++) begin
      c = M'($urandom);
      d = M'($urandom);
      exp_t = c ^ d;
      col_in = c;
      @(posedge clk); #1;
      col_in = rev(d);
      @(posedge clk); #1;
      checks++;
      if (t_out !== exp_t) begin
        failures++;
        $display("n=%0d t=%b expected %b", n, t_out, exp_t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
