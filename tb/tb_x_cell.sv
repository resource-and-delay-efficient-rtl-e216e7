// tb_x_cell: random stimulus on the X-cell. Checks every cycle that
// t_out = own_in (two clocks earlier) ^ mirror_in (one clock earlier).
module tb_x_cell;
  logic clk = 1'b0;
  logic own_in, mirror_in, t_out;
  logic own_h [3];
  logic mir_h [3];
  int checks = 0, failures = 0;

  x_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      own_in    = 1'($urandom);
      mirror_in = 1'($urandom);
      @(posedge clk);
      own_h[2] = own_h[1]; own_h[1] = own_h[0]; own_h[0] = own_in;
      mir_h[2] = mir_h[1]; mir_h[1] = mir_h[0]; mir_h[0] = mirror_in;
      #1;
      if (n >= 2) begin
        checks++;
        if (t_out !== (own_h[1] ^ mir_h[0])) begin
          failures++;
          $display("mismatch at n=%0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
