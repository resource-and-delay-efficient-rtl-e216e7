// x_row: the row of m X-cells below the Montgomery array.
//
// col_in[k] is the bottom output of array column k+1 (c_k in a C slot,
// d_(m-1-k) in a D slot). Cell k pairs its own column, delayed one clock,
// with the undelayed mirrored column m-1-k, giving
//   t_out[k] = c_k ^ d_k
// two clocks after the C slot reached the bottom of the array. Only the cycle
// after a D slot left the array holds a valid sum; the controller tags it.
// The crossover wiring is that of the described structure.
module x_row #(
  parameter int unsigned M = 571
) (
  input  logic         clk,
  input  logic [M-1:0] col_in,
  output logic [M-1:0] t_out
);

  for (genvar k = 0; k < M; k++) begin : g_x
    x_cell u_x (
      .clk      (clk),
      .own_in   (col_in[k]),
      .mirror_in(col_in[M-1-k]),
      .t_out    (t_out[k])
    );
  end

endmodule
