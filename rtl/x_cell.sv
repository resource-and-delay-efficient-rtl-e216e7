// x_cell: output adder X_j of the semi-systolic Montgomery multiplier.
//
// The bottom of column j of the array carries c_(j-1) in the C slot and, one
// clock later, d_(m-j) in the D slot. The coefficient t_(j-1) = c_(j-1) ^ d_(j-1)
// needs d_(j-1), which leaves the mirrored column m-j+1 in the D slot. The cell
// therefore delays its own column by one clock (own_q) and XORs it with the
// undelayed value of the mirrored column, so c and d meet in the same cycle.
// The sum goes to an output register.
//
// Interface: own_in is this column's bottom output, mirror_in the bottom
// output of column m-j+1 (for the middle column both are the same net).
// Timing: t_out = own_in(two clocks earlier) ^ mirror_in(one clock earlier).
// The delay register and the XOR follow the described cell; the output
// register is the second latch of the cell, placed here so that the stated
// latency of (m+7)/2 clocks is met.
module x_cell (
  input  logic clk,
  input  logic own_in,
  input  logic mirror_in,
  output logic t_out
);

  logic own_q;

  always_ff @(posedge clk) begin
    own_q <= own_in;
    t_out <= own_q ^ mirror_in;
  end

endmodule
