// m_cell: basic cell M_j^(i) of the semi-systolic GF(2^m) Montgomery array.
//
// One cell sits at row i, column j of the array. It performs one step of two
// independent recurrences that share the operand bit a_in = a_(j-1)^(i-1):
//   a_out = a_in ^ (a_msb & g_in)   next bit of A*x mod G (or A*x^-1 mod G in a D slot)
//   c_out = c_in ^ (b & a_in)       accumulates b * A into the partial product
// so the cell holds two AND2 and two XOR2 gates. The a_msb and b inputs are
// broadcast along the row without a register; a, c and g leave the cell
// through one-bit registers (the three latches per cell of the structure), so
// the critical path is one AND2 followed by one XOR2. g_in is passed down
// unchanged to the cell below.
//
// Timing: all three outputs are registered, valid one clock after the inputs.
// The datapath has no reset: the array controller tags valid slots instead.
// Parameter W places W such cells side by side with a shared a_msb and b, as
// in one row of the array (W = 1 is the single cell); the array uses one
// W = m instance per row so that elaboration stays fast at m = 571.
// The gate-level contents follow the described cell; using edge-triggered
// flip-flops for the latches is this implementation's choice.
module m_cell #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] a_in,   // a_(j-1)^(i-1), from the cell above on the right (diagonal link)
  input  logic [W-1:0] c_in,   // c_(j-1)^(i-1), from the cell above (vertical link)
  input  logic [W-1:0] g_in,   // g_j, from the cell above (vertical link)
  input  logic         a_msb,  // a_(m-1)^(i-1), broadcast along the row
  input  logic         b,      // multiplier bit of this row, broadcast along the row
  output logic [W-1:0] a_out,  // a_j^(i), to the cell below on the left
  output logic [W-1:0] c_out,  // c_(j-1)^(i), to the cell below
  output logic [W-1:0] g_out   // g_j, to the cell below
);

  always_ff @(posedge clk) begin
    a_out <= a_in ^ ({W{a_msb}} & g_in);
    c_out <= c_in ^ ({W{b}} & a_in);
    g_out <= g_in;
  end

endmodule
