// mmm_multiplier: semi-systolic LSB-first Montgomery multiplier over GF(2^m).
//
// For odd m and Montgomery factor R = x^((m-1)/2) it computes
//   T = A * B * x^-((m-1)/2) mod G
// for residues A, B and any irreducible G = x^m + ... + 1 given per operation.
// The product splits into C (upper half of B, A multiplied by x^0..x^(m-1)/2)
// and D (lower half of B, A multiplied by x^-1..x^-(m-1)/2). Both run through
// one m x (m+1)/2 array of M-cells, D one clock after C with A and G
// bit-reversed, and a row of m X-cells adds them.
//
//   cd_slot_gen -> mmm_array -> x_row -> t_o
//
// Interface: valid/ready on the operands, out_valid on the result; g_i holds
// g_m..g_0 with g_m = g_0 = 1. Only g_1..g_(m-1) influence the result.
// Timing: operands taken in cycle n give t_o with out_valid in cycle
// n + (m+7)/2. One multiplication is accepted every two clocks, because each
// occupies the array for a C and a D slot. The critical path is one AND2 and
// one XOR2 (inside an M-cell).
// The architecture and latency follow the described design; the handshake,
// the reset of the control path and the valid tagging are this design's.
module mmm_multiplier
  import gf2m_pkg::*;
#(
  parameter int unsigned M = 571
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] a_i,
  input  logic [M-1:0] b_i,
  input  logic [M:0]   g_i,
  output logic         out_valid,
  output logic [M-1:0] t_o
);

  localparam int unsigned ROWS = (M + 1) / 2;

  logic               slot_valid;
  slot_e              slot_kind;
  logic [M-1:0]       a_top, g_top, col;
  logic [ROWS-1:0]    b_rows;

  cd_slot_gen #(.M(M)) u_slot (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .a_i       (a_i),
    .b_i       (b_i),
    .g_i       (g_i),
    .slot_valid(slot_valid),
    .slot_kind (slot_kind),
    .a_top     (a_top),
    .g_top     (g_top),
    .b_rows    (b_rows)
  );

  mmm_array #(.M(M)) u_array (
    .clk    (clk),
    .a_top  (a_top),
    .g_top  (g_top),
    .b_rows (b_rows),
    .col_out(col)
  );

  x_row #(.M(M)) u_xrow (
    .clk   (clk),
    .col_in(col),
    .t_out (t_o)
  );

  // A D slot leaves the array ROWS clocks after entering it; the X-cell output
  // register adds one more.
  logic [ROWS:0] dvalid_q;
  always_ff @(posedge clk) begin
    if (!rst_n) dvalid_q <= '0;
    else        dvalid_q <= {dvalid_q[ROWS-1:0], slot_valid && slot_kind == SLOT_D};
  end
  assign out_valid = dvalid_q[ROWS];

endmodule
