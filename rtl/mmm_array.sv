// mmm_array: the m x (m+1)/2 semi-systolic array of M-cells.
//
// Column k (k = 0..m-1, column k+1 of the structure) holds coefficient k of
// the running operand A^(i) and of the partial product; row r (r = 0..(m-1)/2)
// is iteration i = r+1. Within a row the cells are combinational apart from
// their output registers: the top coefficient a_(m-1) and the row's b bit are
// broadcast to all m cells, so every row computes in one clock
//   A^(i) = A^(i-1) * x mod G        (shift one place towards the MSB, reduce)
//   C^(i) = C^(i-1) + b_row * A^(i-1)
// The reduced-out bit a_(m-1) becomes the new a_0 through one feedback
// register per row; the a output of the last column would be a_m and is unused.
// The partial product enters the first row as zero.
//
// The same array computes the D half-product of a Montgomery product when it
// is fed bit-reversed A and G (see cd_slot_gen): in reversed order the shift
// towards the MSB is a shift towards the LSB, i.e. a multiplication by x^-1.
//
// The b bit of row r has to meet its operand r clocks after the slot entered
// the top row, so b_rows[r] passes through r skew registers on the left edge;
// the caller presents all b bits of a slot in the same cycle.
//
// Timing: a slot presented on a_top/g_top/b_rows in cycle n is on col_out in
// cycle n + (m+1)/2. A new slot may be presented every cycle.
// Structure, cell contents and skew follow the described array; the
// zero-initialised partial product and the port grouping are this design's.
module mmm_array #(
  parameter int unsigned M = 571
) (
  input  logic                 clk,
  input  logic [M-1:0]         a_top,   // a_k^(0) of this slot, column k
  input  logic [M-1:0]         g_top,   // g value for column k (g_(k+1) in a C slot)
  input  logic [(M+1)/2-1:0]   b_rows,  // b bit of each row for this slot, unskewed
  output logic [M-1:0]         col_out  // bottom row partial product
);

  localparam int unsigned ROWS = (M + 1) / 2;

  if (M % 2 == 0 || M < 3) begin : g_bad_m
    $error("mmm_array: M must be odd and at least 3");
  end

  // Inputs of row r (index ROWS is the array's output).
  logic [M-1:0] a_row [ROWS+1];
  logic [M-1:0] c_row [ROWS+1];
  logic [M-1:0] g_row [ROWS+1];

  assign a_row[0] = a_top;
  assign c_row[0] = '0;
  assign g_row[0] = g_top;

  for (genvar r = 0; r < ROWS; r++) begin : g_row_r
    logic         b_sk;      // b bit of this row after the skew registers
    logic [M-1:0] a_next;    // a outputs of the cells: a_next[k] = a_(k+1)^(i)
    logic         a_fb_q;    // a_(m-1)^(i-1) registered: becomes a_0^(i)

    if (r == 0) begin : g_noskew
      assign b_sk = b_rows[0];
    end else begin : g_skew
      logic [r-1:0] sk_q;
      always_ff @(posedge clk) begin
        sk_q[0] <= b_rows[r];
        for (int s = 1; s < r; s++) sk_q[s] <= sk_q[s-1];
      end
      assign b_sk = sk_q[r-1];
    end

    // The m cells of the row; cell k drives a_next[k] = a_(k+1) and c_k.
    m_cell #(.W(M)) u_m (
      .clk  (clk),
      .a_in (a_row[r]),
      .c_in (c_row[r]),
      .g_in (g_row[r]),
      .a_msb(a_row[r][M-1]),
      .b    (b_sk),
      .a_out(a_next),
      .c_out(c_row[r+1]),
      .g_out(g_row[r+1])
    );

    always_ff @(posedge clk) a_fb_q <= a_row[r][M-1];

    assign a_row[r+1] = {a_next[M-2:0], a_fb_q};
  end

  assign col_out = c_row[ROWS];

endmodule
