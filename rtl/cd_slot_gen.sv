// cd_slot_gen: operand register and C/D slot scheduler of the Montgomery
// multiplier.
//
// The array computes T = A*B*x^-(m-1)/2 mod G as the sum of two half-products
// that use the same cells one clock apart:
//   C slot: column k gets a_k and g_(k+1); row r gets b_((m-1)/2 + r).
//   D slot: column k gets a_(m-1-k) and g_(m-1-k) (A and G bit-reversed);
//           row 0 gets 0 and row r > 0 gets b_((m-1)/2 - r).
// Bit-reversing A and G turns the array's multiplication by x into a
// multiplication by x^-1, so the D slot accumulates b_k * A * x^(k-(m-1)/2)
// for the lower half of B while the C slot covers the upper half.
//
// Handshake: operands are taken in a cycle with in_valid and in_ready high.
// The C slot is presented in the next cycle and the D slot in the cycle
// after; in_ready is low while a C slot is presented, so at most one
// multiplication starts every two clocks. g_i must have g_m = g_0 = 1.
//
// The input orders of both slots and the one-clock stagger of D after C follow
// the described structure; the operand register, the valid/ready handshake
// and the reset are this design's choices.
module cd_slot_gen
  import gf2m_pkg::*;
#(
  parameter int unsigned M = 571
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [M-1:0]       a_i,
  input  logic [M-1:0]       b_i,
  input  logic [M:0]         g_i,
  output logic               slot_valid,
  output slot_e              slot_kind,
  output logic [M-1:0]       a_top,
  output logic [M-1:0]       g_top,
  output logic [(M+1)/2-1:0] b_rows
);

  localparam int unsigned ROWS = (M + 1) / 2;
  localparam int unsigned H    = (M - 1) / 2;

  logic [M-1:0] a_q, b_q;
  logic [M:0]   g_q;
  logic         accept;

  assign in_ready = !(slot_valid && slot_kind == SLOT_C);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_valid <= 1'b0;
      slot_kind  <= SLOT_C;
    end else if (accept) begin
      slot_valid <= 1'b1;
      slot_kind  <= SLOT_C;
    end else if (slot_valid && slot_kind == SLOT_C) begin
      slot_kind  <= SLOT_D;
    end else begin
      slot_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      a_q <= a_i;
      b_q <= b_i;
      g_q <= g_i;
    end
  end

  always_comb begin
    for (int k = 0; k < M; k++) begin
      if (slot_kind == SLOT_C) begin
        a_top[k] = a_q[k];
        g_top[k] = g_q[k+1];
      end else begin
        a_top[k] = a_q[M-1-k];
        g_top[k] = g_q[M-1-k];
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      if (slot_kind == SLOT_C) b_rows[r] = b_q[H+r];
      else if (r == 0)         b_rows[r] = 1'b0;
      else                     b_rows[r] = b_q[H-r];
    end
  end

  // G must be a polynomial of degree m with a constant term, and a D slot
  // always follows its C slot.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (accept)
        assert (g_i[0] && g_i[M]) else $error("cd_slot_gen: g_0 and g_m must be 1");
      if (slot_valid && slot_kind == SLOT_C)
        assert (!accept) else $error("cd_slot_gen: operands taken during a C slot");
    end
  end

endmodule
