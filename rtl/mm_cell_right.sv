// mm_cell_right: rightmost cell (column 0) of each row of the Montgomery multiplier array.
//
// It chooses the row's modulus multiple. In radix 2 with an odd modulus, Montgomery's factor
// (r - M[0])^-1 mod r is 1, so the multiple is q_i = (P_i[0] + A[i]*B[0]) mod 2: adding
// q_i*M then makes the low bit of P_i + A[i]*B + q_i*M zero, which is what lets the row divide
// by 2 exactly. The cell forms
//     2*cout = p_in + a_i*b_0 + q_i*m_0
// and passes the carry, 0 or 1, to column 1; the sum bit is always 0 and is not an output.
// q_i is broadcast to every cell of the row.
//
// Interface: single-bit inputs, q_i output, carry as syst_pkg::carry_t. Combinational.
//
// The function, including the choice of q_i from the low bit, follows the document; writing
// the carry as one addition is this design's choice.
module mm_cell_right
  import syst_pkg::*;
(
  input  logic   a_i,
  input  logic   b_0,
  input  logic   m_0,
  input  logic   p_in,
  output logic   q_i,
  output carry_t cout
);

  logic       ab;
  logic [1:0] sum;

  always_comb begin
    ab   = a_i & b_0;
    q_i  = p_in ^ ab;
    sum  = 2'(p_in) + 2'(ab) + 2'(q_i & m_0);
    // sum is 0 or 2 by the choice of q_i (its bit 0 is the dropped zero), so the carry into
    // column 1 is sum / 2, at most 1.
    cout = carry_t'(sum >> 1);
  end

endmodule
