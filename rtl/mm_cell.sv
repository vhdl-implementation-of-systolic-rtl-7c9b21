// mm_cell: typical cell of the bit-level Montgomery multiplier array (row i, column j > 0).
//
// The cell performs one digit step of the loop P := (P + A[i]*B + Q[i]*M) / 2:
//     p_out + 2*cout = p_in + a_i*b_j + q_i*m_j + cin
// where p_out is bit j-1 of the next partial product (the division by 2 is the wiring:
// the sum bit moves one column to the right on its way to the next row). Two partial
// products (a_i AND b_j, q_i AND m_j), the incoming partial-product bit and the two-wire
// carry are added as one 3-bit sum; the sum's bit 0 is p_out, bits 2:1 the carry out.
//
// Interface: all single-bit inputs and outputs, carry as syst_pkg::carry_t (c weight 1,
// d weight 2). Purely combinational, no clock.
//
// The cell equation and the two-wire carry follow the document. Writing the sum as a single
// addition instead of a netlist of half adders and OR gates is this design's choice; the two
// agree because, within a row, the carry into a cell never exceeds 2. The pass-through
// outputs of A, B, M and Q are left to the array's wiring.
module mm_cell
  import syst_pkg::*;
(
  input  logic   a_i,
  input  logic   b_j,
  input  logic   m_j,
  input  logic   q_i,
  input  logic   p_in,
  input  carry_t cin,
  output logic   p_out,
  output carry_t cout
);

  logic [2:0] sum;

  always_comb begin
    sum   = 3'({1'b0, a_i & b_j}) + 3'({1'b0, q_i & m_j}) + 3'({1'b0, p_in})
          + 3'(carry_value(cin));
    p_out = sum[0];
    cout  = '{d: sum[2], c: sum[1]};
  end

endmodule
