// syst: N x N bit-level Montgomery modular multiplier array (radix 2), after Walter's
// systolic arrangement of Montgomery's algorithm.
//
// Row i performs iteration i of
//     P := PI;  for i in 0..N-1:  Q[i] := (P[0] + A[i]*B[0]) mod 2;
//                                 P := (P + A[i]*B + Q[i]*M) / 2
// so that POUT * 2^N = PI + A*B + Q*M, i.e. POUT is congruent to (PI + A*B) * 2^-N mod M for
// an odd modulus M. Column 0 of each row is a rightmost cell (mm_cell_right), which derives
// Q[i]; columns 1..N-1 are typical cells (mm_cell), which add the partial products and pass
// a two-wire carry to the left. The division by 2 is wiring: the sum bit of column j becomes
// bit j-1 of the next row's partial product, and the row's final carry wire c becomes bit
// N-1. Bit A[i] and Q[i] run along row i; B and M run down the columns.
//
// Between consecutive rows, every B and M bit passes through a level-sensitive latch
// (latch1). Latch (row r, column j) is enabled by CLB[r*N+j] / CLM[r*N+j]. With all enables
// high the array is a single combinational path from the inputs to POUT; lowering an enable
// freezes the B or M bit seen by all rows below it.
//
// Ports: CLB, CLM latch enables (N*(N-1) bits each); AI multiplier, BI multiplicand, MI odd
// modulus, PI initial partial product (N bits each); POUT result (N bits). There is no clock:
// the result settles through N rows of combinational cells.
//
// What follows the document: the cell equations, the Q[i] rule, the array wiring, the B/M
// latches with separate enables, and keeping N bits of partial product between rows (the
// d wire of each row's leftmost carry is not passed on). Because of the latter POUT equals
// the exact Montgomery product only while every partial product stays below 2^N, which is
// guaranteed when B < M, PI = 0 and M <= 2^(N-1). The generalisation from the 3 x 3 array
// to a parameter N is this design's choice. The top carry wire d of each row is unused by
// design; the latches are intended storage.
module syst
  import syst_pkg::*;
#(
  parameter int unsigned N = SYST_N
) (
  input  logic [N*(N-1)-1:0] CLB,
  input  logic [N*(N-1)-1:0] CLM,
  input  logic [N-1:0]       AI,
  input  logic [N-1:0]       BI,
  input  logic [N-1:0]       MI,
  input  logic [N-1:0]       PI,
  output logic [N-1:0]       POUT
);

  // b_row[r] / m_row[r]: multiplicand and modulus bits seen by row r.
  logic [N-1:0] b_row [N];
  logic [N-1:0] m_row [N];
  // p_row[r]: partial product entering row r; p_row[N] is the result.
  logic [N-1:0] p_row [N+1];
  logic [N-1:0] q_row;

  assign b_row[0] = BI;
  assign m_row[0] = MI;
  assign p_row[0] = PI;
  assign POUT     = p_row[N];

  for (genvar r = 0; r < N; r++) begin : g_row
    carry_t cy [N];  // cy[j]: carry out of column j

    mm_cell_right u_right (
      .a_i (AI[r]),
      .b_0 (b_row[r][0]),
      .m_0 (m_row[r][0]),
      .p_in(p_row[r][0]),
      .q_i (q_row[r]),
      .cout(cy[0])
    );

    for (genvar j = 1; j < N; j++) begin : g_col
      mm_cell u_cell (
        .a_i  (AI[r]),
        .b_j  (b_row[r][j]),
        .m_j  (m_row[r][j]),
        .q_i  (q_row[r]),
        .p_in (p_row[r][j]),
        .cin  (cy[j-1]),
        .p_out(p_row[r+1][j-1]),
        .cout (cy[j])
      );
    end

    // Top bit of the next partial product: the c wire of the leftmost carry.
    assign p_row[r+1][N-1] = cy[N-1].c;

    if (r < N - 1) begin : g_latch
      for (genvar j = 0; j < N; j++) begin : g_bit
        latch1 u_lb (.en(CLB[r*N+j]), .d(b_row[r][j]), .q(b_row[r+1][j]));
        latch1 u_lm (.en(CLM[r*N+j]), .d(m_row[r][j]), .q(m_row[r+1][j]));
      end
    end
  end

endmodule
