// syst_pkg: types and constants shared by the bit-level Montgomery multiplier array.
//
// The array works in radix 2, one bit per cell. A cell passes to its left neighbour a carry
// of value 0..3, carried on two wires: c (weight 1 in the receiving column) and d (weight 2).
// Inside one row the carry never exceeds 2, which the rightmost cell and the typical cell
// both rely on. SYST_N is the array size of the prototype, a 3 x 3 array for 3-bit operands.
package syst_pkg;

  // Default operand width and array size (rows = columns = SYST_N).
  localparam int unsigned SYST_N = 3;

  // Two-wire carry between neighbouring cells of a row: value = c + 2*d.
  typedef struct packed {
    logic d;  // weight 2
    logic c;  // weight 1
  } carry_t;

  // Numeric value of a carry bundle.
  function automatic logic [1:0] carry_value(carry_t cy);
    return {1'b0, cy.c} + {cy.d, 1'b0};
  endfunction

endpackage
