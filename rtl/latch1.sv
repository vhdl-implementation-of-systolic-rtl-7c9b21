// latch1: one-bit level-sensitive latch on the B and M paths between rows of the array.
//
// While en is 1 the latch is transparent (q follows d); while en is 0 it holds the last
// value. The array gives each latch its own enable so that the multiplicand and modulus bits
// seen by a row can be frozen while the inputs of earlier rows change.
//
// Interface: en, d in; q out. No reset: the latch is opened once before its output is used.
// Level-sensitive storage is intended here, so a latch reported by a synthesis or lint tool
// for this module is the design, not a mistake. Verilator, when the latch is linted inside
// the array, may report that it found no latch in the always_latch block; the simulation and
// the synthesized netlist (one $dlatch per instance) both show the level-sensitive storage,
// so that note stands. Behaviour as in the document.
module latch1 (
  input  logic en,
  input  logic d,
  output logic q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
