// mp_cell: the uni-switch of one memory-programmable cell.
//
// The cell sits where a horizontal wire (X in, X' out) crosses a vertical wire
// (Y in, Y' out). Both wires are precharged nets that any cell may discharge,
// so the cell does not drive levels: it reports whether it pulls each wire low.
//   case (a), cfg.a: the level of X turns on a pull-down of Y.
//   case (b), cfg.b: the level of Y turns on a pull-down of X'.
//   case (c), cfg.c: X and Y are joined through a pass gate, so a low on
//                    either wire discharges the other.
//   case (d): no bit set, the wires cross untouched.
// The three bits act independently, as the three transistor groups of the
// switch do. The four cases and the W1/W2/W3 = C/B/A bit placement follow the
// uni-switch and mp-cell schematics; modelling wires as wired-NOR nets and a
// join as "low discharges the other" is this design's digital abstraction.
// Purely combinational, no clock.
module mp_cell
  import mfm_pkg::*;
(
  input  mp_cfg_t cfg,     // stored bits C (W1), B (W2), A (W3)
  input  logic    h_val,   // present level of the horizontal wire
  input  logic    v_val,   // present level of the vertical wire
  output logic    pull_h,  // this cell discharges the horizontal wire
  output logic    pull_v   // this cell discharges the vertical wire
);

  always_comb begin
    pull_v = (cfg.a & h_val) | (cfg.c & ~h_val);
    pull_h = (cfg.b & v_val) | (cfg.c & ~v_val);
  end

endmodule
