// Shared types of the multi-functional memory.
//
// An mp-cell (memory-programmable cell) is three SRAM bit cells stacked in one
// column plus a uni-switch. The three stored bits select how the cell's
// horizontal wire (X/X') and vertical wire (Y/Y') interact:
//   a : X gates a pull-down on Y   (case (a) of the uni-switch)
//   b : Y gates a pull-down on X'  (case (b))
//   c : X and Y are joined         (case (c))
//   none set: the wires cross without contact (case (d)).
// c sits on the first word line of the group (W1), b on the second (W2) and a
// on the third (W3), as in the cell schematic this memory follows.
package mfm_pkg;

  typedef struct packed {
    logic c;  // word line W1: join X and Y
    logic b;  // word line W2: Y discharges X'
    logic a;  // word line W3: X discharges Y
  } mp_cfg_t;

  // Word lines used by one mp-cell row.
  localparam int unsigned MP_ROWS = 3;

  // Row offsets of the three bits inside an mp-cell group.
  localparam int unsigned ROW_C = 0;
  localparam int unsigned ROW_B = 1;
  localparam int unsigned ROW_A = 2;

endpackage
