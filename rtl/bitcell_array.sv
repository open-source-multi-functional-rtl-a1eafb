// bitcell_array: the SRAM cell array, with its PLA columns grouped into mp-cells.
//
// ROWS x COLS single-bit cells. A cell on an active word line is written at the
// rising clock edge when its bit-line pair is differential (one line low): it
// takes the level of bl. Both lines high is the precharged idle state and
// leaves the cell alone. Reading is modelled as precharged read bit lines that
// the selected cell discharges: rbl falls when the cell holds 0, rblb when it
// holds 1. With no word line active both stay high.
// The leftmost PLA_COLS columns (columns 0..PLA_COLS-1) of rows
// 0..3*N_TERMS-1 are read out continuously as mp-cell settings: mp-cell
// (t, c) uses rows 3t (C, W1), 3t+1 (B, W2) and 3t+2 (A, W3) of column c, the
// three bit cells that share one uni-switch. These cells are ordinary memory
// cells too, reachable through the normal write and read path.
// Grouping three bit cells into an mp-cell follows the design this RTL
// implements; the clocked write, the read model and the absence of reset are
// this design's choices (an SRAM has no defined power-up contents).
module bitcell_array
  import mfm_pkg::*;
#(
  parameter int unsigned ROWS     = 16,
  parameter int unsigned COLS     = 16,
  parameter int unsigned PLA_COLS = 8,
  parameter int unsigned N_TERMS  = 5
) (
  input  logic                clk,
  input  logic [ROWS-1:0]     wl,
  input  logic [COLS-1:0]     bl,
  input  logic [COLS-1:0]     blb,
  output logic [COLS-1:0]     rbl,
  output logic [COLS-1:0]     rblb,
  output mp_cfg_t             cfg [N_TERMS][PLA_COLS]
);

  logic [COLS-1:0] mem [ROWS];

  // Write: a differential pair on an active word line sets the cell.
  always_ff @(posedge clk) begin
    for (int r = 0; r < int'(ROWS); r++) begin
      for (int c = 0; c < int'(COLS); c++) begin
        if (wl[r] && (bl[c] != blb[c])) mem[r][c] <= bl[c];
      end
    end
  end

  // Read: wired discharge of the precharged read bit lines.
  always_comb begin
    rbl  = '1;
    rblb = '1;
    for (int r = 0; r < int'(ROWS); r++) begin
      if (wl[r]) begin
        rbl  = rbl  & mem[r];
        rblb = rblb & ~mem[r];
      end
    end
  end

  // mp-cell view of the PLA columns.
  for (genvar t = 0; t < N_TERMS; t++) begin : g_term
    for (genvar c = 0; c < PLA_COLS; c++) begin : g_col
      assign cfg[t][c].c = mem[MP_ROWS*t + ROW_C][c];
      assign cfg[t][c].b = mem[MP_ROWS*t + ROW_B][c];
      assign cfg[t][c].a = mem[MP_ROWS*t + ROW_A][c];
    end
  end

endmodule
