// pla_predecoder: a PLA built from mp-cells, used as the address pre-decoder.
//
// Layout (as in a classic NOR-NOR PLA): N_IN vertical input wires, then N_OUT
// vertical sum wires, crossed by N_TERMS horizontal product-term wires. Every
// crossing is an mp_cell.
//   AND plane: each input wire is driven by an input buffer. A product wire is
//     precharged high and discharged by its cells: case (b) discharges it when
//     the input is 1 (literal ~x), case (c) joins it to the input and so
//     discharges it when the input is 0 (literal x). One wire per input thus
//     gives both polarities.
//   OR plane: each sum wire is precharged high; case (a) discharges it when a
//     product wire is high, case (c) when a product wire is low. An output
//     inverter turns the wired NOR into the OR of the selected terms.
// Input wires are driven, so case (a) there has no effect; case (b) on a sum
// wire would feed a sum back into a product and is not used (no effect).
// The NOR-NOR structure and output inverters follow the PLA this design is
// based on; the single-wire literal encoding is this design's reading of the
// uni-switch. Purely combinational: y follows x and cfg.
module pla_predecoder
  import mfm_pkg::*;
#(
  parameter int unsigned N_IN    = 4,
  parameter int unsigned N_OUT   = 4,
  parameter int unsigned N_TERMS = 5
) (
  input  logic [N_IN-1:0]  x,
  input  mp_cfg_t          cfg [N_TERMS][N_IN+N_OUT],
  output logic [N_OUT-1:0] y
);

  localparam int unsigned NC = N_IN + N_OUT;

  logic [N_TERMS-1:0] term;                // product wires after discharge
  logic [NC-1:0]      pull_h [N_TERMS];    // per-cell discharge of product wire
  logic [NC-1:0]      pull_v [N_TERMS];    // per-cell discharge of column wire
  logic [N_OUT-1:0]   sum_w;               // sum wires before the inverters

  for (genvar t = 0; t < N_TERMS; t++) begin : g_row
    for (genvar c = 0; c < NC; c++) begin : g_col
      // Inside the AND plane the cell sees the input level; inside the OR
      // plane it sees the product wire level and its own column is only a sink.
      logic v_seen;
      if (c < N_IN) begin : g_and
        assign v_seen = x[c];
      end else begin : g_or
        assign v_seen = 1'b0;
      end
      mp_cell u_cell (
        .cfg   (cfg[t][c]),
        .h_val (term[t]),
        .v_val (v_seen),
        .pull_h(pull_h[t][c]),
        .pull_v(pull_v[t][c])
      );
    end
    // Only AND-plane cells may discharge a product wire.
    assign term[t] = ~|pull_h[t][N_IN-1:0];
  end

  // Sum wires: discharged by any OR-plane cell.
  always_comb begin
    for (int o = 0; o < int'(N_OUT); o++) begin
      sum_w[o] = 1'b1;
      for (int t = 0; t < int'(N_TERMS); t++) begin
        if (pull_v[t][N_IN+o]) sum_w[o] = 1'b0;
      end
    end
  end

  assign y = ~sum_w;

endmodule
