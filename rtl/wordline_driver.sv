// wordline_driver: raises the selected word line while word lines are enabled.
//
// wl = sel when wl_en is 1, all word lines low otherwise, so no cell is touched
// outside an access. Gating decoder outputs with an enable is this design's
// reading of a block that is only named. Purely combinational.
module wordline_driver #(
  parameter int unsigned ROWS = 16
) (
  input  logic [ROWS-1:0] sel,
  input  logic            wl_en,
  output logic [ROWS-1:0] wl
);

  assign wl = wl_en ? sel : '0;

endmodule
