// switch_matrix: selects between normal and pre-decoder addressing.
//
// s = 0 (normal mode): the external address a goes straight to the row
//   decoder (a_eff = a) and the PLA inputs are held at 0.
// s = 1 (pre-decoder mode): a is routed to the PLA inputs x and the PLA
//   outputs y become the row address (a_eff = y).
// The two modes are those of the design this RTL follows; holding x at 0 in
// normal mode is this design's choice. Purely combinational.
module switch_matrix #(
  parameter int unsigned AW = 4
) (
  input  logic          s,
  input  logic [AW-1:0] a,
  input  logic [AW-1:0] y,
  output logic [AW-1:0] x,
  output logic [AW-1:0] a_eff
);

  always_comb begin
    if (s) begin
      x     = a;
      a_eff = y;
    end else begin
      x     = '0;
      a_eff = a;
    end
  end

endmodule
