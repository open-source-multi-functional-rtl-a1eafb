// addr_decoder: row address decoder.
//
// Turns the AW-bit row address into a one-hot select of 2**AW rows: bit r of
// sel is 1 exactly when a == r. A plain binary decoder; the design only names
// this block. Purely combinational.
module addr_decoder #(
  parameter int unsigned AW = 4
) (
  input  logic [AW-1:0]      a,
  output logic [2**AW-1:0]   sel
);

  always_comb begin
    for (int r = 0; r < 2**AW; r++) begin
      sel[r] = (a == AW'(r));
    end
  end

endmodule
