// write_driver: write driver and bit-line precharge, digital view.
//
// When w_en is 1 each bit-line pair is driven differentially with the data
// (bl = din, blb = ~din). Otherwise both lines of every pair stay at the
// precharged high level, which the cell array treats as "no write".
// The analog precharge circuit itself is not modelled; only its idle level is.
// Purely combinational.
module write_driver #(
  parameter int unsigned COLS = 16
) (
  input  logic            w_en,
  input  logic [COLS-1:0] din,
  output logic [COLS-1:0] bl,
  output logic [COLS-1:0] blb
);

  always_comb begin
    if (w_en) begin
      bl  = din;
      blb = ~din;
    end else begin
      bl  = '1;
      blb = '1;
    end
  end

endmodule
