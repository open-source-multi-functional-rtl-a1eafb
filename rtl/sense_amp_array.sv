// sense_amp_array: resolves the read bit-line pairs and latches the word.
//
// At the rising clock edge with s_en = 1, every column whose pair is
// differential latches rbl (the discharged line tells the stored value).
// A column whose pair is still fully precharged keeps its previous value. The
// output is valid from the edge after the read until the next read.
// Only the decision of the analog sense amplifier is modelled. The latched
// output starts undefined (no reset), as an SRAM's data outputs do.
module sense_amp_array #(
  parameter int unsigned COLS = 16
) (
  input  logic            clk,
  input  logic            s_en,
  input  logic [COLS-1:0] rbl,
  input  logic [COLS-1:0] rblb,
  output logic [COLS-1:0] dout
);

  always_ff @(posedge clk) begin
    if (s_en) begin
      for (int c = 0; c < int'(COLS); c++) begin
        if (rbl[c] != rblb[c]) dout[c] <= rbl[c];
      end
    end
  end

endmodule
