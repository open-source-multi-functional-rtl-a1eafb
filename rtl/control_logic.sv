// control_logic: access control of the memory.
//
// One access per clock cycle. While the chip is selected (csb = 0) the word
// line of the addressed row is enabled; web = 0 makes it a write (the write
// driver drives the bit lines, the cell takes the data at the clock edge),
// web = 1 a read (the sense amplifiers latch the row at the clock edge).
// rd_valid is a registered flag: 1 in the cycle after a read, when dout holds
// that read's data. Reset (rst_n low) clears it.
// The block is only named in the design this RTL follows: the one-cycle
// protocol and the csb/web names are this design's choice.
module control_logic (
  input  logic clk,
  input  logic rst_n,
  input  logic csb,
  input  logic web,
  output logic wl_en,
  output logic w_en,
  output logic s_en,
  output logic rd_valid
);

  always_comb begin
    wl_en = ~csb;
    w_en  = ~csb & ~web;
    s_en  = ~csb &  web;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= s_en;
  end

endmodule
