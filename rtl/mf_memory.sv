// mf_memory: multi-functional memory unit with a PLA pre-decoder in its array.
//
// An SRAM whose array also holds a reconfigurable PLA. The word is
// WORD_W = 2*AW + DATA_W bits: columns 0..AW-1 are the PLA input wires,
// columns AW..2*AW-1 its sum (output) wires, and the upper DATA_W columns hold
// ordinary data. In the PLA columns every three consecutive rows form one
// mp-cell row (a product term), so the PLA has N_TERMS = floor(2**AW/3) terms
// and is programmed by ordinary writes.
//
// Mode s = 0 (normal): the address selects the row directly.
// Mode s = 1 (pre-decoder): the address is fed to the PLA, and the PLA output
//   y = f(address) selects the row. The same array thus stores a decoder and
//   the table it indexes, e.g. a lookup table y = f(g(x)) whose address
//   compression g is programmed into the PLA.
//
// Interface: one access per clock. csb = 0 selects the chip, web = 0 writes
// din into the row at the rising edge, web = 1 reads the row; the data appear
// on dout after that edge and rd_valid marks that cycle. addr_eff shows the row
// address after the switch matrix (a'), combinationally. rst_n only clears
// rd_valid; the array has no reset.
// The blocks and the two modes follow the design this RTL implements; the word
// layout, the term count and the one-cycle timing are this design's choices.
module mf_memory
  import mfm_pkg::*;
#(
  parameter int unsigned AW      = 4,
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned N_TERMS = (2**AW) / MP_ROWS,
  localparam int unsigned ROWS    = 2**AW,
  localparam int unsigned PLA_W   = 2*AW,
  localparam int unsigned WORD_W  = PLA_W + DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              csb,
  input  logic              web,
  input  logic              s,
  input  logic [AW-1:0]     addr,
  input  logic [WORD_W-1:0] din,
  output logic [WORD_W-1:0] dout,
  output logic              rd_valid,
  output logic [AW-1:0]     addr_eff
);

  logic [AW-1:0]     pla_x, pla_y;
  logic [ROWS-1:0]   row_sel, wl;
  logic [WORD_W-1:0] bl, blb, rbl, rblb;
  logic              wl_en, w_en, s_en;
  mp_cfg_t           cfg [N_TERMS][PLA_W];

  control_logic u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .csb     (csb),
    .web     (web),
    .wl_en   (wl_en),
    .w_en    (w_en),
    .s_en    (s_en),
    .rd_valid(rd_valid)
  );

  switch_matrix #(.AW(AW)) u_switch (
    .s    (s),
    .a    (addr),
    .y    (pla_y),
    .x    (pla_x),
    .a_eff(addr_eff)
  );

  pla_predecoder #(.N_IN(AW), .N_OUT(AW), .N_TERMS(N_TERMS)) u_pla (
    .x  (pla_x),
    .cfg(cfg),
    .y  (pla_y)
  );

  addr_decoder #(.AW(AW)) u_dec (
    .a  (addr_eff),
    .sel(row_sel)
  );

  wordline_driver #(.ROWS(ROWS)) u_wld (
    .sel  (row_sel),
    .wl_en(wl_en),
    .wl   (wl)
  );

  write_driver #(.COLS(WORD_W)) u_wdrv (
    .w_en(w_en),
    .din (din),
    .bl  (bl),
    .blb (blb)
  );

  bitcell_array #(
    .ROWS    (ROWS),
    .COLS    (WORD_W),
    .PLA_COLS(PLA_W),
    .N_TERMS (N_TERMS)
  ) u_array (
    .clk (clk),
    .wl  (wl),
    .bl  (bl),
    .blb (blb),
    .rbl (rbl),
    .rblb(rblb),
    .cfg (cfg)
  );

  sense_amp_array #(.COLS(WORD_W)) u_sa (
    .clk (clk),
    .s_en(s_en),
    .rbl (rbl),
    .rblb(rblb),
    .dout(dout)
  );

  // Exactly one word line is active during an access, none otherwise.
  a_one_wl: assert property (@(posedge clk) wl_en |-> $onehot(wl))
    else $error("mf_memory: word lines not one-hot during an access");
  a_idle_wl: assert property (@(posedge clk) !wl_en |-> (wl == '0))
    else $error("mf_memory: word line active while idle");

endmodule
