// End-to-end testbench of mf_memory at its default size (4-bit address,
// 16 rows, 16-bit word: 4 PLA input columns, 4 PLA output columns, 8 data
// columns, 5 product terms).
//
// Sequence, repeated for several PLA programs:
//   1. normal mode: write every row with an image made of the PLA settings
//      (columns 0..7 of rows 0..14) and random data (columns 8..15), read every
//      row back;
//   2. pre-decoder mode: read every address; the row read must be the one the
//      programmed sum of products selects, worked out here from the term list;
//   3. pre-decoder mode writes, checked by normal-mode reads of the mapped row;
//   4. reprogram the PLA with a different function.
// Programs: bitwise invert (y = ~x), bit reversal, the three-output example
// PLA (Y1 = ~X2 X4 + X3 X4, Y2 = ~X2 X4 + ~X1 X3, Y3 = ~X1 X3 + X3 X4) and
// random 5-term programs.
// Read latency is checked: data and rd_valid appear one clock after the read.
// Counted mechanisms (each must occur): normal writes/reads, pre-decoder
// reads/writes, mode switches both ways, PLA reconfigurations, idle cycles.
module tb_mf_memory;
  import mfm_pkg::*;

  localparam int unsigned AW = 4, DATA_W = 8;
  localparam int unsigned ROWS = 2**AW, PLA_W = 2*AW, WORD_W = PLA_W + DATA_W;
  localparam int unsigned N_TERMS = ROWS / 3;

  logic              clk = 1'b0, rst_n, csb, web, s;
  logic [AW-1:0]     addr, addr_eff;
  logic [WORD_W-1:0] din, dout;
  logic              rd_valid;

  mf_memory dut (.clk(clk), .rst_n(rst_n), .csb(csb), .web(web), .s(s), .addr(addr),
                 .din(din), .dout(dout), .rd_valid(rd_valid), .addr_eff(addr_eff));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wr_norm = 0, n_rd_norm = 0, n_wr_pre = 0, n_rd_pre = 0;
  int n_sw_to_pre = 0, n_sw_to_norm = 0, n_reconf = 0, n_idle = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Program description: per term, literal per input (0 none, 1 x, 2 ~x) and
  // the outputs it feeds.
  int unsigned    lit [N_TERMS][AW];
  logic [AW-1:0]  member [N_TERMS];
  logic [WORD_W-1:0] model [ROWS];

  function automatic logic [AW-1:0] ref_map(logic [AW-1:0] xi);
    logic [AW-1:0] r = '0;
    for (int t = 0; t < int'(N_TERMS); t++) begin
      logic p = 1'b1;
      for (int i = 0; i < int'(AW); i++) begin
        if (lit[t][i] == 1 && !xi[i]) p = 1'b0;
        if (lit[t][i] == 2 &&  xi[i]) p = 1'b0;
      end
      if (p) r |= member[t];
    end
    return r;
  endfunction

  // PLA columns of row r for the current program.
  function automatic logic [PLA_W-1:0] pla_bits(int r);
    logic [PLA_W-1:0] w = '0;
    int t = r / 3, k = r % 3;
    if (t >= int'(N_TERMS)) return '0;
    for (int i = 0; i < int'(AW); i++) begin
      if (k == int'(ROW_C) && lit[t][i] == 1) w[i] = 1'b1;
      if (k == int'(ROW_B) && lit[t][i] == 2) w[i] = 1'b1;
    end
    for (int o = 0; o < int'(AW); o++) begin
      if (k == int'(ROW_A)) w[AW+o] = member[t][o];
    end
    return w;
  endfunction

  task automatic set_mode(logic m);
    if (m && !s) n_sw_to_pre++;
    if (!m && s) n_sw_to_norm++;
    s = m;
  endtask

  task automatic do_write(logic [AW-1:0] a, logic [WORD_W-1:0] d);
    addr = a;
    din  = d;
    csb  = 1'b0;
    web  = 1'b0;
    @(posedge clk);
    #1;
    csb = 1'b1;
    web = 1'b1;
  endtask

  // Read and check dout against exp one clock after the read.
  task automatic do_read(logic [AW-1:0] a, logic [WORD_W-1:0] exp, logic [AW-1:0] exp_row);
    addr = a;
    csb  = 1'b0;
    web  = 1'b1;
    #1;
    checks++;
    if (addr_eff !== exp_row) begin
      failures++;
      $display("FAIL s=%b addr=%h addr_eff=%h exp_row=%h", s, a, addr_eff, exp_row);
    end
    @(posedge clk);
    #1;
    csb = 1'b1;
    checks++;
    if (!rd_valid || dout !== exp) begin
      failures++;
      $display("FAIL s=%b addr=%h dout=%h exp=%h rd_valid=%b", s, a, dout, exp, rd_valid);
    end
    // Idle cycle: rd_valid drops, dout holds.
    @(posedge clk);
    #1;
    n_idle++;
    checks++;
    if (rd_valid || dout !== exp) begin
      failures++;
      $display("FAIL idle after read: rd_valid=%b dout=%h", rd_valid, dout);
    end
  endtask

  task automatic load_program();
    set_mode(1'b0);
    for (int r = 0; r < int'(ROWS); r++) begin
      model[r] = {DATA_W'($urandom), pla_bits(r)};
      do_write(AW'(r), model[r]);
      n_wr_norm++;
    end
    for (int r = 0; r < int'(ROWS); r++) begin
      do_read(AW'(r), model[r], AW'(r));
      n_rd_norm++;
    end
  endtask

  task automatic exercise_predecoder();
    logic [AW-1:0] row;
    set_mode(1'b1);
    for (int a = 0; a < int'(ROWS); a++) begin
      row = ref_map(AW'(a));
      do_read(AW'(a), model[row], row);
      n_rd_pre++;
    end
    // Writes through the pre-decoder: keep the PLA columns, change the data.
    for (int n = 0; n < 4; n++) begin
      logic [AW-1:0] a = AW'($urandom);
      row = ref_map(a);
      model[row] = {DATA_W'($urandom), model[row][PLA_W-1:0]};
      do_write(a, model[row]);
      n_wr_pre++;
      set_mode(1'b0);
      do_read(row, model[row], row);
      n_rd_norm++;
      set_mode(1'b1);
    end
  endtask

  task automatic clear_program();
    for (int t = 0; t < int'(N_TERMS); t++) begin
      member[t] = '0;
      for (int i = 0; i < int'(AW); i++) lit[t][i] = 0;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    csb   = 1'b1;
    web   = 1'b1;
    s     = 1'b0;
    addr  = '0;
    din   = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // Program 1: y = ~x, one single-literal term per output.
    clear_program();
    for (int i = 0; i < int'(AW); i++) begin
      lit[i][i] = 2;
      member[i] = AW'(1) << i;
    end
    load_program();
    exercise_predecoder();

    // Program 2: bit reversal, y[AW-1-i] = x[i].
    clear_program();
    for (int i = 0; i < int'(AW); i++) begin
      lit[i][i] = 1;
      member[i] = AW'(1) << (AW-1-i);
    end
    n_reconf++;
    load_program();
    exercise_predecoder();

    // Program 3: the three-output example PLA
    //   Y1 = ~X2 X4 + X3 X4, Y2 = ~X2 X4 + ~X1 X3, Y3 = ~X1 X3 + X3 X4
    // with X1..X4 on address bits 0..3 and Y1..Y3 on row bits 0..2.
    clear_program();
    lit[0][1] = 2; lit[0][3] = 1; member[0] = 4'b0011;
    lit[1][2] = 1; lit[1][3] = 1; member[1] = 4'b0101;
    lit[2][0] = 2; lit[2][2] = 1; member[2] = 4'b0110;
    n_reconf++;
    load_program();
    exercise_predecoder();
    for (int a = 0; a < 16; a++) begin
      logic x1, x2, x3, x4;
      logic [AW-1:0] exp_row;
      {x4, x3, x2, x1} = AW'(a);
      exp_row = {1'b0, (!x1 && x3) || (x3 && x4), (!x2 && x4) || (!x1 && x3),
                 (!x2 && x4) || (x3 && x4)};
      checks++;
      if (ref_map(AW'(a)) !== exp_row) begin
        failures++;
        $display("FAIL example program reference, a=%0d", a);
      end
    end

    // Random programs using all five terms.
    for (int p = 0; p < 20; p++) begin
      for (int t = 0; t < int'(N_TERMS); t++) begin
        for (int i = 0; i < int'(AW); i++) lit[t][i] = $urandom_range(0, 2);
        member[t] = AW'($urandom);
      end
      n_reconf++;
      load_program();
      exercise_predecoder();
    end
    set_mode(1'b0);

    $display("mechanisms: normal wr=%0d rd=%0d, predecoder wr=%0d rd=%0d, switch to pre=%0d to normal=%0d, reconfig=%0d, idle=%0d",
             n_wr_norm, n_rd_norm, n_wr_pre, n_rd_pre, n_sw_to_pre, n_sw_to_norm, n_reconf, n_idle);
    if (n_wr_norm == 0 || n_rd_norm == 0 || n_wr_pre == 0 || n_rd_pre == 0 ||
        n_sw_to_pre == 0 || n_sw_to_norm == 0 || n_reconf == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
