// Testbench for bitcell_array (16 x 16, 8 PLA columns, 5 mp-cell rows).
// Writes random words through differential bit lines, checks that idle pairs
// and inactive word lines write nothing, that the read bit lines of a selected
// row carry (word, ~word) and stay high with no row selected, and that the
// mp-cell view returns the C/B/A bits from rows 3t, 3t+1, 3t+2.
module tb_bitcell_array;
  import mfm_pkg::*;

  localparam int unsigned ROWS = 16, COLS = 16, PLA_COLS = 8, N_TERMS = 5;

  logic            clk = 1'b0;
  logic [ROWS-1:0] wl;
  logic [COLS-1:0] bl, blb, rbl, rblb;
  mp_cfg_t         cfg [N_TERMS][PLA_COLS];
  logic [COLS-1:0] model [ROWS];
  int              checks = 0, failures = 0;

  bitcell_array dut (
    .clk(clk), .wl(wl), .bl(bl), .blb(blb), .rbl(rbl), .rblb(rblb), .cfg(cfg));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(int r, logic [COLS-1:0] d, logic [COLS-1:0] idle);
    wl  = ROWS'(1) << r;
    bl  = d | idle;
    blb = ~d | idle;
    @(posedge clk);
    #1;
    model[r] = (model[r] & idle) | (d & ~idle);
    wl  = '0;
    bl  = '1;
    blb = '1;
  endtask

  task automatic check_row(int r);
    wl = ROWS'(1) << r;
    #1;
    checks++;
    if (rbl !== model[r] || rblb !== ~model[r]) begin
      failures++;
      $display("FAIL read row %0d rbl=%h rblb=%h exp=%h", r, rbl, rblb, model[r]);
    end
    wl = '0;
  endtask

  task automatic check_cfg();
    for (int t = 0; t < int'(N_TERMS); t++) begin
      for (int c = 0; c < int'(PLA_COLS); c++) begin
        checks++;
        if (cfg[t][c].c !== model[3*t][c] || cfg[t][c].b !== model[3*t+1][c] ||
            cfg[t][c].a !== model[3*t+2][c]) begin
          failures++;
          $display("FAIL cfg t=%0d c=%0d", t, c);
        end
      end
    end
  endtask

  initial begin
    wl  = '0;
    bl  = '1;
    blb = '1;
    for (int r = 0; r < int'(ROWS); r++) begin
      model[r] = '0;
      write_row(r, COLS'($urandom), '0);
    end
    for (int r = 0; r < int'(ROWS); r++) check_row(r);
    check_cfg();
    // No row selected: both read lines stay precharged.
    #1;
    checks++;
    if (rbl !== '1 || rblb !== '1) begin
      failures++;
      $display("FAIL idle read lines rbl=%h rblb=%h", rbl, rblb);
    end
    // Driven bit lines without a word line must not write.
    bl  = '0;
    blb = '1;
    @(posedge clk);
    #1;
    bl  = '1;
    for (int r = 0; r < int'(ROWS); r++) check_row(r);
    // Random partial writes with some columns left precharged.
    for (int i = 0; i < 300; i++) begin
      int r;
      r = $urandom_range(0, ROWS-1);
      write_row(r, COLS'($urandom), (i % 2 == 1) ? COLS'($urandom) : '0);
      check_row($urandom_range(0, ROWS-1));
    end
    check_cfg();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
