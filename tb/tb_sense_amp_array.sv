// Testbench for sense_amp_array. Random stored words are presented as
// discharged bit-line pairs; a differential column latches rbl at the edge
// with s_en, a fully precharged column and any column without s_en hold.
module tb_sense_amp_array;
  localparam int unsigned COLS = 16;
  logic            clk = 1'b0, s_en;
  logic [COLS-1:0] rbl, rblb, dout, model, word, idle;
  int              checks = 0, failures = 0;

  sense_amp_array dut (.clk(clk), .s_en(s_en), .rbl(rbl), .rblb(rblb), .dout(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Start from a known word.
    s_en = 1'b1;
    rbl  = '0;
    rblb = '1;
    @(posedge clk);
    #1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      word = COLS'($urandom);
      idle = (i % 3 == 0) ? COLS'($urandom) : '0;   // columns left precharged
      s_en = (i % 5 != 4);
      rbl  = word | idle;
      rblb = ~word | idle;
      @(posedge clk);
      #1;
      if (s_en) model = (model & idle) | (word & ~idle);
      checks++;
      if (dout !== model) begin
        failures++;
        $display("FAIL i=%0d s_en=%b dout=%h exp=%h", i, s_en, dout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
