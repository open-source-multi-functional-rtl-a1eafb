// Testbench for wordline_driver: random select patterns with the enable on
// (word lines follow the select) and off (all word lines low).
module tb_wordline_driver;
  localparam int unsigned ROWS = 16;
  logic [ROWS-1:0] sel, wl;
  logic            wl_en;
  int              checks = 0, failures = 0;

  wordline_driver dut (.sel(sel), .wl_en(wl_en), .wl(wl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel   = ROWS'($urandom);
      wl_en = i[0];
      #1;
      checks++;
      if (wl !== (wl_en ? sel : '0)) begin
        failures++;
        $display("FAIL sel=%h en=%b wl=%h", sel, wl_en, wl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
