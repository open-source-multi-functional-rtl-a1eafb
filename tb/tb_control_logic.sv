// Testbench for control_logic: every csb/web combination gives the expected
// enables, rd_valid is 1 exactly in the cycle after a read, and reset clears it.
module tb_control_logic;
  logic clk = 1'b0, rst_n, csb, web;
  logic wl_en, w_en, s_en, rd_valid, prev_read;
  int   checks = 0, failures = 0;

  control_logic dut (.clk(clk), .rst_n(rst_n), .csb(csb), .web(web),
                     .wl_en(wl_en), .w_en(w_en), .s_en(s_en), .rd_valid(rd_valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    csb   = 1'b0;
    web   = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (rd_valid !== 1'b0) begin
      failures++;
      $display("FAIL rd_valid not cleared by reset");
    end
    rst_n = 1'b1;
    prev_read = 1'b0;
    for (int i = 0; i < 200; i++) begin
      csb = $urandom_range(0, 1);
      web = $urandom_range(0, 1);
      #1;
      checks++;
      if (wl_en !== !csb || w_en !== (!csb && !web) || s_en !== (!csb && web)) begin
        failures++;
        $display("FAIL csb=%b web=%b wl_en=%b w_en=%b s_en=%b", csb, web, wl_en, w_en, s_en);
      end
      checks++;
      if (rd_valid !== prev_read) begin
        failures++;
        $display("FAIL i=%0d rd_valid=%b exp=%b", i, rd_valid, prev_read);
      end
      prev_read = !csb && web;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
