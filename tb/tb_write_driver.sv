// Testbench for write_driver: with w_en the pair carries (din, ~din), without
// it both lines of every pair sit at the precharged high level.
module tb_write_driver;
  localparam int unsigned COLS = 16;
  logic            w_en;
  logic [COLS-1:0] din, bl, blb;
  int              checks = 0, failures = 0;

  write_driver dut (.w_en(w_en), .din(din), .bl(bl), .blb(blb));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      din  = COLS'($urandom);
      w_en = i[0];
      #1;
      checks++;
      if (w_en && (bl !== din || blb !== ~din)) begin
        failures++;
        $display("FAIL write din=%h bl=%h blb=%h", din, bl, blb);
      end
      if (!w_en && (bl !== '1 || blb !== '1)) begin
        failures++;
        $display("FAIL idle bl=%h blb=%h", bl, blb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
