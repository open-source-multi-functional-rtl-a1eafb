// Testbench for addr_decoder: each address gives exactly bit a set.
module tb_addr_decoder;
  localparam int unsigned AW = 4;
  logic [AW-1:0]    a;
  logic [2**AW-1:0] sel;
  int               checks = 0, failures = 0;

  addr_decoder dut (.a(a), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      a = AW'(i);
      #1;
      checks++;
      if (sel !== (16'(1) << i)) begin
        failures++;
        $display("FAIL a=%0d sel=%b", i, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
