// Testbench for switch_matrix: every address and PLA output in both modes.
// s = 0: a_eff = a, x = 0.  s = 1: x = a, a_eff = y.
module tb_switch_matrix;
  localparam int unsigned AW = 4;
  logic          s;
  logic [AW-1:0] a, y, x, a_eff;
  int            checks = 0, failures = 0;

  switch_matrix dut (.s(s), .a(a), .y(y), .x(x), .a_eff(a_eff));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i < 256; i++) begin
        s = m[0];
        a = i[3:0];
        y = i[7:4];
        #1;
        checks++;
        if (m == 0 && (a_eff !== a || x !== '0)) begin
          failures++;
          $display("FAIL normal a=%h y=%h: a_eff=%h x=%h", a, y, a_eff, x);
        end
        if (m == 1 && (a_eff !== y || x !== a)) begin
          failures++;
          $display("FAIL predecoder a=%h y=%h: a_eff=%h x=%h", a, y, a_eff, x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
