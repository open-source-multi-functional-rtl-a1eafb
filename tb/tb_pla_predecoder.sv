// Testbench for pla_predecoder.
// 1) The three-output example PLA  Y1 = ~X2 X4 + X3 X4,  Y2 = ~X2 X4 + ~X1 X3,
//    Y3 = ~X1 X3 + X3 X4  (three shared product terms) is programmed and all 16
//    inputs are checked against those equations.
// 2) Random mp-cell settings are checked against a reference that evaluates
//    the same sum of products from a term/literal description.
module tb_pla_predecoder;
  import mfm_pkg::*;

  localparam int unsigned N_IN = 4, N_OUT = 3, N_TERMS = 4;

  logic [N_IN-1:0]  x;
  logic [N_OUT-1:0] y;
  mp_cfg_t          cfg [N_TERMS][N_IN+N_OUT];
  int               checks = 0, failures = 0;

  pla_predecoder #(.N_IN(N_IN), .N_OUT(N_OUT), .N_TERMS(N_TERMS)) dut (.x(x), .cfg(cfg), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Literal codes per term and input: 0 absent, 1 true literal, 2 complement.
  int unsigned lit [N_TERMS][N_IN];
  // Output membership per term.
  logic [N_OUT-1:0] member [N_TERMS];

  // Build the mp-cell settings from the literal description.
  task automatic load_cfg();
    for (int t = 0; t < int'(N_TERMS); t++) begin
      for (int i = 0; i < int'(N_IN); i++) begin
        cfg[t][i] = '0;
        if (lit[t][i] == 1) cfg[t][i].c = 1'b1;  // join: term needs x = 1
        if (lit[t][i] == 2) cfg[t][i].b = 1'b1;  // x discharges: term needs x = 0
      end
      for (int o = 0; o < int'(N_OUT); o++) begin
        cfg[t][N_IN+o] = '0;
        cfg[t][N_IN+o].a = member[t][o];
      end
    end
  endtask

  function automatic logic [N_OUT-1:0] ref_sop(logic [N_IN-1:0] xi);
    logic [N_OUT-1:0] r = '0;
    for (int t = 0; t < int'(N_TERMS); t++) begin
      logic p = 1'b1;
      for (int i = 0; i < int'(N_IN); i++) begin
        if (lit[t][i] == 1 && !xi[i]) p = 1'b0;
        if (lit[t][i] == 2 &&  xi[i]) p = 1'b0;
      end
      if (p) r |= member[t];
    end
    return r;
  endfunction

  initial begin
    logic [N_OUT-1:0] exp_y;
    logic x1, x2, x3, x4;
    // --- example PLA: inputs X1..X4 on x[0..3], outputs Y1..Y3 on y[0..2]
    for (int t = 0; t < int'(N_TERMS); t++) begin
      member[t] = '0;
      for (int i = 0; i < int'(N_IN); i++) lit[t][i] = 0;
    end
    lit[0][1] = 2; lit[0][3] = 1; member[0] = 3'b011;  // ~X2 X4 -> Y1, Y2
    lit[1][2] = 1; lit[1][3] = 1; member[1] = 3'b101;  //  X3 X4 -> Y1, Y3
    lit[2][0] = 2; lit[2][2] = 1; member[2] = 3'b110;  // ~X1 X3 -> Y2, Y3
    load_cfg();
    for (int v = 0; v < 16; v++) begin
      x = v[3:0];
      #1;
      {x4, x3, x2, x1} = x;
      exp_y[0] = (!x2 && x4) || (x3 && x4);
      exp_y[1] = (!x2 && x4) || (!x1 && x3);
      exp_y[2] = (!x1 && x3) || (x3 && x4);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL example x=%b y=%b exp=%b", x, y, exp_y);
      end
    end
    // --- random programs
    for (int n = 0; n < 200; n++) begin
      for (int t = 0; t < int'(N_TERMS); t++) begin
        for (int i = 0; i < int'(N_IN); i++) lit[t][i] = $urandom_range(0, 2);
        member[t] = N_OUT'($urandom);
      end
      load_cfg();
      for (int v = 0; v < 16; v++) begin
        x = v[3:0];
        #1;
        checks++;
        if (y !== ref_sop(x)) begin
          failures++;
          if (failures < 10) $display("FAIL random x=%b y=%b exp=%b", x, y, ref_sop(x));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
