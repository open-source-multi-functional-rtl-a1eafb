// Testbench for mp_cell: all 8 settings of the three stored bits against all
// four wire-level combinations. Expected pull-downs are worked out from the
// four uni-switch cases: (a) X discharges Y, (b) Y discharges X', (c) joined
// wires share a low level, (d) nothing.
module tb_mp_cell;
  import mfm_pkg::*;

  mp_cfg_t cfg;
  logic    h_val, v_val, pull_h, pull_v;
  int      checks = 0, failures = 0;

  mp_cell dut (.cfg(cfg), .h_val(h_val), .v_val(v_val), .pull_h(pull_h), .pull_v(pull_v));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_h, exp_v;
    for (int k = 0; k < 8; k++) begin
      for (int hv = 0; hv < 4; hv++) begin
        cfg   = mp_cfg_t'(k[2:0]);
        h_val = hv[0];
        v_val = hv[1];
        #1;
        exp_v = 1'b0;
        exp_h = 1'b0;
        if (k[0] && h_val)  exp_v = 1'b1;  // a: transistor gated by X on Y
        if (k[1] && v_val)  exp_h = 1'b1;  // b: transistor gated by Y on X'
        if (k[2] && !h_val) exp_v = 1'b1;  // c: low X pulls the joined Y low
        if (k[2] && !v_val) exp_h = 1'b1;  // c: low Y pulls the joined X low
        checks++;
        if (pull_h !== exp_h || pull_v !== exp_v) begin
          failures++;
          $display("FAIL cfg=%b h=%b v=%b: pull_h=%b (exp %b) pull_v=%b (exp %b)",
                   k[2:0], h_val, v_val, pull_h, exp_h, pull_v, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
