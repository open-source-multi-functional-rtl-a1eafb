// Approximate-computing workload: a lookup table y = f(g(x)) held in one
// mf_memory, with the address compression g programmed into its PLA.
//
// The input x is a 6-bit floating-point code {e1 e0 m3 m2 m1 m0}: exponent
// 01 or 10, four mantissa bits, i.e. the 32 values 1.0, 1.0625, ... 1.9375,
// 2.0, 2.125, ... 3.875. g maps each code to a 5-bit row of a table of the
// function's samples; codes whose function values are close share a row, so
// the 32 inputs use 19 rows. EXP_ROW below is that mapping, and TERMS a
// 24-product-term sum of products that realises it (codes with exponent 00 or
// 11 are don't-cares). 24 terms need 72 word lines, so the memory is built
// with a 7-bit address (128 rows, room for 42 terms); the extra input x[6] is
// held at 0 and the PLA outputs y[6:5] have no terms.
//
// The testbench writes the PLA settings and the table (DATA_W-bit sample per
// row) in normal mode, then reads all 32 codes in pre-decoder mode and checks
// the row selected (addr_eff) against EXP_ROW and the data returned against
// the sample stored there. It then reads the table once more in normal mode.
module tb_fp_approx;
  import mfm_pkg::*;

  localparam int unsigned AW = 7, DATA_W = 8;
  localparam int unsigned ROWS = 2**AW, PLA_W = 2*AW, WORD_W = PLA_W + DATA_W;
  localparam int unsigned N_USED = 24;

  typedef struct packed {
    logic [5:0] care;   // 1: the input bit is a literal of the term
    logic [5:0] val;    // required value of that input bit
    logic [4:0] outs;   // outputs y[4:0] the term feeds
  } term_t;

  localparam term_t TERMS [N_USED] = '{
      '{6'b101000, 6'b101000, 5'b10000},
      '{6'b001111, 6'b000001, 5'b00110},
      '{6'b011101, 6'b001101, 5'b10011},
      '{6'b101101, 6'b001000, 5'b01001},
      '{6'b001110, 6'b001100, 5'b00100},
      '{6'b101111, 6'b100100, 5'b01111},
      '{6'b011110, 6'b010100, 5'b01010},
      '{6'b001110, 6'b000010, 5'b01000},
      '{6'b010110, 6'b010110, 5'b00100},
      '{6'b001011, 6'b001000, 5'b00010},
      '{6'b001111, 6'b000000, 5'b00101},
      '{6'b001111, 6'b001011, 5'b00101},
      '{6'b101111, 6'b100110, 5'b10011},
      '{6'b011110, 6'b001110, 5'b11001},
      '{6'b000111, 6'b000101, 5'b00001},
      '{6'b101100, 6'b000100, 5'b01000},
      '{6'b010011, 6'b000001, 5'b00001},
      '{6'b011111, 6'b001010, 5'b10011},
      '{6'b011011, 6'b000011, 5'b00100},
      '{6'b100101, 6'b100101, 5'b10000},
      '{6'b101101, 6'b001001, 5'b00010},
      '{6'b101111, 6'b100010, 5'b01010},
      '{6'b011110, 6'b011000, 5'b01010},
      '{6'b100111, 6'b000011, 5'b00001}
  };

  // Row of each code 16..47 (exponent 01, then exponent 10).
  localparam logic [4:0] EXP_ROW [32] = '{5'd5, 5'd6, 5'd8, 5'd9, 5'd10, 5'd11, 5'd12, 5'd12, 5'd11, 5'd10, 5'd9, 5'd7, 5'd6, 5'd5, 5'd4, 5'd4, 5'd5, 5'd7, 5'd10, 5'd12, 5'd15, 5'd17, 5'd19, 5'd20, 5'd18, 5'd17, 5'd19, 5'd21, 5'd22, 5'd23, 5'd25, 5'd27};

  logic              clk = 1'b0, rst_n, csb, web, s;
  logic [AW-1:0]     addr, addr_eff;
  logic [WORD_W-1:0] din, dout;
  logic              rd_valid;
  logic [WORD_W-1:0] model [ROWS];
  int                checks = 0, failures = 0;
  int                n_hit [32];

  mf_memory #(.AW(AW), .DATA_W(DATA_W)) dut (
    .clk(clk), .rst_n(rst_n), .csb(csb), .web(web), .s(s), .addr(addr),
    .din(din), .dout(dout), .rd_valid(rd_valid), .addr_eff(addr_eff));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PLA columns of row r: input columns 0..AW-1, output columns AW..2*AW-1.
  function automatic logic [PLA_W-1:0] pla_bits(int r);
    logic [PLA_W-1:0] w = '0;
    int t = r / 3, k = r % 3;
    if (t >= int'(N_USED)) return '0;
    for (int i = 0; i < 6; i++) begin
      if (TERMS[t].care[i]) begin
        if (k == int'(ROW_C) &&  TERMS[t].val[i]) w[i] = 1'b1;  // literal x_i
        if (k == int'(ROW_B) && !TERMS[t].val[i]) w[i] = 1'b1;  // literal ~x_i
      end
    end
    if (k == int'(ROW_A)) w[AW +: 5] = TERMS[t].outs;
    return w;
  endfunction

  // Sample stored in table row r: any value distinct per row will do.
  function automatic logic [DATA_W-1:0] sample(int r);
    return DATA_W'(8'h40 + 5 * r);
  endfunction

  task automatic access(logic we, logic [AW-1:0] a, logic [WORD_W-1:0] d);
    addr = a;
    din  = d;
    csb  = 1'b0;
    web  = ~we;
    @(posedge clk);
    #1;
    csb = 1'b1;
    web = 1'b1;
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

    // Load PLA settings and table in normal mode.
    for (int r = 0; r < int'(ROWS); r++) begin
      model[r] = {(r < 32) ? sample(r) : DATA_W'(0), pla_bits(r)};
      access(1'b1, AW'(r), model[r]);
    end

    // Look up all 32 codes through the PLA.
    s = 1'b1;
    for (int c = 16; c < 48; c++) begin
      logic [4:0] row;
      row = EXP_ROW[c-16];
      addr = AW'(c);
      csb  = 1'b0;
      web  = 1'b1;
      #1;
      checks++;
      if (addr_eff !== AW'(row)) begin
        failures++;
        $display("FAIL code %b: row %0d, expected %0d", c[5:0], addr_eff, row);
      end
      @(posedge clk);
      #1;
      csb = 1'b1;
      checks++;
      if (!rd_valid || dout[PLA_W +: DATA_W] !== sample(row)) begin
        failures++;
        $display("FAIL code %b: data %h, expected %h", c[5:0], dout[PLA_W +: DATA_W], sample(row));
      end else begin
        n_hit[c-16]++;
      end
    end

    // The table and the settings read back unchanged in normal mode.
    s = 1'b0;
    for (int r = 0; r < 32; r++) begin
      access(1'b0, AW'(r), '0);
      checks++;
      if (dout !== model[r]) begin
        failures++;
        $display("FAIL normal read row %0d: %h, expected %h", r, dout, model[r]);
      end
    end

    begin
      int n_ok = 0;
      for (int c = 0; c < 32; c++) if (n_hit[c] > 0) n_ok++;
      $display("codes looked up correctly: %0d of 32", n_ok);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
