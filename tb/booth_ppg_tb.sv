// booth_ppg_tb: exhaustive check of one Booth partial product row.
//
// For every 8-bit multiplicand and every control combination the encoder can
// produce, the row read as a signed number plus its negation bit must equal
// the multiple (0, +-1, +-2) times the multiplicand.
module booth_ppg_tb;
  import fir_pkg::*;

  logic signed [7:0] x;
  booth_ctrl_t       ctrl;
  logic [8:0]        pp;
  logic              neg;
  int checks = 0, failures = 0;

  booth_ppg #(.XW(8)) dut (.x(x), .ctrl(ctrl), .pp(pp), .neg(neg));

  initial begin
    for (int t = 0; t < 8; t++) begin
      // control bits written out from the recoding rule, multiple from the table
      logic d, s, a;
      int   mult;
      d = t[2]; s = t[2] ^ t[1]; a = t[1] ^ t[0];
      case (t)
        0, 7: mult = 0;
        1, 2: mult = 1;
        3:    mult = 2;
        4:    mult = -2;
        default: mult = -1;
      endcase
      for (int v = -128; v < 128; v++) begin
        int got;
        x = 8'(v);
        ctrl = '{dir: d, shift: s, add: a};
        #1;
        got = int'(signed'(pp)) + int'(neg);
        checks++;
        if (got != mult * v) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0d x=%0d: row %0d expected %0d", t, v, got, mult * v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
