// booth_encoder_tb: exhaustive check of the radix-4 Booth encoder.
//
// All eight triplets are applied and Direction, Shift and Addition are
// compared with the recoding table (Shift is a don't-care where Addition
// is 1). The three bits are also checked to select the right multiple:
// 0, +1, +2, -2, -1 or -0 times the multiplicand.
module booth_encoder_tb;
  import fir_pkg::*;

  logic [2:0]  trip;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_encoder dut (.y_triplet(trip), .ctrl(ctrl));

  // Table rows indexed by {y[2i+1], y[2i], y[2i-1]}: direction, shift, addition
  // (shift 'x' rows are the ones where addition is 1), and the Booth multiple.
  localparam logic [7:0] TAB_D = 8'b1111_0000;   // bit t = row t
  localparam logic [7:0] TAB_S = 8'b0001_1000;
  localparam logic [7:0] TAB_A = 8'b0110_0110;
  localparam int         MULT [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    for (int t = 0; t < 8; t++) begin
      int m;
      trip = 3'(t);
      #1;
      checks++;
      if (ctrl.dir !== TAB_D[t] || ctrl.add !== TAB_A[t] ||
          (!TAB_A[t] && ctrl.shift !== TAB_S[t])) begin
        failures++;
        $display("FAIL triplet %b: D=%b S=%b A=%b", trip, ctrl.dir, ctrl.shift, ctrl.add);
      end
      // Selected multiple from the control bits.
      m = ctrl.add ? 1 : (ctrl.shift ? 2 : 0);
      if (ctrl.dir) m = -m;
      checks++;
      if (m != MULT[t]) begin
        failures++;
        $display("FAIL triplet %b selects %0d, expected %0d", trip, m, MULT[t]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
