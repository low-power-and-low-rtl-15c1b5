// fir_top_tb: end-to-end run of all five filters on one sample stream.
//
// Runs the top at its default sizes (8 taps, 8-bit samples and coefficients).
// Random signed samples, including the extremes, are offered every cycle and
// in random bursts; the top takes one only when all filters can. A single
// reference convolution per filter checks every output and its arrival
// cycle (1 cycle for mac/lp/sa, 5 for fold, 20 for ser after the take).
// Coverage counted, each must occur at least once:
//   stall       an offer refused because a filter was busy
//   chain       a sample taken in the last busy cycle (no gap)
//   booth op    every one of the 8 Booth recodings appears in a coefficient
//   fold sel    the folded filter's tap select takes each of its 4 values
//   coef switch the coefficients are changed between samples
module fir_top_tb;
  localparam int N = 8, L = 4, FW = 19;
  localparam int HSA [N] = '{1, 3, 6, 15, 15, 6, 3, 1};   // built-in, quarters

  logic               clk = 0, rst_n = 0, x_valid = 0, x_ready;
  logic signed [7:0]  x = '0;
  logic        [7:0]  coef [N];
  logic        [7:0]  lp_coef [L];
  logic               mac_valid, lp_valid, fold_valid, ser_valid, sa_valid;
  logic signed [19:0] mac_y, lp_y, fold_y;
  logic signed [18:0] ser_y, sa_y;

  fir_top dut (.clk, .rst_n, .x_valid, .x_ready, .x, .coef, .lp_coef,
               .mac_valid, .mac_y, .lp_valid, .lp_y, .fold_valid, .fold_y,
               .ser_valid, .ser_y, .sa_valid, .sa_y);

  int checks = 0, failures = 0, cyc = 0;
  int stalls = 0, chains = 0, coef_switches = 0, last_take = -100, next_sw = 1000;
  int booth_seen [8];
  int sel_seen [L];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int hist [N];
  // per filter: expected value and due cycle
  int eq [5][$];
  int dq [5][$];
  localparam int LAT [5] = '{1, 1, L + 1, FW + 1, 1};
  string NAME [5] = '{"mac", "lp", "fold", "ser", "sa"};

  function automatic int hlp(int k);
    return int'(lp_coef[(k < L) ? k : N-1-k]);
  endfunction

  task automatic check_out(int f, logic v, int got);
    if (!v) return;
    checks++;
    if (eq[f].size() == 0) begin
      failures++; $display("FAIL %s: output without a sample", NAME[f]);
    end else begin
      int e, d;
      e = eq[f].pop_front(); d = dq[f].pop_front();
      if (got != e || d != cyc) begin
        failures++;
        if (failures < 20) $display("FAIL %s: y=%0d exp %0d at cycle %0d due %0d",
                                    NAME[f], got, e, cyc, d);
      end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (x_valid && !x_ready) stalls++;
    if (dut.u_fold.busy) sel_seen[dut.u_fold.sel1]++;
    if (x_valid && x_ready) begin
      int a [5];
      if (cyc - last_take == FW) chains++;
      last_take = cyc;
      for (int k = N-1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x);
      a = '{0, 0, 0, 0, 0};
      for (int k = 0; k < N; k++) begin
        a[0] += hist[k] * int'(coef[k]);
        a[1] += hist[k] * hlp(k);
        a[4] += hist[k] * HSA[k];
      end
      a[2] = a[1];
      a[3] = a[0];
      for (int f = 0; f < 5; f++) begin
        eq[f].push_back(a[f]);
        dq[f].push_back(cyc + LAT[f]);
      end
    end
    check_out(0, mac_valid,  int'(mac_y));
    check_out(1, lp_valid,   int'(lp_y));
    check_out(2, fold_valid, int'(fold_y));
    check_out(3, ser_valid,  int'(ser_y));
    check_out(4, sa_valid,   int'(sa_y));
  end

  task automatic new_coefs();
    for (int k = 0; k < N; k++) coef[k] = 8'($urandom);
    for (int k = 0; k < L; k++) lp_coef[k] = 8'($urandom);
    // Booth triplets of the zero-padded coefficient words
    for (int k = 0; k < N; k++) begin
      logic [10:0] yp;
      yp = {2'b00, coef[k], 1'b0};
      for (int g = 0; g < 5; g++) booth_seen[yp[2*g +: 3]]++;
    end
    coef_switches++;
  endtask

  initial begin
    for (int k = 0; k < N; k++) hist[k] = 0;
    for (int t = 0; t < 8; t++) booth_seen[t] = 0;
    for (int s = 0; s < L; s++) sel_seen[s] = 0;
    new_coefs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      if (!x_valid || x_ready) begin
        // new coefficients only between samples, when no filter is busy
        if (i >= next_sw && !dut.u_ser.busy && !dut.u_fold.busy) begin
          new_coefs();
          next_sw += 1500;
        end
        x_valid = (i < 4000) ? 1'b1 : ($urandom_range(3) == 0);
        case ($urandom_range(7))
          0: x = -8'sd128;
          1: x = 8'sd127;
          default: x = 8'($urandom);
        endcase
      end
    end
    @(negedge clk); x_valid = 0;
    repeat (30) @(negedge clk);
    for (int f = 0; f < 5; f++) if (eq[f].size() != 0) begin
      failures++; $display("FAIL %s: %0d outputs missing", NAME[f], eq[f].size());
    end
    $display("coverage: stalls=%0d chained_takes=%0d coef_switches=%0d", stalls, chains, coef_switches);
    checks++; if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    checks++; if (chains == 0) begin failures++; $display("FAIL no chained take"); end
    checks++; if (coef_switches < 4) begin failures++; $display("FAIL no coefficient switch"); end
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (booth_seen[t] == 0) begin failures++; $display("FAIL Booth triplet %0d never used", t); end
    end
    for (int s = 0; s < L; s++) begin
      checks++;
      if (sel_seen[s] == 0) begin failures++; $display("FAIL fold select %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
