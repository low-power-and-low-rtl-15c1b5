// coef16_workload_tb: the programmable filters at 8 taps, 16-bit coefficients, 8-bit input.
//
// The default build uses 8-bit coefficients; this bench raises the
// coefficient width to 16 on the transversal Booth filter, the linear-phase
// filter, the folded linear-phase filter and the bit-serial filter, and runs
// the same 300 random samples (extremes included) through each at its own
// pace. Every output is compared with a 64-bit convolution model. The
// coefficient sets include 16'hFFFF words so the widest Booth rows and the
// longest serial carries are exercised.
module coef16_workload_tb;
  localparam int N = 8, L = 4, CW = 16, NS = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [7:0] smp [NS];
  logic [CW-1:0] h  [N];     // mac, ser
  logic [CW-1:0] hl [L];     // lp, fold
  longint ref_full [NS], ref_lp [NS];
  int checks = 0, failures = 0;

  // --- devices ---
  logic               v0, v1, v2, v3, r2, r3;
  logic signed [7:0]  x0, x1, x2, x3;
  logic               o0, o1, o2, o3;
  logic signed [27:0] y0, y1, y2;
  logic signed [26:0] y3;

  mac_fir_booth    #(.CW(CW)) u_mac  (.clk, .rst_n, .x_valid(v0), .x(x0), .coef(h),
                                      .y_valid(o0), .y(y0));
  linear_phase_fir #(.CW(CW)) u_lp   (.clk, .rst_n, .x_valid(v1), .x(x1), .coef(hl),
                                      .y_valid(o1), .y(y1));
  folded_lp_fir    #(.CW(CW)) u_fold (.clk, .rst_n, .x_valid(v2), .x_ready(r2), .x(x2),
                                      .coef(hl), .y_valid(o2), .y(y2));
  serial_mac_fir   #(.CW(CW)) u_ser  (.clk, .rst_n, .x_valid(v3), .x_ready(r3), .x(x3),
                                      .coef(h), .y_valid(o3), .y(y3));

  // --- sample feeders, one sample index per filter ---
  int i0 = 0, i1 = 0, i2 = 0, i3 = 0;
  assign v0 = rst_n && (i0 < NS);
  assign v1 = rst_n && (i1 < NS);
  assign v2 = rst_n && (i2 < NS);
  assign v3 = rst_n && (i3 < NS);
  assign x0 = smp[(i0 < NS) ? i0 : 0];
  assign x1 = smp[(i1 < NS) ? i1 : 0];
  assign x2 = smp[(i2 < NS) ? i2 : 0];
  assign x3 = smp[(i3 < NS) ? i3 : 0];

  int k0 = 0, k1 = 0, k2 = 0, k3 = 0;   // outputs seen

  task automatic cmp(string name, int idx, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s output %0d: %0d expected %0d", name, idx, got, expv);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (v0) i0 <= i0 + 1;
    if (v1) i1 <= i1 + 1;
    if (v2 && r2) i2 <= i2 + 1;
    if (v3 && r3) i3 <= i3 + 1;
    if (o0) begin cmp("mac",  k0, longint'(y0), ref_full[k0]); k0 <= k0 + 1; end
    if (o1) begin cmp("lp",   k1, longint'(y1), ref_lp[k1]);   k1 <= k1 + 1; end
    if (o2) begin cmp("fold", k2, longint'(y2), ref_lp[k2]);   k2 <= k2 + 1; end
    if (o3) begin cmp("ser",  k3, longint'(y3), ref_full[k3]); k3 <= k3 + 1; end
  end

  initial begin
    for (int k = 0; k < N; k++) h[k]  = (k % 3 == 0) ? 16'hFFFF : 16'($urandom);
    for (int k = 0; k < L; k++) hl[k] = (k == 1)     ? 16'hFFFF : 16'($urandom);
    for (int n = 0; n < NS; n++)
      smp[n] = (n % 7 == 0) ? -8'sd128 : (n % 11 == 0) ? 8'sd127 : 8'($urandom);
    for (int n = 0; n < NS; n++) begin
      ref_full[n] = 0; ref_lp[n] = 0;
      for (int k = 0; k < N; k++) if (n - k >= 0) begin
        ref_full[n] += longint'(smp[n-k]) * longint'(h[k]);
        ref_lp[n]   += longint'(smp[n-k]) * longint'(hl[(k < L) ? k : N-1-k]);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (k3 == NS);
    repeat (5) @(negedge clk);
    checks++;
    if (k0 != NS || k1 != NS || k2 != NS) begin
      failures++; $display("FAIL output counts %0d %0d %0d %0d", k0, k1, k2, k3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
