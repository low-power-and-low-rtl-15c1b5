// fir_size_check: drives the four programmable filters at one tap count.
//
// Helper for fir_sizes_tb. The transversal Booth, linear-phase, folded and
// bit-serial filters are built with NTAP taps (8-bit data and coefficients)
// and fed the same NS random samples, each at its own pace (the folded and
// serial filters through their ready signals). Every output is compared with
// a convolution model; `done` rises when all outputs have arrived, and the
// totals are given on `checks` and `failures`.
module fir_size_check #(
  parameter int NTAP = 4,
  parameter int NS   = 120
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int L  = NTAP / 2;
  localparam int LG = (NTAP <= 2) ? 1 : $clog2(NTAP);
  localparam int LL = (L <= 2) ? 1 : $clog2(L);

  logic signed [7:0] smp [NS];
  logic [7:0] h [NTAP];
  logic [7:0] hl [L];
  longint ref_full [NS], ref_lp [NS];

  logic v0, v1, v2, v3, r2, r3, o0, o1, o2, o3;
  logic signed [7:0] x0, x1, x2, x3;
  logic signed [16+LG:0]   y0;
  logic signed [17+LL:0]   y1, y2;
  logic signed [15+LG:0]   y3;

  mac_fir_booth    #(.NTAP(NTAP)) u_mac  (.clk, .rst_n, .x_valid(v0), .x(x0), .coef(h),
                                          .y_valid(o0), .y(y0));
  linear_phase_fir #(.NTAP(NTAP)) u_lp   (.clk, .rst_n, .x_valid(v1), .x(x1), .coef(hl),
                                          .y_valid(o1), .y(y1));
  folded_lp_fir    #(.NTAP(NTAP)) u_fold (.clk, .rst_n, .x_valid(v2), .x_ready(r2), .x(x2),
                                          .coef(hl), .y_valid(o2), .y(y2));
  serial_mac_fir   #(.NTAP(NTAP)) u_ser  (.clk, .rst_n, .x_valid(v3), .x_ready(r3), .x(x3),
                                          .coef(h), .y_valid(o3), .y(y3));

  int i0 = 0, i1 = 0, i2 = 0, i3 = 0, k0 = 0, k1 = 0, k2 = 0, k3 = 0;
  assign v0 = rst_n && (i0 < NS);
  assign v1 = rst_n && (i1 < NS);
  assign v2 = rst_n && (i2 < NS);
  assign v3 = rst_n && (i3 < NS);
  assign x0 = smp[(i0 < NS) ? i0 : 0];
  assign x1 = smp[(i1 < NS) ? i1 : 0];
  assign x2 = smp[(i2 < NS) ? i2 : 0];
  assign x3 = smp[(i3 < NS) ? i3 : 0];
  assign done = (k0 == NS) && (k1 == NS) && (k2 == NS) && (k3 == NS);

  initial begin
    checks = 0; failures = 0;
    for (int k = 0; k < NTAP; k++) h[k] = 8'($urandom);
    for (int k = 0; k < L; k++) hl[k] = 8'($urandom);
    for (int n = 0; n < NS; n++)
      smp[n] = (n % 5 == 0) ? -8'sd128 : 8'($urandom);
    for (int n = 0; n < NS; n++) begin
      ref_full[n] = 0; ref_lp[n] = 0;
      for (int k = 0; k < NTAP; k++) if (n - k >= 0) begin
        ref_full[n] += longint'(smp[n-k]) * longint'(h[k]);
        ref_lp[n]   += longint'(smp[n-k]) * longint'(hl[(k < L) ? k : NTAP-1-k]);
      end
    end
  end

  task automatic cmp(string name, int idx, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10)
        $display("FAIL NTAP=%0d %s output %0d: %0d expected %0d", NTAP, name, idx, got, expv);
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
endmodule
