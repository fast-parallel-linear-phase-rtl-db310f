// fir3a: three-parallel FIR filter "structure 3A" for symmetric impulse
// responses whose length N is a multiple of 3, aimed at odd lengths (the main
// design; 27 taps by default).
//
// h is split into its polyphase components H0, H1, H2 (K = N/3 taps each).
// For N = 3K, H2 is H0 reversed and H1 is symmetric. Structure 3A uses the six
// sub-filters
//   H0, H1, (H0+H2)/2, (H0-H2)/2, H0+H1+H2, H1+H2
// of which H1, H0+H2, H0-H2 (antisymmetric) and H0+H1+H2 are symmetric and run
// on sym_tdf_fir with ceil(K/2) multipliers each; H0 and H1+H2 use tdf_fir.
// With X0..X2 = x(3k)..x(3k+2) and the sub-filter outputs
//   F = H0 X0, Q = H1 X1, P = (H0+H2)(X0+X2), M = (H0-H2)(X0-X2),
//   S = (H0+H1+H2)(X0+X1+X2), C = (H1+H2)(X1+X2)
// the post-processing forms A = (P+M)/2 = H0X0+H2X2, B = (P-M)/2 = H0X2+H2X0,
// T = A - F = H2X2, and
//   Y0 = F + z^-1 [C - Q - T]
//   Y1 = S - C - F - B + z^-1 T
//   Y2 = B + Q
// (z^-1: one block delay). The sub-filter set and its symmetry follow the
// published design; the post-processing equations are derived here from that set and
// the three-phase convolution. The factor 1/2 is applied after P+M and P-M at
// full precision (exact, both are even) instead of to the coefficients, so
// integer coefficients lose nothing. Word widths and en are this design's.
// ANTI = 1 is for an antisymmetric response, h(n) = -h(N-1-n), as met inside
// the six-parallel cascade: H1, H0+H2 and H0+H1+H2 are then antisymmetric and
// H0-H2 symmetric, so the same four sub-filters keep half their multipliers.
//
// Interface: h is the full response, x[i] = x(3k+i), y[i] = y(3k+i). y is
// combinational from x and the stored state; state advances on enabled clock
// edges; rst_n (synchronous, active low) clears it.
module fir3a #(
  parameter int unsigned N    = 27,
  parameter bit          ANTI = 1'b0,
  parameter int unsigned XW = fir_pkg::DATA_W,
  parameter int unsigned CW = fir_pkg::COEF_W,
  parameter int unsigned AW = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] h [N],
  input  logic signed [XW-1:0] x [3],
  output logic signed [AW-1:0] y [3]
);
  localparam int unsigned K = N / 3;

  if (N % 3 != 0) begin : g_bad_n
    $error("fir3a: N must be a multiple of 3");
  end

  // Pre-processing.
  logic signed [CW-1:0] c0  [K];
  logic signed [CW-1:0] c1  [K];
  logic signed [CW:0]   cp  [K];
  logic signed [CW:0]   cm  [K];
  logic signed [CW+1:0] cs  [K];
  logic signed [CW:0]   c12 [K];
  logic signed [XW:0]   xp, xm, x12;
  logic signed [XW+1:0] xs;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      c0[k]  = h[3*k];
      c1[k]  = h[3*k+1];
      cp[k]  = (CW+1)'(h[3*k]) + (CW+1)'(h[3*k+2]);
      cm[k]  = (CW+1)'(h[3*k]) - (CW+1)'(h[3*k+2]);
      c12[k] = (CW+1)'(h[3*k+1]) + (CW+1)'(h[3*k+2]);
      cs[k]  = (CW+2)'(cp[k]) + (CW+2)'(h[3*k+1]);
    end
    xp  = (XW+1)'(x[0]) + (XW+1)'(x[2]);
    xm  = (XW+1)'(x[0]) - (XW+1)'(x[2]);
    x12 = (XW+1)'(x[1]) + (XW+1)'(x[2]);
    xs  = (XW+2)'(xp) + (XW+2)'(x[1]);
  end

  // Sub-filters.
  logic signed [AW-1:0] f, q, p, m, s, c;

  tdf_fir #(.K(K), .XW(XW), .CW(CW), .AW(AW)) u_sub_h0 (
    .clk, .rst_n, .en, .c(c0), .x(x[0]), .y(f));
  sym_tdf_fir #(.K(K), .ANTI(ANTI), .XW(XW), .CW(CW), .AW(AW)) u_sub_h1 (
    .clk, .rst_n, .en, .c(c1), .x(x[1]), .y(q));
  sym_tdf_fir #(.K(K), .ANTI(ANTI), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_h02p (
    .clk, .rst_n, .en, .c(cp), .x(xp), .y(p));
  sym_tdf_fir #(.K(K), .ANTI(!ANTI), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_h02m (
    .clk, .rst_n, .en, .c(cm), .x(xm), .y(m));
  sym_tdf_fir #(.K(K), .ANTI(ANTI), .XW(XW+2), .CW(CW+2), .AW(AW)) u_sub_h012 (
    .clk, .rst_n, .en, .c(cs), .x(xs), .y(s));
  tdf_fir #(.K(K), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_h12 (
    .clk, .rst_n, .en, .c(c12), .x(x12), .y(c));

  // Post-processing.
  logic signed [AW:0]   pm_sum, pm_dif;
  logic signed [AW-1:0] a, b, t, v0, v0_d, t_d;

  always_comb begin
    pm_sum = (AW+1)'(p) + (AW+1)'(m);
    pm_dif = (AW+1)'(p) - (AW+1)'(m);
    a      = AW'(pm_sum >>> 1);   // H0X0 + H2X2
    b      = AW'(pm_dif >>> 1);   // H0X2 + H2X0
    t      = a - f;               // H2X2
    v0     = c - q - t;           // H1X2 + H2X1
    y[0]   = f + v0_d;
    y[1]   = s - c - f - b + t_d;
    y[2]   = b + q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0_d <= '0;
      t_d  <= '0;
    end else if (en) begin
      v0_d <= v0;
      t_d  <= t;
    end
  end
endmodule
