// fir2_proposed: two-parallel FIR filter, proposed fast FIR algorithm (FFA)
// form for symmetric (or antisymmetric) impulse responses of even length N.
//
// The N-tap response h is split into its even and odd phases H0, H1 (N/2 taps
// each). Per block of two inputs X0 = x(2k), X1 = x(2k+1):
//   P = (H0+H1)(X0+X1),  M = (H0-H1)(X0-X1),  Q = H1 X1
//   Y0 = y(2k)   = (P+M)/2 - Q + z^-1 Q        (z^-1: one block delay)
//   Y1 = y(2k+1) = (P-M)/2
// For an even-length symmetric h, H1 is H0 reversed, so H0+H1 is symmetric and
// H0-H1 antisymmetric: both run on sym_tdf_fir with half the multipliers; only
// H1 needs a full tdf_fir. With ANTI = 1 (antisymmetric h) the roles swap.
// That is the published structure. This design's choices: P+M and P-M are
// formed at full precision and then halved, which is exact because both are
// even, instead of halving the sub-filter coefficients; word widths; the en
// handshake.
//
// Interface: h is the full response (h[n] for n = 0..N-1), x[i] = x(2k+i),
// y[i] = y(2k+i). y is combinational from x and the stored state, which
// advances on a rising clk edge when en is high; rst_n clears all history.
module fir2_proposed #(
  parameter int unsigned N    = 24,
  parameter bit          ANTI = 1'b0,
  parameter int unsigned XW   = fir_pkg::DATA_W,
  parameter int unsigned CW   = fir_pkg::COEF_W,
  parameter int unsigned AW   = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] h [N],
  input  logic signed [XW-1:0] x [2],
  output logic signed [AW-1:0] y [2]
);
  localparam int unsigned K = N / 2;

  if (N % 2 != 0) begin : g_bad_n
    $error("fir2_proposed: N must be even");
  end

  // Pre-processing: sub-filter coefficients (constant for fixed h) and inputs.
  logic signed [CW:0]   c_p [K];
  logic signed [CW:0]   c_m [K];
  logic signed [CW-1:0] c_1 [K];
  logic signed [XW:0]   x_p, x_m;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      c_p[k] = (CW+1)'(h[2*k]) + (CW+1)'(h[2*k+1]);
      c_m[k] = (CW+1)'(h[2*k]) - (CW+1)'(h[2*k+1]);
      c_1[k] = h[2*k+1];
    end
    x_p = (XW+1)'(x[0]) + (XW+1)'(x[1]);
    x_m = (XW+1)'(x[0]) - (XW+1)'(x[1]);
  end

  // Sub-filters.
  logic signed [AW-1:0] p, m, q;

  sym_tdf_fir #(.K(K), .ANTI(ANTI), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_p (
    .clk, .rst_n, .en, .c(c_p), .x(x_p), .y(p));
  sym_tdf_fir #(.K(K), .ANTI(!ANTI), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_m (
    .clk, .rst_n, .en, .c(c_m), .x(x_m), .y(m));
  tdf_fir #(.K(K), .XW(XW), .CW(CW), .AW(AW)) u_sub_1 (
    .clk, .rst_n, .en, .c(c_1), .x(x[1]), .y(q));

  // Post-processing.
  logic signed [AW:0]   pm_sum, pm_dif;
  logic signed [AW-1:0] q_d;

  always_ff @(posedge clk) begin
    if (!rst_n)  q_d <= '0;
    else if (en) q_d <= q;
  end

  always_comb begin
    pm_sum = (AW+1)'(p) + (AW+1)'(m);
    pm_dif = (AW+1)'(p) - (AW+1)'(m);
    y[0]   = AW'(pm_sum >>> 1) - q + q_d;
    y[1]   = AW'(pm_dif >>> 1);
  end
endmodule
