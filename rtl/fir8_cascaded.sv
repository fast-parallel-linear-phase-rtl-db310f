// fir8_cascaded: eight-parallel FIR filter for symmetric impulse responses
// whose length N is a multiple of 8, built by cascading two-parallel
// structures three levels deep.
//
// Outer level: the proposed two-parallel form. h splits into E = h(2m) and
// O = h(2m+1) (N/2 taps), the input block X0..X7 = x(8k)..x(8k+7) into the
// half-rate streams U = (X0, X2, X4, X6) and V = (X1, X3, X5, X7), each a
// four-sample block:
//   P = (E+O)(U+V),  M = (E-O)(U-V),  Q = O V
//   y(2n) = (P+M)/2 - Q + z^-1' Q,   y(2n+1) = (P-M)/2
// with z^-1' mapping the block (q0..q3) to (q3 of the previous block, q0, q1,
// q2). Inner levels: E+O (symmetric) and E-O (antisymmetric) use the
// four-parallel cascade fir4_cascaded (ANTI = 0 and 1), which applies the
// proposed form again to its (anti)symmetric blocks and the existing FFA to
// the rest; O has no symmetry and uses the existing-FFA cascade fir4_ffa.
// This follows the cascading rule the published design states; the wiring is this
// design's. It gives 27 sub-filters of N/8 taps, 8 of them (anti)symmetric,
// against 1 in the existing FFA cascade: 7 more, as the published design states,
// saving 7N/16 multipliers when N/8 is even (7 at N = 24, whose 3-tap
// sub-filters save one multiplier each).
//
// Interface: h is the full response, x[i] = x(8k+i), y[i] = y(8k+i). y is
// combinational from x; state advances on enabled clock edges; rst_n
// (synchronous, active low) clears it. Word widths and en are this design's.
module fir8_cascaded #(
  parameter int unsigned N  = 24,
  parameter int unsigned XW = fir_pkg::DATA_W,
  parameter int unsigned CW = fir_pkg::COEF_W,
  parameter int unsigned AW = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] h [N],
  input  logic signed [XW-1:0] x [8],
  output logic signed [AW-1:0] y [8]
);
  localparam int unsigned NH = N / 2;

  if (N % 8 != 0) begin : g_bad_n
    $error("fir8_cascaded: N must be a multiple of 8");
  end

  // Outer pre-processing.
  logic signed [CW:0]   g_p [NH];
  logic signed [CW:0]   g_m [NH];
  logic signed [CW-1:0] g_o [NH];
  logic signed [XW:0]   u_p [4];
  logic signed [XW:0]   u_m [4];
  logic signed [XW-1:0] v   [4];

  always_comb begin
    for (int k = 0; k < NH; k++) begin
      g_p[k] = (CW+1)'(h[2*k]) + (CW+1)'(h[2*k+1]);
      g_m[k] = (CW+1)'(h[2*k]) - (CW+1)'(h[2*k+1]);
      g_o[k] = h[2*k+1];
    end
    for (int i = 0; i < 4; i++) begin
      u_p[i] = (XW+1)'(x[2*i]) + (XW+1)'(x[2*i+1]);
      u_m[i] = (XW+1)'(x[2*i]) - (XW+1)'(x[2*i+1]);
      v[i]   = x[2*i+1];
    end
  end

  // Inner four-parallel filters.
  logic signed [AW-1:0] p [4];
  logic signed [AW-1:0] m [4];
  logic signed [AW-1:0] q [4];

  fir4_cascaded #(.N(NH), .ANTI(1'b0), .XW(XW+1), .CW(CW+1), .AW(AW)) u_inner_p (
    .clk, .rst_n, .en, .h(g_p), .x(u_p), .y(p));
  fir4_cascaded #(.N(NH), .ANTI(1'b1), .XW(XW+1), .CW(CW+1), .AW(AW)) u_inner_m (
    .clk, .rst_n, .en, .h(g_m), .x(u_m), .y(m));
  fir4_ffa #(.N(NH), .XW(XW), .CW(CW), .AW(AW)) u_inner_q (
    .clk, .rst_n, .en, .h(g_o), .x(v), .y(q));

  // Outer post-processing.
  logic signed [AW:0]   pm_sum [4];
  logic signed [AW:0]   pm_dif [4];
  logic signed [AW-1:0] q_z    [4];   // Q delayed by one half-rate sample
  logic signed [AW-1:0] q3_d;

  always_ff @(posedge clk) begin
    if (!rst_n)  q3_d <= '0;
    else if (en) q3_d <= q[3];
  end

  always_comb begin
    q_z[0] = q3_d;
    for (int i = 1; i < 4; i++) q_z[i] = q[i-1];
    for (int i = 0; i < 4; i++) begin
      pm_sum[i] = (AW+1)'(p[i]) + (AW+1)'(m[i]);
      pm_dif[i] = (AW+1)'(p[i]) - (AW+1)'(m[i]);
      y[2*i]    = AW'(pm_sum[i] >>> 1) - q[i] + q_z[i];
      y[2*i+1]  = AW'(pm_dif[i] >>> 1);
    end
  end
endmodule
