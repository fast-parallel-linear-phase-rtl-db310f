// fir6_cascaded: six-parallel FIR filter for symmetric impulse responses
// whose length N is a multiple of 6, built by cascading a two-parallel and a
// three-parallel structure.
//
// Outer level: the proposed two-parallel form. h splits into E = h(2m) and
// O = h(2m+1) (N/2 taps), the input block X0..X5 = x(6k)..x(6k+5) into the
// half-rate streams U = (X0, X2, X4) and V = (X1, X3, X5), each a three-sample
// block:
//   P = (E+O)(U+V),  M = (E-O)(U-V),  Q = O V
//   y(2n) = (P+M)/2 - Q + z^-1' Q,   y(2n+1) = (P-M)/2
// with z^-1' mapping the block (q0, q1, q2) to (q2 of the previous block,
// q0, q1). Inner level: E+O is symmetric and E-O antisymmetric, so both use
// structure 3A (fir3a with ANTI = 0 and 1), four of whose six sub-filters keep
// half their multipliers; O has no symmetry and uses the existing
// three-parallel FFA (fir3_ffa), whose adder network is smaller. This is the
// cascading rule the published design states for larger block sizes; the choice of a
// 2x3 order and of structure 3A for the inner symmetric blocks is this
// design's. It gives 18 sub-filters of N/6 taps, 8 of them (anti)symmetric,
// against 2 in the existing FFA cascade: 6 more, saving N/2 multipliers, as
// the published design states.
//
// Interface: h is the full response, x[i] = x(6k+i), y[i] = y(6k+i). y is
// combinational from x; state advances on enabled clock edges; rst_n
// (synchronous, active low) clears it. Word widths and en are this design's.
module fir6_cascaded #(
  parameter int unsigned N  = 24,
  parameter int unsigned XW = fir_pkg::DATA_W,
  parameter int unsigned CW = fir_pkg::COEF_W,
  parameter int unsigned AW = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] h [N],
  input  logic signed [XW-1:0] x [6],
  output logic signed [AW-1:0] y [6]
);
  localparam int unsigned NH = N / 2;

  if (N % 6 != 0) begin : g_bad_n
    $error("fir6_cascaded: N must be a multiple of 6");
  end

  // Outer pre-processing.
  logic signed [CW:0]   g_p [NH];
  logic signed [CW:0]   g_m [NH];
  logic signed [CW-1:0] g_o [NH];
  logic signed [XW:0]   u_p [3];
  logic signed [XW:0]   u_m [3];
  logic signed [XW-1:0] v   [3];

  always_comb begin
    for (int k = 0; k < NH; k++) begin
      g_p[k] = (CW+1)'(h[2*k]) + (CW+1)'(h[2*k+1]);
      g_m[k] = (CW+1)'(h[2*k]) - (CW+1)'(h[2*k+1]);
      g_o[k] = h[2*k+1];
    end
    for (int i = 0; i < 3; i++) begin
      u_p[i] = (XW+1)'(x[2*i]) + (XW+1)'(x[2*i+1]);
      u_m[i] = (XW+1)'(x[2*i]) - (XW+1)'(x[2*i+1]);
      v[i]   = x[2*i+1];
    end
  end

  // Inner three-parallel filters.
  logic signed [AW-1:0] p [3];
  logic signed [AW-1:0] m [3];
  logic signed [AW-1:0] q [3];

  fir3a #(.N(NH), .ANTI(1'b0), .XW(XW+1), .CW(CW+1), .AW(AW)) u_inner_p (
    .clk, .rst_n, .en, .h(g_p), .x(u_p), .y(p));
  fir3a #(.N(NH), .ANTI(1'b1), .XW(XW+1), .CW(CW+1), .AW(AW)) u_inner_m (
    .clk, .rst_n, .en, .h(g_m), .x(u_m), .y(m));
  fir3_ffa #(.N(NH), .XW(XW), .CW(CW), .AW(AW)) u_inner_q (
    .clk, .rst_n, .en, .h(g_o), .x(v), .y(q));

  // Outer post-processing.
  logic signed [AW:0]   pm_sum [3];
  logic signed [AW:0]   pm_dif [3];
  logic signed [AW-1:0] q_z    [3];   // Q delayed by one half-rate sample
  logic signed [AW-1:0] q2_d;

  always_ff @(posedge clk) begin
    if (!rst_n)  q2_d <= '0;
    else if (en) q2_d <= q[2];
  end

  always_comb begin
    q_z[0] = q2_d;
    q_z[1] = q[0];
    q_z[2] = q[1];
    for (int i = 0; i < 3; i++) begin
      pm_sum[i] = (AW+1)'(p[i]) + (AW+1)'(m[i]);
      pm_dif[i] = (AW+1)'(p[i]) - (AW+1)'(m[i]);
      y[2*i]    = AW'(pm_sum[i] >>> 1) - q[i] + q_z[i];
      y[2*i+1]  = AW'(pm_dif[i] >>> 1);
    end
  end
endmodule
