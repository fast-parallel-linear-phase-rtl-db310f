// fir4_cascaded: four-parallel FIR filter built by cascading two-parallel
// fast FIR algorithm (FFA) structures, for symmetric impulse responses whose
// length N is a multiple of 4.
//
// Outer level: h is split into its even and odd halves E = h(2m), O = h(2m+1)
// (N/2 taps each), and the input block X0..X3 = x(4k)..x(4k+3) into the two
// half-rate streams U = (X0, X2) and V = (X1, X3), each carried as a
// two-sample block. The proposed two-parallel form is applied:
//   P = (E+O)(U+V),  M = (E-O)(U-V),  Q = O V
//   y(2n) = (P+M)/2 - Q + z^-1' Q,   y(2n+1) = (P-M)/2
// where z^-1' delays a half-rate stream by one of its samples: on the block
// (q0, q1) it yields (q1 of the previous block, q0).
// Inner level: each of P, M, Q is itself a two-parallel filter of N/2 taps.
// E+O is symmetric and E-O antisymmetric, so they use the proposed structure
// (fir2_proposed, ANTI = 0 and 1), which again puts half of their taps into
// symmetric sub-filters. O has no symmetry and uses the existing FFA
// (fir2_ffa), whose pre- and post-processing is cheaper. This mixed choice is
// the cascading rule the published design states; the exact wiring of its four-parallel
// figure is reconstructed here from that rule. Nine sub-filters of N/4 taps
// result, four of them symmetric or antisymmetric. ANTI = 1 is for an
// antisymmetric response (met inside the eight-parallel cascade): E+O is then
// antisymmetric and E-O symmetric, and the two inner filters swap roles.
//
// Interface: h is the full response, x[i] = x(4k+i), y[i] = y(4k+i). y is
// combinational from x and the stored state; state advances on enabled clock
// edges; rst_n clears it. Word widths and en are this design's choice.
module fir4_cascaded #(
  parameter int unsigned N    = 24,
  parameter bit          ANTI = 1'b0,
  parameter int unsigned XW = fir_pkg::DATA_W,
  parameter int unsigned CW = fir_pkg::COEF_W,
  parameter int unsigned AW = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] h [N],
  input  logic signed [XW-1:0] x [4],
  output logic signed [AW-1:0] y [4]
);
  localparam int unsigned NH = N / 2;

  if (N % 4 != 0) begin : g_bad_n
    $error("fir4_cascaded: N must be a multiple of 4");
  end

  // Outer pre-processing.
  logic signed [CW:0]   g_p [NH];
  logic signed [CW:0]   g_m [NH];
  logic signed [CW-1:0] g_o [NH];
  logic signed [XW:0]   u_p [2];
  logic signed [XW:0]   u_m [2];
  logic signed [XW-1:0] v   [2];

  always_comb begin
    for (int k = 0; k < NH; k++) begin
      g_p[k] = (CW+1)'(h[2*k]) + (CW+1)'(h[2*k+1]);
      g_m[k] = (CW+1)'(h[2*k]) - (CW+1)'(h[2*k+1]);
      g_o[k] = h[2*k+1];
    end
    for (int i = 0; i < 2; i++) begin
      u_p[i] = (XW+1)'(x[2*i]) + (XW+1)'(x[2*i+1]);
      u_m[i] = (XW+1)'(x[2*i]) - (XW+1)'(x[2*i+1]);
      v[i]   = x[2*i+1];
    end
  end

  // Inner two-parallel filters.
  logic signed [AW-1:0] p [2];
  logic signed [AW-1:0] m [2];
  logic signed [AW-1:0] q [2];

  fir2_proposed #(.N(NH), .ANTI(ANTI), .XW(XW+1), .CW(CW+1), .AW(AW)) u_inner_p (
    .clk, .rst_n, .en, .h(g_p), .x(u_p), .y(p));
  fir2_proposed #(.N(NH), .ANTI(!ANTI), .XW(XW+1), .CW(CW+1), .AW(AW)) u_inner_m (
    .clk, .rst_n, .en, .h(g_m), .x(u_m), .y(m));
  fir2_ffa #(.N(NH), .XW(XW), .CW(CW), .AW(AW)) u_inner_q (
    .clk, .rst_n, .en, .h(g_o), .x(v), .y(q));

  // Outer post-processing.
  logic signed [AW:0]   pm_sum [2];
  logic signed [AW:0]   pm_dif [2];
  logic signed [AW-1:0] q1_d;

  always_ff @(posedge clk) begin
    if (!rst_n)  q1_d <= '0;
    else if (en) q1_d <= q[1];
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      pm_sum[i] = (AW+1)'(p[i]) + (AW+1)'(m[i]);
      pm_dif[i] = (AW+1)'(p[i]) - (AW+1)'(m[i]);
    end
    y[0] = AW'(pm_sum[0] >>> 1) - q[0] + q1_d;
    y[2] = AW'(pm_sum[1] >>> 1) - q[1] + q[0];
    y[1] = AW'(pm_dif[0] >>> 1);
    y[3] = AW'(pm_dif[1] >>> 1);
  end
endmodule
