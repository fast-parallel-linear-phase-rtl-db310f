// fir4_ffa: four-parallel FIR filter as a cascade of existing two-parallel
// fast FIR algorithm (FFA) structures, for a response with no symmetry.
//
// The eight-parallel cascade uses it for its one inner sub-block without
// coefficient symmetry. Outer level: h splits into E = h(2m), O = h(2m+1)
// (N/2 taps) and the input block X0..X3 into the half-rate streams
// U = (X0, X2), V = (X1, X3), each a two-sample block. The existing FFA gives
//   A = E U,  B = O V,  C = (E+O)(U+V)
//   y(2n) = A + z^-1' B,   y(2n+1) = C - A - B
// where z^-1' maps the block (b0, b1) to (b1 of the previous block, b0).
// Each of A, B, C is itself a two-parallel existing-FFA filter (fir2_ffa),
// giving nine general sub-filters of N/4 taps. Word widths and en are this
// design's choice.
//
// Interface: h is the full response, x[i] = x(4k+i), y[i] = y(4k+i). y is
// combinational from x; state advances on enabled clock edges; rst_n
// (synchronous, active low) clears it.
module fir4_ffa #(
  parameter int unsigned N  = 12,
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
    $error("fir4_ffa: N must be a multiple of 4");
  end

  logic signed [CW-1:0] g_e [NH];
  logic signed [CW-1:0] g_o [NH];
  logic signed [CW:0]   g_s [NH];
  logic signed [XW-1:0] u   [2];
  logic signed [XW-1:0] v   [2];
  logic signed [XW:0]   u_s [2];

  always_comb begin
    for (int k = 0; k < NH; k++) begin
      g_e[k] = h[2*k];
      g_o[k] = h[2*k+1];
      g_s[k] = (CW+1)'(h[2*k]) + (CW+1)'(h[2*k+1]);
    end
    for (int i = 0; i < 2; i++) begin
      u[i]   = x[2*i];
      v[i]   = x[2*i+1];
      u_s[i] = (XW+1)'(x[2*i]) + (XW+1)'(x[2*i+1]);
    end
  end

  logic signed [AW-1:0] a [2];
  logic signed [AW-1:0] b [2];
  logic signed [AW-1:0] c [2];
  logic signed [AW-1:0] b1_d;

  fir2_ffa #(.N(NH), .XW(XW), .CW(CW), .AW(AW)) u_inner_e (
    .clk, .rst_n, .en, .h(g_e), .x(u), .y(a));
  fir2_ffa #(.N(NH), .XW(XW), .CW(CW), .AW(AW)) u_inner_o (
    .clk, .rst_n, .en, .h(g_o), .x(v), .y(b));
  fir2_ffa #(.N(NH), .XW(XW+1), .CW(CW+1), .AW(AW)) u_inner_s (
    .clk, .rst_n, .en, .h(g_s), .x(u_s), .y(c));

  always_ff @(posedge clk) begin
    if (!rst_n)  b1_d <= '0;
    else if (en) b1_d <= b[1];
  end

  always_comb begin
    y[0] = a[0] + b1_d;
    y[2] = a[1] + b[0];
    y[1] = c[0] - a[0] - b[0];
    y[3] = c[1] - a[1] - b[1];
  end
endmodule
