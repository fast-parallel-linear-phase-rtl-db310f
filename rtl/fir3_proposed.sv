// fir3_proposed: three-parallel FIR filter, proposed fast FIR algorithm form
// for symmetric impulse responses whose length N is a multiple of 3.
//
// With H0, H1, H2 the three polyphase components of h (N/3 taps each) and
// X0..X2 = x(3k)..x(3k+2), six sub-filters run in parallel:
//   P01 = (H0+H1)(X0+X1)   M01 = (H0-H1)(X0-X1)   Q1 = H1 X1
//   P02 = (H0+H2)(X0+X2)   M02 = (H0-H2)(X0-X2)   S  = (H0+H1+H2)(X0+X1+X2)
// and the outputs are rebuilt as (z^-1 is one block delay)
//   Y0 = (P01+M01)/2 - Q1 + z^-1 [S - P02 - (P01-M01)/2 - Q1]
//   Y1 = (P01-M01)/2      + z^-1 [(P02+M02)/2 - (P01+M01)/2 + Q1]
//   Y2 = (P02-M02)/2 + Q1
// For N = 3K, H2 is H0 reversed and H1 is symmetric, so H1, H0+H2, H0-H2
// (antisymmetric) and H0+H1+H2 use sym_tdf_fir with half the multipliers;
// H0+H1 and H0-H1 use tdf_fir. This follows the published design. The halvings are
// done after forming the exact (even) sums and differences, a choice of this
// design, as are the word widths and the en handshake. The term
// (P01+M01)/2 - Q1 = H0X0 is formed once and shared by Y0 and the delayed
// part of Y1, giving 5 pre-adders and 12 post-adders.
//
// Interface: h is the full response, x[i] = x(3k+i), y[i] = y(3k+i). y is
// combinational from x and the stored state; state advances on enabled clock
// edges; rst_n clears it.
module fir3_proposed #(
  parameter int unsigned N  = 27,
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
    $error("fir3_proposed: N must be a multiple of 3");
  end

  // Pre-processing.
  logic signed [CW:0]   c01p [K];
  logic signed [CW:0]   c01m [K];
  logic signed [CW-1:0] c1   [K];
  logic signed [CW:0]   c02p [K];
  logic signed [CW:0]   c02m [K];
  logic signed [CW+1:0] cs   [K];
  logic signed [XW:0]   x01p, x01m, x02p, x02m;
  logic signed [XW+1:0] xs;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      c01p[k] = (CW+1)'(h[3*k]) + (CW+1)'(h[3*k+1]);
      c01m[k] = (CW+1)'(h[3*k]) - (CW+1)'(h[3*k+1]);
      c1[k]   = h[3*k+1];
      c02p[k] = (CW+1)'(h[3*k]) + (CW+1)'(h[3*k+2]);
      c02m[k] = (CW+1)'(h[3*k]) - (CW+1)'(h[3*k+2]);
      cs[k]   = (CW+2)'(c02p[k]) + (CW+2)'(h[3*k+1]);
    end
    x01p = (XW+1)'(x[0]) + (XW+1)'(x[1]);
    x01m = (XW+1)'(x[0]) - (XW+1)'(x[1]);
    x02p = (XW+1)'(x[0]) + (XW+1)'(x[2]);
    x02m = (XW+1)'(x[0]) - (XW+1)'(x[2]);
    xs   = (XW+2)'(x02p) + (XW+2)'(x[1]);
  end

  // Sub-filters.
  logic signed [AW-1:0] p01, m01, q1, p02, m02, s;

  tdf_fir #(.K(K), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_01p (
    .clk, .rst_n, .en, .c(c01p), .x(x01p), .y(p01));
  tdf_fir #(.K(K), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_01m (
    .clk, .rst_n, .en, .c(c01m), .x(x01m), .y(m01));
  sym_tdf_fir #(.K(K), .ANTI(1'b0), .XW(XW), .CW(CW), .AW(AW)) u_sub_1 (
    .clk, .rst_n, .en, .c(c1), .x(x[1]), .y(q1));
  sym_tdf_fir #(.K(K), .ANTI(1'b0), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_02p (
    .clk, .rst_n, .en, .c(c02p), .x(x02p), .y(p02));
  sym_tdf_fir #(.K(K), .ANTI(1'b1), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_02m (
    .clk, .rst_n, .en, .c(c02m), .x(x02m), .y(m02));
  sym_tdf_fir #(.K(K), .ANTI(1'b0), .XW(XW+2), .CW(CW+2), .AW(AW)) u_sub_s (
    .clk, .rst_n, .en, .c(cs), .x(xs), .y(s));

  // Post-processing.
  logic signed [AW:0]   sum01, dif01, sum02, dif02;
  logic signed [AW-1:0] a01, b01, a02, b02;   // halved sums and differences
  logic signed [AW-1:0] r0;                   // H0X0, shared by Y0 and v1
  logic signed [AW-1:0] v0, v1;               // terms delayed by one block
  logic signed [AW-1:0] v0_d, v1_d;

  always_comb begin
    sum01 = (AW+1)'(p01) + (AW+1)'(m01);
    dif01 = (AW+1)'(p01) - (AW+1)'(m01);
    sum02 = (AW+1)'(p02) + (AW+1)'(m02);
    dif02 = (AW+1)'(p02) - (AW+1)'(m02);
    a01   = AW'(sum01 >>> 1);     // H0X0 + H1X1
    b01   = AW'(dif01 >>> 1);     // H0X1 + H1X0
    a02   = AW'(sum02 >>> 1);     // H0X0 + H2X2
    b02   = AW'(dif02 >>> 1);     // H0X2 + H2X0
    r0    = a01 - q1;             // H0X0
    v0    = s - p02 - b01 - q1;   // H1X2 + H2X1
    v1    = a02 - r0;             // H2X2
    y[0]  = r0 + v0_d;
    y[1]  = b01 + v1_d;
    y[2]  = b02 + q1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v0_d <= '0;
      v1_d <= '0;
    end else if (en) begin
      v0_d <= v0;
      v1_d <= v1;
    end
  end
endmodule
