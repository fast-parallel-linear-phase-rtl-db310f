// fir3_ffa: three-parallel FIR filter in the existing fast FIR algorithm
// (FFA) form, for a response with no symmetry to exploit.
//
// The six-parallel cascade uses it for the one inner sub-block whose
// coefficients have no symmetry, since its pre- and post-processing is the
// most compact (3 pre-adders, 7 post-adders). With H0, H1, H2 the polyphase
// components of the N-tap response and X0..X2 = x(3k)..x(3k+2):
//   A = H0X0, B = H1X1, Cc = H2X2,
//   D = (H0+H1)(X0+X1), E = (H1+H2)(X1+X2), S = (H0+H1+H2)(X0+X1+X2)
//   T  = A - z^-1 Cc
//   Y0 = T + z^-1 (E - B)
//   Y1 = (D - B) - T
//   Y2 = S - (D - B) - (E - B)
// All six sub-filters are general transposed-form filters (tdf_fir). Word
// widths and the en handshake are this design's choice.
//
// Interface and timing as fir3a: y is combinational from x, state advances on
// enabled clock edges, rst_n (synchronous, active low) clears it.
module fir3_ffa #(
  parameter int unsigned N  = 12,
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
    $error("fir3_ffa: N must be a multiple of 3");
  end

  logic signed [CW-1:0] c0  [K];
  logic signed [CW-1:0] c1  [K];
  logic signed [CW-1:0] c2  [K];
  logic signed [CW:0]   c01 [K];
  logic signed [CW:0]   c12 [K];
  logic signed [CW+1:0] cs  [K];
  logic signed [XW:0]   x01, x12;
  logic signed [XW+1:0] xs;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      c0[k]  = h[3*k];
      c1[k]  = h[3*k+1];
      c2[k]  = h[3*k+2];
      c01[k] = (CW+1)'(h[3*k]) + (CW+1)'(h[3*k+1]);
      c12[k] = (CW+1)'(h[3*k+1]) + (CW+1)'(h[3*k+2]);
      cs[k]  = (CW+2)'(c01[k]) + (CW+2)'(h[3*k+2]);
    end
    x01 = (XW+1)'(x[0]) + (XW+1)'(x[1]);
    x12 = (XW+1)'(x[1]) + (XW+1)'(x[2]);
    xs  = (XW+2)'(x01) + (XW+2)'(x[2]);
  end

  logic signed [AW-1:0] a, b, cc, d, e, s;

  tdf_fir #(.K(K), .XW(XW), .CW(CW), .AW(AW)) u_sub_0 (
    .clk, .rst_n, .en, .c(c0), .x(x[0]), .y(a));
  tdf_fir #(.K(K), .XW(XW), .CW(CW), .AW(AW)) u_sub_1 (
    .clk, .rst_n, .en, .c(c1), .x(x[1]), .y(b));
  tdf_fir #(.K(K), .XW(XW), .CW(CW), .AW(AW)) u_sub_2 (
    .clk, .rst_n, .en, .c(c2), .x(x[2]), .y(cc));
  tdf_fir #(.K(K), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_01 (
    .clk, .rst_n, .en, .c(c01), .x(x01), .y(d));
  tdf_fir #(.K(K), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_12 (
    .clk, .rst_n, .en, .c(c12), .x(x12), .y(e));
  tdf_fir #(.K(K), .XW(XW+2), .CW(CW+2), .AW(AW)) u_sub_s (
    .clk, .rst_n, .en, .c(cs), .x(xs), .y(s));

  logic signed [AW-1:0] d_b, e_b, t, e_b_d, cc_d;

  always_comb begin
    d_b  = d - b;              // H0X1 + H1X0 + H0X0
    e_b  = e - b;              // H1X2 + H2X1 + H2X2
    t    = a - cc_d;           // H0X0 - z^-1 H2X2
    y[0] = t + e_b_d;
    y[1] = d_b - t;
    y[2] = s - d_b - e_b;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_b_d <= '0;
      cc_d  <= '0;
    end else if (en) begin
      e_b_d <= e_b;
      cc_d  <= cc;
    end
  end
endmodule
