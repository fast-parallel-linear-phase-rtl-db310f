// fir2_ffa: two-parallel FIR filter in the existing fast FIR algorithm (FFA)
// form, for a response with no symmetry to exploit.
//
// The cascaded four-parallel filter uses it for the one inner sub-block whose
// coefficients have no symmetry, because its pre- and post-processing need
// fewer adders than the proposed form. With H0, H1 the even and odd phases of
// the N-tap response and X0 = x(2k), X1 = x(2k+1):
//   A = H0 X0,  B = H1 X1,  C = (H0+H1)(X0+X1)
//   Y0 = A + z^-1 B,   Y1 = C - A - B
// All three sub-filters are general transposed direct-form filters (tdf_fir).
// Word widths and the en handshake are this design's choice.
//
// Interface and timing as fir2_proposed: y is combinational from x, state
// advances on enabled clock edges, rst_n clears it.
module fir2_ffa #(
  parameter int unsigned N  = 12,
  parameter int unsigned XW = fir_pkg::DATA_W,
  parameter int unsigned CW = fir_pkg::COEF_W,
  parameter int unsigned AW = fir_pkg::ACC_W
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
    $error("fir2_ffa: N must be even");
  end

  logic signed [CW-1:0] c_0 [K];
  logic signed [CW-1:0] c_1 [K];
  logic signed [CW:0]   c_s [K];
  logic signed [XW:0]   x_s;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      c_0[k] = h[2*k];
      c_1[k] = h[2*k+1];
      c_s[k] = (CW+1)'(h[2*k]) + (CW+1)'(h[2*k+1]);
    end
    x_s = (XW+1)'(x[0]) + (XW+1)'(x[1]);
  end

  logic signed [AW-1:0] a, b, s, b_d;

  tdf_fir #(.K(K), .XW(XW), .CW(CW), .AW(AW)) u_sub_0 (
    .clk, .rst_n, .en, .c(c_0), .x(x[0]), .y(a));
  tdf_fir #(.K(K), .XW(XW), .CW(CW), .AW(AW)) u_sub_1 (
    .clk, .rst_n, .en, .c(c_1), .x(x[1]), .y(b));
  tdf_fir #(.K(K), .XW(XW+1), .CW(CW+1), .AW(AW)) u_sub_s (
    .clk, .rst_n, .en, .c(c_s), .x(x_s), .y(s));

  always_ff @(posedge clk) begin
    if (!rst_n)  b_d <= '0;
    else if (en) b_d <= b;
  end

  assign y[0] = a + b_d;
  assign y[1] = s - a - b;
endmodule
