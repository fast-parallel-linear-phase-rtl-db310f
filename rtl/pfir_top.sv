// pfir_top: the parallel symmetric FIR filters side by side.
//
// Six independent filters, each with its own coefficient, input and output
// ports and a shared clock, reset and enable:
//   fir2_proposed  two-parallel,  N2  taps (even, symmetric)
//   fir3_proposed  three-parallel, N3 taps (multiple of 3, symmetric)
//   fir3a          three-parallel structure 3A, N3A taps (odd, multiple of 3)
//   fir4_cascaded  four-parallel cascade, N4 taps (multiple of 4, symmetric)
//   fir6_cascaded  six-parallel cascade, N6 taps (multiple of 6, symmetric)
//   fir8_cascaded  eight-parallel cascade, N8 taps (multiple of 8, symmetric)
// Structure 3A is the main design; the others are the same idea at other
// block sizes. Each filter takes only the unique half of
// its symmetric response, h(0) .. h(ceil(N/2)-1); the full response is formed
// here by mirroring, h(n) = h(N-1-n), so the symmetry every sub-filter relies
// on holds by construction.
//
// Timing: input blocks (x*, en) are registered, filtered, and the output
// blocks registered, so y* and vld appear two clock edges after the block and
// en that produced them. A cycle with en low is a stall: no filter state
// moves, vld drops one cycle later and the outputs hold. rst_n is
// synchronous, active low. Register stages, widths and en are this design's.
module pfir_top #(
  parameter int unsigned N2  = 24,
  parameter int unsigned N3  = 27,
  parameter int unsigned N3A = 27,
  parameter int unsigned N4  = 24,
  parameter int unsigned N6  = 24,
  parameter int unsigned N8  = 24,
  parameter int unsigned W   = fir_pkg::DATA_W,
  parameter int unsigned CW  = fir_pkg::COEF_W,
  parameter int unsigned AW  = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] h2  [(N2+1)/2],
  input  logic signed [CW-1:0] h3  [(N3+1)/2],
  input  logic signed [CW-1:0] h3a [(N3A+1)/2],
  input  logic signed [CW-1:0] h4  [(N4+1)/2],
  input  logic signed [CW-1:0] h6  [(N6+1)/2],
  input  logic signed [CW-1:0] h8  [(N8+1)/2],
  input  logic signed [W-1:0]  x2  [2],
  input  logic signed [W-1:0]  x3  [3],
  input  logic signed [W-1:0]  x3a [3],
  input  logic signed [W-1:0]  x4  [4],
  input  logic signed [W-1:0]  x6  [6],
  input  logic signed [W-1:0]  x8  [8],
  output logic signed [AW-1:0] y2  [2],
  output logic signed [AW-1:0] y3  [3],
  output logic signed [AW-1:0] y3a [3],
  output logic signed [AW-1:0] y4  [4],
  output logic signed [AW-1:0] y6  [6],
  output logic signed [AW-1:0] y8  [8],
  output logic                 vld
);
  // Full responses by mirroring the unique half.
  logic signed [CW-1:0] f2  [N2];
  logic signed [CW-1:0] f3  [N3];
  logic signed [CW-1:0] f3a [N3A];
  logic signed [CW-1:0] f4  [N4];
  logic signed [CW-1:0] f6  [N6];
  logic signed [CW-1:0] f8  [N8];

  always_comb begin
    for (int n = 0; n < N2; n++)  f2[n]  = (n < (N2+1)/2)  ? h2[n]  : h2[N2-1-n];
    for (int n = 0; n < N3; n++)  f3[n]  = (n < (N3+1)/2)  ? h3[n]  : h3[N3-1-n];
    for (int n = 0; n < N3A; n++) f3a[n] = (n < (N3A+1)/2) ? h3a[n] : h3a[N3A-1-n];
    for (int n = 0; n < N4; n++)  f4[n]  = (n < (N4+1)/2)  ? h4[n]  : h4[N4-1-n];
    for (int n = 0; n < N6; n++)  f6[n]  = (n < (N6+1)/2)  ? h6[n]  : h6[N6-1-n];
    for (int n = 0; n < N8; n++)  f8[n]  = (n < (N8+1)/2)  ? h8[n]  : h8[N8-1-n];
  end

  // Input registers.
  logic                en_q;
  logic signed [W-1:0] x2_q  [2];
  logic signed [W-1:0] x3_q  [3];
  logic signed [W-1:0] x3a_q [3];
  logic signed [W-1:0] x4_q  [4];
  logic signed [W-1:0] x6_q  [6];
  logic signed [W-1:0] x8_q  [8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      en_q  <= 1'b0;
      x2_q  <= '{default: '0};
      x3_q  <= '{default: '0};
      x3a_q <= '{default: '0};
      x4_q  <= '{default: '0};
      x6_q  <= '{default: '0};
      x8_q  <= '{default: '0};
    end else begin
      en_q <= en;
      if (en) begin
        x2_q  <= x2;
        x3_q  <= x3;
        x3a_q <= x3a;
        x4_q  <= x4;
        x6_q  <= x6;
        x8_q  <= x8;
      end
    end
  end

  // Filters.
  logic signed [AW-1:0] r2  [2];
  logic signed [AW-1:0] r3  [3];
  logic signed [AW-1:0] r3a [3];
  logic signed [AW-1:0] r4  [4];
  logic signed [AW-1:0] r6  [6];
  logic signed [AW-1:0] r8  [8];

  fir2_proposed #(.N(N2), .ANTI(1'b0), .XW(W), .CW(CW), .AW(AW)) u_fir2 (
    .clk, .rst_n, .en(en_q), .h(f2), .x(x2_q), .y(r2));
  fir3_proposed #(.N(N3), .XW(W), .CW(CW), .AW(AW)) u_fir3 (
    .clk, .rst_n, .en(en_q), .h(f3), .x(x3_q), .y(r3));
  fir3a #(.N(N3A), .XW(W), .CW(CW), .AW(AW)) u_fir3a (
    .clk, .rst_n, .en(en_q), .h(f3a), .x(x3a_q), .y(r3a));
  fir4_cascaded #(.N(N4), .XW(W), .CW(CW), .AW(AW)) u_fir4 (
    .clk, .rst_n, .en(en_q), .h(f4), .x(x4_q), .y(r4));
  fir6_cascaded #(.N(N6), .XW(W), .CW(CW), .AW(AW)) u_fir6 (
    .clk, .rst_n, .en(en_q), .h(f6), .x(x6_q), .y(r6));
  fir8_cascaded #(.N(N8), .XW(W), .CW(CW), .AW(AW)) u_fir8 (
    .clk, .rst_n, .en(en_q), .h(f8), .x(x8_q), .y(r8));

  // Output registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= 1'b0;
      y2  <= '{default: '0};
      y3  <= '{default: '0};
      y3a <= '{default: '0};
      y4  <= '{default: '0};
      y6  <= '{default: '0};
      y8  <= '{default: '0};
    end else begin
      vld <= en_q;
      if (en_q) begin
        y2  <= r2;
        y3  <= r3;
        y3a <= r3a;
        y4  <= r4;
        y6  <= r6;
        y8  <= r8;
      end
    end
  end
endmodule
