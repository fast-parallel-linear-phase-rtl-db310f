// sym_tdf_fir: transposed direct-form FIR sub-filter for symmetric or
// antisymmetric coefficients, using ceil(K/2) multipliers instead of K.
//
// When c[k] = c[K-1-k] (ANTI = 0) or c[k] = -c[K-1-k] (ANTI = 1), the product
// c[k]*x for k >= ceil(K/2) equals (or is the negative of) the product of the
// mirrored tap. Only the first ceil(K/2) products are formed; each feeds two
// taps of the transposed delay line, the middle one (odd K) feeds one. This is
// the sub-filter the published design uses for every symmetric sub-filter block.
// Only c[0 .. ceil(K/2)-1] are used; the rest of c must mirror them, and an
// assertion checks that it does whenever the filter is enabled.
//
// Timing and reset are those of tdf_fir: y is combinational from x, the K-1
// partial-sum registers advance on enabled clock edges and reset to zero.
module sym_tdf_fir #(
  parameter int unsigned K    = 9,
  parameter bit          ANTI = 1'b0,
  parameter int unsigned XW   = fir_pkg::DATA_W,
  parameter int unsigned CW   = fir_pkg::COEF_W,
  parameter int unsigned AW   = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] c [K],
  input  logic signed [XW-1:0] x,
  output logic signed [AW-1:0] y
);
  localparam int unsigned M = (K + 1) / 2;  // number of multipliers

  if (K < 2) begin : g_bad_k
    $error("sym_tdf_fir: K must be at least 2");
  end

  logic signed [XW+CW-1:0] prod [M];
  logic signed [AW-1:0]    tap  [K];
  logic signed [AW-1:0]    sum  [K];
  logic signed [AW-1:0]    d    [K-1];

  always_comb begin
    for (int j = 0; j < M; j++) prod[j] = x * c[j];
    for (int k = 0; k < K; k++) begin
      if (k < M) tap[k] = AW'(prod[k]);
      else if (ANTI) tap[k] = -AW'(prod[K-1-k]);
      else tap[k] = AW'(prod[K-1-k]);
    end
    for (int k = 0; k < K; k++) begin
      sum[k] = tap[k];
      if (k < K - 1) sum[k] = sum[k] + d[k];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < K - 1; k++) d[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < K - 1; k++) d[k] <= sum[k+1];
    end
  end

  assign y = sum[0];

  // The coefficient set must have the symmetry this sub-filter relies on.
  logic coef_ok;
  always_comb begin
    coef_ok = 1'b1;
    for (int k = 0; k < K; k++) begin
      if (ANTI) begin
        if (c[k] != -c[K-1-k]) coef_ok = 1'b0;
      end else begin
        if (c[k] != c[K-1-k]) coef_ok = 1'b0;
      end
    end
  end

  a_coef_symmetric : assert property (@(posedge clk) disable iff (!rst_n) en |-> coef_ok)
    else $error("sym_tdf_fir: coefficients are not %0s", ANTI ? "antisymmetric" : "symmetric");
endmodule
