// tdf_fir: general transposed direct-form FIR sub-filter, one multiplier per tap.
//
// Used for the sub-filters of a fast FIR algorithm (FFA) structure whose
// coefficients carry no symmetry (for example H0 and H1+H2 in structure 3A).
// Every enabled cycle the input sample x is multiplied by all K coefficients at
// once; product k is added to the partial sum held in register d[k] and the
// result moves one register towards the output (transposed form, as the
// published design uses for its sub-filters).
//
//   y = c[0]*x + d[0],   d[k] <= c[k+1]*x + d[k+1],   d[K-2] <= c[K-1]*x
//
// Timing: y is combinational from x and the registers (zero latency); the
// registers advance only on clock edges with en high. rst_n (synchronous,
// active low) clears them, so the filter starts from an all-zero history.
// Products are sign-extended to the accumulator width AW; the caller chooses
// AW wide enough for K products.
module tdf_fir #(
  parameter int unsigned K  = 9,
  parameter int unsigned XW = fir_pkg::DATA_W,
  parameter int unsigned CW = fir_pkg::COEF_W,
  parameter int unsigned AW = fir_pkg::ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [CW-1:0] c [K],
  input  logic signed [XW-1:0] x,
  output logic signed [AW-1:0] y
);
  if (K < 2) begin : g_bad_k
    $error("tdf_fir: K must be at least 2");
  end

  logic signed [XW+CW-1:0] prod [K];
  logic signed [AW-1:0]    sum  [K];
  logic signed [AW-1:0]    d    [K-1];

  always_comb begin
    for (int k = 0; k < K; k++) begin
      prod[k] = x * c[k];
      sum[k]  = AW'(prod[k]);
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
endmodule
