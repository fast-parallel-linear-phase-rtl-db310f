// fir3a_len_check: testbench helper that runs one fir3a instance of length N
// and accumulator width AW through NB random input blocks with random stalls,
// comparing every output sample with a direct convolution. It generates its
// own symmetric coefficients, reset and enable, starts on `start` and raises
// `done` when finished; `checks` and `failures` count the comparisons.
module fir3a_len_check #(
  parameter int unsigned N  = 81,
  parameter int unsigned AW = fir_pkg::ACC_W,
  parameter int unsigned NB = 120
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  localparam int unsigned W  = fir_pkg::DATA_W;
  localparam int unsigned CW = fir_pkg::COEF_W;

  logic rst_n;
  logic en;
  logic signed [CW-1:0] h [N];
  logic signed [W-1:0]  x [3];
  logic signed [AW-1:0] y [3];
  longint xs [NB*3];

  fir3a #(.N(N), .AW(AW)) dut (.clk, .rst_n, .en, .h, .x, .y);

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    stalls = 0;
    rst_n = 1'b0;
    en = 1'b0;
    foreach (x[i]) x[i] = '0;
    for (int n = 0; n < int'(N+1)/2; n++) begin
      h[n] = CW'($urandom);
      h[N-1-n] = h[n];
    end
    wait (start);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < int'(NB); b++) begin
      while ($urandom_range(3) == 0) begin
        en = 1'b0;
        foreach (x[i]) x[i] = W'($urandom);
        stalls++;
        @(negedge clk);
      end
      en = 1'b1;
      for (int i = 0; i < 3; i++) begin
        x[i] = W'($urandom);
        xs[b*3+i] = longint'(x[i]);
      end
      #1;
      for (int i = 0; i < 3; i++) begin
        longint exp_v;
        int nn;
        nn = b*3 + i;
        exp_v = 0;
        for (int k = 0; k < int'(N); k++)
          if (nn - k >= 0) exp_v += longint'(h[k]) * xs[nn-k];
        checks++;
        if (longint'(y[i]) != exp_v) begin
          failures++;
          if (failures < 5)
            $display("N=%0d MISMATCH block %0d lane %0d: got %0d expected %0d", N, b, i, y[i], exp_v);
        end
      end
      @(negedge clk);
    end
    en = 1'b0;
    done = 1'b1;
  end
endmodule
