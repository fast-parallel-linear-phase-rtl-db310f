// tb_fir3_proposed: self-checking testbench for fir3_proposed.
//
// Drives the 3-parallel filter with blocks of random samples, random
// symmetric coefficients and random stall cycles (en low, inputs changed to
// garbage that must be ignored), and compares every output sample with a
// direct convolution y(n) = sum_k h(k) x(n-k) computed here from the sample
// history (x(n) = 0 before reset). The filter has zero latency: the block's
// outputs are checked in the same cycle its inputs are applied. A second run,
// after a reset, uses full-scale samples and coefficients to check that no
// intermediate word overflows. A watchdog ends the run if it hangs.
module tb_fir3_proposed;
  localparam int unsigned N  = 27;
  localparam int unsigned L  = 3;
  localparam int unsigned W  = fir_pkg::DATA_W;
  localparam int unsigned CW = fir_pkg::COEF_W;
  localparam int unsigned AW = fir_pkg::ACC_W;
  localparam int unsigned NB = 300;   // blocks per run

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [CW-1:0] h [N];
  logic signed [W-1:0]  x [L];
  logic signed [AW-1:0] y [L];
  int checks = 0;
  int failures = 0;
  int stalls = 0;
  longint xs [NB*L];

  fir3_proposed dut (.clk, .rst_n, .en, .h, .x, .y);

  always #5 clk = ~clk;

  function automatic logic signed [W-1:0] rand_sample(bit full);
    if (full) return ($urandom_range(1) != 0) ? W'(-(2**(W-1))) : W'(2**(W-1) - 1);
    return W'($urandom);
  endfunction

  task automatic load_coefs(bit full);
    for (int n = 0; n < (N+1)/2; n++) begin
      logic signed [CW-1:0] v;
      v = full ? (($urandom_range(1) != 0) ? CW'(-(2**(CW-1)) + 1) : CW'(2**(CW-1) - 1))
               : CW'($urandom);
      h[n] = v;
      h[N-1-n] = h[n];
    end
  endtask

  task automatic run(bit full);
    rst_n = 1'b0;
    en = 1'b0;
    load_coefs(full);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < int'(NB); b++) begin
      while ($urandom_range(3) == 0) begin
        en = 1'b0;
        for (int i = 0; i < int'(L); i++) x[i] = W'($urandom);
        stalls++;
        @(negedge clk);
      end
      en = 1'b1;
      for (int i = 0; i < int'(L); i++) begin
        x[i] = rand_sample(full);
        xs[b*L+i] = longint'(x[i]);
      end
      #1;
      for (int i = 0; i < int'(L); i++) begin
        longint exp_v;
        int nn;
        nn = b*L + i;
        exp_v = 0;
        for (int k = 0; k < int'(N); k++)
          if (nn - k >= 0) exp_v += longint'(h[k]) * xs[nn-k];
        checks++;
        if (longint'(y[i]) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH block %0d lane %0d: got %0d expected %0d", b, i, y[i], exp_v);
        end
      end
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    if (stalls == 0) begin
      failures++;
      $display("no stall cycle was exercised");
    end
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
