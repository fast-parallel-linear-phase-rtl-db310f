// tb_sym_tdf_fir: self-checking testbench for sym_tdf_fir.
//
// Feeds random samples (with random stall cycles, en low) into a 9-tap
// symmetric, a 9-tap antisymmetric (zero middle tap) and a 6-tap antisymmetric
// half-multiplier filter, with random coefficients of that symmetry, and
// compares each output, in the same cycle as its input (zero latency), with a
// direct convolution over the sample history. A second run after reset uses
// full-scale samples and coefficients. A watchdog ends a hung run.
module tb_sym_tdf_fir;
  localparam int unsigned W  = fir_pkg::DATA_W;
  localparam int unsigned CW = fir_pkg::COEF_W;
  localparam int unsigned AW = fir_pkg::ACC_W;
  localparam int unsigned K1 = 9;
  localparam int unsigned K2 = 6;
  localparam int unsigned NS = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [CW-1:0] c1 [K1];
  logic signed [CW-1:0] c2 [K2];
  logic signed [W-1:0]  x;
  logic signed [CW-1:0] c3 [K1];
  logic signed [AW-1:0] y1, y2, y3;
  int checks = 0;
  int failures = 0;
  int stalls = 0;
  longint xs [NS];

  sym_tdf_fir dut1 (.clk, .rst_n, .en, .c(c1), .x, .y(y1));
  sym_tdf_fir #(.K(K2), .ANTI(1'b1)) dut2 (.clk, .rst_n, .en, .c(c2), .x, .y(y2));
  sym_tdf_fir #(.K(K1), .ANTI(1'b1)) dut3 (.clk, .rst_n, .en, .c(c3), .x, .y(y3));

  always #5 clk = ~clk;

  function automatic logic signed [15:0] pick(bit full);
    if (full) return ($urandom_range(1) != 0) ? 16'sh8001 : 16'sh7fff;
    return 16'($urandom);
  endfunction

  task automatic check(string name, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("MISMATCH %s: got %0d expected %0d", name, got, exp_v);
    end
  endtask

  task automatic run(bit full);
    rst_n = 1'b0;
    en = 1'b0;
    for (int k = 0; k < int'(K1+1)/2; k++) begin
      c1[k] = pick(full);
      c1[K1-1-k] = c1[k];
      c3[k] = pick(full);
      c3[K1-1-k] = -c3[k];
    end
    c3[K1/2] = '0;
    for (int k = 0; k < int'(K2)/2; k++) begin
      c2[k] = pick(full);
      c2[K2-1-k] = -c2[k];
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < int'(NS); n++) begin
      while ($urandom_range(3) == 0) begin
        en = 1'b0;
        x = W'($urandom);
        stalls++;
        @(negedge clk);
      end
      en = 1'b1;
      x = full ? ((($urandom_range(1) != 0) ? 16'sh8000 : 16'sh7fff)) : W'($urandom);
      xs[n] = longint'(x);
      #1;
      begin
        longint e1, e2, e3;
        e1 = 0;
        e2 = 0;
        e3 = 0;
        for (int k = 0; k < int'(K1); k++) if (n - k >= 0) e1 += longint'(c1[k]) * xs[n-k];
        for (int k = 0; k < int'(K2); k++) if (n - k >= 0) e2 += longint'(c2[k]) * xs[n-k];
        check("K=9 symmetric", longint'(y1), e1);
        for (int k = 0; k < int'(K1); k++) if (n - k >= 0) e3 += longint'(c3[k]) * xs[n-k];
        check("K=6 antisymmetric", longint'(y2), e2);
        check("K=9 antisymmetric", longint'(y3), e3);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
