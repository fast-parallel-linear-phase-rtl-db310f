// tb_pfir_top: end-to-end testbench of pfir_top at its default sizes
// (two-parallel 24 taps, three-parallel 27 taps, structure 3A 27 taps,
// four-, six- and eight-parallel cascades 24 taps each).
//
// All six filters get random symmetric responses (unique halves on the h*
// ports) and independent random input blocks. Cycles with en low are mixed
// in (stalls); the inputs then carry garbage that must be ignored. Every
// accepted block's expected outputs, from a direct convolution over each
// filter's sample history, are queued with the cycle they entered; when vld
// is high the head of the queue must match all outputs and must be exactly
// two cycles old (the latency of the input and output registers). While vld
// is low the outputs must hold. Three runs follow each other, separated by a
// reset in the middle of streaming: random data, full-scale data and
// coefficients (word-growth check), and random data again. The run fails if
// a stall, an output hold or a mid-stream reset never happened. A watchdog
// ends a hung run.
module tb_pfir_top;
  localparam int unsigned N2  = 24;
  localparam int unsigned N3  = 27;
  localparam int unsigned N3A = 27;
  localparam int unsigned N4  = 24;
  localparam int unsigned N6  = 24;
  localparam int unsigned N8  = 24;
  localparam int unsigned W   = fir_pkg::DATA_W;
  localparam int unsigned CW  = fir_pkg::COEF_W;
  localparam int unsigned AW  = fir_pkg::ACC_W;
  localparam int unsigned NB  = 250;          // blocks per run
  localparam int          NF  = 6;            // filters
  localparam int          LMAX = 8;           // widest block
  localparam int          LN [NF] = '{2, 3, 3, 4, 6, 8};
  localparam int          TP [NF] = '{N2, N3, N3A, N4, N6, N8};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic signed [CW-1:0] h2  [(N2+1)/2];
  logic signed [CW-1:0] h3  [(N3+1)/2];
  logic signed [CW-1:0] h3a [(N3A+1)/2];
  logic signed [CW-1:0] h4  [(N4+1)/2];
  logic signed [CW-1:0] h6  [(N6+1)/2];
  logic signed [CW-1:0] h8  [(N8+1)/2];
  logic signed [W-1:0]  x2  [2];
  logic signed [W-1:0]  x3  [3];
  logic signed [W-1:0]  x3a [3];
  logic signed [W-1:0]  x4  [4];
  logic signed [W-1:0]  x6  [6];
  logic signed [W-1:0]  x8  [8];
  logic signed [AW-1:0] y2  [2];
  logic signed [AW-1:0] y3  [3];
  logic signed [AW-1:0] y3a [3];
  logic signed [AW-1:0] y4  [4];
  logic signed [AW-1:0] y6  [6];
  logic signed [AW-1:0] y8  [8];
  logic                 vld;

  pfir_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    longint v [NF][LMAX];
    int     cyc;
  } exp_t;

  int     checks = 0;
  int     failures = 0;
  int     stalls = 0;
  int     holds = 0;
  int     resets = 0;
  int     cyc = 0;
  exp_t   pend [$];
  longint hf [NF][27];        // full responses
  longint hist [NF][$];       // sample history per filter
  longint last [NF][LMAX];       // last output block seen

  function automatic longint yout(int f, int lane);
    case (f)
      0: return longint'(y2[lane]);
      1: return longint'(y3[lane]);
      2: return longint'(y3a[lane]);
      3: return longint'(y4[lane]);
      4: return longint'(y6[lane]);
      default: return longint'(y8[lane]);
    endcase
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  // Output side, evaluated at each falling edge before new inputs are driven.
  task automatic check_outputs();
    if (vld) begin
      exp_t e;
      checks++;
      if (pend.size() == 0) begin
        fail("vld high with no block outstanding");
        return;
      end
      e = pend.pop_front();
      if (cyc - e.cyc != 2) fail($sformatf("latency %0d, expected 2", cyc - e.cyc));
      for (int f = 0; f < NF; f++)
        for (int i = 0; i < LN[f]; i++) begin
          checks++;
          if (yout(f, i) != e.v[f][i])
            fail($sformatf("filter %0d lane %0d got %0d expected %0d", f, i, yout(f, i), e.v[f][i]));
          last[f][i] = yout(f, i);
        end
    end else if (pend.size() != 0 || resets != 0) begin
      bit same;
      same = 1'b1;
      for (int f = 0; f < NF; f++)
        for (int i = 0; i < LN[f]; i++)
          if (yout(f, i) != last[f][i]) same = 1'b0;
      checks++;
      holds++;
      if (!same) fail("outputs changed while vld was low");
    end
  endtask

  task automatic step();
    @(negedge clk);
    cyc++;
    check_outputs();
  endtask

  function automatic logic signed [15:0] pick(bit full);
    if (full) return ($urandom_range(1) != 0) ? 16'sh8001 : 16'sh7fff;
    return 16'($urandom);
  endfunction

  task automatic load_coefs(bit full);
    for (int n = 0; n < (N2+1)/2; n++)  h2[n]  = pick(full);
    for (int n = 0; n < (N3+1)/2; n++)  h3[n]  = pick(full);
    for (int n = 0; n < (N3A+1)/2; n++) h3a[n] = pick(full);
    for (int n = 0; n < (N4+1)/2; n++)  h4[n]  = pick(full);
    for (int n = 0; n < (N6+1)/2; n++)  h6[n]  = pick(full);
    for (int n = 0; n < (N8+1)/2; n++)  h8[n]  = pick(full);
    for (int f = 0; f < NF; f++)
      for (int n = 0; n < TP[f]; n++) begin
        int m;
        m = (n < (TP[f]+1)/2) ? n : TP[f] - 1 - n;
        case (f)
          0: hf[f][n] = longint'(h2[m]);
          1: hf[f][n] = longint'(h3[m]);
          2: hf[f][n] = longint'(h3a[m]);
          3: hf[f][n] = longint'(h4[m]);
          4: hf[f][n] = longint'(h6[m]);
          default: hf[f][n] = longint'(h8[m]);
        endcase
      end
  endtask

  task automatic drive_garbage();
    foreach (x2[i])  x2[i]  = W'($urandom);
    foreach (x3[i])  x3[i]  = W'($urandom);
    foreach (x3a[i]) x3a[i] = W'($urandom);
    foreach (x4[i])  x4[i]  = W'($urandom);
    foreach (x6[i])  x6[i]  = W'($urandom);
    foreach (x8[i])  x8[i]  = W'($urandom);
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    en = 1'b0;
    drive_garbage();
    @(negedge clk);
    cyc++;
    @(negedge clk);
    cyc++;
    pend.delete();
    for (int f = 0; f < NF; f++) begin
      hist[f].delete();
      for (int i = 0; i < LMAX; i++) last[f][i] = 0;
    end
    rst_n = 1'b1;
  endtask

  task automatic run(bit full);
    load_coefs(full);
    for (int b = 0; b < int'(NB); b++) begin
      exp_t e;
      if ($urandom_range(3) == 0) begin
        en = 1'b0;
        drive_garbage();
        stalls++;
        step();
        continue;
      end
      en = 1'b1;
      for (int f = 0; f < NF; f++)
        for (int i = 0; i < LN[f]; i++) begin
          logic signed [W-1:0] s;
          s = full ? (($urandom_range(1) != 0) ? 16'sh8000 : 16'sh7fff) : W'($urandom);
          case (f)
            0: x2[i] = s;
            1: x3[i] = s;
            2: x3a[i] = s;
            3: x4[i] = s;
            4: x6[i] = s;
            default: x8[i] = s;
          endcase
          hist[f].push_back(longint'(s));
        end
      for (int f = 0; f < NF; f++)
        for (int i = 0; i < LMAX; i++) begin
          e.v[f][i] = 0;
          if (i < LN[f]) begin
            int nn;
            nn = hist[f].size() - LN[f] + i;
            for (int k = 0; k < TP[f]; k++)
              if (nn - k >= 0) e.v[f][i] += hf[f][k] * hist[f][nn-k];
          end
        end
      e.cyc = cyc;
      pend.push_back(e);
      step();
    end
    en = 1'b0;
  endtask

  initial begin
    do_reset();
    run(1'b0);
    do_reset();          // reset while blocks are still in flight
    resets++;
    run(1'b1);
    do_reset();
    resets++;
    run(1'b0);
    en = 1'b0;
    repeat (4) step();
    if (pend.size() != 0) fail("blocks left without output");
    if (stalls == 0) fail("no stall exercised");
    if (holds == 0) fail("no output hold exercised");
    if (resets == 0) fail("no mid-stream reset exercised");
    $display("stalls=%0d holds=%0d resets=%0d", stalls, holds, resets);
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
