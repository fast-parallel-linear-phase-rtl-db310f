// tb_fir3a_workloads: structure 3A at the other filter lengths of the
// published comparison, 81, 147 and 591 taps (27 taps is covered by
// tb_fir3a). Each length runs in its own fir3a_len_check helper: random
// symmetric 16-bit coefficients, random 16-bit samples, random stalls, every
// output compared with a direct convolution. The 591-tap instance uses a
// 48-bit accumulator, since at full scale its sub-filter sums can exceed the default 40 bits.
// The three run one after another; a watchdog ends a hung run.
module tb_fir3a_workloads;
  logic clk = 1'b0;
  logic start = 1'b0;
  logic done [3];
  int   checks [3];
  int   failures [3];
  int   stalls [3];

  always #5 clk = ~clk;

  fir3a_len_check #(.N(81))  u_n81  (.clk, .start, .done(done[0]), .checks(checks[0]),
                                     .failures(failures[0]), .stalls(stalls[0]));
  fir3a_len_check #(.N(147)) u_n147 (.clk, .start, .done(done[1]), .checks(checks[1]),
                                     .failures(failures[1]), .stalls(stalls[1]));
  fir3a_len_check #(.N(591), .AW(48), .NB(300)) u_n591 (.clk, .start, .done(done[2]),
                                     .checks(checks[2]), .failures(failures[2]), .stalls(stalls[2]));

  initial begin
    int c, f;
    #20 start = 1'b1;
    wait (done[0] && done[1] && done[2]);
    c = 0;
    f = 0;
    for (int i = 0; i < 3; i++) begin
      c += checks[i];
      f += failures[i];
      if (stalls[i] == 0) f++;
      $display("length %0d: checks=%0d failures=%0d stalls=%0d",
               i == 0 ? 81 : (i == 1 ? 147 : 591), checks[i], failures[i], stalls[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
