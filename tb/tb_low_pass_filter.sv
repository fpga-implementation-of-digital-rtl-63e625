// tb_low_pass_filter: runs the 53-tap filter in both realisations on the stimuli of
// its evaluation: an impulse of magnitude 1 (the output must then be the
// coefficient sequence), the input codes 8, 9 and 10 (minus zero, -1/8, -2/8 in sign-magnitude), then random samples.
// The parallel instance gets one sample per clock and is checked every
// clock; the serial instance gets each sample held for 53 clocks and is
// checked every clock against the frame schedule (sample on enabled edges
// 53, 2x53, ...; result written 53 clocks later). Expected values come
// from an integer convolution with an independent copy of the coefficients.
module tb_low_pass_filter;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  localparam int N = 53;
  logic clk = 0, reset = 1;
  logic ce_p = 0, ce_s = 0;
  logic [3:0]  x_p = '0, x_s = '0;
  logic [31:0] y_p, y_s, exp_s;
  logic [3:0]  seq [$];
  logic [3:0]  seq_eval [3] = '{4'h8, 4'h9, 4'hA};
  fir_model    mp, ms;
  int checks = 0, failures = 0, impulse_ok = 0;

  low_pass_filter #(.ARCH(ARCH_PARALLEL)) dut_p (.clk, .clk_enable(ce_p), .reset, .filter_in(x_p), .filter_out(y_p));
  low_pass_filter #(.ARCH(ARCH_SERIAL))   dut_s (.clk, .clk_enable(ce_s), .reset, .filter_in(x_s), .filter_out(y_s));

  always #5 clk = ~clk;

  initial begin
    mp = new(0);
    ms = new(0);
    // stimulus: impulse, the evaluation inputs, random samples
    seq.push_back(4'h1);
    repeat (N) seq.push_back(4'h0);
    foreach (seq_eval[i]) seq.push_back(seq_eval[i]); repeat (N) seq.push_back(4'h0);
    repeat (60) seq.push_back(4'($urandom));

    @(negedge clk); reset = 1;
    @(negedge clk); reset = 0;
    // parallel: one sample per clock
    foreach (seq[i]) begin
      @(negedge clk);
      x_p = seq[i]; ce_p = 1;
      @(posedge clk); #1;
      mp.push(seq[i]);
      checks++;
      if (y_p !== sm32(mp.y())) begin
        failures++;
        $display("FAIL parallel sample %0d: %h expected %h", i, y_p, sm32(mp.y()));
      end
      if (i < N && y_p === sm32(longint'(ref_coef(0, i)))) impulse_ok++;
    end
    @(negedge clk); ce_p = 0;
    // serial: each sample held for one N-clock frame; first frame is idle
    exp_s = '0;
    for (int f = -1; f < seq.size(); f++) begin
      for (int c = 1; c <= N; c++) begin
        @(negedge clk);
        x_s = (f + 1 < seq.size()) ? seq[f + 1] : 4'h0; ce_s = 1;
        @(posedge clk); #1;
        if (c == N) begin
          exp_s = sm32(ms.y());
          ms.push(x_s);
        end
        checks++;
        if (y_s !== exp_s) begin
          failures++;
          $display("FAIL serial frame %0d clock %0d: %h expected %h", f, c, y_s, exp_s);
        end
      end
    end
    if (impulse_ok != N) begin
      failures++;
      $display("impulse response matched %0d of %0d coefficients", impulse_ok, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
