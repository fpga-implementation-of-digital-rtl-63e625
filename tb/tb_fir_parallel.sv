// tb_fir_parallel: checks the fully parallel FIR for all three coefficient
// tables (default low-pass instance, plus band-pass and high-pass).
// An impulse (magnitude 1) must reproduce h(0..N-1) one per enabled clock;
// then random sign-magnitude samples with random clk_enable gaps and a reset
// in the middle are compared, every cycle, with an integer convolution.
// Because the output is combinational from the tap registers, y(n) must be
// present right after the edge that captures x(n) (zero cycles of latency).
module tb_fir_parallel;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  logic clk = 0, reset = 1, ce = 0;
  logic [3:0]  x = '0;
  logic [31:0] y [3];
  fir_model    m [3];
  int checks = 0, failures = 0, stalls = 0, negatives = 0;

  fir_parallel                   dut_lpf (.clk, .clk_enable(ce), .reset, .filter_in(x), .filter_out(y[0]));
  fir_parallel #(.KIND(FILT_BPF)) dut_bpf (.clk, .clk_enable(ce), .reset, .filter_in(x), .filter_out(y[1]));
  fir_parallel #(.KIND(FILT_HPF)) dut_hpf (.clk, .clk_enable(ce), .reset, .filter_in(x), .filter_out(y[2]));

  always #5 clk = ~clk;

  task automatic step(logic [3:0] xin, logic en, logic rst);
    @(negedge clk);
    x = xin; ce = en; reset = rst;
    @(posedge clk); #1;
    for (int i = 0; i < 3; i++) begin
      if (rst) m[i].clear();
      else if (en) m[i].push(xin);
      checks++;
      if (y[i] !== sm32(m[i].y())) begin
        failures++;
        $display("FAIL filter %0d: out %h expected %h", i, y[i], sm32(m[i].y()));
      end
      if (y[i][31]) negatives++;
    end
    if (!en && !rst) stalls++;
  endtask

  initial begin
    for (int i = 0; i < 3; i++) m[i] = new(i);
    step(4'h0, 1'b0, 1'b1);
    // impulse: x = +1/8, then zeros; outputs are h(0), h(1), ...
    step(4'h1, 1'b1, 1'b0);
    for (int k = 1; k < 80; k++) step(4'h0, 1'b1, 1'b0);
    for (int c = 0; c < 1500; c++)
      step(4'($urandom), 1'($urandom_range(0, 4) != 0), c == 700);
    if (stalls == 0 || negatives == 0) failures++;
    $display("stalls %0d, negative outputs %0d", stalls, negatives);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
