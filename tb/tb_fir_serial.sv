// tb_fir_serial: checks the fully serial FIR for all three coefficient
// tables (default low-pass instance, plus band-pass and high-pass).
// The input is changed every enabled clock; the filter must sample it only
// on enabled edges N, 2N, ... after reset, and write the sum for the sample
// of edge jN to filter_out on edge (j+1)N, holding it in between. Random
// clk_enable gaps and a reset in the middle are included. The output is
// compared every cycle with an integer convolution placed at those edges,
// which also checks the N-clock latency and the one-per-N-clocks rate.
module tb_fir_serial;
  import fir_pkg::*;
  import fir_ref_pkg::*;

  logic clk = 0, reset = 1, ce = 0;
  logic [3:0]  x = '0;
  logic [31:0] y [3];
  logic [31:0] expect_y [3];
  int          en_edges;
  fir_model    m [3];
  int checks = 0, failures = 0, stalls = 0, frames = 0;

  fir_serial                   dut_lpf (.clk, .clk_enable(ce), .reset, .filter_in(x), .filter_out(y[0]));
  fir_serial #(.KIND(FILT_BPF)) dut_bpf (.clk, .clk_enable(ce), .reset, .filter_in(x), .filter_out(y[1]));
  fir_serial #(.KIND(FILT_HPF)) dut_hpf (.clk, .clk_enable(ce), .reset, .filter_in(x), .filter_out(y[2]));

  always #5 clk = ~clk;

  task automatic step(logic [3:0] xin, logic en, logic rst);
    @(negedge clk);
    x = xin; ce = en; reset = rst;
    @(posedge clk); #1;
    if (rst) en_edges = 0;
    else if (en) en_edges++;
    for (int i = 0; i < 3; i++) begin
      if (rst) begin
        m[i].clear();
        expect_y[i] = '0;
      end else if (en && (en_edges % m[i].n == 0)) begin
        expect_y[i] = sm32(m[i].y());   // frame just finished
        m[i].push(xin);                 // sample taken on this edge
        frames++;
      end
      checks++;
      if (y[i] !== expect_y[i]) begin
        failures++;
        $display("FAIL filter %0d edge %0d: out %h expected %h", i, en_edges, y[i], expect_y[i]);
      end
    end
    if (!en && !rst) stalls++;
  endtask

  initial begin
    for (int i = 0; i < 3; i++) m[i] = new(i);
    step(4'h0, 1'b0, 1'b1);
    // impulse held for the first frame of 73 clocks, then random data
    for (int c = 0; c < 73; c++) step(4'h1, 1'b1, 1'b0);
    for (int c = 0; c < 12000; c++)
      step(4'($urandom), 1'($urandom_range(0, 7) != 0), c == 6000);
    if (stalls == 0 || frames < 300) failures++;
    $display("stalls %0d, frames %0d", stalls, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
