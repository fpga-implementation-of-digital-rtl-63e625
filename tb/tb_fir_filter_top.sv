// tb_fir_filter_top: end-to-end test of all six filters at default sizes.
// Each instance (low-, band-, high-pass; parallel and serial) gets its own
// random samples and its own random clock-enable gaps; a reset in the middle
// hits all of them. Every clock each output is compared with an integer
// convolution: parallel instances take a sample on every enabled clock and
// show its result at once, serial instances take a sample on enabled edges
// N, 2N, ... and show the result N enabled clocks later. The test counts how
// often each mechanism occurred (enable stall, reset, serial frame
// completion, negative result, parallel sample) and fails if one never did.
module tb_fir_filter_top;
  import fir_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic [5:0]  clk_enable = '0;
  logic [3:0]  filter_in  [6];
  logic [31:0] filter_out [6];
  logic [31:0] expect_y   [6];
  int          en_edges   [6];
  fir_model    m [6];
  int checks = 0, failures = 0;
  int n_stall = 0, n_reset = 0, n_frame = 0, n_neg = 0, n_par = 0;

  fir_filter_top dut (.clk, .reset, .clk_enable, .filter_in, .filter_out);

  always #5 clk = ~clk;

  task automatic step(logic rst);
    @(negedge clk);
    reset = rst;
    for (int i = 0; i < 6; i++) begin
      filter_in[i]  = 4'($urandom);
      clk_enable[i] = 1'($urandom_range(0, 9) != 0);
    end
    @(posedge clk); #1;
    if (rst) n_reset++;
    for (int i = 0; i < 6; i++) begin
      if (rst) begin
        m[i].clear();
        en_edges[i] = 0;
        expect_y[i] = '0;
      end else if (!clk_enable[i]) begin
        n_stall++;
      end else if (i % 2 == 0) begin            // parallel
        m[i].push(filter_in[i]);
        expect_y[i] = sm32(m[i].y());
        n_par++;
      end else begin                            // serial
        en_edges[i]++;
        if (en_edges[i] % m[i].n == 0) begin
          expect_y[i] = sm32(m[i].y());
          m[i].push(filter_in[i]);
          n_frame++;
        end
      end
      checks++;
      if (filter_out[i][31]) n_neg++;
      if (filter_out[i] !== expect_y[i]) begin
        failures++;
        if (failures < 10) $display("FAIL instance %0d: %h expected %h", i, filter_out[i], expect_y[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) begin
      m[i] = new(i / 2);
      filter_in[i] = '0;
    end
    step(1'b1);
    for (int c = 0; c < 8000; c++) step(c == 4000);
    $display("stalls %0d, resets %0d, serial frames %0d, negative outputs %0d, parallel samples %0d",
             n_stall, n_reset, n_frame, n_neg, n_par);
    if (n_stall == 0) failures++;
    if (n_reset < 2)  failures++;
    if (n_frame == 0) failures++;
    if (n_neg == 0)   failures++;
    if (n_par == 0)   failures++;
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
