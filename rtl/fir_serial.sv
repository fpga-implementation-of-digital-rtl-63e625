// fir_serial: fully serial FIR filter with one shared multiply-accumulate.
//
// Computes the same y(n) = sum h(k) x(n-k) as fir_parallel with a single
// nibble_multiplier and a single byte_adder, used once per tap. A tap counter
// steps k = 0 .. N-1; in each enabled clock the multiplexers pick taps[k] from
// the delay_ram and h(k) from a constant table, and the product is added to
// the accumulator. In the last step (k = N-1) the finished sum goes to the
// output register, the accumulator is cleared and the tap line takes in the
// next sample. The clock must therefore run N times faster than the sample
// rate.
//
// Timing, counted in enabled clocks after reset: filter_in is sampled on
// edges N, 2N, 3N, ... (the edge ending each N-cycle frame, when the counter
// is at N-1); the sum for the sample taken on edge jN is written to the
// registered filter_out on edge (j+1)N and held for N clocks. Latency is thus
// N clocks, throughput one sample per N clocks. `clk_enable` low freezes
// counter, accumulator, taps and output. Synchronous active-high `reset`
// clears everything.
//
// One multiplier, one adder, an up counter (CNT_W = 32 bits by default) and
// a registered output follow the source design; the exact frame schedule
// above is this design's choice.
module fir_serial
  import fir_pkg::*;
#(
  parameter filter_kind_e KIND   = FILT_LPF,
  parameter int unsigned  N      = num_taps(KIND),
  parameter int unsigned  IN_W   = DEF_IN_W,
  parameter int unsigned  COEF_W = DEF_COEF_W,
  parameter int unsigned  OUT_W  = DEF_OUT_W,
  parameter int unsigned  CNT_W  = 32
) (
  input  logic             clk,
  input  logic             clk_enable,
  input  logic             reset,
  input  logic [IN_W-1:0]  filter_in,
  output logic [OUT_W-1:0] filter_out
);

  logic [CNT_W-1:0]  cnt;
  logic              last;
  logic [IN_W-1:0]   taps [N];
  logic [IN_W-1:0]   x_sel;
  logic [COEF_W-1:0] h_sel;
  logic [31:0]       h_sm;
  logic [OUT_W-1:0]  prod, sum, acc;
  logic              ovf_unused;

  assign last = (cnt == CNT_W'(N - 1));

  delay_ram #(.W(IN_W), .DEPTH(N)) u_delay (
    .clk  (clk),
    .reset(reset),
    .en   (clk_enable & last),
    .din  (filter_in),
    .taps (taps)
  );

  // Tap and coefficient multiplexers, indexed by the counter.
  always_comb begin
    x_sel = '0;
    h_sm  = '0;
    for (int k = 0; k < N; k++) begin
      if (cnt == CNT_W'(k)) begin
        x_sel = taps[k];
        h_sm  = to_sm(coef(KIND, k));
      end
    end
    h_sel = {h_sm[31], h_sm[COEF_W-2:0]};
  end

  nibble_multiplier #(.A_W(IN_W), .B_W(COEF_W), .P_W(OUT_W)) u_mul (
    .a(x_sel),
    .b(h_sel),
    .p(prod)
  );

  byte_adder #(.W(OUT_W)) u_add (
    .a  (acc),
    .b  (prod),
    .s  (sum),
    .ovf(ovf_unused)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      cnt        <= '0;
      acc        <= '0;
      filter_out <= '0;
    end else if (clk_enable) begin
      if (last) begin
        cnt        <= '0;
        acc        <= '0;
        filter_out <= sum;
      end else begin
        cnt <= cnt + 1'b1;
        acc <= sum;
      end
    end
  end

endmodule
