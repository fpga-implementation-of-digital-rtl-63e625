// fir_parallel: fully parallel direct-form FIR filter.
//
// y(n) = sum_{k=0}^{N-1} h(k) x(n-k), with the coefficients of filter KIND
// taken from fir_pkg. Every enabled clock a new IN_W-bit sample enters the
// delay_ram tap line; each tap has its own nibble_multiplier with a constant
// coefficient, and the N products are summed by a chain of N-1 byte_adders,
// tap 0 first. All arithmetic is sign-magnitude (see fir_pkg).
//
// Timing: the output is combinational from the tap registers, so filter_out
// shows y(n) in the same cycle, right after the clock edge that captures x(n);
// one sample per enabled clock. `clk_enable` low holds the tap line and so the
// output. Synchronous active-high `reset` clears the taps (output 0).
//
// The tap line, one multiplier per tap and the adder chain follow the source
// design's direct-form structure, as does the unregistered output (its long
// clock-to-output path is what the source reports); the sign-magnitude
// `ovf` of the adders is not brought out, since the word widths exclude
// overflow for these coefficient tables.
module fir_parallel
  import fir_pkg::*;
#(
  parameter filter_kind_e KIND   = FILT_LPF,
  parameter int unsigned  N      = num_taps(KIND),
  parameter int unsigned  IN_W   = DEF_IN_W,
  parameter int unsigned  COEF_W = DEF_COEF_W,
  parameter int unsigned  OUT_W  = DEF_OUT_W
) (
  input  logic             clk,
  input  logic             clk_enable,
  input  logic             reset,
  input  logic [IN_W-1:0]  filter_in,
  output logic [OUT_W-1:0] filter_out
);

  logic [IN_W-1:0]  taps [N];
  logic [OUT_W-1:0] prod [N];
  logic [OUT_W-1:0] psum [N];

  delay_ram #(.W(IN_W), .DEPTH(N)) u_delay (
    .clk  (clk),
    .reset(reset),
    .en   (clk_enable),
    .din  (filter_in),
    .taps (taps)
  );

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam logic [31:0]       H_SM = to_sm(coef(KIND, k));
    localparam logic [COEF_W-1:0] H    = {H_SM[31], H_SM[COEF_W-2:0]};

    nibble_multiplier #(.A_W(IN_W), .B_W(COEF_W), .P_W(OUT_W)) u_mul (
      .a(taps[k]),
      .b(H),
      .p(prod[k])
    );

    if (k == 0) begin : g_first
      assign psum[0] = prod[0];
    end else begin : g_add
      logic ovf_unused;
      byte_adder #(.W(OUT_W)) u_add (
        .a  (psum[k-1]),
        .b  (prod[k]),
        .s  (psum[k]),
        .ovf(ovf_unused)
      );
    end
  end

  assign filter_out = psum[N-1];

endmodule
