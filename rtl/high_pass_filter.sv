// high_pass_filter: the 53-tap high-pass filter (passband edge 10 kHz, transition 0.5 kHz, fs = 48 kHz) of the design, ports as on its block symbol.
//
// filter_in(3:0) is a sign-magnitude fraction (sign bit, binary point, three
// magnitude bits); filter_out(31:0) is the sign-magnitude sum of products
// with the integer coefficients of fir_pkg (FILT_HPF table, symmetric, 53 taps).
// ARCH selects the realisation: ARCH_PARALLEL builds fir_parallel (one output
// per enabled clock, combinational from the tap registers), ARCH_SERIAL builds
// fir_serial (one shared multiply-accumulate, one output every 53 enabled
// clocks, registered). clk_enable gates every register; reset is synchronous
// and active high. The port list, the tap count, the coefficients and the two
// realisations follow the source design; the ARCH parameter that chooses
// between them in one module is this design's choice.
module high_pass_filter
  import fir_pkg::*;
#(
  parameter arch_e ARCH = ARCH_PARALLEL
) (
  input  logic        clk,
  input  logic        clk_enable,
  input  logic        reset,
  input  logic [3:0]  filter_in,
  output logic [31:0] filter_out
);

  if (ARCH == ARCH_SERIAL) begin : g_serial
    fir_serial #(.KIND(FILT_HPF), .N(53), .IN_W(4), .COEF_W(28), .OUT_W(32)) u_fir (
      .clk, .clk_enable, .reset, .filter_in, .filter_out
    );
  end else begin : g_parallel
    fir_parallel #(.KIND(FILT_HPF), .N(53), .IN_W(4), .COEF_W(28), .OUT_W(32)) u_fir (
      .clk, .clk_enable, .reset, .filter_in, .filter_out
    );
  end

endmodule
