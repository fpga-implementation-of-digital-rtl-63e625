// fir_filter_top: the three FIR filters, each in both realisations, side by side.
//
// The design consists of a 53-tap low-pass, a 73-tap band-pass and a 53-tap
// high-pass direct-form FIR filter, each built once fully parallel (one
// multiplier and adder per tap, one output per clock) and once fully serial
// (one shared multiplier and adder, one output every N clocks). The six
// instances are independent: each has its own clock enable, 4-bit input and
// 32-bit output, indexed as listed below; clock and
// synchronous active-high reset are shared. Data are sign-magnitude (see
// fir_pkg). Timing per instance is that of fir_parallel / fir_serial.
//
// Index of each instance in clk_enable, filter_in and filter_out:
//   0 low-pass parallel   1 low-pass serial
//   2 band-pass parallel  3 band-pass serial
//   4 high-pass parallel  5 high-pass serial
// The six configurations are the source design's; placing them in one top
// with shared clock and reset is this design's choice.
module fir_filter_top
  import fir_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [5:0]  clk_enable,
  input  logic [3:0]  filter_in  [6],
  output logic [31:0] filter_out [6]
);

  low_pass_filter #(.ARCH(ARCH_PARALLEL)) u_lpf_par (
    .clk, .reset, .clk_enable(clk_enable[0]), .filter_in(filter_in[0]), .filter_out(filter_out[0]));
  low_pass_filter #(.ARCH(ARCH_SERIAL)) u_lpf_ser (
    .clk, .reset, .clk_enable(clk_enable[1]), .filter_in(filter_in[1]), .filter_out(filter_out[1]));
  band_pass_filter #(.ARCH(ARCH_PARALLEL)) u_bpf_par (
    .clk, .reset, .clk_enable(clk_enable[2]), .filter_in(filter_in[2]), .filter_out(filter_out[2]));
  band_pass_filter #(.ARCH(ARCH_SERIAL)) u_bpf_ser (
    .clk, .reset, .clk_enable(clk_enable[3]), .filter_in(filter_in[3]), .filter_out(filter_out[3]));
  high_pass_filter #(.ARCH(ARCH_PARALLEL)) u_hpf_par (
    .clk, .reset, .clk_enable(clk_enable[4]), .filter_in(filter_in[4]), .filter_out(filter_out[4]));
  high_pass_filter #(.ARCH(ARCH_SERIAL)) u_hpf_ser (
    .clk, .reset, .clk_enable(clk_enable[5]), .filter_in(filter_in[5]), .filter_out(filter_out[5]));

endmodule
