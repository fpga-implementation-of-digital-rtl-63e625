// byte_adder: adder for two sign-magnitude words.
//
// Each W-bit operand has its sign in the MSB and its magnitude below. A
// negative operand is first turned into two's complement, the two are added in
// a (W+1)-bit adder, and if the sum comes out negative its two's complement is
// taken again to give back a magnitude, with the sign bit set. A zero result
// is always positive. The whole block is combinational; the three
// conversions are twos_complement instances.
//
// The conversion to two's complement, the (W+1)-bit adder and the final two's
// complement of a negative sum follow the source design. The source avoids
// overflow by choice of word width rather than correcting it; here `ovf` flags
// a sum whose magnitude does not fit in W-1 bits and the magnitude then
// saturates to its largest value, a choice of this design.
module byte_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s,
  output logic         ovf
);

  logic [W:0] a_tc, b_tc, sum, mag;

  // Sign-magnitude -> two's complement, one bit wider so the magnitude fits.
  twos_complement #(.W(W+1)) u_tc_a (.x({2'b00, a[W-2:0]}), .neg(a[W-1]), .y(a_tc));
  twos_complement #(.W(W+1)) u_tc_b (.x({2'b00, b[W-2:0]}), .neg(b[W-1]), .y(b_tc));

  // The (W+1)-bit adder.
  assign sum = a_tc + b_tc;

  // A negative sum is brought back to a magnitude by its two's complement.
  twos_complement #(.W(W+1)) u_tc_s (.x(sum), .neg(sum[W]), .y(mag));

  assign ovf = (mag[W:W-1] != 2'b00);

  always_comb begin
    if (ovf) s = {sum[W], {(W-1){1'b1}}};
    else     s = {sum[W] & (mag != '0), mag[W-2:0]};
  end

endmodule
