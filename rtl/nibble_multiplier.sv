// nibble_multiplier: sign-magnitude multiplier built from shifts and adds.
//
// Multiplies an A_W-bit sign-magnitude sample `a` (a nibble by default) by a
// B_W-bit sign-magnitude coefficient `b`. The product sign is the XOR of the
// two signs; the product magnitude is the shift-and-accumulate of the
// coefficient magnitude, shifted left once for every set bit of the sample
// magnitude, so no hardware multiplier is used. A zero magnitude always gives
// a positive zero. The result is P_W = A_W + B_W bits wide (two n-bit numbers
// give a 2n-bit product), sign in the MSB.
//
// The register A / register B / shift-accumulator / register C arrangement of
// the source design is unrolled here into A_W-1 shifted partial products summed
// in one combinational step, so the block has no clock and zero latency; the
// registers around it are the filter's tap line and accumulator. Unrolling is
// this design's choice, made so the filter keeps one result per clock.
module nibble_multiplier #(
  parameter int unsigned A_W = 4,
  parameter int unsigned B_W = 28,
  parameter int unsigned P_W = A_W + B_W
) (
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [P_W-1:0] p
);

  logic [A_W-2:0] a_mag;
  logic [B_W-2:0] b_mag;
  logic [P_W-2:0] acc;

  assign a_mag = a[A_W-2:0];
  assign b_mag = b[B_W-2:0];

  // Shift-accumulate: one partial product per magnitude bit of the sample.
  always_comb begin
    acc = '0;
    for (int i = 0; i < A_W - 1; i++) begin
      if (a_mag[i]) acc = acc + ((P_W-1)'(b_mag) << i);
    end
  end

  assign p = {(a[A_W-1] ^ b[B_W-1]) & (acc != '0), acc};

  initial begin
    assert (P_W >= A_W + B_W - 1)
      else $error("nibble_multiplier: P_W too small for the product magnitude");
  end

endmodule
