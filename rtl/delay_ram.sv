// delay_ram: the tap delay line of a direct-form FIR filter.
//
// Holds the DEPTH most recent W-bit samples. On each clock with `en` high the
// array shifts by one place: `din` enters at taps[0], every other entry moves
// one place along and the oldest, taps[DEPTH-1], is dropped, so the array size
// stays constant. taps[k] is therefore the sample taken k enabled clocks
// before the newest one. The first register also serves as the filter's input
// register. A synchronous active-high `reset` clears all entries to zero.
//
// The shifting array of constant size follows the source design; the reset and
// its synchronous timing are this design's choice.
module delay_ram #(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 53
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
