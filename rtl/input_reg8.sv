// input_reg8: one 8-bit input register with its latch multiplexer.
//
// The register holds one coordinate of the evaluation point: the upper 4
// bits select the grid cell ("4 Up"), the lower 4 bits give the position
// inside it ("4 Dn"). It is loaded in one of two ways:
//  * A/D conversion: during Converting (`conv` = 1) the register follows the
//    counter `cnt` every clock while the latch signal `latch_in` is 0, and
//    holds from the first clock where it is 1. With `latch_in` driven by the
//    analog comparator of this channel, it keeps the last counter value at
//    which the ramp had not yet passed the input: a single-slope conversion.
//  * Serial load: while `ser_en` is 1 the register shifts one bit per clock,
//    MSB first, from `ser_in`; `ser_out` is its MSB, so several registers can
//    be chained into one serial input.
// Outside Converting the latch multiplexer forces the latch signal to 1, so
// the value cannot change after the conversion. The latch multiplexer and
// the capture of the counter follow the source design; the shift-register
// form of the serial load (bit order, chaining, `ser_en` priority over the
// latch) and the asynchronous reset to 0 are this implementation's choices.
// The source design's master-slave register on a two-phase clock is written
// here as a rising-edge register.
module input_reg8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         conv,      // 1 in the Converting state
  input  logic         latch_in,  // latch pad: 0 = follow counter, 1 = hold
  input  logic [W-1:0] cnt,       // counter value (digital ramp code)
  input  logic         ser_en,    // serial shift enable
  input  logic         ser_in,    // serial data in, MSB first
  output logic         ser_out,   // serial data out (MSB of the register)
  output logic [W-1:0] q
);

  logic latch;

  // Latch multiplexer: the pad in Converting, a constant 1 otherwise.
  assign latch = conv ? latch_in : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (ser_en) q <= {q[W-2:0], ser_in};
    else if (!latch) q <= cnt;
  end

  assign ser_out = q[W-1];

endmodule
