// counter8: the 8-bit counter shared by the A/D conversion and the weighted sum.
//
// During the conversion its full 8-bit value is the digital code of the
// external analog ramp, which is kept in step with it; the input registers
// capture this value when their comparator fires. During processing its 4
// LSBs are the 16-step digital ramp that the three comparators hold against
// the 4 LSBs of the inputs. `clr` (synchronous, wins over `en`) returns it to
// zero; `en` advances it by one per clock, wrapping from 2^W-1 to 0. The
// source design builds it from modular stages clocked by a two-phase clock;
// here it is one register on the rising edge, with an asynchronous
// active-low reset, which are this implementation's choices.
module counter8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= q + 1'b1;
  end

endmodule
