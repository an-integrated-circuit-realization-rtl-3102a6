// adder12: the 12-bit accumulating adder that forms the weighted sum.
//
// During Processing (`en` = 1) it adds the 8-bit coefficient read from the
// external RAM (`din`) to its 12-bit running sum once per clock, sixteen
// times in all. Because each vertex coefficient is addressed for as many
// clocks as its weight mu (in sixteenths), the sum of the sixteen values is
// 16 * F(x); the 8 MSBs of the sum are F(x) with the 4 LSBs as its fraction.
// Sixteen 8-bit values cannot exceed 12 bits, so the sum never overflows.
// The second operand is the coefficient with its 4 upper bits tied to 0.
// As in the source design the adder is split in two parts: a carry part that
// computes the carry into every bit, and a sum part that combines each bit
// pair with its carry. `clr` (synchronous) empties the sum and wins over
// `en`; with neither asserted the sum is held. The register around the adder
// and the asynchronous active-low reset are this implementation's choices.
module adder12 #(
  parameter int unsigned W     = 12,
  parameter int unsigned DIN_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [DIN_W-1:0] din,
  output logic [W-1:0]     sum
);

  logic [W-1:0] a, b, s;
  logic [W:0]   c;   // c[i]: carry into bit i; c[W] is the carry out

  assign a = sum;
  assign b = {{(W-DIN_W){1'b0}}, din};

  // Carry part: ripple of generate / propagate terms.
  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_carry
    assign c[i+1] = (a[i] & b[i]) | ((a[i] ^ b[i]) & c[i]);
  end

  // Sum part.
  assign s = a ^ b ^ c[W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sum <= '0;
    else if (clr) sum <= '0;
    else if (en)  sum <= s;
  end

  // Sixteen coefficients of DIN_W bits never carry out of W bits.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) en && !clr |-> !c[W]);

endmodule
