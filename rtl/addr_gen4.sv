// addr_gen4: the address generator of one input channel.
//
// It forms this channel's 4-bit string of the 12-bit RAM address: the 4 MSBs
// of the input register (`d`, the lower corner of the grid cell) when the
// comparator output `inc` is 0, and the next vertex, d + 1, when it is 1.
// Built as the source design's ripple incrementer: a chain of half adders in
// which `inc` is the carry into bit 0, with outputs S0-S3. The carry out of
// bit 3 is dropped, as the design has no fifth output: an input whose MSBs
// are 1111 and whose LSBs are non-zero therefore wraps to vertex 0000, so
// inputs should stay inside the 16-cell grid (MSBs 1111 only with LSBs 0000).
// Purely combinational.
module addr_gen4 #(
  parameter int unsigned W = 4
) (
  input  logic         inc,   // comparator output (IN)
  input  logic [W-1:0] d,     // input register MSBs (D0-D3)
  output logic [W-1:0] s      // address string (S0-S3)
);

  logic [W-1:0] c;  // c[i]: carry into bit i, c[0] = inc

  assign c[0] = inc;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s[i] = d[i] ^ c[i];
    if (i < W - 1) begin : g_carry
      assign c[i+1] = d[i] & c[i];
    end
  end

endmodule
