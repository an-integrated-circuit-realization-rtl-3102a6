// comparator4: the digital comparator of one input channel.
//
// It compares the 4 LSBs of the counter (the digital ramp, `r`) with the 4
// LSBs of the input register (the position inside the grid cell, `d`).
// `comp` is 1 while r < d, so over the 16 ramp steps it is high for exactly
// d steps: the ramp time it spends high is the weight mu of the upper vertex
// along this axis, in units of 1/16. Purely combinational.
//
// The structure follows the source design's 4-stage ripple comparator: one
// stage per bit from the LSB up, each stage deciding on its own bit when the
// two bits differ and passing the lower stages' decision on when they are
// equal. The strict "less than" matches the worked example of the design
// (an LSB code of 1000 gives 8 high steps out of 16).
module comparator4 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] r,     // ramp: counter LSBs
  input  logic [W-1:0] d,     // data: input register LSBs
  output logic         comp   // 1 when r < d
);

  logic [W:0] lt;  // lt[i]: r[i-1:0] < d[i-1:0]

  assign lt[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_stage
    assign lt[i+1] = (~r[i] & d[i]) | (~(r[i] ^ d[i]) & lt[i]);
  end

  assign comp = lt[W];

endmodule
