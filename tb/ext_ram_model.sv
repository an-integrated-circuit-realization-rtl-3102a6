// ext_ram_model: behavioural model of the external coefficient RAM.
//
// A 2^AW x DW memory (4 kB by default, addressed by a 12-bit word) with an
// asynchronous read: rdata follows addr in the same clock, as the evaluator
// expects. The testbench programs it by writing the array `mem` directly,
// standing in for whatever loads the real RAM. Not part of the chip; used
// only by the testbenches.
module ext_ram_model #(
  parameter int unsigned AW = 12,
  parameter int unsigned DW = 8
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  assign rdata = mem[addr];

endmodule
