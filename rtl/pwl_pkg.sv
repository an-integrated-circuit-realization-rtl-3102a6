// pwl_pkg: types and constants shared by the simplicial piecewise-linear
// (PWL) function evaluator.
//
// The evaluator computes F(x) = sum_l mu_l * c_l over the n+1 vertices of the
// simplex holding x. Each input is an 8-bit fixed-point number: the 4 MSBs
// select the grid cell, the 4 LSBs give the position inside it. The state
// encoding below is the one of the control block: two state bits that are
// themselves the EP (End of Processing) and PROC (Processing) outputs.
package pwl_pkg;

  // Number of inputs (dimension n of the PWL function).
  localparam int unsigned N_IN      = 3;
  // Width of an input register and of the counter.
  localparam int unsigned IN_W      = 8;
  // Width of the vertex-select (MSB) and position (LSB) halves of an input.
  localparam int unsigned NIB_W     = 4;
  // Width of a PWL coefficient in the external RAM.
  localparam int unsigned COEF_W    = 8;
  // Width of the accumulating adder: 16 coefficients of 8 bits need 12 bits.
  localparam int unsigned ACC_W     = 12;
  // External RAM address: n juxtaposed 4-bit vertex strings.
  localparam int unsigned ADDR_W    = N_IN * NIB_W;

  // State register {EP, PROC}; values follow the EP/PROC table of the design.
  typedef enum logic [1:0] {
    ST_NOTHING    = 2'b10,  // EP=1 PROC=0: idle, I/O bus shows F(x)
    ST_CONVERTING = 2'b00,  // EP=0 PROC=0: A/D conversion, 256 cycles
    ST_PROCESSING = 2'b01   // EP=0 PROC=1: 16 additions from the RAM
  } state_e;

endpackage
