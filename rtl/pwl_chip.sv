// pwl_chip: the complete three-input PWL function evaluator chip.
//
// It joins the analog block, three A/D front-end comparators working
// against an external ramp, with the digital core (pwl_core), which holds
// the control FSM, counter, input registers, comparators, address
// generators and the 12-bit adder. As on the chip, the two blocks are not
// wired together inside: each comparator output goes to a pad (comp_out)
// and each register's latch signal comes from a pad (latch_in). The board
// connects comp_out to latch_in for an analog conversion, or drives
// latch_in with any other signal, for instance 1 to keep values loaded
// serially. The external 4 kB coefficient RAM sits on ram_addr / bus_in.
//
// The ramp vramp must be generated off chip in step with the core's
// counter: during the 256 Converting clocks it must be a monotonic staircase
// whose k-th step (k = counter value) is the analog level coded as k. The
// input register of a channel then ends with the largest k whose ramp
// level does not exceed the input. See pwl_core for the operation and
// timing; the analog comparator is a behavioural model (ad_comparator).
module pwl_chip
  import pwl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sp,             // start pad
  // Analog block
  input  real               vin   [N_IN],   // analog inputs x1..x3
  input  real               vramp,          // external ramp
  output logic [N_IN-1:0]   comp_out,       // comparator output pads
  input  logic [N_IN-1:0]   latch_in,       // latch input pads
  // Serial digital input load
  input  logic              ser_en,
  input  logic              ser_in,
  output logic              ser_out,
  // External RAM interface and I/O bus
  output logic [ADDR_W-1:0] ram_addr,
  input  logic [COEF_W-1:0] bus_in,
  output logic [COEF_W-1:0] bus_out,
  output logic              bus_oe,
  // State
  output logic              ep,
  output logic              proc
);

  for (genvar i = 0; i < N_IN; i++) begin : g_adc
    ad_comparator u_adc (
      .vin (vin[i]), .vramp, .comp (comp_out[i])
    );
  end

  pwl_core u_core (
    .clk, .rst_n, .sp, .latch_in,
    .ser_en, .ser_in, .ser_out,
    .ram_addr, .bus_in, .bus_out, .bus_oe,
    .ep, .proc
  );

endmodule
