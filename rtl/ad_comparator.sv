// ad_comparator: behavioural model of one analog A/D front-end channel.
//
// This is a behavioural model, not synthesizable logic: the real part is an
// OTA comparator followed by an output buffer driving a pad. It compares the
// analog input `vin` with the external analog ramp `vramp` and drives `comp`
// to 1 while the ramp is above the input. In the chip this output goes to
// an output pad; brought back to the channel's latch pad, it makes the input
// register keep the counter value reached when the ramp crosses the input,
// which is a single-slope A/D conversion. The ramp must be generated off
// chip in step with the counter. The model has no offset, hysteresis or
// delay; those, and the sense of the output (1 = ramp above input), are this
// model's assumptions.
module ad_comparator (
  input  real  vin,    // analog input signal
  input  real  vramp,  // external analog ramp
  output logic comp    // 1 while vramp > vin
);

  always_comb comp = (vramp > vin);

endmodule
