// control_fsm: the control block of the PWL evaluator.
//
// Three states, Nothing, Converting and Processing, kept in two state
// registers whose bits are directly the EP (End of Processing) and PROC
// (Processing) control signals: Nothing = EP 1 / PROC 0, Converting = 0/0,
// Processing = 0/1. In Nothing the chip is idle and shows the last result.
// SP = 1 in Nothing starts a conversion. Converting lasts CONV_CYCLES clock
// cycles (the full sweep of the 8-bit ramp), then Processing lasts PROC_CYCLES
// cycles (one addition per step of the 4-bit digital ramp), then the FSM
// returns to Nothing.
//
// The state lengths are measured on the shared counter value `cnt`, which the
// counter clears in Nothing and runs in the two other states: Converting ends
// on the cycle where cnt == CONV_CYCLES-1, Processing where cnt == PROC_CYCLES-1.
// The state encoding, the state names, SP and the cycle counts follow the
// source design; the asynchronous active-low reset into Nothing, and the
// return from Processing to Nothing after the last addition, are this
// implementation's choices. SP is ignored outside Nothing.
module control_fsm
  import pwl_pkg::*;
#(
  parameter int unsigned CNT_W       = 8,
  parameter int unsigned CONV_CYCLES = 256,
  parameter int unsigned PROC_CYCLES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sp,
  input  logic [CNT_W-1:0] cnt,
  output logic             ep,
  output logic             proc,
  output state_e           state
);

  localparam logic [CNT_W-1:0] CONV_LAST = CNT_W'(CONV_CYCLES - 1);
  localparam logic [CNT_W-1:0] PROC_LAST = CNT_W'(PROC_CYCLES - 1);

  state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_NOTHING:    if (sp)                state_d = ST_CONVERTING;
      ST_CONVERTING: if (cnt == CONV_LAST)  state_d = ST_PROCESSING;
      ST_PROCESSING: if (cnt == PROC_LAST)  state_d = ST_NOTHING;
      default:                              state_d = ST_NOTHING;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ST_NOTHING;
    else        state_q <= state_d;
  end

  assign state = state_q;
  assign ep    = state_q[1];
  assign proc  = state_q[0];

  // The unused fourth code {EP,PROC} = 11 is never reached.
  a_legal_state: assert property (@(posedge clk) disable iff (!rst_n)
    state_q inside {ST_NOTHING, ST_CONVERTING, ST_PROCESSING});

endmodule
