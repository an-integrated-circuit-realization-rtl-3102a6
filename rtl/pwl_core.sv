// pwl_core: the digital block of the three-input simplicial piecewise-linear
// (PWL) function evaluator: control FSM, 8-bit counter, three channels of
// input register / comparator / address generator, and the 12-bit adder.
//
// The core evaluates F(x) = sum_l mu_l * c_l at a point x = (x1, x2, x3),
// where the c_l are the function values at the 4 vertices of the simplex
// that holds x and the mu_l are x's barycentric weights. Each input is an
// 8-bit code: 4 MSBs select the grid cell, 4 LSBs the position in it. The
// products mu*c are never computed. A 4-bit digital ramp (counter LSBs)
// runs over 16 steps; per channel a comparator says whether the ramp is
// still below the position LSBs, and the address generator then picks the
// cell's upper vertex coordinate (MSBs + 1) or its lower one (MSBs). The
// three 4-bit strings, x1 in the top nibble, form the 12-bit address of the
// coefficient in the external 4 kB RAM; each vertex is thus addressed for a
// number of steps proportional to its weight, and the 12-bit adder sums the
// 16 coefficients read. The 8 MSBs of the sum are F(x); the 4 LSBs, its
// fraction, are not brought out, as the result is an 8-bit word.
//
// Operation, driven by the control FSM (EP/PROC are the state bits):
//  * Nothing (EP=1): idle; bus_oe=1 and bus_out shows the last F(x). The
//    inputs can be shifted in serially here (see below).
//  * SP=1 starts Converting (256 clocks): the counter sweeps 0..255, the
//    off-chip analog ramp must follow it, and each register captures the
//    counter until its latch_in goes to 1 (normally the channel's analog
//    comparator output, looped back through the pads). Holding latch_in at
//    1 keeps serially loaded values.
//  * Processing (16 clocks): ram_addr changes each clock, bus_in must carry
//    the RAM data of the current address in the same clock (asynchronous
//    read), and the adder accumulates it. Then back to Nothing.
// One evaluation takes 1 + 256 + 16 clocks from SP to the new result.
//
// Serial load: while ser_en is 1 the three registers form one 24-bit shift
// register, ser_in -> x3 -> x2 -> x1 -> ser_out, one bit per clock. Send x1
// MSB first, then x2, then x3. It is meant for Nothing.
//
// The block structure, widths, state encoding, cycle counts, the address
// rule and the use of the adder's 8 MSBs follow the source design. The
// single-clock timing (the source uses a two-phase clock), the split of the
// bidirectional I/O bus into bus_in/bus_out/bus_oe, the serial protocol, the
// asynchronous RAM read in the same clock, the clearing of the sum during
// Converting and the bus being driven only in Nothing are this design's own
// choices. Channel index 0 is x1.
module pwl_core
  import pwl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sp,             // start
  input  logic [N_IN-1:0]   latch_in,       // per-channel latch signals
  // Serial digital input load
  input  logic              ser_en,
  input  logic              ser_in,
  output logic              ser_out,
  // External RAM interface and I/O bus
  output logic [ADDR_W-1:0] ram_addr,
  input  logic [COEF_W-1:0] bus_in,         // RAM data, used in Processing
  output logic [COEF_W-1:0] bus_out,        // F(x), driven in Nothing
  output logic              bus_oe,
  // State
  output logic              ep,
  output logic              proc
);

  state_e                  state;
  logic [IN_W-1:0]         cnt;
  logic [IN_W-1:0]         xreg  [N_IN];
  logic [N_IN:0]           chain;          // serial chain
  logic [N_IN-1:0]         cmp;
  logic [NIB_W-1:0]        astr  [N_IN];
  logic [ACC_W-1:0]        sum;
  logic                    conv;

  control_fsm #(
    .CNT_W       (IN_W),
    .CONV_CYCLES (1 << IN_W),
    .PROC_CYCLES (1 << NIB_W)
  ) u_ctrl (
    .clk, .rst_n, .sp, .cnt, .ep, .proc, .state
  );

  assign conv = (state == ST_CONVERTING);

  // The counter is cleared in Nothing and runs in the two other states.
  counter8 #(.W(IN_W)) u_cnt (
    .clk, .rst_n, .clr(ep), .en(!ep), .q(cnt)
  );

  assign chain[N_IN] = ser_in;
  assign ser_out     = chain[0];

  for (genvar i = 0; i < N_IN; i++) begin : g_ch
    input_reg8 #(.W(IN_W)) u_reg (
      .clk, .rst_n, .conv,
      .latch_in (latch_in[i]),
      .cnt,
      .ser_en,
      .ser_in   (chain[i+1]),
      .ser_out  (chain[i]),
      .q        (xreg[i])
    );

    comparator4 #(.W(NIB_W)) u_cmp (
      .r    (cnt[NIB_W-1:0]),
      .d    (xreg[i][NIB_W-1:0]),
      .comp (cmp[i])
    );

    addr_gen4 #(.W(NIB_W)) u_agen (
      .inc (cmp[i]),
      .d   (xreg[i][IN_W-1:NIB_W]),
      .s   (astr[i])
    );

    // x1 occupies the most significant nibble of the address.
    assign ram_addr[ADDR_W-1-NIB_W*i -: NIB_W] = astr[i];
  end

  // Weighted sum. Cleared during Converting, accumulates in Processing,
  // held in Nothing.
  adder12 #(.W(ACC_W), .DIN_W(COEF_W)) u_add (
    .clk, .rst_n,
    .clr (conv),
    .en  (proc),
    .din (bus_in),
    .sum
  );

  // Divide by 16: the 8 MSBs of the sum.
  assign bus_out = sum[ACC_W-1 -: COEF_W];
  assign bus_oe  = ep;

endmodule
