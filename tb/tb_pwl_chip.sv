// tb_pwl_chip: end-to-end test of the complete evaluator at its default
// size (three 8-bit inputs, 12-bit RAM address, 256-clock conversion,
// 16-clock processing), with the external RAM modelled in ext_ram_model.
//
// The off-chip ramp is generated in step with the counter (the testbench
// mirrors it: zero in Nothing, +1 per clock otherwise) with 0.01 per code.
// Each evaluation starts with SP and is checked for:
//  * its length: 272 clocks with EP = 0 (256 Converting, 16 Processing);
//  * the address sequence: at ramp step k the address of channel i must be
//    MSB_i + (k < LSB_i), x1 in the top nibble;
//  * the result on the bus: bus_out = (sum of the 16 coefficients) / 16.
// Three kinds of reference are used: the two-input worked example of the
// design (coefficients of its 3x3 grid, x = (1.5, 1.75), result 1.25, so
// bus_out = 1 and the addresses 0x220 x8, 0x120 x4, 0x110 x4); a linear
// function c(v) = v1 + 2 v2 + 3 v3, which PWL interpolation reproduces
// exactly, so the sum must be X1 + 2 X2 + 3 X3 for the 8-bit codes X; and a
// random coefficient table against a step-by-step model.
// Inputs come either from the analog comparators (comp_out looped back to
// latch_in) or from the serial port (latch_in held at 1). After each
// evaluation the registers are shifted out through ser_out and compared
// with the expected codes, which checks the A/D conversion directly.
// Mechanisms counted, each of which must occur: analog conversion, serial
// load, serial read-back, steps on the upper vertex (comparator 1), steps
// on the lower vertex, bus turned to input in Processing and back to
// output in Nothing, SP ignored while busy.
module tb_pwl_chip;
  import pwl_pkg::*;

  localparam real STEP = 0.01;

  logic              clk = 0, rst_n = 0, sp = 0;
  real               vin [N_IN];
  real               vramp;
  logic [N_IN-1:0]   comp_out, latch_in;
  logic              ser_en = 0, ser_in = 0, ser_out;
  logic [ADDR_W-1:0] ram_addr;
  logic [COEF_W-1:0] bus_in, bus_out;
  logic              bus_oe, ep, proc;
  logic              analog_mode = 1;
  logic [7:0]        ramp_code = 0;
  logic [COEF_W-1:0] shadow [2**ADDR_W];

  int checks = 0, failures = 0;
  int n_analog = 0, n_serial = 0, n_readback = 0, n_upper = 0, n_lower = 0;
  int n_bus_in = 0, n_bus_out = 0, n_sp_busy = 0;

  pwl_chip dut (
    .clk, .rst_n, .sp, .vin, .vramp, .comp_out, .latch_in,
    .ser_en, .ser_in, .ser_out, .ram_addr, .bus_in, .bus_out, .bus_oe,
    .ep, .proc
  );

  ext_ram_model #(.AW(ADDR_W), .DW(COEF_W)) u_ram (
    .addr(ram_addr), .rdata(bus_in)
  );

  always #5 clk = ~clk;

  // Ramp generator kept in step with the chip's counter.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  ramp_code <= '0;
    else if (ep) ramp_code <= '0;
    else         ramp_code <= ramp_code + 1'b1;
  always_comb vramp = real'(ramp_code) * STEP;

  assign latch_in = analog_mode ? comp_out : '1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic write_coef(int a, int v);
    u_ram.mem[a] = COEF_W'(v);
    shadow[a]    = COEF_W'(v);
  endtask

  // Shifts 24 bits through the chain: loads x (x1 MSB first) and checks
  // that the bits coming out are the previous contents `prev`.
  task automatic serial_swap(logic [7:0] x [N_IN], logic [7:0] prev [N_IN], bit check_prev);
    logic [N_IN*8-1:0] vin_bits, out_bits;
    for (int i = 0; i < N_IN; i++) vin_bits[N_IN*8-1-8*i -: 8] = x[i];
    for (int b = N_IN*8-1; b >= 0; b--) begin
      @(negedge clk);
      ser_en = 1; ser_in = vin_bits[b];
      out_bits[b] = ser_out;
      @(posedge clk);
    end
    @(negedge clk) ser_en = 0;
    if (check_prev) begin
      n_readback++;
      for (int i = 0; i < N_IN; i++) begin
        checks++;
        if (out_bits[N_IN*8-1-8*i -: 8] !== prev[i])
          fail($sformatf("read-back x%0d = %02h, expected %02h", i + 1,
                         out_bits[N_IN*8-1-8*i -: 8], prev[i]));
      end
    end
  endtask

  // One evaluation of the inputs x (already in the registers in serial mode,
  // or presented as analog levels in analog mode). Returns the sum of the
  // coefficients seen on the bus, as the step model computes it.
  task automatic evaluate(logic [7:0] x [N_IN], bit sp_while_busy, output int sum_model);
    int busy = 0;
    sum_model = 0;
    for (int i = 0; i < N_IN; i++) vin[i] = (real'(x[i]) + 0.5) * STEP;
    @(negedge clk) sp = 1;
    @(negedge clk) sp = 0;
    // Converting.
    while (!ep && !proc && busy < 400) begin
      if (sp_while_busy && busy == 100) begin
        sp = 1; n_sp_busy++;
      end else sp = 0;
      busy++;
      @(negedge clk);
    end
    sp = 0;
    // Processing: check each address against the rule and accumulate.
    for (int k = 0; k < 16; k++) begin
      logic [ADDR_W-1:0] exp_a;
      bit up = 0;
      checks++;
      if (!proc || bus_oe) fail($sformatf("step %0d: proc=%0b bus_oe=%0b", k, proc, bus_oe));
      else n_bus_in++;
      for (int i = 0; i < N_IN; i++) begin
        bit inc = (k < int'(x[i][3:0]));
        exp_a[ADDR_W-1-4*i -: 4] = x[i][7:4] + 4'(inc);
        up |= inc;
      end
      if (up) n_upper++; else n_lower++;
      checks++;
      if (ram_addr !== exp_a)
        fail($sformatf("step %0d: address %03h, expected %03h", k, ram_addr, exp_a));
      sum_model += int'(shadow[exp_a]);
      busy++;
      @(negedge clk);
    end
    checks++;
    if (!ep || proc || !bus_oe) fail("not back in Nothing after 16 additions");
    else n_bus_out++;
    checks++;
    if (busy != 272) fail($sformatf("evaluation took %0d clocks, expected 272", busy));
    checks++;
    if (bus_out !== 8'(sum_model >> 4))
      fail($sformatf("bus_out %0d, expected %0d (sum %0d)", bus_out, sum_model >> 4, sum_model));
    if (analog_mode) n_analog++;
  endtask

  initial begin
    logic [7:0] x [N_IN], prev [N_IN];
    int s;

    for (int a = 0; a < 2**ADDR_W; a++) shadow[a] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // Worked example: 3x3 grid in x1, x2 (x3 = 0), coefficients at
    // address {v1, v2, 0}.
    write_coef('h000, 0); write_coef('h010, 2); write_coef('h020, 1);
    write_coef('h100, 0); write_coef('h200, 0); write_coef('h110, 1);
    write_coef('h120, 2); write_coef('h210, 2); write_coef('h220, 1);
    x = '{8'b0001_1000, 8'b0001_1100, 8'b0000_0000};
    analog_mode = 1;
    evaluate(x, 1'b0, s);
    checks += 2;
    if (s != 20)       fail($sformatf("worked example sum %0d, expected 20", s));
    if (bus_out != 1)  fail($sformatf("worked example F = %0d, expected 1", bus_out));
    prev = x;
    x = '{8'h00, 8'h00, 8'h00};
    serial_swap(x, prev, 1'b1);
    prev = x;

    // Linear function c(v) = v1 + 2 v2 + 3 v3 over the whole 16^3 grid.
    for (int a = 0; a < 2**ADDR_W; a++)
      write_coef(a, ((a >> 8) & 15) + 2 * ((a >> 4) & 15) + 3 * (a & 15));
    for (int t = 0; t < 24; t++) begin
      int exact;
      // Keep each vertex inside the grid: MSBs 15 only with LSBs 0.
      for (int i = 0; i < N_IN; i++) begin
        x[i] = 8'($urandom_range(0, 240));
      end
      if (t == 0) x = '{8'd255 - 8'd15, 8'd0, 8'd7};
      analog_mode = (t % 2 == 0);
      if (!analog_mode) begin
        serial_swap(x, prev, 1'b1);
        n_serial++;
      end
      evaluate(x, t == 3 || t == 4, s);
      exact = int'(x[0]) + 2 * int'(x[1]) + 3 * int'(x[2]);
      checks++;
      if (s != exact) fail($sformatf("linear: sum %0d, expected %0d", s, exact));
      checks++;
      if (bus_out !== 8'(exact >> 4))
        fail($sformatf("linear: F %0d, expected %0d", bus_out, exact >> 4));
      prev = x;
    end

    // Random coefficient table against the step model.
    for (int a = 0; a < 2**ADDR_W; a++) write_coef(a, $urandom_range(0, 255));
    for (int t = 0; t < 8; t++) begin
      for (int i = 0; i < N_IN; i++) x[i] = 8'($urandom_range(0, 240));
      analog_mode = (t % 2 == 1);
      if (!analog_mode) begin
        serial_swap(x, prev, 1'b1);
        n_serial++;
      end
      evaluate(x, 1'b0, s);
      prev = x;
    end
    // Read back the last analog conversion.
    serial_swap(x, prev, 1'b1);

    // Every mechanism must have happened.
    checks += 8;
    if (n_analog   == 0) fail("no analog conversion");
    if (n_serial   == 0) fail("no serial load");
    if (n_readback == 0) fail("no serial read-back");
    if (n_upper    == 0) fail("no step on an upper vertex");
    if (n_lower    == 0) fail("no step on the lower vertex");
    if (n_bus_in   == 0) fail("bus never used as input");
    if (n_bus_out  == 0) fail("bus never returned to output");
    if (n_sp_busy  == 0) fail("SP never raised while busy");
    $display("mechanisms: analog=%0d serial=%0d readback=%0d upper=%0d lower=%0d bus_in=%0d bus_out=%0d sp_busy=%0d",
             n_analog, n_serial, n_readback, n_upper, n_lower, n_bus_in, n_bus_out, n_sp_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
