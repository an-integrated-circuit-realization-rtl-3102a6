// tb_pwl_core: test of the digital core on its own, without the analog
// comparators. The latch signals are driven by the testbench: during a
// conversion latch_in[i] rises when the (mirrored) counter passes the code
// wanted for channel i, which is what the analog comparator does on the
// chip; in serial mode they are held at 1 and the codes are shifted in.
// The coefficient table is the linear function c(v) = 3 v1 + 2 v2 + v3,
// which the evaluator reproduces exactly: the 12-bit sum must be
// 3 X1 + 2 X2 + X3 and bus_out its 8 MSBs. Each evaluation must take 272
// clocks, and the 16 bus reads must all happen with bus_oe low. A last
// directed case puts every input at a grid vertex (LSBs 0): the comparators
// never fire and the single vertex address is read 16 times.
module tb_pwl_core;
  import pwl_pkg::*;

  logic              clk = 0, rst_n = 0, sp = 0;
  logic [N_IN-1:0]   latch_in;
  logic              ser_en = 0, ser_in = 0, ser_out;
  logic [ADDR_W-1:0] ram_addr;
  logic [COEF_W-1:0] bus_in, bus_out;
  logic              bus_oe, ep, proc;
  logic [7:0]        mirror = 0;
  logic [7:0]        code [N_IN];
  logic              serial_mode = 0;
  int checks = 0, failures = 0;

  pwl_core dut (
    .clk, .rst_n, .sp, .latch_in, .ser_en, .ser_in, .ser_out,
    .ram_addr, .bus_in, .bus_out, .bus_oe, .ep, .proc
  );

  ext_ram_model #(.AW(ADDR_W), .DW(COEF_W)) u_ram (.addr(ram_addr), .rdata(bus_in));

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  mirror <= '0;
    else if (ep) mirror <= '0;
    else         mirror <= mirror + 1'b1;

  always_comb
    for (int i = 0; i < N_IN; i++)
      latch_in[i] = serial_mode | (mirror > code[i]);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check(int exact);
    int busy, reads;
    busy = 0; reads = 0;
    @(negedge clk) sp = 1;
    @(negedge clk) sp = 0;
    while (!ep && busy < 400) begin
      if (proc) begin
        reads++;
        checks++;
        if (bus_oe) begin failures++; $display("FAIL bus driven in Processing"); end
      end
      busy++;
      @(negedge clk);
    end
    checks += 3;
    if (busy != 272) begin failures++; $display("FAIL took %0d clocks", busy); end
    if (reads != 16) begin failures++; $display("FAIL %0d reads", reads); end
    if (bus_out !== 8'(exact >> 4) || !bus_oe) begin
      failures++;
      $display("FAIL F=%0d oe=%0b, expected %0d (codes %02h %02h %02h)",
               bus_out, bus_oe, exact >> 4, code[0], code[1], code[2]);
    end
  endtask

  initial begin
    for (int a = 0; a < 2**ADDR_W; a++)
      u_ram.mem[a] = COEF_W'(3 * ((a >> 8) & 15) + 2 * ((a >> 4) & 15) + (a & 15));
    for (int i = 0; i < N_IN; i++) code[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < N_IN; i++) code[i] = 8'($urandom_range(0, 240));
      if (t == 11) code = '{8'h30, 8'hA0, 8'hF0};
      serial_mode = (t % 2 == 1);
      if (serial_mode) begin
        for (int i = 0; i < N_IN; i++)
          for (int b = 7; b >= 0; b--) begin
            @(negedge clk);
            ser_en = 1; ser_in = code[i][b];
          end
        @(negedge clk) ser_en = 0;
      end
      run_and_check(3 * int'(code[0]) + 2 * int'(code[1]) + int'(code[2]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
