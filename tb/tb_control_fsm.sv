// tb_control_fsm: test of the Nothing / Converting / Processing controller.
// The counter is modelled in the testbench (cleared in Nothing, counting
// otherwise, as in the core). Checks the EP/PROC coding of each state, that
// the FSM stays in Nothing without SP, that Converting lasts exactly 256
// clocks and Processing exactly 16, that SP is ignored while busy, and that
// reset returns it to Nothing.
module tb_control_fsm;
  import pwl_pkg::*;
  logic       clk = 0, rst_n = 0, sp = 0;
  logic [7:0] cnt = 0;
  logic       ep, proc;
  state_e     state;
  int checks = 0, failures = 0;

  control_fsm dut (.clk, .rst_n, .sp, .cnt, .ep, .proc, .state);

  always #5 clk = ~clk;

  // Counter model.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  cnt <= '0;
    else if (ep) cnt <= '0;
    else         cnt <= cnt + 1'b1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(logic e, logic p, string what);
    checks++;
    if (ep !== e || proc !== p) begin
      failures++;
      $display("FAIL %s: EP=%0b PROC=%0b expected %0b %0b", what, ep, proc, e, p);
    end
  endtask

  // Runs one start and measures how long each state lasts.
  task automatic run(bit sp_while_busy);
    int nconv = 0, nproc = 0;
    @(negedge clk) sp = 1;
    @(negedge clk) sp = sp_while_busy;
    while (!ep && !proc) begin
      expect_state(1'b0, 1'b0, "Converting");
      nconv++;
      @(negedge clk);
      if (nconv > 400) break;
    end
    while (proc) begin
      expect_state(1'b0, 1'b1, "Processing");
      nproc++;
      @(negedge clk);
      if (nproc > 400) break;
    end
    sp = 0;
    expect_state(1'b1, 1'b0, "Nothing after Processing");
    checks += 2;
    if (nconv != 256) begin failures++; $display("FAIL Converting lasted %0d", nconv); end
    if (nproc != 16)  begin failures++; $display("FAIL Processing lasted %0d", nproc); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    expect_state(1'b1, 1'b0, "reset");
    rst_n = 1;
    repeat (10) begin
      @(negedge clk);
      expect_state(1'b1, 1'b0, "Nothing without SP");
    end
    run(1'b0);
    repeat (3) @(negedge clk);
    expect_state(1'b1, 1'b0, "Nothing holds");
    run(1'b1);   // SP held high throughout: must not disturb the sequence
    // SP still high in Nothing starts a new conversion; reset aborts it.
    @(negedge clk) sp = 1;
    @(negedge clk) sp = 0;
    repeat (50) @(negedge clk);
    expect_state(1'b0, 1'b0, "Converting again");
    rst_n = 0;
    #1 expect_state(1'b1, 1'b0, "reset mid-conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
