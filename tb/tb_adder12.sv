// tb_adder12: test of the 12-bit accumulating adder.
// Runs many evaluations of 16 additions of random 8-bit values (including
// the all-255 worst case, 16 * 255 = 4080), each preceded by a clear and
// followed by hold clocks, and checks the running sum every clock against
// integer arithmetic. Also replays the sixteen-term sum of the two-input
// worked example (eight 1s, four 2s, four 1s = 20 = 0x014).
module tb_adder12;
  logic        clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0]  din = 0;
  logic [11:0] sum;
  int          model = 0;
  int checks = 0, failures = 0;

  adder12 dut (.clk, .rst_n, .clr, .en, .din, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(logic c, logic e, logic [7:0] v);
    @(negedge clk);
    clr = c; en = e; din = v;
    @(posedge clk);
    if (c)      model = 0;
    else if (e) model = model + int'(v);
    #1;
    checks++;
    if (sum !== 12'(model)) begin
      failures++;
      $display("FAIL sum=%0d expected %0d", sum, model);
    end
  endtask

  initial begin
    int ex [16] = '{1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 1, 1, 1, 1};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // Worked example.
    tick(1'b1, 1'b0, 8'd0);
    foreach (ex[k]) tick(1'b0, 1'b1, 8'(ex[k]));
    checks++;
    if (sum !== 12'h014 || sum[11:4] !== 8'd1 || sum[3:0] !== 4'b0100) begin
      failures++;
      $display("FAIL worked example sum=%03h", sum);
    end

    // Worst case: sixteen 255s.
    tick(1'b1, 1'b0, 8'd0);
    repeat (16) tick(1'b0, 1'b1, 8'd255);
    checks++;
    if (sum !== 12'd4080) begin
      failures++;
      $display("FAIL worst case sum=%0d", sum);
    end

    // Random evaluations with holds in between.
    for (int e = 0; e < 300; e++) begin
      tick(1'b1, 1'b0, 8'($urandom));
      repeat (16) tick(1'b0, 1'b1, 8'($urandom));
      repeat ($urandom_range(0, 3)) tick(1'b0, 1'b0, 8'($urandom));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
