// tb_input_reg8: random test of the input register and its latch multiplexer
// against a reference model, plus two directed sequences: a conversion in
// which the latch rises part way through the counter sweep (the register
// must keep the last value before it), and a serial load of a known byte.
module tb_input_reg8;
  logic       clk = 0, rst_n = 0;
  logic       conv = 0, latch_in = 0, ser_en = 0, ser_in = 0;
  logic [7:0] cnt = 0, q;
  logic       ser_out;
  logic [7:0] model = 0;
  int checks = 0, failures = 0;

  input_reg8 dut (.clk, .rst_n, .conv, .latch_in, .cnt, .ser_en, .ser_in,
                  .ser_out, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model || ser_out !== model[7]) begin
      failures++;
      $display("FAIL %s q=%02h ser_out=%0b expected %02h", what, q, ser_out, model);
    end
  endtask

  // One clock with the given inputs, reference model updated alongside.
  task automatic step(logic c, logic l, logic [7:0] k, logic se, logic si);
    @(negedge clk);
    conv = c; latch_in = l; cnt = k; ser_en = se; ser_in = si;
    @(posedge clk);
    if (se)          model = {model[6:0], si};
    else if (c && !l) model = k;
    #1 check("step");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check("reset");

    // Conversion of code 173: the latch rises when the ramp passes it.
    for (int k = 0; k < 256; k++) step(1'b1, k > 173, 8'(k), 1'b0, 1'b0);
    checks++;
    if (q !== 8'd173) begin
      failures++;
      $display("FAIL conversion kept %0d, expected 173", q);
    end
    // Outside Converting the register holds even with the latch pad low.
    for (int k = 0; k < 20; k++) step(1'b0, 1'b0, 8'(k), 1'b0, 1'b0);

    // Serial load of 8'h5C, MSB first.
    for (int b = 7; b >= 0; b--) step(1'b0, 1'b0, 8'h00, 1'b1, 1'(8'h5C >> b));
    checks++;
    if (q !== 8'h5C) begin
      failures++;
      $display("FAIL serial load gave %02h", q);
    end

    // Random inputs.
    for (int t = 0; t < 3000; t++)
      step(1'($urandom), 1'($urandom), 8'($urandom), ($urandom_range(0, 3) == 0),
           1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
