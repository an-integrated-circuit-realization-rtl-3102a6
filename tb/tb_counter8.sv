// tb_counter8: random test of the 8-bit counter against a reference count.
// Reset, clear, enable and hold are applied at random for 3000 clocks,
// with long enabled runs so that the count wraps from 255 to 0.
module tb_counter8;
  logic       clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [7:0] q;
  int         model = 0;
  int checks = 0, failures = 0, wraps = 0;

  counter8 dut (.clk, .rst_n, .clr, .en, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clr = ($urandom_range(0, 99) == 0);
      en  = ($urandom_range(0, 9) != 0);
      @(posedge clk);
      if (clr)     model = 0;
      else if (en) begin
        model = model + 1;
        if (model == 256) begin model = 0; wraps++; end
      end
      #1;
      checks++;
      if (q !== 8'(model)) begin
        failures++;
        $display("FAIL t=%0d q=%0d expected %0d", t, q, model);
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL the counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
