// tb_comparator4: exhaustive test of the 4-bit ramp comparator.
// All 256 pairs (r, d) are applied; comp must be 1 exactly when r < d, and
// for each d the number of ramp steps with comp = 1 must equal d.
module tb_comparator4;
  logic [3:0] r, d;
  logic       comp;
  int checks = 0, failures = 0;

  comparator4 dut (.r, .d, .comp);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 0; dv < 16; dv++) begin
      int high;
      high = 0;
      for (int rv = 0; rv < 16; rv++) begin
        r = 4'(rv); d = 4'(dv);
        #1;
        checks++;
        if (comp !== (rv < dv)) begin
          failures++;
          $display("FAIL r=%0d d=%0d comp=%0b", rv, dv, comp);
        end
        if (comp) high++;
      end
      checks++;
      if (high != dv) begin
        failures++;
        $display("FAIL d=%0d high for %0d steps", dv, high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
