// tb_ad_comparator: test of the behavioural A/D front-end comparator.
// A staircase ramp is swept past several input levels; comp must be 0
// while the ramp is at or below the input and 1 above it, and the number
// of steps before it switches must be the input's code.
module tb_ad_comparator;
  real  vin, vramp;
  logic comp;
  int checks = 0, failures = 0;
  localparam real STEP = 0.01;

  ad_comparator dut (.vin, .vramp, .comp);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes [5] = '{0, 1, 77, 128, 254};
    foreach (codes[j]) begin
      int below;
      below = 0;
      vin = (real'(codes[j]) + 0.5) * STEP;
      for (int k = 0; k < 256; k++) begin
        vramp = real'(k) * STEP;
        #1;
        checks++;
        if (comp !== (k > codes[j])) begin
          failures++;
          $display("FAIL code=%0d k=%0d comp=%0b", codes[j], k, comp);
        end
        if (!comp) below++;
      end
      checks++;
      if (below != codes[j] + 1) begin
        failures++;
        $display("FAIL code=%0d comparator low for %0d steps", codes[j], below);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
