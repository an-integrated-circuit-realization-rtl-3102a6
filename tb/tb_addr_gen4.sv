// tb_addr_gen4: exhaustive test of the 4-bit address generator.
// For every register MSB value d and comparator output inc, s must be d
// when inc = 0 and the next vertex d + 1 (modulo 16) when inc = 1.
module tb_addr_gen4;
  logic       inc;
  logic [3:0] d, s;
  int checks = 0, failures = 0;

  addr_gen4 dut (.inc, .d, .s);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iv = 0; iv < 2; iv++) begin
      for (int dv = 0; dv < 16; dv++) begin
        int exp_s;
        inc = 1'(iv); d = 4'(dv);
        #1;
        exp_s = (dv + iv) % 16;
        checks++;
        if (s !== 4'(exp_s)) begin
          failures++;
          $display("FAIL inc=%0d d=%0d s=%0d expected %0d", iv, dv, s, exp_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
