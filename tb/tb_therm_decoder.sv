// tb_therm_decoder: exhaustive self-check of the 3-bit binary-to-thermometer
// decoder. For every input code the expected output is the mask with the
// 'code' lowest bits set, and the count of high lines must equal the code.
module tb_therm_decoder;
  int checks = 0, failures = 0;
  logic [2:0] bin;
  logic [6:0] therm;

  therm_decoder #(.IN_W(3)) dut (.bin(bin), .therm(therm));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [6:0] exp_mask;
      bin = 3'(v);
      #1;
      exp_mask = 7'((1 << v) - 1);
      checks++;
      if (therm !== exp_mask) begin
        failures++;
        $display("FAIL bin=%0d therm=%b expected %b", v, therm, exp_mask);
      end
      checks++;
      if ($countones(therm) != v) begin
        failures++;
        $display("FAIL bin=%0d has %0d high lines", v, $countones(therm));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
