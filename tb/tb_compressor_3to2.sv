// tb_compressor_3to2: exhaustive check of the 3:2 compressor.
// For all eight input combinations, 2*carry + sum must equal a + b + c.
module tb_compressor_3to2;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  compressor_3to2 dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (2 * int'(carry) + int'(sum) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL abc=%b sum=%b carry=%b", {a, b, c}, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
