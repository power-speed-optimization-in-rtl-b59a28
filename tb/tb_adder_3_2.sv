// tb_adder_3_2: exhaustive check, i0 + i1 + i2 == s + 2*carry.
module tb_adder_3_2;
  logic i0, i1, i2, s, carry;
  int checks = 0, failures = 0;

  adder_3_2 dut (.i0(i0), .i1(i1), .i2(i2), .s(s), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int n;
      {i2, i1, i0} = 3'(v);
      #1;
      n = $countones(v);
      checks++;
      if (int'(s) + 2 * int'(carry) != n) begin
        failures++;
        $display("FAIL in=%b s=%b carry=%b", v[2:0], s, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
