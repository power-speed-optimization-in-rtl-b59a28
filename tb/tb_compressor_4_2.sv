// tb_compressor_4_2: exhaustive check of the 4-2 compressor.
// i0+i1+i2+i3+cin == s + 2*(carry+cout) for all 32 inputs, and cout must not
// depend on cin (checked by flipping cin).
module tb_compressor_4_2;
  logic i0, i1, i2, i3, cin, s, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.i0(i0), .i1(i1), .i2(i2), .i3(i3), .cin(cin),
                      .s(s), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic cout0;
      {cin, i3, i2, i1, i0} = 5'(v);
      #1;
      checks++;
      if (int'(s) + 2 * (int'(carry) + int'(cout)) != $countones(v)) begin
        failures++;
        $display("FAIL in=%b s=%b carry=%b cout=%b", v[4:0], s, carry, cout);
      end
      cout0 = cout;
      cin = ~cin;
      #1;
      checks++;
      if (cout !== cout0) begin
        failures++;
        $display("FAIL cout depends on cin, in=%b", v[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
