// tb_compressor_5_2: exhaustive check of the 5-2 compressor.
// For all 128 inputs: i0..i4 + cin1 + cin2 == s + 2*(carry+cout1+cout2).
// Also checks that cout1 depends on neither carry-in and cout2 not on cin2,
// which is what keeps a row of compressors free of rippling carries.
module tb_compressor_5_2;
  logic i0, i1, i2, i3, i4, cin1, cin2, s, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.i0(i0), .i1(i1), .i2(i2), .i3(i3), .i4(i4),
                      .cin1(cin1), .cin2(cin2),
                      .s(s), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      logic c1, c2;
      {cin2, cin1, i4, i3, i2, i1, i0} = 7'(v);
      #1;
      checks++;
      if (int'(s) + 2 * (int'(carry) + int'(cout1) + int'(cout2)) != $countones(v)) begin
        failures++;
        $display("FAIL in=%b s=%b carry=%b cout1=%b cout2=%b", v[6:0], s, carry, cout1, cout2);
      end
      c1 = cout1;
      c2 = cout2;
      cin2 = ~cin2;
      #1;
      checks++;
      if (cout1 !== c1 || cout2 !== c2) begin
        failures++;
        $display("FAIL couts depend on cin2, in=%b", v[6:0]);
      end
      cin1 = ~cin1;
      #1;
      checks++;
      if (cout1 !== c1) begin
        failures++;
        $display("FAIL cout1 depends on cin1, in=%b", v[6:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
