// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
// For all eight triplets the expected one-hot select is derived from the
// triplet's value -2*b2 + b1 + b0 and compared with the encoder output.
module tb_booth_encoder;
  import mac_pkg::*;
  logic [2:0]  bits;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_encoder dut (.bits(bits), .ctrl(ctrl));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int d;
      booth_ctrl_t exp;
      bits = 3'(v);
      #1;
      d = -2 * int'(bits[2]) + int'(bits[1]) + int'(bits[0]);
      exp = '{z: d == 0, p1: d == 1, m1: d == -1, p2: d == 2, m2: d == -2};
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("FAIL bits=%b ctrl=%b exp=%b", bits, ctrl, exp);
      end
      checks++;
      if (!$onehot(ctrl)) begin
        failures++;
        $display("FAIL bits=%b ctrl not one-hot", bits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
