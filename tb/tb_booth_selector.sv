// tb_booth_selector: exhaustive check of one Booth selector bit.
// Every one-hot control with both data inputs: +1X gives x[i], -1X its
// inverse, +2X gives x[i-1], -2X its inverse, Z gives 0.
module tb_booth_selector;
  import mac_pkg::*;
  logic        xi, xi_m1, pp;
  booth_ctrl_t ctrl;
  int checks = 0, failures = 0;

  booth_selector dut (.xi(xi), .xi_m1(xi_m1), .ctrl(ctrl), .pp(pp));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 5; c++) begin
      for (int d = 0; d < 4; d++) begin
        logic exp;
        ctrl  = booth_ctrl_t'(5'b1 << (4 - c));   // z, p1, m1, p2, m2
        xi    = d[0];
        xi_m1 = d[1];
        #1;
        case (c)
          0: exp = 1'b0;
          1: exp = xi;
          2: exp = ~xi;
          3: exp = xi_m1;
          default: exp = ~xi_m1;
        endcase
        checks++;
        if (pp !== exp) begin
          failures++;
          $display("FAIL ctrl=%b xi=%b xi_m1=%b pp=%b exp=%b", ctrl, xi, xi_m1, pp, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
