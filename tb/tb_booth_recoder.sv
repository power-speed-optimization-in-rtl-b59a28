// tb_booth_recoder: one Booth partial-product row.
// For random and corner multiplicands and all eight triplets, the 17-bit row
// read as a signed number plus the neg bit must equal d * x, where
// d = -2*b2 + b1 + b0 is the triplet's digit.
module tb_booth_recoder;
  import mac_pkg::*;
  logic [N-1:0] x;
  logic [2:0]   bits;
  logic [N:0]   pp;
  logic         neg;
  int checks = 0, failures = 0;

  booth_recoder dut (.x(x), .bits(bits), .pp(pp), .neg(neg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] xv);
    for (int v = 0; v < 8; v++) begin
      longint d, got, exp;
      x    = xv;
      bits = 3'(v);
      #1;
      d   = -2 * longint'(bits[2]) + longint'(bits[1]) + longint'(bits[0]);
      exp = d * longint'($signed(x));
      got = longint'($signed(pp)) + longint'(neg);
      checks++;
      if (got != exp) begin
        failures++;
        $display("FAIL x=%h bits=%b pp=%h neg=%b got=%0d exp=%0d", x, bits, pp, neg, got, exp);
      end
    end
  endtask

  initial begin
    check_one('0);
    check_one('1);
    check_one(16'h8000);
    check_one(16'h7fff);
    check_one(16'h0001);
    for (int i = 0; i < 200; i++) check_one(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
