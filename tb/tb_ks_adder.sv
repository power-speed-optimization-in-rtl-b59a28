// tb_ks_adder: 32-bit Kogge-Stone adder against the built-in addition,
// with carry-in, on corner cases (full carry propagation) and random data.
module tb_ks_adder;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ks_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] av, input logic [W-1:0] bv, input logic cv);
    logic [W:0] exp;
    a = av; b = bv; cin = cv;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got=%h exp=%h", a, b, cin, {cout, sum}, exp);
    end
  endtask

  initial begin
    check_one('1, '0, 1'b1);
    check_one('1, 32'h1, 1'b0);
    check_one('1, '1, 1'b1);
    check_one('0, '0, 1'b0);
    check_one(32'h5555_5555, 32'haaaa_aaaa, 1'b1);
    for (int i = 0; i < W; i++) check_one(W'(1) << i, '1 >> (W - 1 - i) >> 1, 1'b1);
    for (int i = 0; i < 5000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
