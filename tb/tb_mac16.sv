// tb_mac16: end-to-end test of the 16 x 16 multiply-accumulate unit at its
// default sizes.
//
// A reference model keeps acc_ref += x*y (mod 2^32) and the DUT's acc is
// compared with it every cycle: the new total must be visible exactly one
// clock after the operands are presented with en = 1 (one-cycle latency, one
// operation per cycle). Mechanisms exercised and counted, each of which must
// occur at least once: clear (a new sum), hold (en = 0), wrap-around of the
// 32-bit total, the extreme product (-32768)^2, and each of the five Booth
// digits Z, +1, -1, +2, -2 in the multiplier.
module tb_mac16;
  import mac_pkg::*;
  logic             clk = 1'b0;
  logic             rst_n;
  logic             en, clr;
  logic [N-1:0]     x, y;
  logic [ACC_W-1:0] acc;

  logic [ACC_W-1:0] acc_ref;
  int checks = 0, failures = 0;
  int n_clear = 0, n_hold = 0, n_wrap = 0, n_extreme = 0, n_ops = 0;
  int n_digit [5] = '{default: 0};        // -2, -1, 0, +1, +2

  mac16 dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .x(x), .y(y), .acc(acc));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_digits(input logic [N-1:0] yv);
    logic [N:0] ye;
    ye = {yv, 1'b0};
    for (int j = 0; j < NPP; j++) begin
      int d;
      d = -2 * int'(ye[2*j+2]) + int'(ye[2*j+1]) + int'(ye[2*j]);
      n_digit[d + 2]++;
    end
  endtask

  // Present one set of inputs, clock once, check the result.
  task automatic step(input logic e, input logic c, input logic [N-1:0] xv, input logic [N-1:0] yv);
    logic [ACC_W-1:0] prod, base, nxt;
    en = e; clr = c; x = xv; y = yv;
    @(posedge clk);
    #1;
    if (e) begin
      prod = ACC_W'($signed(xv)) * ACC_W'($signed(yv));
      base = c ? '0 : acc_ref;
      nxt  = base + prod;
      // signed overflow of the 32-bit total: operands of equal sign, result of the other
      if (base[ACC_W-1] == prod[ACC_W-1] && nxt[ACC_W-1] != base[ACC_W-1]) n_wrap++;
      if (c) n_clear++;
      if (xv == 16'h8000 && yv == 16'h8000) n_extreme++;
      count_digits(yv);
      n_ops++;
      acc_ref = nxt;
    end else begin
      n_hold++;
    end
    checks++;
    if (acc !== acc_ref) begin
      failures++;
      $display("FAIL t=%0t en=%b clr=%b x=%h y=%h acc=%h exp=%h", $time, e, c, xv, yv, acc, acc_ref);
    end
  endtask

  initial begin
    en = 1'b0; clr = 1'b0; x = '0; y = '0;
    rst_n = 1'b0;
    acc_ref = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (acc !== '0) begin
      failures++;
      $display("FAIL acc not cleared by reset: %h", acc);
    end
    rst_n = 1'b1;

    // Directed: a short dot product, then a hold, then a clear.
    step(1'b1, 1'b1, 16'd3, 16'd5);          // 15
    step(1'b1, 1'b0, 16'hfffe, 16'd7);       // 15 - 14 = 1
    step(1'b0, 1'b0, 16'd100, 16'd100);      // hold: still 1
    step(1'b1, 1'b0, 16'd10, 16'hfff6);      // 1 - 100 = -99
    checks++;
    if ($signed(acc) != -99) begin
      failures++;
      $display("FAIL directed dot product: acc=%0d exp=-99", $signed(acc));
    end
    step(1'b1, 1'b1, 16'h8000, 16'h8000);    // 2^30
    // Repeated extreme products push the 32-bit total past its range.
    for (int i = 0; i < 4; i++) step(1'b1, 1'b0, 16'h8000, 16'h8000);
    step(1'b1, 1'b0, 16'h7fff, 16'h8000);
    step(1'b1, 1'b0, 16'hffff, 16'hffff);

    // Random traffic.
    for (int i = 0; i < 20000; i++) begin
      int r;
      logic e, c;
      r = $urandom_range(0, 99);
      e = (r >= 10);
      c = (r >= 10 && r < 14);
      step(e, c, N'($urandom), N'($urandom));
    end

    if (n_clear == 0)   begin failures++; $display("FAIL clear never exercised"); end
    if (n_hold == 0)    begin failures++; $display("FAIL hold never exercised"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL wrap-around never exercised"); end
    if (n_extreme == 0) begin failures++; $display("FAIL extreme product never exercised"); end
    foreach (n_digit[d])
      if (n_digit[d] == 0) begin failures++; $display("FAIL Booth digit %0d never exercised", d - 2); end
    $display("ops=%0d clear=%0d hold=%0d wrap=%0d extreme=%0d digits(-2..+2)=%0d/%0d/%0d/%0d/%0d",
             n_ops, n_clear, n_hold, n_wrap, n_extreme,
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
