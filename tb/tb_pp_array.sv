// tb_pp_array: the partial-product array of an N x N signed product.
// The NPP+1 rows, summed modulo 2^ACC_W by the testbench, must equal x*y.
module tb_pp_array;
  import mac_pkg::*;
  logic [N-1:0]     x, y;
  logic [ACC_W-1:0] rows [NPP+1];
  int checks = 0, failures = 0;

  pp_array dut (.x(x), .y(y), .rows(rows));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] xv, input logic [N-1:0] yv);
    logic [ACC_W-1:0] tot, exp;
    x = xv;
    y = yv;
    #1;
    tot = '0;
    for (int r = 0; r <= NPP; r++) tot += rows[r];
    exp = ACC_W'($signed(x)) * ACC_W'($signed(y));
    checks++;
    if (tot !== exp) begin
      failures++;
      $display("FAIL x=%h y=%h sum=%h exp=%h", x, y, tot, exp);
    end
  endtask

  localparam logic [N-1:0] CORNERS [6] = '{16'h0000, 16'hffff, 16'h8000, 16'h7fff, 16'h0001, 16'haaaa};

  initial begin
    foreach (CORNERS[i]) foreach (CORNERS[k]) check_one(CORNERS[i], CORNERS[k]);
    for (int i = 0; i < 5000; i++) check_one(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
