// tb_column_compressor: column compression of ten 32-bit rows.
// The rows are random, but shaped like the real array: group-B rows
// (pp_rows[4..8]) are zero below column 6. sum + carry must equal the
// modulo-2^32 total of all rows.
module tb_column_compressor;
  import mac_pkg::*;
  logic [ACC_W-1:0] pp_rows [NPP+1];
  logic [ACC_W-1:0] acc, sum, carry;
  int checks = 0, failures = 0;

  column_compressor dut (.pp_rows(pp_rows), .acc(acc), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [ACC_W-1:0] exp;
    #1;
    exp = acc;
    for (int r = 0; r <= NPP; r++) exp += pp_rows[r];
    checks++;
    if (sum + carry !== exp) begin
      failures++;
      $display("FAIL sum=%h carry=%h exp=%h", sum, carry, exp);
    end
  endtask

  initial begin
    // all ones in every live position: maximal column heights
    acc = '1;
    for (int r = 0; r <= NPP; r++) pp_rows[r] = (r >= 4) ? ('1 << 6) : '1;
    check_now();
    for (int i = 0; i < 5000; i++) begin
      acc = $urandom;
      for (int r = 0; r <= NPP; r++) begin
        pp_rows[r] = $urandom;
        if (r >= 4) pp_rows[r][5:0] = '0;
      end
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
