// mac16: 16 x 16 signed multiply-accumulate unit.
//
// Each enabled clock cycle computes acc <= acc + x*y (or acc <= x*y when clr
// is high) in one combinational pass:
//   pp_array           radix-4 Booth recoding: 8 partial-product rows plus
//                      one negation-bit row, sign extension folded in
//   column_compressor  5-2 compressors, then 4-2 compressors / 3-2 adders,
//                      merging those rows and the accumulator into two rows
//   ks_adder           32-bit Kogge-Stone adder producing the new total
// The accumulator is therefore added inside the compression tree, not by a
// separate adder. Arithmetic is two's complement modulo 2^32 (the result
// wraps). Interface: x and y are sampled on the rising clock edge when en is
// high; acc shows the total from the next cycle on. Latency 1 cycle, one
// operation per cycle. rst_n is an asynchronous active-low reset to 0.
// The register, the enable and the clear are this design's own choices; the
// datapath blocks and the widths follow the design.
module mac16
  import mac_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,        // accumulate this cycle
  input  logic             clr,       // with en: start a new sum (acc <= x*y)
  input  logic [N-1:0]     x,         // multiplicand (signed)
  input  logic [N-1:0]     y,         // multiplier (signed)
  output logic [ACC_W-1:0] acc        // accumulated total (signed, wraps)
);
  logic [ACC_W-1:0] pp_rows [NPP+1];
  logic [ACC_W-1:0] acc_in, cs_sum, cs_carry, acc_next;
  logic             unused_cout;

  pp_array u_pp (.x(x), .y(y), .rows(pp_rows));

  assign acc_in = clr ? '0 : acc;

  column_compressor u_cc (
    .pp_rows(pp_rows), .acc(acc_in), .sum(cs_sum), .carry(cs_carry)
  );

  ks_adder #(.W(ACC_W)) u_ks (
    .a(cs_sum), .b(cs_carry), .cin(1'b0), .sum(acc_next), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end
endmodule
