// column_compressor: column compression stage of the multiply-accumulate.
//
// Reduces the NPP+1 = 9 Booth rows plus the accumulator row (10 rows of
// ACC_W = 32 bits) to two rows, sum and carry, for the final adder.
//
//   Level 1: two rows of compressor_5_2 work side by side.
//            Group A = {acc, pp0, pp1, pp2, pp3}, all starting at column 0.
//            Group B = {pp4, pp5, pp6, pp7, neg7}, nothing below column
//            B_LSB = 6 (the negation bit of pp3, carried in row pp4).
//            Inside a group, cout1/cout2 of column k feed cin1/cin2 of
//            column k+1; each group yields a sum row and a carry row.
//   Level 2: the resulting four rows go through one compressor row. Below
//            column B_LSB+1 the fourth row (group B's carry) is known to be
//            zero, so those columns use adder_3_2; from there up they use
//            compressor_4_2 with the carry chain starting at 0.
//
// Everything above column ACC_W-1 is dropped (the top level-1 carries and
// carry-outs are left unused on purpose), as are group B's carry bits below
// SPLIT, which are always 0: the result is exact modulo 2^ACC_W.
// The column grouping is this design's own choice; the compressor family
// (5-2, 4-2, 3-2) is the one the column heights call for.
// Combinational; sum + carry (mod 2^ACC_W) equals the sum of all rows.
module column_compressor
  import mac_pkg::*;
(
  input  logic [ACC_W-1:0] pp_rows [NPP+1],   // Booth rows from pp_array
  input  logic [ACC_W-1:0] acc,               // accumulator row
  output logic [ACC_W-1:0] sum,
  output logic [ACC_W-1:0] carry
);
  localparam int unsigned B_FIRST = 4;                     // first Booth row of group B
  localparam int unsigned B_LSB   = 2 * B_FIRST - 2;       // lowest live column of group B
  localparam int unsigned SPLIT   = B_LSB + 1;             // first 4-2 column

  logic [ACC_W-1:0] in_a [5];
  logic [ACC_W-1:0] in_b [5];
  logic [ACC_W-1:0] sa, ca_raw, sb, cb_raw;
  logic [ACC_W-1:0] ca, cb;
  logic [ACC_W:0]   a_c1, a_c2, b_c1, b_c2;              // level-1 carry chains
  logic [ACC_W:0]   l2_c;                                // level-2 carry chain
  logic [ACC_W-1:0] l2_carry_raw;

  always_comb begin
    in_a[0] = acc;
    for (int r = 0; r < 4; r++) in_a[r+1] = pp_rows[r];
    for (int r = 0; r < 5; r++) in_b[r]   = pp_rows[B_FIRST + r];
  end

  assign a_c1[0] = 1'b0;
  assign a_c2[0] = 1'b0;
  assign b_c1[0] = 1'b0;
  assign b_c2[0] = 1'b0;
  assign l2_c[SPLIT] = 1'b0;

  for (genvar k = 0; k < ACC_W; k++) begin : g_col
    compressor_5_2 u_a (
      .i0(in_a[0][k]), .i1(in_a[1][k]), .i2(in_a[2][k]), .i3(in_a[3][k]), .i4(in_a[4][k]),
      .cin1(a_c1[k]), .cin2(a_c2[k]),
      .s(sa[k]), .carry(ca_raw[k]), .cout1(a_c1[k+1]), .cout2(a_c2[k+1])
    );
    compressor_5_2 u_b (
      .i0(in_b[0][k]), .i1(in_b[1][k]), .i2(in_b[2][k]), .i3(in_b[3][k]), .i4(in_b[4][k]),
      .cin1(b_c1[k]), .cin2(b_c2[k]),
      .s(sb[k]), .carry(cb_raw[k]), .cout1(b_c1[k+1]), .cout2(b_c2[k+1])
    );
  end

  // Level-1 carries have weight 2: move them one column up.
  assign ca = {ca_raw[ACC_W-2:0], 1'b0};
  assign cb = {cb_raw[ACC_W-2:0], 1'b0};

  for (genvar k = 0; k < ACC_W; k++) begin : g_l2
    if (k < SPLIT) begin : g_fa
      adder_3_2 u_fa (
        .i0(sa[k]), .i1(ca[k]), .i2(sb[k]),
        .s(sum[k]), .carry(l2_carry_raw[k])
      );
    end else begin : g_c42
      compressor_4_2 u_c42 (
        .i0(sa[k]), .i1(ca[k]), .i2(sb[k]), .i3(cb[k]), .cin(l2_c[k]),
        .s(sum[k]), .carry(l2_carry_raw[k]), .cout(l2_c[k+1])
      );
    end
  end

  assign carry = {l2_carry_raw[ACC_W-2:0], 1'b0};
endmodule
