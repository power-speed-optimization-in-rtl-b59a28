// compressor_4_2: XOR/MUX 4-2 compressor.
//
// Four bits of one column plus a carry-in from the next lower column become a
// sum bit s (weight 1) and two weight-2 bits, carry and cout:
//   i0 + i1 + i2 + i3 + cin = s + 2*(carry + cout).
// cout = MUX(i0^i1 ? i2 : i0) depends on i0..i2 only, so it never waits for
// cin and a row of these has no rippling carry. The four-input XOR
// x = i0^i1^i2^i3 steers carry = x ? cin : i3, and s = x ^ cin.
// Critical path: three XOR delays. Combinational.
module compressor_4_2 (
  input  logic i0, i1, i2, i3,
  input  logic cin,
  output logic s,
  output logic carry,
  output logic cout
);
  logic h01, h23, x;
  always_comb begin
    h01   = i0 ^ i1;
    h23   = i2 ^ i3;
    x     = h01 ^ h23;
    cout  = h01 ? i2 : i0;
    carry = x ? cin : i3;
    s     = x ^ cin;
  end
endmodule
