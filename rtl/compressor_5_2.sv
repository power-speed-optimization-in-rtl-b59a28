// compressor_5_2: XOR/MUX 5-2 compressor.
//
// Five bits of one column plus two carries from the next lower column become
// a sum bit s (weight 1) and three weight-2 bits carry, cout1 and cout2:
//   i0 + i1 + i2 + i3 + i4 + cin1 + cin2 = s + 2*(carry + cout1 + cout2).
// Six XORs and three multiplexers:
//   cout1 = (i3^i4) ? i2 : i4                      (majority of i2, i3, i4)
//   x4    = (i1^i2) ^ (i3^i4)
//   cout2 = x4 ? cin1 : i1                         (independent of cin2)
//   x6    = x4 ^ (i0^cin1)
//   carry = x6 ? cin2 : i0,  s = x6 ^ cin2
// cout1 depends on no carry-in and cout2 only on cin1, so a row of these does
// not ripple. The second-level XOR that is combined with x4 takes i0 and
// cin1, the inputs that make the sum identity above hold.
module compressor_5_2 (
  input  logic i0, i1, i2, i3, i4,
  input  logic cin1, cin2,
  output logic s,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic x12, x34, x0c, x4, x6;
  always_comb begin
    x12   = i1 ^ i2;          // XOR1
    x0c   = i0 ^ cin1;        // XOR2
    x34   = i3 ^ i4;          // XOR3
    x4    = x12 ^ x34;        // XOR4
    x6    = x4 ^ x0c;         // XOR5
    s     = x6 ^ cin2;        // XOR6
    cout1 = x34 ? i2 : i4;
    cout2 = x4 ? cin1 : i1;
    carry = x6 ? cin2 : i0;
  end
endmodule
