// adder_3_2: XOR/MUX 3-2 adder (full adder) of the compressor family.
//
// One XOR forms h = i0 ^ i1; the sum is h ^ i2 and a multiplexer steered by h
// picks the carry: i2 when h = 1, otherwise i1 (when i0 = i1 both equal the
// carry). i0 + i1 + i2 = s + 2*carry. Combinational.
module adder_3_2 (
  input  logic i0, i1, i2,
  output logic s,
  output logic carry
);
  logic h;
  always_comb begin
    h     = i0 ^ i1;
    s     = h ^ i2;
    carry = h ? i2 : i1;
  end
endmodule
