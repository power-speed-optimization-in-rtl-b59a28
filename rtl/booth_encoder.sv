// booth_encoder: radix-4 (modified) Booth encoder.
//
// Looks at three overlapping multiplier bits {b[2j+1], b[2j], b[2j-1]} and
// raises exactly one of the five select lines Z, +1X, -1X, +2X, -2X that drive
// the selectors of one partial-product row:
//   000, 111 -> Z      001, 010 -> +1X     011 -> +2X
//   100      -> -2X    101, 110 -> -1X
// Purely combinational. The five-line interface is the one the selector of
// this design expects; the gate-level form of the encoder is left to synthesis.
module booth_encoder
  import mac_pkg::*;
(
  input  logic [2:0]  bits,   // {b[2j+1], b[2j], b[2j-1]}
  output booth_ctrl_t ctrl
);
  always_comb begin
    ctrl.p1 = (bits == 3'b001) || (bits == 3'b010);
    ctrl.m1 = (bits == 3'b101) || (bits == 3'b110);
    ctrl.p2 = (bits == 3'b011);
    ctrl.m2 = (bits == 3'b100);
    ctrl.z  = (bits == 3'b000) || (bits == 3'b111);
  end
endmodule
