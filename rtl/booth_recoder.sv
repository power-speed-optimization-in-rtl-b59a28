// booth_recoder: one radix-4 Booth partial-product row.
//
// One booth_encoder turns the multiplier triplet into the five select lines,
// which fan out to W+1 = 17 booth_selector bits. Selector i sees the
// sign-extended multiplicand bits x[i] and x[i-1] (x[-1] = 0), so the row is
// the one's-complement form of {0, +-1, +-2} x multiplicand as a 17-bit signed
// number; "neg" is 1 for -1X and -2X and must be added at the row's LSB to
// finish the two's complement. Combinational. An immediate assertion checks
// that the encoder's select lines are one-hot.
module booth_recoder
  import mac_pkg::*;
#(
  parameter int unsigned W = N          // multiplicand width
)(
  input  logic [W-1:0] x,               // multiplicand (signed)
  input  logic [2:0]   bits,            // {b[2j+1], b[2j], b[2j-1]}
  output logic [W:0]   pp,              // W+1-bit partial product (one's complement)
  output logic         neg              // +1 correction for negative rows
);
  booth_ctrl_t  ctrl;                   // the row's one-hot select lines
  logic [W+1:0] xe;                     // {sign, x, 0}: xe[i+1] is x[i], xe[0] is x[-1]

  assign xe = {x[W-1], x, 1'b0};

  booth_encoder u_enc (.bits(bits), .ctrl(ctrl));

  for (genvar i = 0; i <= W; i++) begin : g_sel
    booth_selector u_sel (.xi(xe[i+1]), .xi_m1(xe[i]), .ctrl(ctrl), .pp(pp[i]));
  end

  assign neg = ctrl.m1 | ctrl.m2;

  // The selectors assume exactly one select line is active.
  always_comb assert ($onehot(ctrl)) else $error("Booth select lines not one-hot: %b", ctrl);
endmodule
