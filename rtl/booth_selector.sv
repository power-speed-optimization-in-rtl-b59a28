// booth_selector: one bit of a radix-4 Booth partial product.
//
// Built as a five-way one-hot multiplexer onto a shared node followed by an
// output inverter, the same arrangement as the transmission-gate selector:
// the node takes x[i] for -1X, ~x[i] for +1X, x[i-1] for -2X, ~x[i-1] for
// +2X and a constant 1 for Z, and the output is the inverse of the node. So
//   pp = x[i] (+1X), ~x[i] (-1X), x[i-1] (+2X), ~x[i-1] (-2X), 0 (Z).
// The +1 that completes the two's complement of a negative row is added
// elsewhere (the row's "neg" bit). Combinational.
module booth_selector
  import mac_pkg::*;
(
  input  logic        xi,     // multiplicand bit i
  input  logic        xi_m1,  // multiplicand bit i-1
  input  booth_ctrl_t ctrl,   // one-hot controls from the encoder
  output logic        pp      // partial-product bit
);
  logic node;

  always_comb begin
    node = 1'b0;
    if (ctrl.m1) node = xi;
    if (ctrl.p1) node = ~xi;
    if (ctrl.m2) node = xi_m1;
    if (ctrl.p2) node = ~xi_m1;
    if (ctrl.z)  node = 1'b1;
    pp = ~node;
  end
endmodule
