// ks_adder: W-bit Kogge-Stone parallel-prefix adder (final adder).
//
// Bitwise generate g = a & b and propagate p = a ^ b are combined in
// log2(W) prefix levels; at level l each position i >= 2^l merges with
// position i - 2^l using (G, P) o (G', P') = (G | P & G', P & P'). Position i
// of the last level holds the carry out of bits i..0 (with cin folded in as
// a generate below bit 0), and sum = p ^ {carries, cin}. The Kogge-Stone
// structure follows the design; W = 32 is its final-adder width.
// Combinational. cout is the carry out of the top bit.
module ks_adder #(
  parameter int unsigned W = 32
)(
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LEVELS = $clog2(W);

  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];
  logic [W-1:0] pbit;

  always_comb begin
    pbit = a ^ b;
    g[0] = a & b;
    p[0] = pbit;
    g[0][0] = (a[0] & b[0]) | (pbit[0] & cin);
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    sum  = pbit ^ {g[LEVELS][W-2:0], cin};
    cout = g[LEVELS][W-1];
  end
endmodule
