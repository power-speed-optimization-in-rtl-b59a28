// pp_array: radix-4 Booth partial-product array for an N x N signed product.
//
// NPP = N/2 booth_recoder rows, row j weighted 4^j, are laid out on an
// ACC_W = 2N column grid ready for column compression. Sign extension uses
// the usual constant-folding form so that no row is longer than N+3 bits:
//   row 0    : pp[N-1:0] at columns 0.., then s0, s0, ~s0
//   row j>0  : pp[N-1:0] at columns 2j.., then ~sj, then a constant 1
// where s is the row's sign bit pp[N]. The negation bit of row j-1 sits in
// the two empty columns below row j (column 2j-2). The last row's negation
// bit has no free slot and is emitted as an extra row (row NPP, one bit at
// column 2(NPP-1)). Summing all NPP+1 rows modulo 2^ACC_W gives x*y.
// Combinational. The layout is this design's choice. Columns outside a
// row's span are constant 0 (row NPP is a single live bit), which synthesis
// removes together with the compressor inputs they feed.
module pp_array
  import mac_pkg::*;
(
  input  logic [N-1:0]      x,                  // multiplicand (signed)
  input  logic [N-1:0]      y,                  // multiplier (signed)
  output logic [ACC_W-1:0]  rows [NPP+1]        // rows to be summed
);
  logic [N:0]   pp  [NPP];
  logic [NPP-1:0] neg;
  logic [N:0]   ye;                             // {y, 0}: ye[k] = y[k-1]

  assign ye = {y, 1'b0};

  for (genvar j = 0; j < NPP; j++) begin : g_row
    booth_recoder #(.W(N)) u_rec (
      .x(x), .bits(ye[2*j+2 -: 3]), .pp(pp[j]), .neg(neg[j])
    );
  end

  always_comb begin
    for (int j = 0; j < NPP; j++) begin
      rows[j] = '0;
      rows[j][2*j +: N] = pp[j][N-1:0];
      if (j == 0) begin
        rows[j][N]   = pp[j][N];
        rows[j][N+1] = pp[j][N];
        rows[j][N+2] = ~pp[j][N];
      end else begin
        rows[j][2*j+N]   = ~pp[j][N];
        rows[j][2*j+N+1] = 1'b1;
        rows[j][2*j-2]   = neg[j-1];
      end
    end
    rows[NPP] = '0;
    rows[NPP][2*(NPP-1)] = neg[NPP-1];
  end
endmodule
