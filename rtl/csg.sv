// K-bit conditional sum generator of the sparse-tree adder.
//
// Each K-bit slice of the adder gets its carry-in from the sparse carry tree
// only. Meanwhile two ripple rails work out the slice's internal carries for a
// carry-in of 0 (c0: g ripples alone) and of 1 (c1: each stage is a carry merge
// with the previous one, starting from 1). Each rail gives a candidate sum
// psum ^ c, and a GDI 2:1 multiplexer per bit selected by cin picks the real
// one; for the lowest bit the candidates are psum and ~psum. Inputs are the
// bit generates g = a&b and propagates p = a|b of the lower K-1 bits (the top
// bit's carry out is not needed) and the half sums psum = a^b of the slice.
// Structure follows the source's slice diagram; combinational.
module csg #(
  parameter int unsigned K = 4
) (
  input  logic [K-2:0] g,      // generates of the lower K-1 bits
  input  logic [K-2:0] p,      // propagates of the lower K-1 bits
  input  logic [K-1:0] psum,
  input  logic         cin,
  output logic [K-1:0] s
);
  logic [K-1:0] c0, c1;      // carry into bit j for slice carry-in 0 / 1
  logic [K-1:0] s0, s1;

  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;
  for (genvar j = 1; j < K; j++) begin : g_rail
    assign c0[j] = g[j-1] | (p[j-1] & c0[j-1]);
    assign c1[j] = g[j-1] | (p[j-1] & c1[j-1]);
  end

  assign s0 = psum ^ c0;
  assign s1 = psum ^ c1;

  for (genvar j = 0; j < K; j++) begin : g_mux
    gdi_cell u_mux (.g(cin), .p(s0[j]), .n(s1[j]), .d(s[j]));
  end
endmodule
