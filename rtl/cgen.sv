// Carry generator (CGEN) of the compressors: o = (x1 + x2)x3 + x1x2, the
// majority of three bits, i.e. the carry of a full adder.
//
// Written the way the equation reads with three GDI cells: a GDI OR gives
// x1+x2, a GDI AND gives x1x2, and a GDI multiplexer selected by x3 passes the
// OR when x3 is 1 and the AND when x3 is 0. The equation is the source's; the
// three-cell form is this design's choice. Combinational.
module cgen (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic o
);
  logic or12, and12;

  gdi_cell u_or  (.g(x1), .p(x2),    .n(1'b1), .d(or12));
  gdi_cell u_and (.g(x1), .p(1'b0),  .n(x2),   .d(and12));
  gdi_cell u_mux (.g(x3), .p(and12), .n(or12), .d(o));
endmodule
