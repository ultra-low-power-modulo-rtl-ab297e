// Dual-rail XOR/XNOR cell built from GDI cells.
//
// The compressors need both polarities of each two-input parity so that the
// following multiplexers can pick the true or the complemented rail. Here a GDI
// NOT makes b', and two GDI multiplexers selected by a give
//   x  = a ? b' : b = a ^ b
//   xn = a ? b  : b' = ~(a ^ b).
// The cell's transistor arrangement is this design's choice; only its name and
// its two outputs come from the compressor diagrams. Combinational.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  logic b_n;

  gdi_cell u_not (.g(b), .p(1'b1), .n(1'b0), .d(b_n));
  gdi_cell u_xor (.g(a), .p(b),    .n(b_n),  .d(x));
  gdi_cell u_xnr (.g(a), .p(b_n),  .n(b),    .d(xn));
endmodule
