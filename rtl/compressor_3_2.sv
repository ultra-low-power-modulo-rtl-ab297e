// 3:2 compressor (full adder): a + b + c = sum + 2*carry.
//
// The last two rows of the reduction tree are 3:2 compressors. Their inside is
// not drawn in the source, so this one repeats the first stage of the 5:2
// compressor: an XOR-XNOR cell on a, b, a GDI multiplexer selected by c that
// picks XOR (c = 0) or XNOR (c = 1) for the sum, and a CGEN for the carry.
// Combinational.
module compressor_3_2 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic ab_x, ab_xn;

  xor_xnor u_xx   (.a(a), .b(b), .x(ab_x), .xn(ab_xn));
  gdi_cell u_sum  (.g(c), .p(ab_x), .n(ab_xn), .d(sum));
  cgen     u_cgen (.x1(a), .x2(b), .x3(c), .o(carry));
endmodule
