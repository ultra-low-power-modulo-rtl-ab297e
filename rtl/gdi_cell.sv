// Gate-Diffusion-Input (GDI) cell, logic-level model.
//
// A GDI cell is one pMOS and one nMOS transistor with a common gate G. The pMOS
// outer diffusion is P, the nMOS outer diffusion is N and the shared diffusion is
// the output D. When G is 1 the nMOS conducts and D follows N; when G is 0 the
// pMOS conducts and D follows P. With inputs A, B this gives, by tying N and P:
//   N=0 P=B G=A -> A'B      N=B P=1 G=A -> A'+B     N=1 P=B G=A -> A+B (OR)
//   N=B P=0 G=A -> AB (AND) N=B P=A G=S -> S'A+SB (MUX)  N=0 P=1 G=A -> A' (NOT)
// Every AND, OR, NOT and multiplexer of this multiplier is one such cell.
// The cell and its function table are the source's; reducing it to this one
// logic equation is this model's choice.
// Only the logic function is modelled: the threshold-voltage loss of the passed
// level and its restoration are analogue effects outside this model.
// Combinational, no timing.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic d
);
  assign d = g ? n : p;
endmodule
