// Modulo 2^16 + 1 multiplier built from GDI cells.
//
// r = x * y mod (2^16 + 1) for x, y in [0, 2^16] given as 17-bit numbers (bit
// 16 set only for 2^16). Three stages, all combinational:
//  1. pp_gen forms 16 partial product rows of 16 bits. Bits of weight 2^16 and
//     above are folded back inverted, so the rows sum to x*y + 2^16 - 17.
//  2. pp_reduction adds the constant 2 and the 16 rows (17 operands) in a
//     compressor tree of 7:2, 7:2, 5:2, 3:2, 3:2 rows whose carries out of
//     the top column re-enter inverted at the bottom; the two result vectors
//     satisfy Sum + Carry = rows + 2 + 15 (mod 2^16+1).
//  3. sparse_eac_adder, inverted form, returns (Sum + Carry + 1) mod (2^16+1)
//     as {all_prop, s}.
// Altogether r = x*y + (2^16 - 17) + 2 + 15 + 1 = x*y + 2^16 + 1 = x*y.
// For IDEA-style 16-bit operands, where 0 stands for 2^16, tie x[16], y[16] to
// 0 and drop r[16]. sum_vec and carry_vec bring the two reduction vectors out
// for observation. The three-stage structure, the constant 2 and the
// inverted-EAC final adder follow the source; there is no clock, register or
// reset because none is described.
module modmul_2n1
  import modmul_pkg::*;
(
  input  logic [N_MOD:0]   x,
  input  logic [N_MOD:0]   y,
  output logic [N_MOD:0]   r,
  output logic [N_MOD-1:0] sum_vec,
  output logic [N_MOD-1:0] carry_vec
);
  logic [N_MOD-1:0] pp  [N_MOD];
  logic [N_MOD-1:0] ops [NUM_OPS];

  pp_gen #(.N(N_MOD)) u_ppg (.x(x), .y(y), .pp(pp));

  assign ops[0] = N_MOD'(PP_CONST);
  for (genvar i = 0; i < N_MOD; i++) begin : g_ops
    assign ops[i+1] = pp[i];
  end

  pp_reduction #(.N(N_MOD)) u_red (.op(ops), .sum_vec(sum_vec), .carry_vec(carry_vec));

  sparse_eac_adder #(.N(N_MOD), .K(SPARSE_K), .INVERTED(1'b1)) u_add (
    .a        (sum_vec),
    .b        (carry_vec),
    .s        (r[N_MOD-1:0]),
    .all_prop (r[N_MOD])
  );
endmodule
