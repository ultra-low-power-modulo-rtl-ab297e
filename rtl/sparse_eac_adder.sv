// Sparse-tree end-around-carry adder, inverted (default) or plain.
//
// Inverted EAC (INVERTED = 1): s = (a + b + ~cout) mod 2^N, where cout is the
// carry out of a + b. Then {all_prop, s} = (a + b + 1) mod (2^N + 1), which is
// the final addition of the modulo 2^N+1 multiplier: the "+1" is the constant
// that the reduction tree leaves for this adder. all_prop is 1 exactly when
// a ^ b is all ones (a + b = 2^N - 1); s is then 0 and the true result is 2^N.
// Plain EAC (INVERTED = 0): s = (a + b + cout) mod 2^N = a + b mod (2^N - 1),
// with 2^N - 1 standing for zero.
//
// Only every K-th carry is formed. With G_{i:j} the group generate/propagate
// (merge operator of modmul_pkg) the carries out of bit i = mK - 1 are
//   C*_{-1} = ~G_{N-1:0}                          (inverted)
//   C*_{i}  = G_{i:0} | P_{i:0} & ~G_{N-1:i+1}
// (no negation for the plain form). The end-around carry is thus folded into
// each sparse carry from the group terms, so there is no combinational loop.
// K-bit conditional sum generators (csg) then use C*_{mK-1} to select between
// their two precomputed sums. Slice terms come from a binary tree of merge
// cells (log2 K levels); the prefix and suffix terms over slices from
// log2(N/K) levels of recursive doubling, and one more merge folds in the end
// carry, so every sparse carry is log2 N + 1 merges deep. The source draws a
// sparse tree with fewer cells; the carries it computes are the same. Bit
// propagates are a|b, as in the source; sums use the half sums a^b.
// Combinational.
module sparse_eac_adder
  import modmul_pkg::*;
#(
  parameter int unsigned N        = 16,
  parameter int unsigned K        = 4,
  parameter bit          INVERTED = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         all_prop
);
  localparam int unsigned NB = N / K;      // number of K-bit slices

  logic [N-1:0] g, p, psum;
  gp_t          bitgp [N];               // bit terms, then slice terms in place
  gp_t          pre [NB];                // pre[j] = G_{jK+K-1 : 0}
  gp_t          suf [NB];                // suf[j] = G_{N-1 : jK}
  logic [NB-1:0] cslice;                   // carry into slice j

  assign g    = a & b;
  assign p    = a | b;
  assign psum = a ^ b;
  assign all_prop = &psum;

  always_comb begin
    // bit generate/propagate
    for (int unsigned i = 0; i < N; i++)
      bitgp[i] = '{g: g[i], p: p[i]};
    // slice terms by a binary tree: after the last level bitgp[jK+K-1]
    // holds G_{jK+K-1 : jK}
    for (int unsigned w = 1; w < K; w = w * 2)
      for (int unsigned i = 2 * w - 1; i < N; i += 2 * w)
        bitgp[i] = gp_merge(bitgp[i], bitgp[i-w]);
    // slice-level prefixes (from bit 0) and suffixes (to bit N-1), each in
    // log2(NB) levels of merges
    for (int unsigned j = 0; j < NB; j++) begin
      pre[j] = bitgp[j*K + K - 1];
      suf[j] = bitgp[j*K + K - 1];
    end
    for (int d = 1; d < NB; d = d * 2) begin
      for (int j = NB - 1; j >= d; j--)
        pre[j] = gp_merge(pre[j], pre[j-d]);
      for (int j = 0; j + d < NB; j++)
        suf[j] = gp_merge(suf[j+d], suf[j]);
    end
    // sparse carries with the end-around carry folded in
    cslice[0] = INVERTED ? ~suf[0].g : suf[0].g;
    for (int unsigned j = 1; j < NB; j++)
      cslice[j] = pre[j-1].g | (pre[j-1].p & (INVERTED ? ~suf[j].g : suf[j].g));
  end

  for (genvar j = 0; j < NB; j++) begin : g_csg
    csg #(.K(K)) u_csg (
      .g    (g[j*K +: K-1]),
      .p    (p[j*K +: K-1]),
      .psum (psum[j*K +: K]),
      .cin  (cslice[j]),
      .s    (s[j*K +: K])
    );
  end

  initial begin
    assert (N % K == 0 && N >= 2 * K && K >= 2 && (K & (K - 1)) == 0)
      else $error("sparse_eac_adder: K must be a power of two and N a multiple of K, at least 2K");
  end
endmodule
