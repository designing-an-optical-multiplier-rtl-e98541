// dss_channel: one channel of the duplication-shifting-superimposing (DSS)
// multiplication scheme.
//
// Channel K forms partial-product array PP_K = A * b_K * 2^K for every pixel
// of the M x N arrays at once. The multiplicand planes of A are shifted K
// digit positions towards the most significant end inside a 2n-digit frame
// (AA_K); digit K of every multiplier number in B is duplicated over the n
// positions the shifted multiplicand occupies (BB_K). Positions outside that
// span hold DDP zeros. AA_K and BB_K then go through the single-step
// partial-product generator (pp_gen), so PP_K is already aligned for the
// accumulation tree.
//
// The shift-and-duplicate structure and the 2n-digit frame follow the design
// description. Channels are numbered 0..n-1 by the weight of the multiplier
// digit they use, and the multiplier digit is duplicated only over the
// shifted span (outside it the zero multiplicand already forces a zero
// product), both choices of this implementation.
//
// Interface: a, b are M x N x ND arrays of DDP digits; pp is M x N x 2*ND.
// Timing: purely combinational.
module dss_channel
  import msd_pkg::*;
#(
  parameter int unsigned M  = 10,  // array rows
  parameter int unsigned N  = 2,   // array columns
  parameter int unsigned ND = 4,   // digits per operand (n)
  parameter int unsigned K  = 0    // channel number = multiplier digit used
) (
  input  ddp_digit_t [M-1:0][N-1:0][ND-1:0]   a,
  input  ddp_digit_t [M-1:0][N-1:0][ND-1:0]   b,
  output ddp_digit_t [M-1:0][N-1:0][2*ND-1:0] pp
);

  localparam int unsigned W = 2 * ND;

  ddp_digit_t [M-1:0][N-1:0][W-1:0] aa;  // shifted multiplicand planes
  ddp_digit_t [M-1:0][N-1:0][W-1:0] bb;  // duplicated multiplier digit planes

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        for (int p = 0; p < int'(W); p++) begin
          if (p - int'(K) >= 0 && p - int'(K) < int'(ND)) begin
            aa[i][j][p] = a[i][j][p-int'(K)];
            bb[i][j][p] = b[i][j][K];
          end else begin
            aa[i][j][p] = DDP_ZERO;
            bb[i][j][p] = DDP_ZERO;
          end
        end
      end
    end
  end

  pp_gen #(.M(M), .N(N), .W(W)) u_pp_gen (
    .aa(aa),
    .bb(bb),
    .pp(pp)
  );

endmodule
