// pp_gen: single-step MSD partial-product generator on DDP planes.
//
// Multiplies two MSD data arrays digit by digit (pixel by pixel). Because a
// product of two digits from {-1, 0, 1} is again such a digit, no carry ever
// arises and every output digit depends only on the two input digits at the
// same position. The logic works plane-wise, as in the optical scheme:
//   PP1  = A1 & B1  |  A-1 & B-1      (groups (1,1) and (-1,-1) give 1)
//   PP0  = A0 | B0                    (any zero operand gives 0)
//   PP-1 = ~(PP1 | PP0)               (complement plane of the other two)
// The third plane is formed as the complement of the other two, which is how
// the optical implementation builds it; the direct form A1&B-1 | A-1&B1 is
// checked against it by an assertion.
//
// Interface: aa, bb are M x N x W arrays of DDP digits (the duplicated and
// shifted operands of one channel); pp is the M x N x W product array.
// Timing: purely combinational.
module pp_gen
  import msd_pkg::*;
#(
  parameter int unsigned M = 10,  // array rows
  parameter int unsigned N = 2,   // array columns
  parameter int unsigned W = 8    // digits per number (2n for n-digit operands)
) (
  input  ddp_digit_t [M-1:0][N-1:0][W-1:0] aa,
  input  ddp_digit_t [M-1:0][N-1:0][W-1:0] bb,
  output ddp_digit_t [M-1:0][N-1:0][W-1:0] pp
);

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        for (int unsigned k = 0; k < W; k++) begin
          pp[i][j][k].p1 = (aa[i][j][k].p1 & bb[i][j][k].p1)
                         | (aa[i][j][k].m1 & bb[i][j][k].m1);
          pp[i][j][k].z0 = aa[i][j][k].z0 | bb[i][j][k].z0;
          pp[i][j][k].m1 = ~(pp[i][j][k].p1 | pp[i][j][k].z0);
        end
      end
    end
  end

  // The complement-plane form of PP-1 must agree with the direct product rule
  // whenever the inputs are valid DDP digits.
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        for (int unsigned k = 0; k < W; k++) begin
          if (ddp_valid(aa[i][j][k]) && ddp_valid(bb[i][j][k])) begin
            assert (pp[i][j][k].m1 == ((aa[i][j][k].p1 & bb[i][j][k].m1)
                                     | (aa[i][j][k].m1 & bb[i][j][k].p1)))
              else $error("pp_gen: PP-1 plane disagrees with direct rule");
          end
        end
      end
    end
  end

endmodule
