// msd_adder: parallel two-step carry-free MSD adder on DDP planes.
//
// Adds two M x N arrays of W-digit MSD numbers, all pixels and digits at once,
// giving W+1-digit sums. Carry propagation is avoided by splitting the work in
// two steps, each of which looks at no more than two neighbouring digit
// positions:
//
//   Step 1 (transfer/weight). For position i the digit pair sum
//   x_i + y_i in {-2..2} is split as 2*t_{i+1} + w_i:
//        x_i + y_i |  2 |  1 (lower ok) |  1 (else) | 0 | -1 (lower ok) | -1 (else) | -2
//        t_{i+1}   |  1 |      1        |     0     | 0 |       0       |    -1     | -1
//        w_i       |  0 |     -1        |     1     | 0 |      -1       |     1     |  0
//   "lower ok" means neither x_{i-1} nor y_{i-1} is -1 (true for i = 0).
//   This look at the lower pair guarantees that w_i and the incoming t_i
//   never have the same non-zero sign.
//
//   Step 2 (sum). s_i = w_i + t_i, which is always a digit in {-1, 0, 1}
//   (t_0 = 0, s_W = t_W). Since the lowest position always counts as
//   "lower ok", w_0 and hence s_0 are never +1: the s_0 plane p1 is
//   constant 0.
//
// Both steps are written as AND/OR formulas on the three DDP planes. The
// adder itself is only named in the design description (a parallel two-step
// MSD adder with DDP representation); the lookahead rule above is the
// standard two-step MSD addition and is this implementation's choice.
//
// Interface: x, y are M x N x W arrays of DDP digits; s is M x N x (W+1).
// Timing: purely combinational.
module msd_adder
  import msd_pkg::*;
#(
  parameter int unsigned M = 10,  // array rows
  parameter int unsigned N = 2,   // array columns
  parameter int unsigned W = 8    // digits per operand
) (
  input  ddp_digit_t [M-1:0][N-1:0][W-1:0] x,
  input  ddp_digit_t [M-1:0][N-1:0][W-1:0] y,
  output ddp_digit_t [M-1:0][N-1:0][W:0]   s
);

  ddp_digit_t [M-1:0][N-1:0][W:0]   t;  // transfer digits, t[.][.][0] = 0
  ddp_digit_t [M-1:0][N-1:0][W-1:0] w;  // interim weight digits

  // Step 1: transfer and weight planes.
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        t[i][j][0] = DDP_ZERO;
        for (int unsigned k = 0; k < W; k++) begin
          logic sum_p2, sum_p1, sum_m1, sum_m2, lower_ok;
          sum_p2 = x[i][j][k].p1 & y[i][j][k].p1;
          sum_m2 = x[i][j][k].m1 & y[i][j][k].m1;
          sum_p1 = (x[i][j][k].p1 & y[i][j][k].z0) | (x[i][j][k].z0 & y[i][j][k].p1);
          sum_m1 = (x[i][j][k].m1 & y[i][j][k].z0) | (x[i][j][k].z0 & y[i][j][k].m1);
          if (k == 0) lower_ok = 1'b1;
          else        lower_ok = ~(x[i][j][k-1].m1 | y[i][j][k-1].m1);

          t[i][j][k+1].p1 = sum_p2 | (sum_p1 & lower_ok);
          t[i][j][k+1].m1 = sum_m2 | (sum_m1 & ~lower_ok);
          t[i][j][k+1].z0 = ~(t[i][j][k+1].p1 | t[i][j][k+1].m1);

          w[i][j][k].p1 = (sum_p1 | sum_m1) & ~lower_ok;
          w[i][j][k].m1 = (sum_p1 | sum_m1) & lower_ok;
          w[i][j][k].z0 = ~(w[i][j][k].p1 | w[i][j][k].m1);
        end
      end
    end
  end

  // Step 2: s_i = w_i + t_i, never leaving {-1, 0, 1}.
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        for (int unsigned k = 0; k < W; k++) begin
          s[i][j][k].p1 = (w[i][j][k].p1 & t[i][j][k].z0) | (w[i][j][k].z0 & t[i][j][k].p1);
          s[i][j][k].m1 = (w[i][j][k].m1 & t[i][j][k].z0) | (w[i][j][k].z0 & t[i][j][k].m1);
          s[i][j][k].z0 = ~(s[i][j][k].p1 | s[i][j][k].m1);
        end
        s[i][j][W] = t[i][j][W];
      end
    end
  end

  // The lookahead must rule out two equal non-zero digits meeting in step 2.
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        logic all_valid;
        all_valid = 1'b1;
        for (int unsigned k = 0; k < W; k++)
          all_valid &= ddp_valid(x[i][j][k]) & ddp_valid(y[i][j][k]);
        if (all_valid) begin
          for (int unsigned k = 0; k < W; k++)
            assert (!(w[i][j][k].p1 & t[i][j][k].p1) && !(w[i][j][k].m1 & t[i][j][k].m1))
              else $error("msd_adder: step-2 overflow at digit %0d", k);
        end
      end
    end
  end

endmodule
