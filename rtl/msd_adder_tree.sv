// msd_adder_tree: accumulates K partial-product arrays with a binary tree of
// two-step MSD adders.
//
// The K input arrays (M x N numbers of W digits each) are added pairwise, level
// by level, with K-1 msd_adder instances in ceil(log2 K) levels. When a level
// has an odd number of operands the last one passes to the next level
// unchanged. Every adder grows its result by one digit, so the sum is
// WZ = W + ceil(log2 K) digits wide; the extra ceil(log2 K) digits are the
// guard digits ("beta") above the 2n product digits.
//
// All nodes are kept WZ digits wide with zero digits above the operand width.
// An adder at level L only ever sees non-zero digits below position W+L, and
// W+L < WZ, so the transfer out of its top position is always zero and is
// dropped; an assertion checks this. The tree arrangement, the K-1 adders and
// the log2 K depth follow the design description; the carry-through of odd
// operands and the exact guard-digit count are this implementation's choices.
//
// Interface: pp is K arrays of M x N x W DDP digits; z is M x N x WZ.
// Timing: purely combinational, ceil(log2 K) adder delays deep.
module msd_adder_tree
  import msd_pkg::*;
#(
  parameter int unsigned M = 10,  // array rows
  parameter int unsigned N = 2,   // array columns
  parameter int unsigned K = 4,   // number of operand arrays (n channels)
  parameter int unsigned W = 8,   // digits per operand (2n)
  localparam int unsigned LEVELS = $clog2(K),
  localparam int unsigned WZ     = W + LEVELS
) (
  input  ddp_digit_t [K-1:0][M-1:0][N-1:0][W-1:0] pp,
  output ddp_digit_t [M-1:0][N-1:0][WZ-1:0]       z
);

  typedef ddp_digit_t [M-1:0][N-1:0][WZ-1:0] arr_t;

  // Number of operands present at tree level l.
  function automatic int unsigned level_count(input int unsigned l);
    return (K + (1 << l) - 1) >> l;
  endfunction

  // g_lvl[l].node[q] is operand q at tree level l; level 0 holds the inputs
  // zero-extended to WZ digits, level LEVELS holds the sum alone.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    arr_t node [level_count(l)];

    if (l == 0) begin : g_in
      for (genvar q = 0; q < K; q++) begin : g_op
        for (genvar i = 0; i < M; i++) begin : g_row
          for (genvar j = 0; j < N; j++) begin : g_col
            for (genvar d = 0; d < WZ; d++) begin : g_dig
              if (d < W) begin : g_data
                assign node[q][i][j][d] = pp[q][i][j][d];
              end else begin : g_pad
                assign node[q][i][j][d] = DDP_ZERO;
              end
            end
          end
        end
      end
    end else begin : g_sum
      for (genvar q = 0; q < level_count(l); q++) begin : g_node
        if (2 * q + 1 < level_count(l - 1)) begin : g_add
          ddp_digit_t [M-1:0][N-1:0][WZ:0] sum;

          msd_adder #(.M(M), .N(N), .W(WZ)) u_add (
            .x(g_lvl[l-1].node[2*q]),
            .y(g_lvl[l-1].node[2*q+1]),
            .s(sum)
          );

          for (genvar i = 0; i < M; i++) begin : g_row
            for (genvar j = 0; j < N; j++) begin : g_col
              assign node[q][i][j] = sum[i][j][WZ-1:0];
              // The dropped top transfer digit is zero by construction.
              always_comb begin
                if (ddp_valid(sum[i][j][WZ-1]))
                  assert (sum[i][j][WZ].z0)
                    else $error("msd_adder_tree: non-zero digit dropped at level %0d", l);
              end
            end
          end
        end else begin : g_pass
          assign node[q] = g_lvl[l-1].node[2*q];
        end
      end
    end
  end

  assign z = g_lvl[LEVELS].node[0];

endmodule
