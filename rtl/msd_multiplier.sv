// msd_multiplier: parallel array multiplier for modified signed-digit (MSD)
// numbers in digit-decomposition-plane (DDP) form.
//
// Multiplies two M x N arrays of ND-digit MSD numbers, element by element, in
// one pass. The work has the two phases of any multiplier:
//   1. Partial-product generation: ND duplication-shifting-superimposing
//      (DSS) channels run side by side. Channel k shifts the multiplicand
//      array k digits, duplicates digit k of the multiplier array over it and
//      forms PP_k = A * b_k * 2^k with carry-free single-digit logic.
//   2. Accumulation: the ND partial-product arrays are summed by a tree of
//      ND-1 two-step MSD adders in L = ceil(log2 ND) levels.
//
// Result width. PP_k has non-zero digits only at positions k..k+ND-1, and
// each adder level can add one digit on top of its operands, so no product
// digit ever lands above position 2*ND-2+L. The product array Z therefore has
// WZ = 2*ND-1+L digits per number, i.e. 2*ND plus beta = L-1 guard digits
// (beta = 1 for the default ND = 4, as in the design description's example).
// The adder tree itself is generic and delivers 2*ND+L digits; the top
// digit(s) it adds beyond WZ are always zero, which an assertion checks.
//
// Every number in both operands and in the result is carried as three
// one-hot plane bits per digit (see msd_pkg). The datapath is combinational,
// as in the all-parallel optical system; this implementation's own addition
// is a single register on the result (standing in for capture on the output
// detector array) with a valid flag, so Z appears one clock after in_valid.
// The defaults (10 x 2 arrays of 4-digit numbers) are the size of the worked
// example in the design description.
//
// Interface:
//   clk, rst_n      clock, active-low synchronous reset
//   in_valid        a and b hold an operand pair this cycle
//   a, b            M x N x ND DDP operand arrays (multiplicand, multiplier)
//   out_valid       z holds the product of the pair given one cycle earlier
//   z               M x N x WZ DDP product array
module msd_multiplier
  import msd_pkg::*;
#(
  parameter int unsigned M  = 10,  // array rows
  parameter int unsigned N  = 2,   // array columns
  parameter int unsigned ND = 4,   // digits per operand (n)
  localparam int unsigned LV = $clog2(ND),
  localparam int unsigned WZ = (ND > 1) ? 2 * ND - 1 + LV : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  ddp_digit_t [M-1:0][N-1:0][ND-1:0]   a,
  input  ddp_digit_t [M-1:0][N-1:0][ND-1:0]   b,
  output logic                                out_valid,
  output ddp_digit_t [M-1:0][N-1:0][WZ-1:0]   z
);

  ddp_digit_t [ND-1:0][M-1:0][N-1:0][2*ND-1:0] pp;
  ddp_digit_t [M-1:0][N-1:0][2*ND+LV-1:0]      z_tree;
  ddp_digit_t [M-1:0][N-1:0][WZ-1:0]           z_comb;

  // Phase 1: one DSS channel per multiplier digit.
  for (genvar k = 0; k < ND; k++) begin : g_chan
    dss_channel #(.M(M), .N(N), .ND(ND), .K(k)) u_chan (
      .a (a),
      .b (b),
      .pp(pp[k])
    );
  end

  // Phase 2: tree accumulation of the ND partial-product arrays.
  msd_adder_tree #(.M(M), .N(N), .K(ND), .W(2 * ND)) u_tree (
    .pp(pp),
    .z (z_tree)
  );

  // Keep the WZ low digits; the digits above are zero by construction.
  always_comb begin
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned j = 0; j < N; j++)
        z_comb[i][j] = z_tree[i][j][WZ-1:0];
  end

  always_comb begin
    if (operands_valid(a, b)) begin
      for (int unsigned i = 0; i < M; i++)
        for (int unsigned j = 0; j < N; j++)
          for (int unsigned d = WZ; d < 2 * ND + LV; d++)
            assert (z_tree[i][j][d].z0)
              else $error("msd_multiplier: non-zero product digit above the result width");
    end
  end

  // Result capture.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int unsigned i = 0; i < M; i++)
        for (int unsigned j = 0; j < N; j++)
          for (int unsigned d = 0; d < WZ; d++)
            z[i][j][d] <= DDP_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) z <= z_comb;
    end
  end

  // Operands must be well-formed DDP planes: exactly one plane set per digit.
  function automatic logic operands_valid(
    input ddp_digit_t [M-1:0][N-1:0][ND-1:0] x,
    input ddp_digit_t [M-1:0][N-1:0][ND-1:0] y
  );
    logic ok = 1'b1;
    for (int unsigned i = 0; i < M; i++)
      for (int unsigned j = 0; j < N; j++)
        for (int unsigned d = 0; d < ND; d++)
          ok &= ddp_valid(x[i][j][d]) & ddp_valid(y[i][j][d]);
    return ok;
  endfunction

  a_operands_ddp: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> operands_valid(a, b))
    else $error("msd_multiplier: operand digit is not one-hot in DDP form");

endmodule
