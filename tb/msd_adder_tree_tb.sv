// msd_adder_tree_tb: self-checking test of the MSD accumulation tree.
//
// Three trees are tested side by side: the default one (4 operand arrays of
// 10 x 2 numbers, 8 digits each, two adder levels) and two small ones with 3
// and 5 operands, whose odd levels pass an operand through unchanged. Random
// MSD operands are applied and every pixel's result must be a valid
// W + ceil(log2 K)-digit DDP number equal to the sum of its K operands.
// Combinational: each vector settles for 1 time unit before it is checked.
module msd_adder_tree_tb;
  import msd_pkg::*;

  localparam int unsigned W = 8;
  localparam int unsigned VECTORS = 300;

  // Tree A: the default 10 x 2 x 8 with 4 operands.
  localparam int unsigned MA = 10, NA = 2, KA = 4, WZA = W + $clog2(KA);
  // Trees B and C: 2 x 2 arrays with 3 and 5 operands.
  localparam int unsigned MS = 2, NS = 2, KB = 3, KC = 5;
  localparam int unsigned WZB = W + $clog2(KB), WZC = W + $clog2(KC);

  ddp_digit_t [KA-1:0][MA-1:0][NA-1:0][W-1:0] ppa;
  ddp_digit_t [KB-1:0][MS-1:0][NS-1:0][W-1:0] ppb;
  ddp_digit_t [KC-1:0][MS-1:0][NS-1:0][W-1:0] ppc;
  ddp_digit_t [MA-1:0][NA-1:0][WZA-1:0] za;
  ddp_digit_t [MS-1:0][NS-1:0][WZB-1:0] zb;
  ddp_digit_t [MS-1:0][NS-1:0][WZC-1:0] zc;

  int checks = 0, failures = 0;

  msd_adder_tree dut_a (.pp(ppa), .z(za));
  msd_adder_tree #(.M(MS), .N(NS), .K(KB), .W(W)) dut_b (.pp(ppb), .z(zb));
  msd_adder_tree #(.M(MS), .N(NS), .K(KC), .W(W)) dut_c (.pp(ppc), .z(zc));

  initial begin
    #1000000;
    failures++;
    $display("msd_adder_tree_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ddp_digit_t rand_ddp(output int d);
    d = int'($urandom_range(2)) - 1;
    return ddp_encode(d);
  endfunction

  task automatic check_one(input string tree, input int i, input int j,
                           input int got, input logic ok, input int expect_v);
    checks++;
    if (!ok || got != expect_v) begin
      failures++;
      if (failures < 10)
        $display("msd_adder_tree_tb: tree %s pixel (%0d,%0d) gave %0d (planes ok=%0b), expected %0d",
                 tree, i, j, got, ok, expect_v);
    end
  endtask

  initial begin
    for (int v = 0; v < int'(VECTORS); v++) begin
      int suma [MA][NA];
      int sumb [MS][NS];
      int sumc [MS][NS];
      int d;
      suma = '{default: 0};
      sumb = '{default: 0};
      sumc = '{default: 0};
      for (int q = 0; q < int'(KA); q++)
        for (int i = 0; i < int'(MA); i++)
          for (int j = 0; j < int'(NA); j++)
            for (int p = 0; p < int'(W); p++) begin
              ppa[q][i][j][p] = rand_ddp(d);
              suma[i][j] += d * (1 << p);
            end
      for (int q = 0; q < int'(KB); q++)
        for (int i = 0; i < int'(MS); i++)
          for (int j = 0; j < int'(NS); j++)
            for (int p = 0; p < int'(W); p++) begin
              ppb[q][i][j][p] = rand_ddp(d);
              sumb[i][j] += d * (1 << p);
            end
      for (int q = 0; q < int'(KC); q++)
        for (int i = 0; i < int'(MS); i++)
          for (int j = 0; j < int'(NS); j++)
            for (int p = 0; p < int'(W); p++) begin
              ppc[q][i][j][p] = rand_ddp(d);
              sumc[i][j] += d * (1 << p);
            end
      #1;
      for (int i = 0; i < int'(MA); i++)
        for (int j = 0; j < int'(NA); j++) begin
          int got;
          logic ok;
          got = 0;
          ok  = 1'b1;
          for (int p = 0; p < int'(WZA); p++) begin
            ok &= ddp_valid(za[i][j][p]);
            got += ddp_decode(za[i][j][p]) * (1 << p);
          end
          check_one("A", i, j, got, ok, suma[i][j]);
        end
      for (int i = 0; i < int'(MS); i++)
        for (int j = 0; j < int'(NS); j++) begin
          int gotb, gotc;
          logic okb, okc;
          gotb = 0; gotc = 0;
          okb = 1'b1; okc = 1'b1;
          for (int p = 0; p < int'(WZB); p++) begin
            okb &= ddp_valid(zb[i][j][p]);
            gotb += ddp_decode(zb[i][j][p]) * (1 << p);
          end
          for (int p = 0; p < int'(WZC); p++) begin
            okc &= ddp_valid(zc[i][j][p]);
            gotc += ddp_decode(zc[i][j][p]) * (1 << p);
          end
          check_one("B", i, j, gotb, okb, sumb[i][j]);
          check_one("C", i, j, gotc, okc, sumc[i][j]);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
