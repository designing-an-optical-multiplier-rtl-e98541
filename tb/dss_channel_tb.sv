// dss_channel_tb: self-checking test of the DSS partial-product channels.
//
// Instantiates one channel for every multiplier digit position K = 0..ND-1 of
// the default 10 x 2 x 4 configuration, drives random MSD operand arrays and
// checks for every pixel that channel K delivers a valid 2*ND-digit MSD number
// equal to A * b_K * 2^K with no non-zero digit outside positions K..K+ND-1.
// Combinational: each vector settles for 1 time unit before it is checked.
module dss_channel_tb;
  import msd_pkg::*;

  localparam int unsigned M = 10, N = 2, ND = 4;
  localparam int unsigned W = 2 * ND;
  localparam int unsigned VECTORS = 300;

  ddp_digit_t [M-1:0][N-1:0][ND-1:0] a, b;
  ddp_digit_t [ND-1:0][M-1:0][N-1:0][W-1:0] pp;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < ND; k++) begin : g_dut
    dss_channel #(.M(M), .N(N), .ND(ND), .K(k)) dut (.a(a), .b(b), .pp(pp[k]));
  end

  initial begin
    #1000000;
    failures++;
    $display("dss_channel_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < int'(VECTORS); v++) begin
      int va [M][N];
      int db [M][N][ND];
      for (int i = 0; i < int'(M); i++)
        for (int j = 0; j < int'(N); j++) begin
          va[i][j] = 0;
          for (int d = 0; d < int'(ND); d++) begin
            int da;
            da = int'($urandom_range(2)) - 1;
            db[i][j][d] = int'($urandom_range(2)) - 1;
            va[i][j] += da * (1 << d);
            a[i][j][d] = ddp_encode(da);
            b[i][j][d] = ddp_encode(db[i][j][d]);
          end
        end
      #1;
      for (int k = 0; k < int'(ND); k++)
        for (int i = 0; i < int'(M); i++)
          for (int j = 0; j < int'(N); j++) begin
            int got, expect_v;
            logic ok;
            got = 0;
            ok  = 1'b1;
            for (int p = 0; p < int'(W); p++) begin
              ok &= ddp_valid(pp[k][i][j][p]);
              if ((p < k || p >= k + int'(ND)) && !pp[k][i][j][p].z0) ok = 1'b0;
              got += ddp_decode(pp[k][i][j][p]) * (1 << p);
            end
            expect_v = va[i][j] * db[i][j][k] * (1 << k);
            checks++;
            if (!ok || got != expect_v) begin
              failures++;
              if (failures < 10)
                $display("dss_channel_tb: K=%0d pixel (%0d,%0d) gave %0d (planes ok=%0b), expected %0d",
                         k, i, j, got, ok, expect_v);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
