// pp_gen_tb: self-checking test of the single-step partial-product generator.
//
// Drives random DDP digit arrays (all nine digit pairs occur many times) and
// checks every output digit against the integer product of the two input
// digits, and that every output digit is one-hot. Combinational block, so
// each vector is applied, allowed to settle for 1 time unit and checked.
module pp_gen_tb;
  import msd_pkg::*;

  localparam int unsigned M = 10, N = 2, W = 8;
  localparam int unsigned VECTORS = 300;

  ddp_digit_t [M-1:0][N-1:0][W-1:0] aa, bb, pp;
  int checks = 0, failures = 0;
  int seen [3][3];  // digit pairs exercised, indexed by digit + 1

  pp_gen dut (.aa(aa), .bb(bb), .pp(pp));

  function automatic int rand_digit();
    return int'($urandom_range(2)) - 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("pp_gen_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < int'(VECTORS); v++) begin
      int da [M][N][W];
      int db [M][N][W];
      for (int i = 0; i < int'(M); i++)
        for (int j = 0; j < int'(N); j++)
          for (int k = 0; k < int'(W); k++) begin
            da[i][j][k] = rand_digit();
            db[i][j][k] = rand_digit();
            aa[i][j][k] = ddp_encode(da[i][j][k]);
            bb[i][j][k] = ddp_encode(db[i][j][k]);
          end
      #1;
      for (int i = 0; i < int'(M); i++)
        for (int j = 0; j < int'(N); j++)
          for (int k = 0; k < int'(W); k++) begin
            int expect_d;
            expect_d = da[i][j][k] * db[i][j][k];
            seen[da[i][j][k] + 1][db[i][j][k] + 1]++;
            checks++;
            if (!ddp_valid(pp[i][j][k]) || ddp_decode(pp[i][j][k]) != expect_d) begin
              failures++;
              if (failures < 10)
                $display("pp_gen_tb: (%0d,%0d,%0d) %0d*%0d gave planes %b, expected %0d",
                         i, j, k, da[i][j][k], db[i][j][k], pp[i][j][k], expect_d);
            end
          end
    end
    for (int x = 0; x < 3; x++)
      for (int y = 0; y < 3; y++) begin
        checks++;
        if (seen[x][y] == 0) begin
          failures++;
          $display("pp_gen_tb: digit pair (%0d,%0d) never exercised", x - 1, y - 1);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
