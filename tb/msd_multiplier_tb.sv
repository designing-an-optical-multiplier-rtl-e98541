// msd_multiplier_tb: end-to-end test of the MSD array multiplier at its
// default size (10 x 2 arrays of 4-digit MSD numbers, 9-digit products).
//
// Sequence:
//   1. Reset; out_valid must be low.
//   2. The worked example: two fixed 10 x 2 arrays of values in -15..15, each
//      digit written as the binary digits of the magnitude carrying the sign
//      of the value (e.g. -5 = 0,-1,0,-1). Every product must decode to the
//      integer product.
//   3. Random operands with randomly redundant digit strings, applied with
//      random gaps in in_valid. Each accepted pair must come out one clock
//      later (out_valid exactly then, z = products), and z must hold while
//      no new pair arrives, even
//      though the operand inputs keep changing.
// Mechanism counters (each must be non-zero at the end): the three partial-
// product digit groups of the multiplication table (G1: 1*1 or -1*-1 -> 1,
// G2: any zero -> 0, G3: 1*-1 or -1*1 -> -1), negative and zero products,
// idle cycles with a held result, and products that use the guard digit above
// the 2n product digits.
module msd_multiplier_tb;
  import msd_pkg::*;

  localparam int unsigned M = 10, N = 2, ND = 4;
  localparam int unsigned WZ = 2 * ND - 1 + $clog2(ND);
  localparam int unsigned RANDOM_PAIRS = 400;

  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid;
  ddp_digit_t [M-1:0][N-1:0][ND-1:0] a, b;
  ddp_digit_t [M-1:0][N-1:0][WZ-1:0] z;

  int checks = 0, failures = 0;
  int n_g1 = 0, n_g2 = 0, n_g3 = 0, n_neg = 0, n_zero = 0, n_hold = 0, n_guard = 0;
  int expected [M][N];

  msd_multiplier dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .z(z)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("msd_multiplier_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Worked-example operands, row by row: {A col 0, A col 1, B col 0, B col 1}.
  localparam int EXAMPLE [M][4] = '{
    '{ 15, -15,  15, -15},
    '{ 13,   2,   2,  11},
    '{ -1,  -7,  10, -12},
    '{  9,  14,   7,   1},
    '{  7, -14,  -9,   6},
    '{  0,   6,  13,   3},
    '{ -4,  -5,   2,   5},
    '{-10,   0,   8,   0},
    '{ 11,   1,  14,  -1},
    '{ 15,  15,  15, -15}
  };

  // Digit k of a value in -15..15 written as signed binary magnitude.
  function automatic int sign_mag_digit(input int v, input int k);
    int mag = (v < 0) ? -v : v;
    int bit_k = (mag >> k) & 1;
    return (v < 0) ? -bit_k : bit_k;
  endfunction

  // Load one operand pair given as integer digit arrays; record expectations.
  task automatic load(input int da [M][N][ND], input int db [M][N][ND]);
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++) begin
        int va, vb;
        va = 0; vb = 0;
        for (int d = 0; d < int'(ND); d++) begin
          a[i][j][d] = ddp_encode(da[i][j][d]);
          b[i][j][d] = ddp_encode(db[i][j][d]);
          va += da[i][j][d] * (1 << d);
          vb += db[i][j][d] * (1 << d);
        end
        expected[i][j] = va * vb;
        if (va * vb < 0) n_neg++;
        if (va * vb == 0) n_zero++;
        // Digit groups of the multiplication table met by the DSS channels.
        for (int k = 0; k < int'(ND); k++)
          for (int d = 0; d < int'(ND); d++) begin
            int prod = da[i][j][d] * db[i][j][k];
            if (prod > 0) n_g1++;
            else if (prod < 0) n_g3++;
            else n_g2++;
          end
      end
  endtask

  task automatic check_z(input string what);
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++) begin
        int got;
        logic ok, guard;
        got = 0; ok = 1'b1; guard = 1'b0;
        for (int d = 0; d < int'(WZ); d++) begin
          ok &= ddp_valid(z[i][j][d]);
          got += ddp_decode(z[i][j][d]) * (1 << d);
          if (d >= int'(2 * ND) && !z[i][j][d].z0) guard = 1'b1;
        end
        if (guard) n_guard++;
        checks++;
        if (!ok || got != expected[i][j]) begin
          failures++;
          if (failures < 10)
            $display("msd_multiplier_tb: %s pixel (%0d,%0d) gave %0d (planes ok=%0b), expected %0d",
                     what, i, j, got, ok, expected[i][j]);
        end
      end
  endtask

  task automatic expect_valid(input logic v, input string what);
    checks++;
    if (out_valid !== v) begin
      failures++;
      $display("msd_multiplier_tb: out_valid=%0b, expected %0b (%s)", out_valid, v, what);
    end
  endtask

  initial begin
    int da [M][N][ND];
    int db [M][N][ND];

    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++)
        for (int d = 0; d < int'(ND); d++) begin
          a[i][j][d] = DDP_ZERO;
          b[i][j][d] = DDP_ZERO;
        end
    repeat (3) @(posedge clk);
    #1 expect_valid(1'b0, "in reset");
    rst_n = 1'b1;

    // Worked example.
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++)
        for (int d = 0; d < int'(ND); d++) begin
          da[i][j][d] = sign_mag_digit(EXAMPLE[i][j], d);
          db[i][j][d] = sign_mag_digit(EXAMPLE[i][2 + j], d);
        end
    @(negedge clk);
    load(da, db);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    expect_valid(1'b1, "example result");
    check_z("example");
    @(negedge clk);
    expect_valid(1'b0, "after example");

    // Random redundant operands with random gaps.
    for (int v = 0; v < int'(RANDOM_PAIRS); v++) begin
      int gap;
      for (int i = 0; i < int'(M); i++)
        for (int j = 0; j < int'(N); j++)
          for (int d = 0; d < int'(ND); d++) begin
            da[i][j][d] = int'($urandom_range(2)) - 1;
            db[i][j][d] = int'($urandom_range(2)) - 1;
          end
      load(da, db);
      in_valid = 1'b1;
      @(negedge clk);
      expect_valid(1'b1, "random result");
      check_z("random");
      gap = int'($urandom_range(3)) - 1;
      if (gap > 0) begin
        in_valid = 1'b0;
        repeat (gap) begin
          // Change the operands while idle: the held result must not follow.
          for (int i = 0; i < int'(M); i++)
            for (int j = 0; j < int'(N); j++)
              for (int d = 0; d < int'(ND); d++) begin
                a[i][j][d] = ddp_encode(int'($urandom_range(2)) - 1);
                b[i][j][d] = ddp_encode(int'($urandom_range(2)) - 1);
              end
          @(negedge clk);
          expect_valid(1'b0, "idle");
          check_z("held");
          n_hold++;
        end
      end
    end
    in_valid = 1'b0;

    $display("msd_multiplier_tb: groups G1=%0d G2=%0d G3=%0d, negative=%0d zero=%0d held=%0d guard-digit=%0d",
             n_g1, n_g2, n_g3, n_neg, n_zero, n_hold, n_guard);
    checks += 7;
    if (n_g1 == 0)    begin failures++; $display("msd_multiplier_tb: G1 never occurred"); end
    if (n_g2 == 0)    begin failures++; $display("msd_multiplier_tb: G2 never occurred"); end
    if (n_g3 == 0)    begin failures++; $display("msd_multiplier_tb: G3 never occurred"); end
    if (n_neg == 0)   begin failures++; $display("msd_multiplier_tb: no negative product"); end
    if (n_zero == 0)  begin failures++; $display("msd_multiplier_tb: no zero product"); end
    if (n_hold == 0)  begin failures++; $display("msd_multiplier_tb: no idle cycle"); end
    if (n_guard == 0) begin failures++; $display("msd_multiplier_tb: guard digit never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
