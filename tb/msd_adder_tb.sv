// msd_adder_tb: self-checking test of the two-step carry-free MSD adder.
//
// Drives random W-digit MSD operand arrays (default 10 x 2 x 8) plus a few
// directed extreme patterns (all 1, all -1, alternating) and checks for every
// pixel that the W+1-digit result is a valid DDP number whose value is the
// sum of the operand values. It also counts how often each row of the
// transfer/weight table was used (sums of +-2, and +-1 with the lower digit
// pair free of -1 or not) and fails if any row was never exercised.
// Combinational: each vector settles for 1 time unit before it is checked.
module msd_adder_tb;
  import msd_pkg::*;

  localparam int unsigned M = 10, N = 2, W = 8;
  localparam int unsigned VECTORS = 400;

  ddp_digit_t [M-1:0][N-1:0][W-1:0] x, y;
  ddp_digit_t [M-1:0][N-1:0][W:0]   s;
  int checks = 0, failures = 0;
  int case_count [6];  // +2, +1 lower ok, +1 lower not ok, -1 ok, -1 not ok, -2

  msd_adder dut (.x(x), .y(y), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("msd_adder_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode 0: random; 1: all +1; 2: all -1; 3: x all +1, y alternating sign
  task automatic apply_and_check(input int mode);
    int dx [M][N][W];
    int dy [M][N][W];
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++)
        for (int k = 0; k < int'(W); k++) begin
          case (mode)
            1:       begin dx[i][j][k] = 1;  dy[i][j][k] = 1;  end
            2:       begin dx[i][j][k] = -1; dy[i][j][k] = -1; end
            3:       begin dx[i][j][k] = 1;  dy[i][j][k] = (k % 2 == 0) ? -1 : 1; end
            default: begin
              dx[i][j][k] = int'($urandom_range(2)) - 1;
              dy[i][j][k] = int'($urandom_range(2)) - 1;
            end
          endcase
          x[i][j][k] = ddp_encode(dx[i][j][k]);
          y[i][j][k] = ddp_encode(dy[i][j][k]);
        end
    #1;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++) begin
        int vx, vy, vs;
        logic ok;
        vx = 0; vy = 0; vs = 0; ok = 1'b1;
        for (int k = 0; k < int'(W); k++) begin
          int pair;
          logic lower_ok;
          vx += dx[i][j][k] * (1 << k);
          vy += dy[i][j][k] * (1 << k);
          pair = dx[i][j][k] + dy[i][j][k];
          lower_ok = (k == 0) || (dx[i][j][k-1] != -1 && dy[i][j][k-1] != -1);
          if (pair == 2)       case_count[0]++;
          else if (pair == 1)  case_count[lower_ok ? 1 : 2]++;
          else if (pair == -1) case_count[lower_ok ? 3 : 4]++;
          else if (pair == -2) case_count[5]++;
        end
        for (int k = 0; k <= int'(W); k++) begin
          ok &= ddp_valid(s[i][j][k]);
          vs += ddp_decode(s[i][j][k]) * (1 << k);
        end
        checks++;
        if (!ok || vs != vx + vy) begin
          failures++;
          if (failures < 10)
            $display("msd_adder_tb: pixel (%0d,%0d) %0d + %0d gave %0d (planes ok=%0b)",
                     i, j, vx, vy, vs, ok);
        end
      end
  endtask

  initial begin
    apply_and_check(1);
    apply_and_check(2);
    apply_and_check(3);
    for (int v = 0; v < int'(VECTORS); v++) apply_and_check(0);
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (case_count[c] == 0) begin
        failures++;
        $display("msd_adder_tb: transfer/weight case %0d never exercised", c);
      end
    end
    $display("msd_adder_tb: case counts +2:%0d +1ok:%0d +1not:%0d -1ok:%0d -1not:%0d -2:%0d",
             case_count[0], case_count[1], case_count[2], case_count[3], case_count[4],
             case_count[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
