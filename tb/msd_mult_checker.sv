// msd_mult_checker: test harness for one msd_multiplier configuration.
//
// Instantiates msd_multiplier with the given M, N, ND, shares the caller's
// clock, and after start is raised applies PAIRS random operand pairs back
// to back (random redundant MSD digit strings). Each product must appear one
// clock after its operands, as a valid 2*ND-1+ceil(log2 ND)-digit DDP number
// equal to the integer product. Results are reported on checks/failures and
// done goes high when the run is over; guard counts products whose top
// (guard) digit is non-zero.
module msd_mult_checker
  import msd_pkg::*;
#(
  parameter int unsigned M     = 2,
  parameter int unsigned N     = 2,
  parameter int unsigned ND    = 3,
  parameter int unsigned PAIRS = 200
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   guard
);

  localparam int unsigned WZ = (ND > 1) ? 2 * ND - 1 + $clog2(ND) : 1;

  logic rst_n, in_valid, out_valid;
  ddp_digit_t [M-1:0][N-1:0][ND-1:0] a, b;
  ddp_digit_t [M-1:0][N-1:0][WZ-1:0] z;
  longint expected [M][N];

  msd_multiplier #(.M(M), .N(N), .ND(ND)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .z(z)
  );

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    guard = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    a = '0;
    b = '0;
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++)
        for (int d = 0; d < int'(ND); d++) begin
          a[i][j][d] = DDP_ZERO;
          b[i][j][d] = DDP_ZERO;
        end
    wait (start);
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < int'(PAIRS); v++) begin
      for (int i = 0; i < int'(M); i++)
        for (int j = 0; j < int'(N); j++) begin
          longint va, vb;
          va = 0; vb = 0;
          for (int d = 0; d < int'(ND); d++) begin
            int da, db;
            da = int'($urandom_range(2)) - 1;
            db = int'($urandom_range(2)) - 1;
            a[i][j][d] = ddp_encode(da);
            b[i][j][d] = ddp_encode(db);
            va += longint'(da) <<< d;
            vb += longint'(db) <<< d;
          end
          expected[i][j] = va * vb;
        end
      in_valid = 1'b1;
      @(negedge clk);
      checks++;
      if (!out_valid) begin
        failures++;
        $display("msd_mult_checker ND=%0d: out_valid low one clock after in_valid", ND);
      end
      for (int i = 0; i < int'(M); i++)
        for (int j = 0; j < int'(N); j++) begin
          longint got;
          logic ok;
          got = 0; ok = 1'b1;
          for (int d = 0; d < int'(WZ); d++) begin
            ok &= ddp_valid(z[i][j][d]);
            got += longint'(ddp_decode(z[i][j][d])) <<< d;
          end
          if (ND > 1 && !z[i][j][WZ-1].z0) guard++;  // top result digit used
          checks++;
          if (!ok || got != expected[i][j]) begin
            failures++;
            if (failures < 10)
              $display("msd_mult_checker ND=%0d: pixel (%0d,%0d) gave %0d (planes ok=%0b), expected %0d",
                       ND, i, j, got, ok, expected[i][j]);
          end
        end
    end
    in_valid = 1'b0;
    done = 1'b1;
  end

endmodule
