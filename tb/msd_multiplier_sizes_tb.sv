// msd_multiplier_sizes_tb: the MSD array multiplier at other operand lengths.
//
// Runs msd_mult_checker on multipliers with 3, 5 and 8 digits per operand
// (small 2 x 2 and 2 x 3 arrays). 3 and 5 channels give trees with an odd
// operand count at some level (one array passes a level unadded); 8 channels
// give a three-level tree. All products must be exact and appear one clock
// after their operands, in 2*ND-1+ceil(log2 ND) result digits. How often the
// top result digit is non-zero is reported for information: the width is a
// safe bound that is exact only when ND is a power of two.
module msd_multiplier_sizes_tb;

  logic clk = 1'b0;
  logic start = 1'b0;
  logic done3, done5, done8;
  int checks3, checks5, checks8, fail3, fail5, fail8, guard3, guard5, guard8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  msd_mult_checker #(.M(2), .N(2), .ND(3), .PAIRS(300)) u_nd3 (
    .clk(clk), .start(start), .done(done3), .checks(checks3), .failures(fail3), .guard(guard3));
  msd_mult_checker #(.M(2), .N(3), .ND(5), .PAIRS(300)) u_nd5 (
    .clk(clk), .start(start), .done(done5), .checks(checks5), .failures(fail5), .guard(guard5));
  msd_mult_checker #(.M(2), .N(2), .ND(8), .PAIRS(300)) u_nd8 (
    .clk(clk), .start(start), .done(done8), .checks(checks8), .failures(fail8), .guard(guard8));

  initial begin
    repeat (5000) @(posedge clk);
    $display("msd_multiplier_sizes_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks3 + checks5 + checks8,
             failures + fail3 + fail5 + fail8 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    start = 1'b1;
    wait (done3 && done5 && done8);
    $display("msd_multiplier_sizes_tb: top digit used ND=3:%0d ND=5:%0d ND=8:%0d", guard3, guard5, guard8);
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks3 + checks5 + checks8,
             failures + fail3 + fail5 + fail8);
    $finish;
  end

endmodule
