// tb_sp_mask_level: self-checking test of one S+P mask level. Three
// configurations run side by side: a row of several packed words (64 wide,
// 16-pixel words), a row of exactly one word, and a narrow 8x8 band as seen
// at deep levels. Each runs two tiles back to back with random input gaps
// and random output back-pressure; every output position is compared with
// the windows computed from the mask. The test also requires that the input
// stall (RAM word still needed) was exercised.
module tb_sp_mask_level;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d0, d1, d2;
  int   c0, c1, c2, f0, f1, f2, s0, s1, s2;
  int   checks, failures;

  sp_level_harness #(.W(64), .H(20), .PACK(16), .TILES(2), .SEED(3)) h0 (
    .clk(clk), .rst_n(rst_n), .done(d0), .checks(c0), .failures(f0), .in_stalls(s0));
  sp_level_harness #(.W(32), .H(12), .PACK(32), .TILES(2), .SEED(7)) h1 (
    .clk(clk), .rst_n(rst_n), .done(d1), .checks(c1), .failures(f1), .in_stalls(s1));
  sp_level_harness #(.W(8), .H(8), .PACK(32), .TILES(3), .SEED(11)) h2 (
    .clk(clk), .rst_n(rst_n), .done(d2), .checks(c2), .failures(f2), .in_stalls(s2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    wait (d0 && d1 && d2);
    repeat (5) @(posedge clk);
    checks   = c0 + c1 + c2 + 1;
    failures = f0 + f1 + f2;
    $display("input stalls: %0d %0d %0d", s0, s1, s2);
    if (s0 + s1 + s2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: outputs seen %0d %0d %0d", c0, c1, c2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
