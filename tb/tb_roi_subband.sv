// tb_roi_subband: sends random (row, column, LEVEL) triples for a 64 x 32
// tile and compares the subband numbers with a map painted here rectangle
// by rectangle (for each level d: the right band, the lower band and the
// diagonal band of the top-left (W>>(d-1)) x (H>>(d-1)) area). Random
// back-pressure checks that no result is lost or repeated, and a burst with
// ready held high checks one result per cycle after one cycle of latency.
module tb_roi_subband;
  import roi_pkg::*;
  localparam int TW = 64, TH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic       vin, rdy_out, vout, rdy_in;
  logic [4:0] row;
  logic [5:0] col;
  logic [2:0] lev;
  subband_t   sb;

  roi_subband #(.TILE_W(TW), .TILE_H(TH)) dut (.clk(clk), .rst_n(rst_n), .valid_in(vin),
    .ready_out(rdy_out), .row_in(row), .column_in(col), .level_in(lev), .valid_out(vout),
    .ready_in(rdy_in), .subband_out(sb));

  int unsigned map [5][TH][TW];
  int exp_q[$];
  int seen [16];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int l = 0; l < 5; l++) begin
      automatic int L = l + 1;
      for (int r = 0; r < TH; r++) for (int c = 0; c < TW; c++) map[l][r][c] = 0;
      for (int d = 1; d <= L; d++)
        for (int r = 0; r < (TH >> (d - 1)); r++)
          for (int c = 0; c < (TW >> (d - 1)); c++) begin
            automatic bit rh = r >= (TH >> d);
            automatic bit ch = c >= (TW >> d);
            if (rh && ch) map[l][r][c] = 3 * (L - d) + 3;
            else if (ch)  map[l][r][c] = 3 * (L - d) + 1;
            else if (rh)  map[l][r][c] = 3 * (L - d) + 2;
          end
    end
  end

  initial begin
    vin = 0; rdy_in = 0; row = 0; col = 0; lev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      vin = ($urandom % 4 != 0);
      rdy_in = (n > 5000) ? 1'b1 : ($urandom % 3 != 0);
      if (n > 5000) vin = 1;
      row = 5'($urandom); col = 6'($urandom); lev = 3'($urandom % 5);
      @(posedge clk);
      if (vin && rdy_out) exp_q.push_back(int'(map[lev][row][col]));
    end
    @(negedge clk); vin = 0; rdy_in = 1;
    repeat (3) @(posedge clk);
    check(exp_q.size() == 0, "all results delivered");
    check(streak > 900, "full throughput burst");
    for (int i = 0; i < 16; i++) check(seen[i] > 0, $sformatf("subband %0d produced", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one result per cycle when both sides are always ready
  int streak = 0;
  always @(posedge clk) begin
    if (rst_n && vout && rdy_in) begin
      if (exp_q.size() == 0) check(0, "unexpected result");
      else begin
        automatic int e = exp_q.pop_front();
        check(int'(sb) == e, $sformatf("subband %0d exp %0d", sb, e));
        seen[e]++;
      end
    end
    if (rst_n && vin && rdy_in && vout) streak++;
  end


  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
