// tb_sync_fifo: random writes and reads against a queue model on a FIFO of
// non-power-of-two depth (5). Checks data order, the full flag (wr_ready low
// only when full and not being read), the fill level, and that full and
// empty were both reached.
module tb_sync_fifo;
  localparam int W = 8, D = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, full_seen = 0, empty_seen = 0;

  logic         wv, wr, rv, rr;
  logic [W-1:0] wd, rd;
  logic [2:0]   lvl;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .wr_valid(wv), .wr_ready(wr),
                                         .wr_data(wd), .rd_valid(rv), .rd_ready(rr), .rd_data(rd),
                                         .level(lvl));
  logic [W-1:0] q[$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    wv = 0; rr = 0; wd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // phases: fill-biased, drain-biased, mixed
      case ((cyc / 200) % 3)
        0: begin wv = ($urandom % 4 != 0); rr = ($urandom % 4 == 0); end
        1: begin wv = ($urandom % 4 == 0); rr = ($urandom % 4 != 0); end
        default: begin wv = $urandom % 2; rr = $urandom % 2; end
      endcase
      wd = W'($urandom);
      #1;
      check(lvl == 3'(q.size()), $sformatf("level %0d exp %0d", lvl, q.size()));
      check(rv == (q.size() != 0), "rd_valid");
      check(wr == (q.size() < D || rr), "wr_ready");
      if (rv) check(rd == q[0], $sformatf("data %h exp %h", rd, q[0]));
      if (q.size() == D) full_seen++;
      if (q.size() == 0) empty_seen++;
      @(posedge clk);
      if (rv && rr) void'(q.pop_front());
      if (wv && wr) q.push_back(wd);
    end
    check(full_seen > 0 && empty_seen > 0, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
