// tb_shift_up_background: random tagged coefficients, every shift amount
// 0..31 and random output back-pressure. The expected word is computed here
// from integer arithmetic: ROI words give the sign-extended coefficient,
// background words give floor(coefficient / 2^shift). Also checks the one
// cycle latency of the register stage and that a stalled output holds.
module tb_shift_up_background;
  localparam int DW = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [4:0]    shift;
  logic          vin, rdy_out, vout, rdy_in;
  logic [DW-1:0] din, dout;

  shift_up_background dut (.clk(clk), .rst_n(rst_n), .maxshift_config_in(shift),
                           .valid_in(vin), .ready_out(rdy_out), .data_in(din),
                           .valid_out(vout), .ready_in(rdy_in), .data_out(dout));

  // reference: sign-extend the 31-bit coefficient and divide, rounding down
  function automatic logic [DW-1:0] expect_word(logic [DW-1:0] w, int sh);
    longint c;
    c = longint'($signed(w[DW-2:0]));
    if (w[DW-1]) return DW'(c);
    for (int i = 0; i < sh; i++) c = (c - (c & 1)) / 2;
    return DW'(c);
  endfunction

  logic [DW-1:0] q[$];
  int sent = 0, got = 0, roi_cnt = 0, bg_cnt = 0;
  int prev_dout_held = 0;

  initial begin
    vin = 0; din = 0; rdy_in = 0; shift = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: one word, ready_in high
    @(negedge clk);
    din = {1'b0, 31'h2000_0010}; shift = 5'd4; vin = 1; rdy_in = 1;
    q.push_back(expect_word(din, 4));
    @(posedge clk); #1;
    vin = 0;
    check(vout && dout == 32'h0200_0001, "one-cycle latency");
    @(negedge clk);
    // random stream
    while (sent < 3000) begin
      vin = ($urandom % 4 != 0);
      rdy_in = ($urandom % 3 != 0);
      din = $urandom;
      if ($urandom % 5 == 0) din[DW-2:0] = {DW-1{din[DW-2]}};  // -1 and 0 corner
      shift = 5'(sent % 32);
      @(posedge clk);
      if (vin && rdy_out) begin
        q.push_back(expect_word(din, sent % 32));
        if (din[DW-1]) roi_cnt++; else bg_cnt++;
        sent++;
      end
      if (vout && rdy_in) begin
        got++;
      end
      @(negedge clk);
    end
    vin = 0; rdy_in = 1;
    repeat (3) @(posedge clk);
    check(roi_cnt > 100 && bg_cnt > 100, "both ROI and background words seen");
    check(q.size() == 0, "all words came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && vout && rdy_in && checks > 0) begin
      if (q.size() == 0) check(0, "unexpected output");
      else begin
        automatic logic [DW-1:0] e = q.pop_front();
        check(dout == e, $sformatf("data %h exp %h", dout, e));
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
