// tb_roi_decode: mask store and tagger for a 32 x 16 tile with 2 levels
// (7 subbands of 32 or 128 mask bits). Random mask bits are pushed through
// the generator-side channels (three bands per level channel, plus LL);
// coefficients with a shuffled sequence of subband numbers (each subband
// used as often as it has bits) go in on the read side. Each output word
// must be {next mask bit of that subband, coefficient}. The mask side starts
// late so coefficients must wait for their mask (mask_wait), and the output
// sees random back-pressure. Two tiles run back to back.
module tb_roi_decode;
  import roi_pkg::*;
  localparam int TW = 32, TH = 16, L = 2, DW = 32, NSB = 3 * L + 1, TILES = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [L-1:0]  bv, br, lh, hl, hh;
  logic          llv, llr, llb;
  logic          sv, sr;
  subband_t      sbn;
  logic          cv, cr;
  logic [DW-2:0] coef;
  logic          ov, ordy, mwait;
  logic [DW-1:0] odata;

  roi_decode #(.TILE_W(TW), .TILE_H(TH), .LEVELS(L), .DW(DW)) dut (
    .clk(clk), .rst_n(rst_n),
    .band_valid(bv), .band_ready(br), .lm_hm_in(lh), .hm_lm_in(hl), .hm_hm_in(hh),
    .ll_valid(llv), .ll_ready(llr), .ll_in(llb),
    .valid_subband_in(sv), .ready_subband_out(sr), .subband_in(sbn),
    .valid_coef_in(cv), .ready_coef_out(cr), .coef_in(coef),
    .valid_out(ov), .ready_in(ordy), .data_out(odata), .mask_wait(mwait));

  function automatic int bits_of(int i);
    return int'(subband_bits(TW, TH, L, i));
  endfunction

  bit mq [NSB][$];        // mask bits per subband, in generation order
  int order [$];          // subband of every coefficient
  logic [DW-1:0] exp_q [$];
  int wait_cycles = 0, outs = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    // mask bits and coefficient order for all tiles
    for (int t = 0; t < TILES; t++) begin
      int tile_order [$];
      tile_order.delete();
      for (int i = 0; i < NSB; i++) begin
        for (int b = 0; b < bits_of(i); b++) begin
          mq[i].push_back(1'($urandom % 3 == 0));
          tile_order.push_back(i);
        end
      end
      tile_order.shuffle();
      foreach (tile_order[j]) order.push_back(tile_order[j]);
    end
  end

  // generator side: per level channel and LL channel, start after 300 cycles
  int ch_idx [L+1];
  initial begin
    bv = '0; lh = '0; hl = '0; hh = '0; llv = 0; llb = 0;
    for (int k = 0; k <= L; k++) ch_idx[k] = 0;
    repeat (300) @(posedge clk);
    forever begin
      @(negedge clk);
      for (int k = 0; k < L; k++) begin
        automatic int base = 3 * (L - 1 - k) + 1;
        automatic int n = bits_of(base) * TILES;
        bv[k] = (ch_idx[k] < n) && ($urandom % 2 == 0);
        if (ch_idx[k] < n) begin
          hl[k] = mq[base][ch_idx[k]];
          lh[k] = mq[base + 1][ch_idx[k]];
          hh[k] = mq[base + 2][ch_idx[k]];
        end
      end
      llv = (ch_idx[L] < bits_of(0) * TILES) && ($urandom % 2 == 0);
      if (ch_idx[L] < bits_of(0) * TILES) llb = mq[0][ch_idx[L]];
      @(posedge clk);
      for (int k = 0; k < L; k++) if (bv[k] && br[k]) ch_idx[k]++;
      if (llv && llr) ch_idx[L]++;
    end
  end

  // coefficient side
  int ci = 0;
  logic [DW-2:0] coef_next = '0;
  int used [NSB];
  initial begin
    sv = 0; cv = 0; sbn = '0; coef = '0; ordy = 0;
    for (int i = 0; i < NSB; i++) used[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (ci < order.size()) begin
      @(negedge clk);
      sv = 1; cv = 1;
      sbn = subband_t'(order[ci]);
      coef = coef_next;
      ordy = ($urandom % 4 != 0);
      #1;
      if (mwait) wait_cycles++;
      @(posedge clk);
      if (sr && cr) begin
        exp_q.push_back({mq[order[ci]][used[order[ci]]], coef});
        used[order[ci]]++;
        ci++;
        coef_next = (DW-1)'($urandom);
      end
    end
    @(negedge clk); sv = 0; cv = 0; ordy = 1;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all coefficients delivered");
    check(outs == order.size(), "output count");
    check(wait_cycles > 0, "coefficients waited for mask");
    $display("mask wait cycles: %0d", wait_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ov && ordy) begin
      outs++;
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        automatic logic [DW-1:0] e = exp_q.pop_front();
        check(odata == e, $sformatf("out %h exp %h", odata, e));
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired at coefficient %0d (subband %0d, used %0d) gen %0d %0d %0d", ci, order[ci], used[order[ci]], ch_idx[0], ch_idx[1], ch_idx[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
