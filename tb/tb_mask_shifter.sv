// tb_mask_shifter: checks the bit packer. A 16-bit instance gets the timing
// example 1110 1110 1111 0111 and must produce 16'hEEF7 on the clock edge
// after the last bit. A 32-bit instance gets random words with random idle
// cycles between bits; each packed word must equal the bits in arrival
// order (first bit in the MSB) and appear exactly one cycle after its last
// bit, with valid_out high for one cycle only.
module tb_mask_shifter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        v16, d16, vo16;
  logic [15:0] q16;
  logic        v32, d32, vo32;
  logic [31:0] q32;

  mask_shifter #(.PACK(16)) dut16 (.clk(clk), .rst_n(rst_n), .valid_in(v16), .data_in(d16),
                                   .valid_out(vo16), .data_out(q16));
  mask_shifter #(.PACK(32)) dut32 (.clk(clk), .rst_n(rst_n), .valid_in(v32), .data_in(d32),
                                   .valid_out(vo32), .data_out(q32));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit [15:0] seq = 16'b1110_1110_1111_0111;
    v16 = 0; d16 = 0; v32 = 0; d32 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // document timing example
    for (int i = 15; i >= 0; i--) begin
      v16 = 1; d16 = seq[i];
      @(posedge clk); #1;
      check(vo16 == (i == 0), "16-bit valid_out timing");
      @(negedge clk);
    end
    v16 = 0;
    check(q16 == 16'hEEF7, $sformatf("16-bit word %h", q16));
    @(posedge clk); #1;
    check(!vo16, "valid_out one cycle only");
    // random words with gaps
    for (int w = 0; w < 40; w++) begin
      bit [31:0] word = $urandom;
      for (int i = 31; i >= 0; i--) begin
        @(negedge clk);
        while ($urandom % 3 == 0) begin
          v32 = 0;
          @(posedge clk); #1;
          check(!vo32, "no output during gap");
          @(negedge clk);
        end
        v32 = 1; d32 = word[i];
        @(posedge clk); #1;
        check(vo32 == (i == 0), "32-bit valid_out timing");
        if (i == 0) check(q32 == word, $sformatf("32-bit word %h exp %h", q32, word));
      end
      @(negedge clk);
      v32 = 0;
    end
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
