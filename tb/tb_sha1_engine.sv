// tb_sha1_engine: checks the SHA-1 engine against published and
// independently computed digests:
//   * "abc" (24-bit message, one block), FIPS 180 example;
//   * bytes 0x00..0x37 (448 bits, padding spills into a second block);
//   * the 512-bit test plaintexts (two blocks), as used by the processor.
// It also checks the latency of NBLK * 82 cycles.
module tb_sha1_engine;
  import tb_keys_pkg::*;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // 24-bit instance
  logic         st0 = 0, busy0, done0;
  logic [23:0]  msg0;
  logic [159:0] dig0;
  sha1_engine #(.MSG_BITS(24)) dut0 (.clk, .rst, .start(st0), .msg(msg0),
                                     .digest(dig0), .busy(busy0), .done(done0));
  // 448-bit instance
  logic         st1 = 0, busy1, done1;
  logic [447:0] msg1;
  logic [159:0] dig1;
  sha1_engine #(.MSG_BITS(448)) dut1 (.clk, .rst, .start(st1), .msg(msg1),
                                      .digest(dig1), .busy(busy1), .done(done1));
  // default (512-bit) instance
  logic         st2 = 0, busy2, done2;
  logic [511:0] msg2;
  logic [159:0] dig2;
  sha1_engine dut2 (.clk, .rst, .start(st2), .msg(msg2),
                    .digest(dig2), .busy(busy2), .done(done2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [159:0] got, want,
                           input int cyc, input int want_cyc);
    checks += 2;
    if (got !== want) begin failures++; $display("FAIL %s: %h want %h", what, got, want); end
    if (cyc != want_cyc) begin failures++; $display("FAIL %s latency %0d want %0d", what, cyc, want_cyc); end
  endtask

  initial begin
    int cyc;
    msg0 = "abc";
    for (int i = 0; i < 56; i++) msg1[447 - 8*i -: 8] = 8'(i);
    msg2 = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    @(negedge clk) st0 = 1;
    @(negedge clk) st0 = 0;
    cyc = 0;
    while (!done0) begin @(negedge clk); cyc++; end
    expect_eq("abc", dig0, 160'ha9993e364706816aba3e25717850c26c9cd0d89d, cyc, 82);

    @(negedge clk) st1 = 1;
    @(negedge clk) st1 = 0;
    cyc = 0;
    while (!done1) begin @(negedge clk); cyc++; end
    expect_eq("448-bit", dig1, 160'h636e2ec698dac903498e648bd2f3af641d3c88cb, cyc, 164);

    for (int v = 0; v < NVEC; v++) begin
      msg2 = VEC[v].m;
      @(negedge clk) st2 = 1;
      @(negedge clk) st2 = 0;
      cyc = 0;
      while (!done2) begin @(negedge clk); cyc++; end
      expect_eq($sformatf("vector %0d", v), dig2, VEC[v].h, cyc, 164);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
