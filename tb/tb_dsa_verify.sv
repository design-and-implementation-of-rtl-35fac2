// tb_dsa_verify: checks DSA signature verification with 512-bit p and
// 160-bit q. The three test signatures must be accepted; the same
// signatures with a changed digest, a changed r or a changed s must be
// rejected, and r = 0, r = q and s = 0 must be rejected by the range check
// within a few cycles.
module tb_dsa_verify;
  import tb_keys_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [511:0] p, g, y;
  logic [159:0] q, h, r, s;
  logic valid, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dsa_verify dut (.*);

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [159:0] hi, ri, si, input logic want,
                     input string what, input int max_cyc = 1000000);
    int cyc;
    h = hi; r = ri; s = si;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (valid !== want) begin failures++; $display("FAIL %s: valid=%0b", what, valid); end
    if (cyc > max_cyc) begin
      checks++; failures++; $display("FAIL %s: took %0d cycles", what, cyc);
    end
  endtask

  initial begin
    p = DSA_P; q = DSA_Q; g = DSA_G; y = DSA_Y; h = '0; r = '0; s = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < NVEC; i++)
      run(VEC[i].h, VEC[i].r, VEC[i].s, 1'b1, $sformatf("good %0d", i));
    run(VEC[0].h ^ 160'd1, VEC[0].r, VEC[0].s, 1'b0, "changed digest");
    run(VEC[1].h, VEC[1].r + 160'd1, VEC[1].s, 1'b0, "changed r");
    run(VEC[2].h, VEC[2].r, VEC[2].s ^ 160'h80, 1'b0, "changed s");
    run(VEC[0].h, VEC[1].r, VEC[1].s, 1'b0, "signature of another message");
    run(VEC[0].h, '0, VEC[0].s, 1'b0, "r = 0", 3);
    run(VEC[0].h, DSA_Q, VEC[0].s, 1'b0, "r = q", 3);
    run(VEC[0].h, VEC[0].r, '0, 1'b0, "s = 0", 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
