// tb_mont_mul: checks the Montgomery multiplier at W = 512 with the RSA test
// modulus. For random a, b < n it checks res < n and
// res * 2^512 mod n == a * b mod n, and that done comes W + 1 cycles after
// start.
module tb_mont_mul;
  import tb_keys_pkg::*;

  localparam int W = 512;
  logic clk = 0, rst = 1, start = 0;
  logic [W-1:0] a, b, n, res;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mont_mul #(.W(W)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [W-1:0] ai, input logic [W-1:0] bi);
    logic [1023:0] lhs, rhs;
    int cyc;
    a = ai; b = bi;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;  // posedges after the one that sampled start
    while (!done) begin @(negedge clk); cyc++; end
    lhs = ({512'd0, res} << W) % {512'd0, n};
    rhs = ({512'd0, ai} * {512'd0, bi}) % {512'd0, n};
    checks += 3;
    if (lhs != rhs) begin failures++; $display("FAIL value a=%h b=%h res=%h", ai, bi, res); end
    if (res >= n)   begin failures++; $display("FAIL not reduced res=%h", res); end
    if (cyc != W + 1) begin failures++; $display("FAIL latency %0d, expected %0d", cyc, W + 1); end
  endtask

  initial begin
    n = RSA_N;
    a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run_one('0, RSA_N - 1);
    run_one(RSA_N - 1, RSA_N - 1);
    run_one(512'd1, 512'd1);
    for (int i = 0; i < 40; i++) run_one(rand_below(RSA_N), rand_below(RSA_N));
    // a second modulus: the DSA prime p
    n = DSA_P;
    for (int i = 0; i < 20; i++) run_one(rand_below(DSA_P), rand_below(DSA_P));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
