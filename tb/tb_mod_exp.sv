// tb_mod_exp: checks Montgomery modular exponentiation at W = EW = 512
// against a plain square-and-multiply reference that uses wide-integer
// division: the RSA key pair (encrypt with e, decrypt with d, recover the
// message), the corner exponents 0 and 1, and random bases and exponents
// modulo the RSA modulus and the DSA prime p.
module tb_mod_exp;
  import tb_keys_pkg::*;

  localparam int W = 512;
  logic clk = 0, rst = 1, start = 0;
  logic [W-1:0] base, exp, n, res;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_exp #(.W(W), .EW(W)) dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] bi, ei, ni, output logic [W-1:0] ro);
    base = bi; exp = ei; n = ni;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    ro = res;
  endtask

  task automatic check(input logic [W-1:0] bi, ei, ni);
    logic [W-1:0] got, want;
    run(bi, ei, ni, got);
    want = ref_modexp(bi, ei, ni);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %h^%h mod %h: got %h want %h", bi, ei, ni, got, want);
    end
  endtask

  initial begin
    logic [W-1:0] c, m;
    base = '0; exp = '0; n = RSA_N;
    repeat (3) @(negedge clk);
    rst = 0;
    // RSA round trip on the document's sample plaintext 5
    run(512'd5, RSA_E, RSA_N, c);
    checks++;
    if (c !== VEC[0].c) begin failures++; $display("FAIL ciphertext %h", c); end
    run(c, RSA_D, RSA_N, m);
    checks++;
    if (m !== 512'd5) begin failures++; $display("FAIL decrypted %h", m); end
    // corner cases
    check(512'd12345, 512'd0, RSA_N);
    check(512'd12345, 512'd1, RSA_N);
    check(RSA_N - 1, 512'd2, RSA_N);
    check('0, 512'd7, RSA_N);
    // random
    for (int i = 0; i < 3; i++) check(rand_below(RSA_N), rand_below(RSA_N), RSA_N);
    for (int i = 0; i < 3; i++) check(rand_below(DSA_P), 512'(DSA_Q) - 1, DSA_P);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
