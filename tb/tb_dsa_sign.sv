// tb_dsa_sign: checks DSA signature generation with 512-bit p and 160-bit q.
// For the fixed nonce it compares (r, s) of the three test digests with
// independently computed signatures. For random nonces it checks the
// defining relations with wide-integer arithmetic:
//   r == (g^k mod p) mod q   and   s*k == H + x*r  (mod q).
module tb_dsa_sign;
  import tb_keys_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [511:0] p, g;
  logic [159:0] q, x, k, h, r, s;
  logic err, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dsa_sign dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [159:0] ki, hi);
    k = ki; h = hi;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    logic [511:0] qq, rr, lhs, rhs;
    p = DSA_P; q = DSA_Q; g = DSA_G; x = DSA_X; k = '0; h = '0;
    qq = 512'(DSA_Q);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < NVEC; i++) begin
      run(DSA_K, VEC[i].h);
      checks += 3;
      if (r !== VEC[i].r) begin failures++; $display("FAIL r %0d: %h", i, r); end
      if (s !== VEC[i].s) begin failures++; $display("FAIL s %0d: %h", i, s); end
      if (err)            begin failures++; $display("FAIL err %0d", i); end
    end
    for (int i = 0; i < 2; i++) begin
      logic [159:0] kr, hr;
      kr = 160'(rand_below(qq - 1)) + 160'd1;
      hr = 160'(rand_below({352'd0, 160'hffffffffffffffffffffffffffffffffffffffff}));
      run(kr, hr);
      rr  = ref_modexp(DSA_G, 512'(kr), DSA_P) % {352'd0, DSA_Q};
      lhs = 512'((1024'(s) * 1024'(kr)) % 1024'(qq));
      rhs = 512'((1024'(hr) + 1024'(DSA_X) * 1024'(r)) % 1024'(qq));
      checks += 2;
      if (512'(r) !== rr) begin failures++; $display("FAIL random r %h want %h", r, rr); end
      if (lhs !== rhs)    begin failures++; $display("FAIL random s relation"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
