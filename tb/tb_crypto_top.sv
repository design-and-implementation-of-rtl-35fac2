// tb_crypto_top: end-to-end test of the processor at its default sizes
// (512-bit RSA, 512-bit p, 160-bit q).
//
//   1. sender mode: plaintext 5 -> (C, r, s) compared with independently
//      computed values, digest compared with a reference SHA-1;
//   2. receiver mode via start_r: (C, r, s) -> plaintext 5, valid = 1;
//   3. second test case (plaintext 10) with the receiver started by start
//      in mode 1, after a switch of mode;
//   4. rejection: a signature of another message, and a corrupted
//      ciphertext, must give valid = 0;
//   5. RSA operand check: a plaintext >= n gives err in sender mode;
//   6. overlap: a sender run and a receiver run started in the same cycle.
// Each mechanism is counted and must have happened at least once.
module tb_crypto_top;
  import tb_keys_pkg::*;

  logic clk = 0, reset = 1;
  logic mode = 0, start = 0, start_r = 0;
  logic [511:0] data_in = '0;
  logic [159:0] r_in = '0, s_in = '0;
  logic [511:0] data_out, r_out, s_out;
  logic [159:0] digest;
  logic valid, err, done;
  int checks = 0, failures = 0;
  int n_send = 0, n_recv = 0, n_accept = 0, n_reject = 0, n_mode_switch = 0;
  int n_rsa_err = 0, n_overlap = 0;

  always #5 clk = ~clk;

  crypto_top dut (
    .clk, .reset, .mode, .start, .start_r, .data_in, .r_in, .s_in,
    .rsa_n(RSA_N), .rsa_e(RSA_E), .rsa_d(RSA_D),
    .dsa_p(DSA_P), .dsa_q(DSA_Q), .dsa_g(DSA_G), .dsa_x(DSA_X),
    .dsa_y(DSA_Y), .dsa_k(DSA_K),
    .data_out, .r_out, .s_out, .digest, .valid, .err, .done
  );

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset && start) begin
    if (mode != last_mode) n_mode_switch++;
    last_mode = mode;
  end
  logic last_mode = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse_start(input logic m, input logic use_start_r);
    @(negedge clk);
    mode = m;
    if (use_start_r) start_r = 1; else start = 1;
    @(negedge clk);
    start = 0; start_r = 0;
  endtask

  task automatic wait_done(output int cyc);
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  task automatic send(input int v);
    int cyc;
    data_in = VEC[v].m;
    pulse_start(1'b0, 1'b0);
    wait_done(cyc);
    n_send++;
    $display("sender   test case %0d: %0d cycles", v, cyc);
    chk(data_out === VEC[v].c,       $sformatf("tc%0d ciphertext %h", v, data_out));
    chk(r_out === 512'(VEC[v].r),    $sformatf("tc%0d r %h", v, r_out));
    chk(s_out === 512'(VEC[v].s),    $sformatf("tc%0d s %h", v, s_out));
    chk(digest === VEC[v].h,         $sformatf("tc%0d digest %h", v, digest));
    chk(!err && !valid,              $sformatf("tc%0d err/valid in sender mode", v));
  endtask

  task automatic receive(input logic [511:0] c, input logic [159:0] r, s,
                         input logic [511:0] want_m, input logic want_valid,
                         input logic use_start_r, input string what);
    int cyc;
    data_in = c; r_in = r; s_in = s;
    pulse_start(1'b1, use_start_r);
    wait_done(cyc);
    n_recv++;
    $display("receiver %s: %0d cycles, valid=%0b", what, cyc, valid);
    if (valid) n_accept++; else n_reject++;
    chk(valid === want_valid, $sformatf("%s valid=%0b", what, valid));
    if (want_valid) chk(data_out === want_m, $sformatf("%s plaintext %h", what, data_out));
    chk(r_out === 512'(r) && s_out === 512'(s), $sformatf("%s r/s echo", what));
  endtask

  initial begin
    repeat (4) @(negedge clk);
    reset = 0;

    // test case 1
    send(0);
    receive(VEC[0].c, VEC[0].r, VEC[0].s, VEC[0].m, 1'b1, 1'b1, "test case 1");
    // test case 2, receiver started by start in mode 1
    send(1);
    receive(VEC[1].c, VEC[1].r, VEC[1].s, VEC[1].m, 1'b1, 1'b0, "test case 2");
    // forged and corrupted inputs
    receive(VEC[0].c, VEC[1].r, VEC[1].s, '0, 1'b0, 1'b0, "foreign signature");
    receive(VEC[0].c ^ 512'h100, VEC[0].r, VEC[0].s, '0, 1'b0, 1'b1, "corrupted ciphertext");

    // plaintext out of range
    begin
      int cyc;
      data_in = RSA_N;
      pulse_start(1'b0, 1'b0);
      wait_done(cyc);
      chk(err === 1'b1, "plaintext >= n not flagged");
      if (err) n_rsa_err++;
    end

    // overlapping sender and receiver runs
    begin
      int cyc;
      @(negedge clk);
      mode = 1'b0; data_in = VEC[2].m; start = 1;
      @(negedge clk);
      start = 0; data_in = VEC[1].c; r_in = VEC[1].r; s_in = VEC[1].s; start_r = 1;
      @(negedge clk);
      start_r = 0;
      wait_done(cyc);
      n_send++;
      chk(data_out === VEC[2].c && r_out === 512'(VEC[2].r) && s_out === 512'(VEC[2].s),
          "overlap: sender result");
      @(negedge clk) mode = 1'b1;
      @(negedge clk);
      wait_done(cyc);
      n_recv++;
      chk(valid === 1'b1 && data_out === VEC[1].m, "overlap: receiver result");
      if (valid) begin n_accept++; n_overlap++; end
    end

    $display("mechanisms: send=%0d receive=%0d accept=%0d reject=%0d mode_switch=%0d rsa_err=%0d overlap=%0d",
             n_send, n_recv, n_accept, n_reject, n_mode_switch, n_rsa_err, n_overlap);
    chk(n_send > 0,        "no sender run");
    chk(n_recv > 0,        "no receiver run");
    chk(n_accept > 0,      "no signature accepted");
    chk(n_reject > 0,      "no signature rejected");
    chk(n_mode_switch > 0, "no mode switch");
    chk(n_rsa_err > 0,     "no RSA operand rejection");
    chk(n_overlap > 0,     "no overlapping runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
