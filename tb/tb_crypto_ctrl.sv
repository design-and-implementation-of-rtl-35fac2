// tb_crypto_ctrl: checks the sender and receiver control FSMs with simple
// engine responders that answer each start pulse with a done pulse after a
// random delay. For every run it checks that the three engines are started
// exactly once each and in the order RSA, SHA-1, DSA, that no engine is
// started before the previous one has finished, that each FSM walks its
// eight states in the documented order, that done rises at the end, stays
// high, and drops at the next start. Sender and receiver runs overlap.
module tb_crypto_ctrl;
  import crypto_pkg::*;

  logic clk = 0, rst = 1;
  logic start_s = 0, start_r = 0;
  logic rsa_enc_done = 0, sha_s_done = 0, sign_done = 0;
  logic rsa_dec_done = 0, sha_r_done = 0, verify_done = 0;
  logic rsa_enc_start, sha_s_start, sign_start, busy_s, done_s;
  logic rsa_dec_start, sha_r_start, verify_start, busy_r, done_r;
  sender_state_t   state_s;
  receiver_state_t state_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  crypto_ctrl dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // engine responders: done pulse 1..20 cycles after a start pulse
  task automatic respond(ref logic st, ref logic dn);
    forever begin
      @(posedge clk);
      if (st && !rst) begin
        repeat ($urandom_range(1, 20)) @(posedge clk);
        #1 dn = 1;
        @(posedge clk);
        #1 dn = 0;
      end
    end
  endtask

  initial respond(rsa_enc_start, rsa_enc_done);
  initial respond(sha_s_start,   sha_s_done);
  initial respond(sign_start,    sign_done);
  initial respond(rsa_dec_start, rsa_dec_done);
  initial respond(sha_r_start,   sha_r_done);
  initial respond(verify_start,  verify_done);

  // record the order of engine starts and of states
  int sq_s[$], sq_r[$];
  sender_state_t   hist_s[$];
  receiver_state_t hist_r[$];
  always @(posedge clk) if (!rst) begin
    if (rsa_enc_start) sq_s.push_back(0);
    if (sha_s_start)   sq_s.push_back(1);
    if (sign_start)    sq_s.push_back(2);
    if (rsa_dec_start) sq_r.push_back(0);
    if (sha_r_start)   sq_r.push_back(1);
    if (verify_start)  sq_r.push_back(2);
    if (hist_s.size() == 0 || hist_s[$] != state_s) hist_s.push_back(state_s);
    if (hist_r.size() == 0 || hist_r[$] != state_r) hist_r.push_back(state_r);
  end

  task automatic check_run(input string side, ref int sq[$], input int nstates,
                           input int got_states[$]);
    checks++;
    if (sq.size() != 3 || sq[0] != 0 || sq[1] != 1 || sq[2] != 2) begin
      failures++;
      $display("FAIL %s engine start order %p", side, sq);
    end
    checks++;
    if (got_states.size() != nstates) begin
      failures++; $display("FAIL %s visited %0d states %p", side, got_states.size(), got_states);
    end else
      for (int i = 0; i < nstates; i++)
        if (got_states[i] != (i + 1) % 8) begin
          failures++; $display("FAIL %s state %0d is %0d", side, i, got_states[i]); break;
        end
  endtask

  initial begin
    int hs[$], hr[$];
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 4; run++) begin
      sq_s.delete(); sq_r.delete(); hist_s.delete(); hist_r.delete();
      @(negedge clk);
      start_s = 1;
      if (run >= 2) start_r = 1;           // runs 2 and 3 start both together
      @(negedge clk);
      start_s = 0; start_r = 0;
      checks++;
      if (done_s) begin failures++; $display("FAIL done_s not cleared by start"); end
      if (run < 2) begin                   // runs 0 and 1 start the receiver late
        repeat ($urandom_range(3, 30)) @(negedge clk);
        start_r = 1; @(negedge clk); start_r = 0;
      end
      while (!(done_s && done_r)) @(negedge clk);
      repeat (5) @(negedge clk);
      checks += 2;
      if (!done_s || !done_r) begin failures++; $display("FAIL done not held"); end
      if (busy_s || busy_r)   begin failures++; $display("FAIL busy after done"); end
      hs.delete(); hr.delete();
      foreach (hist_s[i]) hs.push_back(int'(hist_s[i]));
      foreach (hist_r[i]) hr.push_back(int'(hist_r[i]));
      // the recorded history starts in the state after IDLE and ends in IDLE
      void'(hs.pop_front()); void'(hr.pop_front());
      check_run("sender",   sq_s, 8, hs);
      check_run("receiver", sq_r, 8, hr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
