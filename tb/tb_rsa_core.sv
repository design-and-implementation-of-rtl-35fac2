// tb_rsa_core: checks the RSA unit used for encryption and decryption.
// It encrypts the three test plaintexts with (e, n) and compares with the
// independently computed ciphertexts, decrypts them with (d, n) back to the
// plaintexts, and checks that an operand >= n and an even modulus are
// rejected with err and an immediate done.
module tb_rsa_core;
  import tb_keys_pkg::*;

  localparam int W = 512;
  logic clk = 0, rst = 1, start = 0;
  logic [W-1:0] data_in, key_exp, key_n, data_out;
  logic err, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_core #(.W(W)) dut (.*);

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] di, ki, ni, output int cyc);
    data_in = di; key_exp = ki; key_n = ni;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    data_in = '0; key_exp = '0; key_n = RSA_N;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < NVEC; i++) begin
      run(VEC[i].m, RSA_E, RSA_N, cyc);
      checks += 2;
      if (data_out !== VEC[i].c) begin failures++; $display("FAIL enc %0d: %h", i, data_out); end
      if (err)                   begin failures++; $display("FAIL enc %0d: err", i); end
      run(VEC[i].c, RSA_D, RSA_N, cyc);
      checks += 2;
      if (data_out !== VEC[i].m) begin failures++; $display("FAIL dec %0d: %h", i, data_out); end
      if (err)                   begin failures++; $display("FAIL dec %0d: err", i); end
    end
    // operand out of range
    run(RSA_N, RSA_E, RSA_N, cyc);
    checks += 2;
    if (!err || data_out !== '0) begin failures++; $display("FAIL range check"); end
    if (cyc > 1)                 begin failures++; $display("FAIL rejection took %0d cycles", cyc); end
    // even modulus
    run(512'd5, RSA_E, RSA_N + 1, cyc);
    checks++;
    if (!err) begin failures++; $display("FAIL even modulus accepted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
