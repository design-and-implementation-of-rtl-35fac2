// rsa_core: RSA encryption / decryption unit, out = in^key mod n.
//
// The same circuit serves as the sender's encryption module
// (C = M^e mod n, public key (e, n)) and as the receiver's decryption
// module (M = C^d mod n, private key (d, n)); only the key applied to it
// differs. It checks that the operand is usable (n odd and greater than 1,
// in < n), runs mod_exp on one Montgomery multiplier and registers the
// result.
//
// Interface: start is a one-cycle pulse; data_in, key_exp and key_n are
// captured then. done pulses for one cycle; data_out and err are valid from
// then until the next start. err = 1 means the operand was rejected and
// data_out is 0.
// Timing: set by mod_exp; with W = 512, e = 65537 takes about 10 k cycles,
// a full 512-bit d about 0.4 M cycles.
//
// RSA's formulas and the use of Montgomery arithmetic follow the document;
// the operand check and the error flag are this design's additions.
module rsa_core #(
  parameter int unsigned W = crypto_pkg::RSA_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] data_in,
  input  logic [W-1:0] key_exp,
  input  logic [W-1:0] key_n,
  output logic [W-1:0] data_out,
  output logic         err,
  output logic         busy,
  output logic         done
);

  logic         ok;
  logic         x_start, x_busy, x_done;
  logic [W-1:0] x_res;

  assign ok      = key_n[0] && (key_n > W'(1)) && (data_in < key_n);
  assign x_start = start && !busy && ok;

  mod_exp #(.W(W), .EW(W)) u_exp (
    .clk, .rst,
    .start(x_start), .base(data_in), .exp(key_exp), .n(key_n),
    .res(x_res), .busy(x_busy), .done(x_done)
  );

  logic running;
  assign busy = running;

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      done     <= 1'b0;
      err      <= 1'b0;
      data_out <= '0;
    end else begin
      done <= 1'b0;
      if (start && !running) begin
        if (ok) begin
          running <= 1'b1;
          err     <= 1'b0;
        end else begin
          err      <= 1'b1;
          data_out <= '0;
          done     <= 1'b1;
        end
      end else if (running && x_done) begin
        running  <= 1'b0;
        data_out <= x_res;
        done     <= 1'b1;
      end
    end
  end

  // handshake rules: a start while busy would be ignored, and done only
  // ends a run that is in progress
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
  a_done_when_idle:     assert property (@(posedge clk) disable iff (rst) done  |-> !busy);

  // the exponentiator only runs inside an accepted operation
  a_exp_owned: assert property (@(posedge clk) disable iff (rst) x_busy |-> running);

endmodule
