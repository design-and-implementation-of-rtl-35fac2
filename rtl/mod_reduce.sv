// mod_reduce: remainder res = x mod n by restoring shift-and-subtract.
//
// One bit of x enters per cycle, most significant first: rem = 2*rem + x_i,
// then rem -= n if rem >= n. After XW cycles rem = x mod n. Used by the DSA
// blocks for "mod q" of a 512-bit value and of the 160-bit digest. n must
// be non-zero (n = 0 returns x's low NW bits, meaningless).
//
// Interface: start pulse captures x and n; done pulses one cycle with res
// valid, res holds until the next start. Timing: done XW cycles after
// start. The document only writes "mod q"; the circuit is this design's.
module mod_reduce #(
  parameter int unsigned XW = 512,
  parameter int unsigned NW = 160
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [XW-1:0] x,
  input  logic [NW-1:0] n,
  output logic [NW-1:0] res,
  output logic          busy,
  output logic          done
);

  localparam int unsigned CW = $clog2(XW + 1);

  logic [XW-1:0] x_sh;
  logic [NW-1:0] n_r, rem;
  logic [CW-1:0] cnt;

  logic [NW:0] rem2;
  always_comb begin
    rem2 = {rem, x_sh[XW-1]};
    if (rem2 >= {1'b0, n_r}) rem2 = rem2 - {1'b0, n_r};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      x_sh <= '0;
      n_r  <= '0;
      rem  <= '0;
      cnt  <= '0;
      res  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        x_sh <= x;
        n_r  <= n;
        rem  <= '0;
        cnt  <= '0;
      end else if (busy) begin
        rem  <= rem2[NW-1:0];
        x_sh <= x_sh << 1;
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(XW - 1)) begin
          res  <= rem2[NW-1:0];
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // handshake rules: a start while busy would be ignored, and done only
  // ends a run that is in progress
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
  a_done_when_idle:     assert property (@(posedge clk) disable iff (rst) done  |-> !busy);

endmodule
