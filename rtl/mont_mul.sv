// mont_mul: bit-serial radix-2 Montgomery multiplier.
//
// Computes res = a * b * 2^-W mod n for an odd modulus n and operands
// a, b < n (R = 2^W). Each cycle consumes one bit of a, least significant
// first: S <= (S + a_i*b + q_i*n) / 2 with q_i chosen so that the sum is
// even. After W steps S < 2n and one conditional subtraction of n gives the
// reduced result, so no division is ever performed. The accumulator is W+2
// bits wide.
//
// Interface: pulse start for one cycle with a, b and n valid (they are
// captured). busy is high while working; done pulses for one cycle when res
// is valid, and res holds until the next start.
// Timing: done rises W+1 cycles after the cycle in which start was seen.
//
// The document names Montgomery multiplication and its formula; the
// radix-2, one-bit-per-cycle organisation is this design's choice.
module mont_mul #(
  parameter int unsigned W = 512
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic [W-1:0] res,
  output logic         busy,
  output logic         done
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  a_sh, b_r, n_r;
  logic [W+1:0]  acc;
  logic [CW-1:0] cnt;
  logic          fin;

  logic [W+1:0] sum_ab, sum_abn;
  always_comb begin
    sum_ab  = acc + (a_sh[0] ? {2'b00, b_r} : '0);
    sum_abn = sum_ab + (sum_ab[0] ? {2'b00, n_r} : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      fin  <= 1'b0;
      cnt  <= '0;
      acc  <= '0;
      a_sh <= '0;
      b_r  <= '0;
      n_r  <= '0;
      res  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        fin  <= 1'b0;
        a_sh <= a;
        b_r  <= b;
        n_r  <= n;
        acc  <= '0;
        cnt  <= '0;
      end else if (busy && !fin) begin
        acc  <= sum_abn >> 1;
        a_sh <= a_sh >> 1;
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(W - 1)) fin <= 1'b1;
      end else if (busy && fin) begin
        res  <= (acc >= {2'b00, n_r}) ? W'(acc - {2'b00, n_r}) : acc[W-1:0];
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // handshake rules: a start while busy would be ignored, and done only
  // ends a run that is in progress
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
  a_done_when_idle:     assert property (@(posedge clk) disable iff (rst) done  |-> !busy);

endmodule
