// tb_mod_arith: checks the two DSA helper engines directly against
// wide-integer '%' arithmetic:
//   mod_mul    (W = 160): a*b mod q for random a, b < q, plus 0 and q-1;
//   mod_reduce (512 -> 160 bits): x mod q for random 512-bit x, x < q and
//              x = q, and the latency of XW cycles.
module tb_mod_arith;
  import tb_keys_pkg::*;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic         mm_start = 0, mm_busy, mm_done;
  logic [159:0] mm_a, mm_b, mm_n, mm_res;
  mod_mul #(.W(160)) u_mm (.clk, .rst, .start(mm_start), .a(mm_a), .b(mm_b), .n(mm_n),
                           .res(mm_res), .busy(mm_busy), .done(mm_done));

  logic         rd_start = 0, rd_busy, rd_done;
  logic [511:0] rd_x;
  logic [159:0] rd_n, rd_res;
  mod_reduce #(.XW(512), .NW(160)) u_rd (.clk, .rst, .start(rd_start), .x(rd_x), .n(rd_n),
                                         .res(rd_res), .busy(rd_busy), .done(rd_done));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mul(input logic [159:0] a, b);
    logic [319:0] want;
    mm_a = a; mm_b = b;
    @(negedge clk) mm_start = 1;
    @(negedge clk) mm_start = 0;
    while (!mm_done) @(negedge clk);
    want = (320'(a) * 320'(b)) % 320'(DSA_Q);
    checks++;
    if (320'(mm_res) !== want) begin failures++; $display("FAIL mul %h*%h = %h", a, b, mm_res); end
  endtask

  task automatic red(input logic [511:0] x);
    int cyc;
    rd_x = x;
    @(negedge clk) rd_start = 1;
    @(negedge clk) rd_start = 0;
    cyc = 0;
    while (!rd_done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (512'(rd_res) !== x % 512'(DSA_Q)) begin failures++; $display("FAIL reduce %h -> %h", x, rd_res); end
    if (cyc != 512) begin failures++; $display("FAIL reduce latency %0d", cyc); end
  endtask

  initial begin
    mm_n = DSA_Q; rd_n = DSA_Q; mm_a = '0; mm_b = '0; rd_x = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    mul('0, DSA_Q - 1);
    mul(DSA_Q - 1, DSA_Q - 1);
    for (int i = 0; i < 20; i++)
      mul(160'(rand_below(512'(DSA_Q))), 160'(rand_below(512'(DSA_Q))));
    red(512'(DSA_Q) - 1);
    red(512'(DSA_Q));
    red(DSA_P - 1);
    for (int i = 0; i < 10; i++) red(rand_below(DSA_P));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
