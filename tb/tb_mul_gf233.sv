// tb_mul_gf233: self-checking test of the serial GF(2^233) multiplier.
// Corner cases and random operand pairs are compared with a full carry-less
// product reduced modulo f(x); each operation must take exactly 233 cycles
// from the start edge to the done pulse, and done must pulse once.
module tb_mul_gf233;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  gf_t  a = '0, b = '0, result;
  logic done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mul_gf233 dut (.clk, .rst_n, .start, .a, .b, .result, .done);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input gf_t ta, input gf_t tb_);
    int cyc;
    gf_t exp;
    @(negedge clk);
    a = ta; b = tb_; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = rand_gf(); b = rand_gf();   // operands need only be valid at start
    cyc = 0;   // edges counted from the start edge
    while (!done) begin @(negedge clk); cyc++; end
    exp = ref_mul(ta, tb_);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL mul %h * %h = %h, expected %h", ta, tb_, result, exp);
    end
    checks++;
    if (cyc != 233) begin
      failures++;
      $display("FAIL latency %0d, expected 233", cyc);
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run('0, rand_gf());
    run(gf_t'(1), B233_GX);
    run(B233_GX, gf_t'(1));
    run({1'b1, {(M-1){1'b0}}}, {1'b1, {(M-1){1'b0}}});
    run('1, '1);
    run(B233_GX, B233_GX);
    for (int i = 0; i < 200; i++) run(rand_gf(), rand_gf());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
