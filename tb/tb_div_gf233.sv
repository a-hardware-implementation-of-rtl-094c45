// tb_div_gf233: self-checking test of the Euclidean GF(2^233) divider.
// Each quotient q = a/b is checked by q*b == a with an independent field
// multiplication, and also against a Fermat-inverse reference for a few
// operands; each division must take exactly 466 cycles from the start edge to
// the done pulse.
module tb_div_gf233;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  gf_t  a = '0, b = '0, result;
  logic done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  div_gf233 dut (.clk, .rst_n, .start, .a, .b, .result, .done);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input gf_t ta, input gf_t tb_, input bit full_ref);
    int cyc;
    @(negedge clk);
    a = ta; b = tb_; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = rand_gf(); b = rand_gf();
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (ref_mul(result, tb_) !== ta) begin
      failures++;
      $display("FAIL div %h / %h = %h", ta, tb_, result);
    end
    if (full_ref) begin
      checks++;
      if (result !== ref_div(ta, tb_)) begin
        failures++;
        $display("FAIL div %h / %h = %h, expected %h", ta, tb_, result, ref_div(ta, tb_));
      end
    end
    checks++;
    if (cyc != 466) begin
      failures++;
      $display("FAIL latency %0d, expected 466", cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(gf_t'(1), B233_GX, 1'b1);               // inverse of Gx
    run(B233_GY, B233_GX, 1'b1);
    run('0, rand_gf(), 1'b0);
    run(rand_gf(), gf_t'(1), 1'b0);
    run(rand_gf(), {1'b1, {(M-1){1'b0}}}, 1'b1);  // divisor x^232
    run(rand_gf(), gf_t'(2), 1'b0);               // divisor x
    run('1, '1, 1'b0);
    for (int i = 0; i < 150; i++) run(rand_gf(), rand_gf() | gf_t'(1) << ($urandom % M), 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
