// tb_alu_gf233: self-checking test of the field ALU. Multiplications and
// divisions are issued back to back in random order through the shared
// operand buses; after each end_mul / end_div the shared result bus must hold
// the product or the quotient, with latencies of 233 and 466 cycles, and only
// the matching end signal may pulse.
module tb_alu_gf233;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start_mul = 1'b0, start_div = 1'b0;
  gf_t  data_a = '0, data_b = '0, data_alu;
  logic end_mul, end_div;
  int   checks = 0, failures = 0;
  int   n_mul = 0, n_div = 0;

  always #5 clk = ~clk;

  alu_gf233 dut (.clk, .rst_n, .start_mul, .start_div, .data_a, .data_b,
                 .data_alu, .end_mul, .end_div);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit is_div, input gf_t ta, input gf_t tb_);
    int cyc;
    logic wrong_end;
    @(negedge clk);
    data_a = ta; data_b = tb_;
    start_mul = !is_div; start_div = is_div;
    @(negedge clk);
    start_mul = 1'b0; start_div = 1'b0;
    data_a = rand_gf(); data_b = rand_gf();
    cyc = 0;
    wrong_end = 1'b0;
    while (!(is_div ? end_div : end_mul)) begin
      if (end_mul || end_div) wrong_end = 1'b1;
      @(negedge clk); cyc++;
    end
    checks++;
    if (is_div ? (ref_mul(data_alu, tb_) !== ta) : (data_alu !== ref_mul(ta, tb_))) begin
      failures++;
      $display("FAIL %s result %h", is_div ? "div" : "mul", data_alu);
    end
    checks++;
    if (cyc != (is_div ? 466 : 233) || wrong_end || (is_div ? end_mul : end_div)) begin
      failures++;
      $display("FAIL %s latency %0d wrong_end %0d", is_div ? "div" : "mul", cyc, wrong_end);
    end
    if (is_div) n_div++; else n_mul++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 80; i++) begin
      bit d;
      d = $urandom_range(0, 1);
      run(d, rand_gf(), rand_gf() | gf_t'(1));
    end
    checks++;
    if (n_mul == 0 || n_div == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
