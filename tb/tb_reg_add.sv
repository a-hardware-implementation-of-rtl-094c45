// tb_reg_add: self-checking test of the register file and adders. The
// testbench plays the control unit and the ALU: it loads a key and the base
// point G, then walks the register file through the INIT doubling and one
// ladder step of each kind, answering every operand pair on data_a / data_b
// with the reference product or quotient. The ladder points must then be
// P0 = G, P1 = 2G; P0 = 3G, P1 = 4G; P1 = 7G, P0 = 6G, compared with an
// independent affine point arithmetic. The key register must shift out its
// bits most significant first on k_msb.
module tb_reg_add;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  gf_t        data = '0;
  logic       k_in = 1'b0, gx_in = 1'b0, gy_in = 1'b0;
  mml_state_t state_smul = MML_IDLE;
  op_step_t   state_afds = OP_IDLE;
  logic       one_count = 1'b0, k_shift = 1'b0, k_msb;
  gf_t        data_a, data_b, data_alu = '0;
  logic       end_mul = 1'b0, end_div = 1'b0;
  gf_t        data_x, data_y;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  reg_add dut (.clk, .rst_n, .data, .k_in, .gx_in, .gy_in, .state_smul,
               .state_afds, .one_count, .k_shift, .k_msb, .data_a, .data_b,
               .data_alu, .end_mul, .end_div, .data_x, .data_y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse_load(input int sel, input gf_t v);
    @(negedge clk);
    data = v; k_in = (sel == 0); gx_in = (sel == 1); gy_in = (sel == 2);
    @(negedge clk);
    k_in = 1'b0; gx_in = 1'b0; gy_in = 1'b0; data = rand_gf();
  endtask

  // one field operation: a few idle cycles, then the ALU answer
  task automatic op(input op_step_t s);
    gf_t r;
    @(negedge clk);
    state_afds = s;
    repeat ($urandom_range(1, 4)) @(negedge clk);
    r = op_is_div(s) ? ref_div(data_a, data_b) : ref_mul(data_a, data_b);
    data_alu = r;
    end_div = op_is_div(s);
    end_mul = !op_is_div(s);
    @(negedge clk);
    end_div = 1'b0; end_mul = 1'b0; data_alu = rand_gf();
  endtask

  task automatic step(input mml_state_t st, input bit with_add);
    @(negedge clk);
    state_smul = st;
    if (with_add) begin
      op(OP_A_DIV); op(OP_A_SQR); op(OP_A_MUL);
    end
    op(OP_D_DIV); op(OP_D_SQR); op(OP_D_MUL); op(OP_D_SQX);
    @(negedge clk);
    state_afds = OP_IDLE;
  endtask

  task automatic check_points(input point_t p0, input point_t p1, input string what);
    checks++;
    if (data_x !== p0.x || data_y !== p0.y || dut.x1_reg !== p1.x || dut.y1_reg !== p1.y) begin
      failures++;
      $display("FAIL %s: P0=(%h,%h) P1=(%h,%h)", what, data_x, data_y, dut.x1_reg, dut.y1_reg);
    end
  endtask

  initial begin
    point_t g, g2, g3, g4, g6, g7;
    gf_t k;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    g = '{inf: 1'b0, x: B233_GX, y: B233_GY};
    g2 = ref_dbl(g);
    g3 = ref_add(g, g2);
    g4 = ref_dbl(g2);
    g6 = ref_dbl(g3);
    g7 = ref_add(g3, g4);

    // key register: load and shift out
    k = rand_gf();
    pulse_load(0, k);
    for (int i = M - 1; i >= M - 40; i--) begin
      checks++;
      if (k_msb !== k[i]) begin failures++; $display("FAIL k bit %0d", i); end
      @(negedge clk); k_shift = 1'b1;
      @(negedge clk); k_shift = 1'b0;
    end

    pulse_load(1, B233_GX);
    pulse_load(2, B233_GY);
    @(negedge clk); one_count = 1'b1;
    @(negedge clk); one_count = 1'b0;
    check_points(g, g, "after one_count");

    step(MML_INIT, 1'b0);
    check_points(g, g2, "INIT");
    step(MML_ADDP0_DBLP1, 1'b1);
    check_points(g3, g4, "ADDP0_DBLP1");
    step(MML_ADDP1_DBLP0, 1'b1);
    check_points(g6, g7, "ADDP1_DBLP0");
    // results on the curve
    checks++;
    if (!ref_on_curve(data_x, data_y)) begin failures++; $display("FAIL P0 not on curve"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
