// tb_control_unit: self-checking test of the ladder controller. The
// testbench models the key register (shifted on k_shift, top bit on k_msb)
// and the ALU (end_mul / end_div a fixed number of cycles after each start,
// shortened here to keep the run brief). For several keys it checks: MAINTAIN
// skips exactly the leading zero bits; one INIT doubling follows the leading
// one; each later key bit selects ADDP0_DBLP1 (1) or ADDP1_DBLP0 (0); every
// ladder step issues the seven field operations in order (two divisions,
// five multiplications; INIT four), one at a time; end_ecc pulses once; and
// the run takes (z+1) + sum(latency+2) cycles, z being the number of leading
// zeros of the key.
module tb_control_unit;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int LMUL = 7;
  localparam int LDIV = 13;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             start_ecc = 1'b0;
  logic             k_msb;
  logic             end_mul = 1'b0, end_div = 1'b0;
  mml_state_t       state_smul;
  op_step_t         state_afds;
  logic [CNT_W-1:0] count;
  logic             one_count, k_shift, start_mul, start_div, end_afds, end_ecc;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_unit dut (.clk, .rst_n, .start_ecc, .k_msb, .end_mul, .end_div,
                    .state_smul, .state_afds, .count, .one_count, .k_shift,
                    .start_mul, .start_div, .end_afds, .end_ecc);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // key register model
  gf_t kreg = '0;
  assign k_msb = kreg[M-1];
  always @(posedge clk) if (k_shift) kreg <= kreg << 1;

  // ALU model
  int mul_left = 0, div_left = 0;
  always @(posedge clk) begin
    end_mul <= (mul_left == 1);
    end_div <= (div_left == 1);
    if (mul_left > 0) mul_left <= mul_left - 1;
    if (div_left > 0) div_left <= div_left - 1;
    if (start_mul) mul_left <= LMUL;
    if (start_div) div_left <= LDIV;
  end

  // observation
  int cyc = 0, t_start = 0, t_end = 0;
  int n_end, n_init, n_one, n_shift_maint, n_overlap;
  mml_state_t steps[$];
  op_step_t   ops[$];
  logic       opstart_div[$];
  mml_state_t prev_state = MML_IDLE;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start_ecc) t_start <= cyc;
    if (end_ecc) begin n_end <= n_end + 1; t_end <= cyc; end
    if (one_count) n_one <= n_one + 1;
    if (k_shift && state_smul == MML_MAINTAIN) n_shift_maint <= n_shift_maint + 1;
    if ((start_mul || start_div) && (mul_left > 1 || div_left > 1)) n_overlap <= n_overlap + 1;
    if (start_mul || start_div) begin
      ops.push_back(state_afds);
      opstart_div.push_back(start_div);
      if (state_afds == OP_A_DIV || (state_afds == OP_D_DIV && state_smul == MML_INIT))
        steps.push_back(state_smul);
    end
  end

  task automatic run(input gf_t k);
    int z, nbits, exp_cyc, idx, lead;
    mml_state_t exp_st;
    op_step_t   exp_op;
    // expected: leading zeros
    z = 0;
    while (z < M && !k[M-1-z]) z++;
    lead = M - 1 - z;             // position of the leading one
    n_end = 0; n_one = 0; n_shift_maint = 0; n_overlap = 0;
    steps.delete(); ops.delete(); opstart_div.delete();
    @(negedge clk);
    kreg = k;
    start_ecc = 1'b1;
    @(negedge clk);
    start_ecc = 1'b0;
    while (!end_ecc) @(negedge clk);
    repeat (5) @(negedge clk);

    checks++;
    if (n_end != 1) begin failures++; $display("FAIL end_ecc pulses %0d", n_end); end
    checks++;
    if (n_overlap != 0) begin failures++; $display("FAIL overlapping ALU starts"); end
    if (z == M) begin
      checks++;
      if (steps.size() != 0 || n_one != 0 || n_shift_maint != M) begin
        failures++; $display("FAIL zero key: steps %0d", steps.size());
      end
      checks++;
      if (t_end - t_start != M + 2) begin failures++; $display("FAIL zero-key time %0d", t_end - t_start); end
      return;
    end
    nbits = lead;                 // key bits after the leading one
    checks++;
    if (n_one != 1 || n_shift_maint != z + 1) begin
      failures++; $display("FAIL MAINTAIN: one_count %0d shifts %0d, z=%0d", n_one, n_shift_maint, z);
    end
    checks++;
    if (steps.size() != nbits + 1 || steps[0] != MML_INIT) begin
      failures++; $display("FAIL number of ladder steps %0d, expected %0d", steps.size(), nbits + 1);
    end else begin
      for (int i = 1; i <= nbits; i++) begin
        exp_st = k[lead - i] ? MML_ADDP0_DBLP1 : MML_ADDP1_DBLP0;
        checks++;
        if (steps[i] != exp_st) begin
          failures++; $display("FAIL step %0d state %s expected %s", i, steps[i].name(), exp_st.name());
        end
      end
    end
    // operation order
    checks++;
    if (ops.size() != 4 + 7 * nbits) begin
      failures++; $display("FAIL ops %0d expected %0d", ops.size(), 4 + 7 * nbits);
    end else begin
      idx = 0;
      for (int i = 0; i < ops.size(); i++) begin
        if (i < 4) exp_op = op_step_t'(OP_D_DIV + i);
        else exp_op = op_step_t'(OP_A_DIV + (i - 4) % 7);
        if (ops[i] != exp_op || opstart_div[i] != op_is_div(exp_op)) idx++;
      end
      checks++;
      if (idx != 0) begin failures++; $display("FAIL %0d operations out of order", idx); end
    end
    exp_cyc = (z + 1) + 2 * (LDIV + 2) * nbits + 5 * (LMUL + 2) * nbits
              + (LDIV + 2) + 3 * (LMUL + 2) + 1;
    checks++;
    if (t_end - t_start != exp_cyc) begin
      failures++; $display("FAIL cycles %0d expected %0d", t_end - t_start, exp_cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(gf_t'(1));
    run(gf_t'(2));
    run(gf_t'(3));
    run('0);
    run({1'b1, {(M-1){1'b0}}} | gf_t'(5));
    run(233'h0c7_e814dd40_466073ef_4cfd3319_b2f0488d_3eed4bba_24dc189a_1c65c202);
    for (int i = 0; i < 5; i++) run(rand_gf() >> $urandom_range(0, 200));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
