// tb_ecc_b233: end-to-end test of the B-233 scalar-multiplication processor
// at its full size, driven only through its pins.
//
//  1. The published test vector: k = 0c7e814dd40...c65c202 times the B-233
//     base point G must give the published Q; the run must take within 1% of
//     490,699 cycles from iSTART_ECC to oEND_ECC.
//  2. Small keys (1, 2, 3, 0x8000 | random 15 bits) against a reference
//     double-and-add scalar multiplication.
//  3. An elliptic-curve Diffie-Hellman exchange with two random 232-bit
//     keys: Pa = ka*G, Pb = kb*G, then ka*Pb and kb*Pa must agree, and all
//     four points must lie on the curve.
// It also counts how often each mechanism of the design happened (leading
// zero bits skipped in MAINTAIN, INIT doublings, both ladder states, field
// multiplications and divisions, key/point loads, output frames) and counts
// a failure for any that never did.
module tb_ecc_b233;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic            clk = 1'b0;
  logic            rst = 1'b0;
  logic [IO_W-1:0] iDATA = '0;
  logic            iK_IN = 1'b0, iGX_IN = 1'b0, iGY_IN = 1'b0, iSTART_ECC = 1'b0;
  logic [IO_W-1:0] oDATA_X, oDATA_Y;
  logic            oEND_ECC;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_b233 dut (.clk, .rst, .iDATA, .iK_IN, .iGX_IN, .iGY_IN, .iSTART_ECC,
                .oDATA_X, .oDATA_Y, .oEND_ECC);

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_maint_skip = 0, n_init = 0, n_add0 = 0, n_add1 = 0;
  int n_mul = 0, n_div = 0, n_load = 0, n_frame = 0;
  logic end_d = 1'b0;
  always @(posedge clk) begin
    if (dut.u_control.state_smul == MML_MAINTAIN && dut.u_control.k_shift && !dut.k_msb)
      n_maint_skip++;
    if (dut.start_div && dut.state_smul == MML_INIT) n_init++;
    if (dut.start_div && dut.state_afds == OP_A_DIV && dut.state_smul == MML_ADDP0_DBLP1) n_add0++;
    if (dut.start_div && dut.state_afds == OP_A_DIV && dut.state_smul == MML_ADDP1_DBLP0) n_add1++;
    if (dut.start_mul) n_mul++;
    if (dut.start_div) n_div++;
    if (dut.k_in || dut.gx_in || dut.gy_in) n_load++;
    end_d <= oEND_ECC;
    if (oEND_ECC && !end_d) n_frame++;
  end

  task automatic load(input int sel, input gf_t v);
    logic [WORDS*IO_W-1:0] w;
    w = (WORDS*IO_W)'(v);
    for (int i = WORDS - 1; i >= 0; i--) begin
      @(negedge clk);
      iDATA = w[i*IO_W +: IO_W];
      iK_IN = (sel == 0); iGX_IN = (sel == 1); iGY_IN = (sel == 2);
    end
    @(negedge clk);
    iK_IN = 1'b0; iGX_IN = 1'b0; iGY_IN = 1'b0; iDATA = '0;
  endtask

  // k * (px, py) on the chip; returns the point and the cycle count
  task automatic smul(input gf_t k, input gf_t px, input gf_t py,
                      output gf_t qx, output gf_t qy, output int cycles);
    logic [WORDS*IO_W-1:0] wx, wy;
    load(0, k);
    load(1, px);
    load(2, py);
    @(negedge clk);
    iSTART_ECC = 1'b1;
    cycles = 0;
    @(negedge clk);
    iSTART_ECC = 1'b0;
    while (!oEND_ECC) begin @(negedge clk); cycles++; end
    for (int i = WORDS - 1; i >= 0; i--) begin
      wx[i*IO_W +: IO_W] = oDATA_X;
      wy[i*IO_W +: IO_W] = oDATA_Y;
      checks++;
      if (!oEND_ECC) begin failures++; $display("FAIL oEND_ECC dropped at word %0d", i); end
      @(negedge clk);
    end
    qx = wx[M-1:0];
    qy = wy[M-1:0];
    checks++;
    if (wx[WORDS*IO_W-1:M] != '0 || wy[WORDS*IO_W-1:M] != '0) begin
      failures++; $display("FAIL padding bits not zero");
    end
  endtask

  task automatic check_ref(input gf_t k);
    gf_t qx, qy;
    int cyc;
    point_t g, q;
    g = '{inf: 1'b0, x: B233_GX, y: B233_GY};
    smul(k, B233_GX, B233_GY, qx, qy, cyc);
    q = ref_smul(k, g);
    checks++;
    if (q.inf || qx !== q.x || qy !== q.y) begin
      failures++;
      $display("FAIL k=%h: got (%h,%h) expected (%h,%h)", k, qx, qy, q.x, q.y);
    end
  endtask

  initial begin
    gf_t qx, qy, ka, kb, pax, pay, pbx, pby, sax, say, sbx, sby;
    int cyc;
    repeat (3) @(posedge clk);
    rst = 1'b1;

    // 1. published vector
    smul(233'h0c7_e814dd40_466073ef_4cfd3319_b2f0488d_3eed4bba_24dc189a_1c65c202,
         B233_GX, B233_GY, qx, qy, cyc);
    checks++;
    if (qx !== 233'h1f4_85a65e59_b336e140_1c8a311f_01c92626_c663e69f_12a627e5_3e8f0675 ||
        qy !== 233'h1bf_338ce75a_dfb07deb_d962e1d8_0c101587_269ac995_1b40422b_12e9da3e) begin
      failures++;
      $display("FAIL published vector: got (%h,%h)", qx, qy);
    end
    $display("published vector: %0d cycles from iSTART_ECC to oEND_ECC (document: 490699)", cyc);
    checks++;
    if (cyc < 485792 || cyc > 495606) begin
      failures++; $display("FAIL cycle count %0d not within 1%% of 490699", cyc);
    end

    // 2. small keys against the reference
    check_ref(gf_t'(1));
    check_ref(gf_t'(2));
    check_ref(gf_t'(3));
    check_ref(gf_t'(16'h8000 | $urandom_range(0, 16'h7fff)));

    // 3. ECDH exchange
    ka = rand_gf() >> 1;   // below 2^232, hence below the group order
    kb = rand_gf() >> 1;
    smul(ka, B233_GX, B233_GY, pax, pay, cyc);
    smul(kb, B233_GX, B233_GY, pbx, pby, cyc);
    smul(ka, pbx, pby, sax, say, cyc);
    smul(kb, pax, pay, sbx, sby, cyc);
    checks++;
    if (sax !== sbx || say !== sby) begin
      failures++; $display("FAIL ECDH shared points differ: (%h,%h) (%h,%h)", sax, say, sbx, sby);
    end
    checks++;
    if (!ref_on_curve(pax, pay) || !ref_on_curve(pbx, pby) || !ref_on_curve(sax, say)) begin
      failures++; $display("FAIL ECDH point not on the curve");
    end

    $display("mechanisms: maintain_skips=%0d init=%0d addp0_dblp1=%0d addp1_dblp0=%0d mul=%0d div=%0d loads=%0d frames=%0d",
             n_maint_skip, n_init, n_add0, n_add1, n_mul, n_div, n_load, n_frame);
    checks++;
    if (n_maint_skip == 0 || n_init == 0 || n_add0 == 0 || n_add1 == 0 || n_mul == 0 ||
        n_div == 0 || n_load == 0 || n_frame == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
