// tb_io_buffer: self-checking test of the 16-bit <-> 233-bit I/O buffer.
// Random values are written as 15 words under each select strobe and must
// appear on data with exactly one matching load pulse; a start_ecc pulse must
// follow each rising edge of iSTART_ECC only; and after end_ecc the two
// result coordinates must come out as 15 word pairs, most significant first,
// framed by oEND_ECC.
module tb_io_buffer;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic [IO_W-1:0] iDATA = '0;
  logic            iK_IN = 1'b0, iGX_IN = 1'b0, iGY_IN = 1'b0, iSTART_ECC = 1'b0;
  logic [IO_W-1:0] oDATA_X, oDATA_Y;
  logic            oEND_ECC;
  gf_t             data, data_x = '0, data_y = '0;
  logic            k_in, gx_in, gy_in, start_ecc;
  logic            end_ecc = 1'b0;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  io_buffer dut (.clk, .rst_n, .iDATA, .iK_IN, .iGX_IN, .iGY_IN, .iSTART_ECC,
                 .oDATA_X, .oDATA_Y, .oEND_ECC, .data, .k_in, .gx_in, .gy_in,
                 .start_ecc, .data_x, .data_y, .end_ecc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the load pulses
  int n_k = 0, n_gx = 0, n_gy = 0, n_start = 0;
  always @(posedge clk) begin
    if (k_in) n_k++;
    if (gx_in) n_gx++;
    if (gy_in) n_gy++;
    if (start_ecc) n_start++;
  end

  task automatic load(input int sel, input gf_t v);
    logic [WORDS*IO_W-1:0] w;
    int nk, ngx, ngy;
    nk = n_k; ngx = n_gx; ngy = n_gy;
    w = (WORDS*IO_W)'(v);
    for (int i = WORDS - 1; i >= 0; i--) begin
      @(negedge clk);
      iDATA = w[i*IO_W +: IO_W];
      iK_IN = (sel == 0); iGX_IN = (sel == 1); iGY_IN = (sel == 2);
    end
    @(negedge clk);
    iK_IN = 1'b0; iGX_IN = 1'b0; iGY_IN = 1'b0; iDATA = $urandom;
    // the load pulse is registered: visible now
    checks++;
    if (data !== v || k_in != (sel == 0) || gx_in != (sel == 1) || gy_in != (sel == 2)) begin
      failures++;
      $display("FAIL load sel %0d data %h expected %h", sel, data, v);
    end
    @(negedge clk);
    checks++;
    if ((n_k - nk) + (n_gx - ngx) + (n_gy - ngy) != 1) begin
      failures++;
      $display("FAIL number of load pulses");
    end
  endtask

  task automatic unload(input gf_t x, input gf_t y);
    logic [WORDS*IO_W-1:0] wx, wy;
    wx = (WORDS*IO_W)'(x);
    wy = (WORDS*IO_W)'(y);
    @(negedge clk);
    data_x = x; data_y = y; end_ecc = 1'b1;
    @(negedge clk);
    end_ecc = 1'b0; data_x = rand_gf(); data_y = rand_gf();
    for (int i = WORDS - 1; i >= 0; i--) begin
      checks++;
      if (!oEND_ECC || oDATA_X !== wx[i*IO_W +: IO_W] || oDATA_Y !== wy[i*IO_W +: IO_W]) begin
        failures++;
        $display("FAIL output word %0d: %h %h end %b", i, oDATA_X, oDATA_Y, oEND_ECC);
      end
      @(negedge clk);
    end
    checks++;
    if (oEND_ECC) begin failures++; $display("FAIL oEND_ECC longer than 15 cycles"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load(0, rand_gf());
    load(1, B233_GX);
    load(2, B233_GY);
    for (int i = 0; i < 20; i++) load($urandom_range(0, 2), rand_gf());
    // start pulse: one per rising edge, none for a held level
    @(negedge clk); iSTART_ECC = 1'b1;
    repeat (10) @(negedge clk);
    iSTART_ECC = 1'b0;
    @(negedge clk); iSTART_ECC = 1'b1;
    @(negedge clk); iSTART_ECC = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_start != 2) begin failures++; $display("FAIL start pulses %0d", n_start); end
    unload(B233_GX, B233_GY);
    for (int i = 0; i < 10; i++) unload(rand_gf(), rand_gf());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
