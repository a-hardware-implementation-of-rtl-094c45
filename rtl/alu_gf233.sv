// alu_gf233: the finite-field arithmetic unit of the processor, holding the
// serial multiplier (multiplication and squaring, 233 cycles) and the
// Euclidean divider (466 cycles) behind shared operand buses.
//
// data_a / data_b are sampled by the unit named by start_mul or start_div on
// the start edge; they need not stay stable afterwards. end_mul / end_div
// pulse for one cycle when the result is ready. data_alu returns the result
// of the unit that was started last; it stays valid until the next start.
// Starting both units in the same cycle is not allowed (checked by an
// assertion). The shared result bus and its selection are choices of this
// implementation; the block diagram shows one data_alu bus.
module alu_gf233
  import ecc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start_mul,
  input  logic start_div,
  input  gf_t  data_a,
  input  gf_t  data_b,
  output gf_t  data_alu,
  output logic end_mul,
  output logic end_div
);

  gf_t  mul_res, div_res;
  logic sel_div;

  mul_gf233 #(.M(M), .FPOLY(F_LOW)) u_mul (
    .clk, .rst_n, .start(start_mul), .a(data_a), .b(data_b),
    .result(mul_res), .done(end_mul)
  );

  div_gf233 #(.M(M), .FPOLY(F_LOW)) u_div (
    .clk, .rst_n, .start(start_div), .a(data_a), .b(data_b),
    .result(div_res), .done(end_div)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sel_div <= 1'b0;
    else if (start_div) sel_div <= 1'b1;
    else if (start_mul) sel_div <= 1'b0;
  end

  assign data_alu = sel_div ? div_res : mul_res;

  a_one_start: assert property (@(posedge clk) disable iff (!rst_n)
                                !(start_mul && start_div));

endmodule
