// ecc_b233: elliptic-curve scalar-multiplication processor for the NIST
// B-233 curve over GF(2^233) (y^2 + xy = x^3 + x^2 + b, f(x) = x^233+x^74+1).
//
// It computes Q = k*P in affine coordinates with a modified Montgomery
// ladder: every key bit after the leading 1 costs one point addition and one
// point doubling, independent of the bit value. Four blocks:
//   io_buffer    16-bit pins <-> 233-bit values
//   reg_add      seven 233-bit registers and the XOR adders
//   control_unit ladder FSM and field-operation sequencer
//   alu_gf233    serial multiplier (233 cycles) and Euclidean divider (466)
//
// Use: load k, Px and Py, each as 15 words on iDATA (most significant word
// first) while holding iK_IN, iGX_IN or iGY_IN high for those 15 clocks; then
// raise iSTART_ECC. When the ladder ends, Qx and Qy come out as 15 word pairs
// on oDATA_X / oDATA_Y, most significant first, with oEND_ECC high for those
// 15 clocks. A 233-bit key whose top set bit is bit 231 takes about 489,000
// clocks from iSTART_ECC to oEND_ECC.
//
// rst is active low: the reference waveform of the design shows rst at 1
// while the processor runs. It resets all registers asynchronously.
module ecc_b233
  import ecc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [IO_W-1:0] iDATA,
  input  logic            iK_IN,
  input  logic            iGX_IN,
  input  logic            iGY_IN,
  input  logic            iSTART_ECC,
  output logic [IO_W-1:0] oDATA_X,
  output logic [IO_W-1:0] oDATA_Y,
  output logic            oEND_ECC
);

  logic rst_n;
  assign rst_n = rst;

  gf_t        data, data_x, data_y, data_a, data_b, data_alu;
  logic       k_in, gx_in, gy_in, start_ecc, end_ecc;
  logic       k_msb, one_count, k_shift, end_afds;
  logic       start_mul, start_div, end_mul, end_div;
  mml_state_t state_smul;
  op_step_t   state_afds;
  logic [CNT_W-1:0] count;

  io_buffer u_buffer (
    .clk, .rst_n,
    .iDATA, .iK_IN, .iGX_IN, .iGY_IN, .iSTART_ECC,
    .oDATA_X, .oDATA_Y, .oEND_ECC,
    .data, .k_in, .gx_in, .gy_in, .start_ecc,
    .data_x, .data_y, .end_ecc
  );

  reg_add u_reg_add (
    .clk, .rst_n,
    .data, .k_in, .gx_in, .gy_in,
    .state_smul, .state_afds, .one_count, .k_shift, .k_msb,
    .data_a, .data_b, .data_alu, .end_mul, .end_div,
    .data_x, .data_y
  );

  control_unit u_control (
    .clk, .rst_n,
    .start_ecc, .k_msb, .end_mul, .end_div,
    .state_smul, .state_afds, .count, .one_count, .k_shift,
    .start_mul, .start_div, .end_afds, .end_ecc
  );

  alu_gf233 u_alu (
    .clk, .rst_n,
    .start_mul, .start_div, .data_a, .data_b,
    .data_alu, .end_mul, .end_div
  );

endmodule
