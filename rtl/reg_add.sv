// reg_add: register file and GF(2^233) adders of the processor (Reg_Add).
//
// Seven 233-bit registers: k_reg (secret key), x0/y0 and x1/y1 (the two
// ladder points P0 and P1), x_sec (new x coordinate of the point being
// computed) and lamda (the slope of the point formula). Field addition is
// XOR. For every step of a point addition / point doubling (op_step_t in
// ecc_pkg) this block puts the two operands on data_a / data_b and, when the
// ALU signals end_mul or end_div, writes data_alu (plus the XOR terms of the
// formula) back. Which point is the addition destination Pd and which the
// doubling source Ps follows the ladder state:
//   ADDP0_DBLP1 : P0 = P0 + P1, P1 = 2*P1
//   ADDP1_DBLP0 : P1 = P0 + P1, P0 = 2*P0
//   INIT        : P1 = 2*P1 (first doubling, P1 = 2P)
//
// Loading: k_in, gx_in, gy_in write data into k_reg, x0 and y0. one_count
// (first 1 of the key found) copies P0 into P1. k_shift shifts k_reg left by
// one; k_msb is its top bit, the key bit under scan. data_x / data_y show P0,
// which holds the result when the ladder finishes.
//
// Register names and count follow the document's block diagram; the step
// schedule, which register each intermediate value lives in, and the control
// signals k_shift / one_count are this implementation's.
module reg_add
  import ecc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // from BUFFER
  input  gf_t        data,
  input  logic       k_in,
  input  logic       gx_in,
  input  logic       gy_in,
  // from the control unit
  input  mml_state_t state_smul,
  input  op_step_t   state_afds,
  input  logic       one_count,
  input  logic       k_shift,
  output logic       k_msb,
  // to / from Alu_GF233
  output gf_t        data_a,
  output gf_t        data_b,
  input  gf_t        data_alu,
  input  logic       end_mul,
  input  logic       end_div,
  // to BUFFER
  output gf_t        data_x,
  output gf_t        data_y
);

  gf_t k_reg, x0_reg, y0_reg, x1_reg, y1_reg, x_sec_reg, lamda_reg;

  // Destination of the point addition (0: P0, 1: P1) and source of the
  // point doubling.
  logic dst1, src1;
  gf_t  xd, yd, xs, ys;

  assign dst1 = (state_smul == MML_ADDP1_DBLP0);
  assign src1 = (state_smul != MML_ADDP1_DBLP0);
  assign xd   = dst1 ? x1_reg : x0_reg;
  assign yd   = dst1 ? y1_reg : y0_reg;
  assign xs   = src1 ? x1_reg : x0_reg;
  assign ys   = src1 ? y1_reg : y0_reg;

  // Operand selection
  always_comb begin
    data_a = '0;
    data_b = '0;
    unique case (state_afds)
      OP_A_DIV: begin data_a = y0_reg ^ y1_reg;     data_b = x0_reg ^ x1_reg; end
      OP_A_SQR: begin data_a = lamda_reg;           data_b = lamda_reg;       end
      OP_A_MUL: begin data_a = lamda_reg;           data_b = xd ^ x_sec_reg;  end
      OP_D_DIV: begin data_a = ys;                  data_b = xs;              end
      OP_D_SQR: begin data_a = lamda_reg;           data_b = lamda_reg;       end
      OP_D_MUL: begin data_a = lamda_reg ^ gf_t'(1); data_b = x_sec_reg;      end
      OP_D_SQX: begin data_a = xs;                  data_b = xs;              end
      default:  ;
    endcase
  end

  logic wb;
  assign wb = end_mul || end_div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_reg     <= '0;
      x0_reg    <= '0;
      y0_reg    <= '0;
      x1_reg    <= '0;
      y1_reg    <= '0;
      x_sec_reg <= '0;
      lamda_reg <= '0;
    end else begin
      if (k_in)  k_reg  <= data;
      else if (k_shift) k_reg <= k_reg << 1;
      if (gx_in) x0_reg <= data;
      if (gy_in) y0_reg <= data;
      if (one_count) begin
        x1_reg <= x0_reg;
        y1_reg <= y0_reg;
      end
      if (wb) begin
        unique case (state_afds)
          OP_A_DIV: lamda_reg <= data_alu;
          OP_A_SQR: x_sec_reg <= data_alu ^ lamda_reg ^ x0_reg ^ x1_reg ^ CURVE_A;
          OP_A_MUL: begin
            if (dst1) begin
              y1_reg <= data_alu ^ x_sec_reg ^ yd;
              x1_reg <= x_sec_reg;
            end else begin
              y0_reg <= data_alu ^ x_sec_reg ^ yd;
              x0_reg <= x_sec_reg;
            end
          end
          OP_D_DIV: lamda_reg <= data_alu ^ xs;
          OP_D_SQR: x_sec_reg <= data_alu ^ lamda_reg ^ CURVE_A;
          OP_D_MUL: lamda_reg <= data_alu;
          OP_D_SQX: begin
            if (src1) begin
              y1_reg <= data_alu ^ lamda_reg;
              x1_reg <= x_sec_reg;
            end else begin
              y0_reg <= data_alu ^ lamda_reg;
              x0_reg <= x_sec_reg;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign k_msb  = k_reg[M-1];
  assign data_x = x0_reg;
  assign data_y = y0_reg;

endmodule
