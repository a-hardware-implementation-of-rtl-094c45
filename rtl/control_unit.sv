// control_unit: controller of the scalar multiplication Q = k*P, made of two
// cooperating state machines.
//
// FSM_MML runs the modified Montgomery ladder over the key bits, most
// significant first:
//   IDLE        wait for start_ecc
//   MAINTAIN    consume key bits one per clock while they are 0 (so the key
//               need not have its top bit set); at the first 1, pulse
//               one_count (P1 := P0 = P) and go to INIT
//   INIT        one point doubling, P1 = 2P
//   ADDP0_DBLP1 key bit 1: P0 = P0 + P1, P1 = 2*P1
//   ADDP1_DBLP0 key bit 0: P1 = P0 + P1, P0 = 2*P0
//   DONE        pulse end_ecc, back to IDLE
// After INIT and after each ladder step the next key bit (k_msb) is consumed
// (k_shift, count+1) and selects the next ladder state; when all M bits are
// consumed the result is in P0. Every key bit after the leading 1 costs the
// same sequence of field operations whatever its value. A zero key ends in
// DONE without a point operation and leaves P0 = P (the point at infinity has
// no affine form).
//
// FSM_OP sequences the field operations of one step (op_step_t): A_DIV,
// A_SQR, A_MUL (addition) then D_DIV, D_SQR, D_MUL, D_SQX (doubling); INIT
// runs the doubling part only. For each operation it pulses start_mul or
// start_div for one cycle, then waits for end_mul / end_div, on which
// reg_add writes the result back. end_afds pulses with the last write-back of
// a step. One operation takes its ALU latency plus 2 cycles.
//
// The four ladder states come from the document; INIT, DONE, the operation
// schedule and the handshake are this implementation's.
module control_unit
  import ecc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_ecc,
  input  logic             k_msb,
  input  logic             end_mul,
  input  logic             end_div,
  output mml_state_t       state_smul,
  output op_step_t         state_afds,
  output logic [CNT_W-1:0] count,
  output logic             one_count,
  output logic             k_shift,
  output logic             start_mul,
  output logic             start_div,
  output logic             end_afds,
  output logic             end_ecc
);

  logic     waiting;     // an ALU operation is in flight
  logic     op_active;
  logic     op_end;
  logic     last_step;
  logic     all_bits;

  assign op_active = (state_afds != OP_IDLE);
  assign start_mul = op_active && !waiting && !op_is_div(state_afds);
  assign start_div = op_active && !waiting &&  op_is_div(state_afds);
  assign op_end    = waiting && (end_mul || end_div);
  assign last_step = (state_afds == OP_D_SQX);
  assign end_afds  = op_end && last_step;
  assign all_bits  = (count == CNT_W'(M));

  // key-bit consumption and first-one detection (combinational outputs)
  always_comb begin
    k_shift   = 1'b0;
    one_count = 1'b0;
    end_ecc   = (state_smul == MML_DONE);
    if (state_smul == MML_MAINTAIN && !all_bits) begin
      k_shift   = 1'b1;
      one_count = k_msb;
    end
    if (end_afds && !all_bits) k_shift = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_smul <= MML_IDLE;
      state_afds <= OP_IDLE;
      count      <= '0;
      waiting    <= 1'b0;
    end else begin
      unique case (state_smul)
        MML_IDLE: begin
          if (start_ecc) begin
            state_smul <= MML_MAINTAIN;
            count      <= '0;
          end
        end
        MML_MAINTAIN: begin
          if (all_bits) begin
            state_smul <= MML_DONE;
          end else begin
            count <= count + 1'b1;
            if (k_msb) begin
              state_smul <= MML_INIT;
              state_afds <= OP_D_DIV;
              waiting    <= 1'b0;
            end
          end
        end
        MML_INIT, MML_ADDP0_DBLP1, MML_ADDP1_DBLP0: begin
          if (start_mul || start_div) begin
            waiting <= 1'b1;
          end else if (op_end) begin
            waiting <= 1'b0;
            if (!last_step) begin
              state_afds <= op_step_t'(state_afds + 3'd1);
            end else if (all_bits) begin
              state_afds <= OP_IDLE;
              state_smul <= MML_DONE;
            end else begin
              count      <= count + 1'b1;
              state_afds <= OP_A_DIV;
              state_smul <= k_msb ? MML_ADDP0_DBLP1 : MML_ADDP1_DBLP0;
            end
          end
        end
        MML_DONE: state_smul <= MML_IDLE;
        default:  state_smul <= MML_IDLE;
      endcase
    end
  end

  // An ALU completion is only expected while an operation is in flight.
  a_end_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   (end_mul || end_div) |-> waiting);

endmodule
