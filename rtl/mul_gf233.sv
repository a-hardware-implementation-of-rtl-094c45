// mul_gf233: bit-serial shift-and-add multiplier over GF(2^M) modulo
// f(x) = x^M + FPOLY.
//
// Three M-bit registers: Shift_reg holds operand a and shifts right one bit
// per clock; B_reg holds operand b and is multiplied by x each clock, reduced
// by f(x) whenever its top bit falls out (shift left, then XOR the low part of
// f(x) gated by the old B_reg[M-1]); C_reg accumulates the partial products.
// On start C_reg is loaded with b or 0 according to a[0]; on each following
// clock C_reg takes C_reg + (new B_reg) when Shift_reg[1] is 1. This is the
// data path of the document's serial multiplier. Squaring is a = b.
//
// Timing: start is sampled on a clock edge (the load). M-1 shift cycles
// follow, and done is a one-cycle pulse M edges after the start edge, so the
// operation takes M = 233 clock cycles. result holds C_reg and stays valid
// until the next start. A start while busy restarts the operation.
module mul_gf233 #(
  parameter int unsigned     M     = 233,
  parameter logic [M-1:0]    FPOLY = M'(1) | (M'(1) << 74)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] result,
  output logic         done
);

  localparam int unsigned CW = $clog2(M);

  logic [M-1:0]  shift_reg, b_reg, c_reg;
  logic [M-1:0]  b_next;
  logic [CW-1:0] cnt;
  logic          busy;

  // B_reg * x mod f(x)
  assign b_next = {b_reg[M-2:0], 1'b0} ^ (b_reg[M-1] ? FPOLY : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_reg <= '0;
      b_reg     <= '0;
      c_reg     <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else if (start) begin
      shift_reg <= a;
      b_reg     <= b;
      c_reg     <= a[0] ? b : '0;
      cnt       <= '0;
      busy      <= 1'b1;
      done      <= 1'b0;
    end else if (busy) begin
      if (cnt == CW'(M - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        shift_reg <= shift_reg >> 1;
        b_reg     <= b_next;
        if (shift_reg[1]) c_reg <= c_reg ^ b_next;
        cnt <= cnt + 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  assign result = c_reg;

endmodule
