// div_gf233: divider over GF(2^M) modulo f(x) = x^M + FPOLY, computing
// result = a / b mod f(x) with the extended Euclidean algorithm in 2M clock
// cycles, without a separate inversion.
//
// Registers: R_reg (divisor b, M bits), S_reg (f(x), M+1 bits), U_reg
// (dividend a, M bits) and V_reg (0, M bits, the result). The controller
// (Cntl_Div) has a one-bit state_div and an 8-bit counter count_div. Each of
// the 2M-1 iteration clocks does, with r0 = R_reg[0]:
//   state 0: count_div++ ; if r0: (R,S) <= (R+S, R), (U,V) <= (U+V, U), state 1
//   state 1: count_div-- ; if r0: R <= R+S, U <= U+V ; state 0 when count_div hits 0
//   then R <= R/x (shift) and U <= U/x mod f(x) (add f(x) first when U is odd).
// R and S play the part of the two Euclidean remainders and U, V of their
// cofactors scaled by a; after 2M-1 iterations S has been reduced to 1 and
// V holds a/b. The document names the registers R, S, U, V and the 8-bit
// count_div, and gives the 2m-cycle latency, but not the exact recurrence;
// its divider shifts left, while this one keeps coefficients in natural order,
// so the registers shift right and the control bit is R_reg[0]. The
// recurrence is this design's choice of a standard binary Euclidean division.
//
// Timing: start is sampled on a clock edge (the load), 2M-1 iteration clocks
// follow, and done is a one-cycle pulse 2M = 466 edges after the start edge.
// result holds V_reg until the next start. b must be nonzero; for b = 0 the
// result is 0.
module div_gf233 #(
  parameter int unsigned  M     = 233,
  parameter logic [M-1:0] FPOLY = M'(1) | (M'(1) << 74)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] result,
  output logic         done
);

  localparam int unsigned IW = $clog2(2 * M);
  localparam logic [M:0]  F_FULL = {1'b1, FPOLY};

  logic [M-1:0]  r_reg, u_reg, v_reg;
  logic [M:0]    s_reg;
  logic          state_div;
  logic [7:0]    count_div;
  logic [IW-1:0] iter;
  logic          busy;

  logic          r0, swap;
  logic [M:0]    r_sel;
  logic [M-1:0]  u_sel, u_half;

  assign r0    = r_reg[0];
  assign swap  = !state_div && r0;
  assign r_sel = r0 ? ({1'b0, r_reg} ^ s_reg) : {1'b0, r_reg};
  assign u_sel = r0 ? (u_reg ^ v_reg) : u_reg;
  // U/x mod f(x): when U is odd add f(x) (making it even) before the shift.
  assign u_half = u_sel[0] ? ((u_sel ^ FPOLY) >> 1) | {1'b1, {(M-1){1'b0}}}
                           : u_sel >> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_reg     <= '0;
      s_reg     <= '0;
      u_reg     <= '0;
      v_reg     <= '0;
      state_div <= 1'b0;
      count_div <= '0;
      iter      <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else if (start) begin
      r_reg     <= b;
      s_reg     <= F_FULL;
      u_reg     <= a;
      v_reg     <= '0;
      state_div <= 1'b0;
      count_div <= '0;
      iter      <= '0;
      busy      <= 1'b1;
      done      <= 1'b0;
    end else if (busy) begin
      if (iter == IW'(2 * M - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        r_reg <= r_sel[M:1];
        u_reg <= u_half;
        if (swap) begin
          s_reg <= {1'b0, r_reg};
          v_reg <= u_reg;
        end
        if (!state_div) begin
          count_div <= count_div + 1'b1;
          state_div <= r0;
        end else begin
          count_div <= count_div - 1'b1;
          if (count_div == 8'd1) state_div <= 1'b0;
        end
        iter <= iter + 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  assign result = v_reg;

endmodule
