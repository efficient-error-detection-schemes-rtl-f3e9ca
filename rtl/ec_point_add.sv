// ec_point_add: complete point addition R = P1 + P2 on y^2 = x^3 - 3x + b,
// in homogeneous projective coordinates.
//
// The window-method multiplier calls this unit to build the table of
// multiples of P and to add table entries to the running result. The
// addition law is the complete one for a = -3 curves (Renes, Costello and
// Batina, 2016): one fixed sequence of 12 general multiplications, 2
// multiplications by b and 29 additions/subtractions that is correct for
// every pair of inputs, including P1 = P2, P1 = -P2 and the point at
// infinity (0:1:0). So the caller never needs a special case, and the run
// time does not depend on the data.
//
// The 43 steps are kept as a micro-program (a case ROM). A small register
// file holds the operands, five temporaries, the result and the constant b.
// Additions and subtractions take one cycle; each multiplication goes to one
// bit-serial modular multiplier (fp_mul) and takes N + 2 cycles.
//
// Interface: pulse `start` with p1/p2 valid (they are captured); `done`
// pulses for one cycle when `r` holds the sum; `r` stays valid until the
// next start. Inputs must have reduced coordinates (< p). Latency is
// 14*(N+2) + 29 + 1 cycles from start to done (3,642 at N = 256).
//
// The published error-detection scheme treats point addition as a black box
// and fixes neither coordinates nor formulas; projective coordinates and the
// complete formula are this design's choice.
module ec_point_add
  import ecc_pkg::*;
#(
  parameter fe_t P_MOD  = P256_P,
  parameter fe_t B_COEF = P256_B
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  point_t p1,
  input  point_t p2,
  output logic   busy,
  output logic   done,
  output point_t r
);

  localparam int unsigned PLEN = 43;
  localparam int unsigned PCW  = $clog2(PLEN);

  // complete addition, a = -3
  function automatic uop_t rom(logic [PCW-1:0] pc);
    case (pc)
      6'd0:  return uop(FOP_MUL, R_T0, R_X1, R_X2);
      6'd1:  return uop(FOP_MUL, R_T1, R_Y1, R_Y2);
      6'd2:  return uop(FOP_MUL, R_T2, R_Z1, R_Z2);
      6'd3:  return uop(FOP_ADD, R_T3, R_X1, R_Y1);
      6'd4:  return uop(FOP_ADD, R_T4, R_X2, R_Y2);
      6'd5:  return uop(FOP_MUL, R_T3, R_T3, R_T4);
      6'd6:  return uop(FOP_ADD, R_T4, R_T0, R_T1);
      6'd7:  return uop(FOP_SUB, R_T3, R_T3, R_T4);
      6'd8:  return uop(FOP_ADD, R_T4, R_Y1, R_Z1);
      6'd9:  return uop(FOP_ADD, R_X3, R_Y2, R_Z2);
      6'd10: return uop(FOP_MUL, R_T4, R_T4, R_X3);
      6'd11: return uop(FOP_ADD, R_X3, R_T1, R_T2);
      6'd12: return uop(FOP_SUB, R_T4, R_T4, R_X3);
      6'd13: return uop(FOP_ADD, R_X3, R_X1, R_Z1);
      6'd14: return uop(FOP_ADD, R_Y3, R_X2, R_Z2);
      6'd15: return uop(FOP_MUL, R_X3, R_X3, R_Y3);
      6'd16: return uop(FOP_ADD, R_Y3, R_T0, R_T2);
      6'd17: return uop(FOP_SUB, R_Y3, R_X3, R_Y3);
      6'd18: return uop(FOP_MUL, R_Z3, R_B,  R_T2);
      6'd19: return uop(FOP_SUB, R_X3, R_Y3, R_Z3);
      6'd20: return uop(FOP_ADD, R_Z3, R_X3, R_X3);
      6'd21: return uop(FOP_ADD, R_X3, R_X3, R_Z3);
      6'd22: return uop(FOP_SUB, R_Z3, R_T1, R_X3);
      6'd23: return uop(FOP_ADD, R_X3, R_T1, R_X3);
      6'd24: return uop(FOP_MUL, R_Y3, R_B,  R_Y3);
      6'd25: return uop(FOP_ADD, R_T1, R_T2, R_T2);
      6'd26: return uop(FOP_ADD, R_T2, R_T1, R_T2);
      6'd27: return uop(FOP_SUB, R_Y3, R_Y3, R_T2);
      6'd28: return uop(FOP_SUB, R_Y3, R_Y3, R_T0);
      6'd29: return uop(FOP_ADD, R_T1, R_Y3, R_Y3);
      6'd30: return uop(FOP_ADD, R_Y3, R_T1, R_Y3);
      6'd31: return uop(FOP_ADD, R_T1, R_T0, R_T0);
      6'd32: return uop(FOP_ADD, R_T0, R_T1, R_T0);
      6'd33: return uop(FOP_SUB, R_T0, R_T0, R_T2);
      6'd34: return uop(FOP_MUL, R_T1, R_T4, R_Y3);
      6'd35: return uop(FOP_MUL, R_T2, R_T0, R_Y3);
      6'd36: return uop(FOP_MUL, R_Y3, R_X3, R_Z3);
      6'd37: return uop(FOP_ADD, R_Y3, R_Y3, R_T2);
      6'd38: return uop(FOP_MUL, R_X3, R_T3, R_X3);
      6'd39: return uop(FOP_SUB, R_X3, R_X3, R_T1);
      6'd40: return uop(FOP_MUL, R_Z3, R_T4, R_Z3);
      6'd41: return uop(FOP_MUL, R_T1, R_T3, R_T0);
      default: return uop(FOP_ADD, R_Z3, R_Z3, R_T1);
    endcase
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_MULW, S_DONE} state_e;

  state_e         state;
  logic [PCW-1:0] pc;
  fe_t            rf [NREG];
  uop_t           u;
  fe_t            opa, opb;
  logic           mul_start, mul_done;
  fe_t            mul_y;

  assign u   = rom(pc);
  assign opa = rf[u.a];
  assign opb = rf[u.b];
  assign mul_start = (state == S_EXEC) && (u.op == FOP_MUL);

  fp_mul #(.P_MOD(P_MOD)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(opa), .b(opb),
    .busy(), .done(mul_done), .y(mul_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pc    <= '0;
      for (int i = 0; i < int'(NREG); i++) rf[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          rf[R_X1] <= p1.x; rf[R_Y1] <= p1.y; rf[R_Z1] <= p1.z;
          rf[R_X2] <= p2.x; rf[R_Y2] <= p2.y; rf[R_Z2] <= p2.z;
          rf[R_B]  <= B_COEF;
          pc    <= '0;
          state <= S_EXEC;
        end
        S_EXEC: begin
          if (u.op == FOP_MUL) begin
            state <= S_MULW;
          end else begin
            rf[u.d] <= (u.op == FOP_ADD) ? fadd(opa, opb, P_MOD) : fsub(opa, opb, P_MOD);
            if (pc == PCW'(PLEN - 1)) state <= S_DONE;
            pc <= pc + 1'b1;
          end
        end
        S_MULW: if (mul_done) begin
          rf[u.d] <= mul_y;
          if (pc == PCW'(PLEN - 1)) state <= S_DONE;
          else                      state <= S_EXEC;
          pc <= pc + 1'b1;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
  assign r    = '{x: rf[R_X3], y: rf[R_Y3], z: rf[R_Z3]};

endmodule
