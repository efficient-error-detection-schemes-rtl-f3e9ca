// ec_point_double: complete point doubling R = 2*P on y^2 = x^3 - 3x + b,
// in homogeneous projective coordinates.
//
// The window-method multiplier calls this unit once per scalar bit. The
// doubling law is the exception-free one for a = -3 curves (Renes, Costello
// and Batina, 2016): 8 multiplications, 3 squarings, 2 multiplications by b
// and 21 additions/subtractions, valid for every input including the point at
// infinity (0:1:0) and points of order two.
//
// As in ec_point_add, the 34 steps are a micro-program run over a small
// register file, with one bit-serial modular multiplier (fp_mul) for the
// products and a one-cycle adder/subtractor for the rest.
//
// Interface: pulse `start` with `p` valid (it is captured); `done` pulses
// for one cycle when `r` holds 2P; `r` stays valid until the next start.
// Latency is 13*(N+2) + 21 + 1 cycles from start to done (3,376 at N = 256).
//
// The published error-detection scheme treats point doubling as a black box
// and fixes neither coordinates nor formulas; both are this design's choice.
module ec_point_double
  import ecc_pkg::*;
#(
  parameter fe_t P_MOD  = P256_P,
  parameter fe_t B_COEF = P256_B
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  point_t p,
  output logic   busy,
  output logic   done,
  output point_t r
);

  localparam int unsigned PLEN = 34;
  localparam int unsigned PCW  = $clog2(PLEN);

  // exception-free doubling, a = -3
  function automatic uop_t rom(logic [PCW-1:0] pc);
    case (pc)
      6'd0:  return uop(FOP_MUL, R_T0, R_X1, R_X1);
      6'd1:  return uop(FOP_MUL, R_T1, R_Y1, R_Y1);
      6'd2:  return uop(FOP_MUL, R_T2, R_Z1, R_Z1);
      6'd3:  return uop(FOP_MUL, R_T3, R_X1, R_Y1);
      6'd4:  return uop(FOP_ADD, R_T3, R_T3, R_T3);
      6'd5:  return uop(FOP_MUL, R_Z3, R_X1, R_Z1);
      6'd6:  return uop(FOP_ADD, R_Z3, R_Z3, R_Z3);
      6'd7:  return uop(FOP_MUL, R_Y3, R_B,  R_T2);
      6'd8:  return uop(FOP_SUB, R_Y3, R_Y3, R_Z3);
      6'd9:  return uop(FOP_ADD, R_X3, R_Y3, R_Y3);
      6'd10: return uop(FOP_ADD, R_Y3, R_X3, R_Y3);
      6'd11: return uop(FOP_SUB, R_X3, R_T1, R_Y3);
      6'd12: return uop(FOP_ADD, R_Y3, R_T1, R_Y3);
      6'd13: return uop(FOP_MUL, R_Y3, R_X3, R_Y3);
      6'd14: return uop(FOP_MUL, R_X3, R_X3, R_T3);
      6'd15: return uop(FOP_ADD, R_T3, R_T2, R_T2);
      6'd16: return uop(FOP_ADD, R_T2, R_T2, R_T3);
      6'd17: return uop(FOP_MUL, R_Z3, R_B,  R_Z3);
      6'd18: return uop(FOP_SUB, R_Z3, R_Z3, R_T2);
      6'd19: return uop(FOP_SUB, R_Z3, R_Z3, R_T0);
      6'd20: return uop(FOP_ADD, R_T3, R_Z3, R_Z3);
      6'd21: return uop(FOP_ADD, R_Z3, R_Z3, R_T3);
      6'd22: return uop(FOP_ADD, R_T3, R_T0, R_T0);
      6'd23: return uop(FOP_ADD, R_T0, R_T3, R_T0);
      6'd24: return uop(FOP_SUB, R_T0, R_T0, R_T2);
      6'd25: return uop(FOP_MUL, R_T0, R_T0, R_Z3);
      6'd26: return uop(FOP_ADD, R_Y3, R_Y3, R_T0);
      6'd27: return uop(FOP_MUL, R_T0, R_Y1, R_Z1);
      6'd28: return uop(FOP_ADD, R_T0, R_T0, R_T0);
      6'd29: return uop(FOP_MUL, R_Z3, R_T0, R_Z3);
      6'd30: return uop(FOP_SUB, R_X3, R_X3, R_Z3);
      6'd31: return uop(FOP_MUL, R_Z3, R_T0, R_T1);
      6'd32: return uop(FOP_ADD, R_Z3, R_Z3, R_Z3);
      default: return uop(FOP_ADD, R_Z3, R_Z3, R_Z3);
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
          rf[R_X1] <= p.x; rf[R_Y1] <= p.y; rf[R_Z1] <= p.z;
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
