// Control unit of the ECC processor: an FSM that runs the Montgomery-ladder
// scalar multiplication Q = k x P (López-Dahab projective X/Z coordinates)
// as a micro-program of register-to-register operations on the arithmetic
// unit and the memory unit.
//
// Flow: LOAD writes x, y, b and the constant 1 into the memory unit; if k or
// x is zero the result is (0,0). Otherwise INIT sets M1=x, M3=1, M2=x^4+b,
// M4=x^2; SCAN skips the leading zeros of k and consumes its leading one;
// for every remaining key bit, most significant first, one ladder step runs
// a point addition into (M1,M3) and a point doubling of (M2,M4) when the bit
// is 1, and with M1<->M2 and M3<->M4 exchanged when it is 0 (the exchange is
// done on register addresses, not by moving data). Finally Z1 = 0 gives (0,0),
// Z2 = 0 gives -P = (x, x+y), and otherwise the affine result is formed with
// one field inversion (Fermat: a^(2^M-2) by M-2 square-multiply steps and one
// squaring) and stored in QX, QY.
//
// Interface: start pulse with key and x_zero valid (key is latched); the
// regfile/ALU control signals; done pulses when QX/QY hold the result.
// ladder_step pulses once per ladder iteration with ladder_bit = key bit.
// Timing: one cycle to issue a micro-op, then the ALU latency (1 cycle for
// add/square/copy, M+2 for multiply), so 2 or M+3 cycles per micro-op; a
// ladder step costs 6 multiplications and 8 one-cycle operations, 6M+34
// cycles (1012 at M=163).
// Following the document (Algorithm 1): initial values, the two ladder
// branches and the final conversion to (x, y). Own choices: the micro-program
// encoding, the leading-zero scan, Fermat inversion, and the Z2 = 0 case.
module ecc_control
  import ehsp_pkg::*;
#(
  parameter int unsigned M = 163,
  localparam int unsigned MW = $clog2(M + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] key,
  input  logic         x_zero,
  // memory unit
  output logic         rf_we,
  output reg_e         rf_waddr,
  output wsel_e        rf_wsel,
  output reg_e         rf_raddr_a,
  output reg_e         rf_raddr_b,
  input  logic         rf_rdata_a_zero,
  // arithmetic unit
  output logic         alu_start,
  output alu_op_e      alu_op,
  input  logic         alu_done,
  // status
  output logic         busy,
  output logic         done,
  output logic         ladder_step,
  output logic         ladder_bit
);
  // Micro-program segment boundaries (addresses into uprog()).
  localparam int unsigned PC_INIT  = 0,  PC_INIT_END = 4;
  localparam int unsigned PC_LAD   = 5,  PC_LAD_END  = 18;
  localparam int unsigned PC_INF   = 19, PC_INF_END  = 20;
  localparam int unsigned PC_NEG   = 21, PC_NEG_END  = 22;
  localparam int unsigned PC_PRE   = 23, PC_PRE_END  = 26;
  localparam int unsigned PC_INV   = 27, PC_INV_END  = 28;
  localparam int unsigned PC_CONV  = 29, PC_CONV_END = 45;

  function automatic alu_uop_t uop(alu_op_e o, reg_e d, reg_e s1, reg_e s2);
    return '{op: o, dst: d, srca: s1, srcb: s2};
  endfunction

  function automatic alu_uop_t uprog(logic [5:0] pc);
    unique case (pc)
      // INIT (Algorithm 1, step 3)
      6'd0:  return uop(OP_MOV, R_M1,  R_X,   R_X);
      6'd1:  return uop(OP_MOV, R_M3,  R_ONE, R_ONE);
      6'd2:  return uop(OP_SQR, R_M4,  R_X,   R_X);
      6'd3:  return uop(OP_SQR, R_M2,  R_M4,  R_M4);
      6'd4:  return uop(OP_ADD, R_M2,  R_M2,  R_B);
      // Point addition: Z1 = (X1 Z2 + X2 Z1)^2, X1 = x Z1 + X1 Z2 X2 Z1
      6'd5:  return uop(OP_MUL, R_TMP, R_M1,  R_M4);
      6'd6:  return uop(OP_MUL, R_T2,  R_M2,  R_M3);
      6'd7:  return uop(OP_ADD, R_M3,  R_TMP, R_T2);
      6'd8:  return uop(OP_SQR, R_M3,  R_M3,  R_M3);
      6'd9:  return uop(OP_MUL, R_TMP, R_TMP, R_T2);
      6'd10: return uop(OP_MUL, R_T2,  R_X,   R_M3);
      6'd11: return uop(OP_ADD, R_M1,  R_TMP, R_T2);
      // Point doubling: X2 = X2^4 + b Z2^4, Z2 = X2^2 Z2^2
      6'd12: return uop(OP_SQR, R_TMP, R_M2,  R_M2);
      6'd13: return uop(OP_SQR, R_T2,  R_M4,  R_M4);
      6'd14: return uop(OP_MUL, R_M4,  R_TMP, R_T2);
      6'd15: return uop(OP_SQR, R_TMP, R_TMP, R_TMP);
      6'd16: return uop(OP_SQR, R_T2,  R_T2,  R_T2);
      6'd17: return uop(OP_MUL, R_T2,  R_B,   R_T2);
      6'd18: return uop(OP_ADD, R_M2,  R_TMP, R_T2);
      // Point at infinity: (0,0)
      6'd19: return uop(OP_ADD, R_QX,  R_X,   R_X);
      6'd20: return uop(OP_ADD, R_QY,  R_X,   R_X);
      // (k+1)P = O, so kP = -P = (x, x+y)
      6'd21: return uop(OP_MOV, R_QX,  R_X,   R_X);
      6'd22: return uop(OP_ADD, R_QY,  R_X,   R_Y);
      // Conversion, part 1: TMP = x Z1 Z2, T6 = Z1 Z2, T2 = TMP
      6'd23: return uop(OP_MUL, R_TMP, R_M3,  R_M4);
      6'd24: return uop(OP_MOV, R_T6,  R_TMP, R_TMP);
      6'd25: return uop(OP_MUL, R_TMP, R_X,   R_TMP);
      6'd26: return uop(OP_MOV, R_T2,  R_TMP, R_TMP);
      // Inversion loop body (M-2 times): T2 = T2^2 * TMP
      6'd27: return uop(OP_SQR, R_T2,  R_T2,  R_T2);
      6'd28: return uop(OP_MUL, R_T2,  R_T2,  R_TMP);
      // Conversion, part 2
      6'(PC_CONV): return uop(OP_SQR, R_T2, R_T2, R_T2); // T2 = (x Z1 Z2)^-1
      6'd30: return uop(OP_MUL, R_T3,  R_X,   R_M4);
      6'd31: return uop(OP_MUL, R_T3,  R_T3,  R_T2);   // 1/Z1
      6'd32: return uop(OP_MUL, R_QX,  R_M1,  R_T3);   // x3 = X1/Z1
      6'd33: return uop(OP_MUL, R_T4,  R_X,   R_M3);
      6'd34: return uop(OP_ADD, R_T4,  R_M1,  R_T4);   // X1 + x Z1
      6'd35: return uop(OP_MUL, R_T5,  R_X,   R_M4);
      6'd36: return uop(OP_ADD, R_T5,  R_M2,  R_T5);   // X2 + x Z2
      6'd37: return uop(OP_MUL, R_T4,  R_T4,  R_T5);
      6'd38: return uop(OP_SQR, R_T5,  R_X,   R_X);
      6'd39: return uop(OP_ADD, R_T5,  R_T5,  R_Y);    // x^2 + y
      6'd40: return uop(OP_MUL, R_T5,  R_T5,  R_T6);
      6'd41: return uop(OP_ADD, R_T4,  R_T4,  R_T5);
      6'd42: return uop(OP_MUL, R_T4,  R_T4,  R_T2);
      6'd43: return uop(OP_ADD, R_T5,  R_X,   R_QX);   // x + x3
      6'd44: return uop(OP_MUL, R_T4,  R_T4,  R_T5);
      6'd45: return uop(OP_ADD, R_QY,  R_T4,  R_Y);    // y3
      default: return uop(OP_MOV, R_TMP, R_TMP, R_TMP);
    endcase
  endfunction

  // Exchange M1<->M2 and M3<->M4 for a ladder step on a zero key bit.
  function automatic reg_e swap(reg_e r, logic en);
    if (!en) return r;
    unique case (r)
      R_M1:    return R_M2;
      R_M2:    return R_M1;
      R_M3:    return R_M4;
      R_M4:    return R_M3;
      default: return r;
    endcase
  endfunction

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_TRIV, S_SCAN, S_ISSUE, S_WAIT, S_CHK_Z1, S_CHK_Z2, S_DONE
  } state_e;

  state_e       state_q;
  logic [5:0]   pc_q;
  logic [1:0]   ld_q;
  logic [M-1:0] k_q;
  logic [MW-1:0] nbits_q;     // key bits still to process
  logic [MW-1:0] inv_q;       // inversion iterations left
  logic         xz_q;
  alu_uop_t     cur;
  logic         in_ladder, sw;

  assign in_ladder = (pc_q >= 6'(PC_LAD)) && (pc_q <= 6'(PC_LAD_END));
  assign sw        = in_ladder && !k_q[M-1];
  assign cur       = uprog(pc_q);
  assign alu_op    = cur.op;
  assign busy      = (state_q != S_IDLE);

  always_comb begin
    rf_we      = 1'b0;
    rf_wsel    = W_ALU;
    rf_waddr   = swap(cur.dst, sw);
    rf_raddr_a = swap(cur.srca, sw);
    rf_raddr_b = swap(cur.srcb, sw);
    alu_start  = 1'b0;
    unique case (state_q)
      S_LOAD: begin
        rf_we = 1'b1;
        unique case (ld_q)
          2'd0: begin rf_waddr = R_X;   rf_wsel = W_X;   end
          2'd1: begin rf_waddr = R_Y;   rf_wsel = W_Y;   end
          2'd2: begin rf_waddr = R_B;   rf_wsel = W_B;   end
          default: begin rf_waddr = R_ONE; rf_wsel = W_ONE; end
        endcase
      end
      S_ISSUE:  alu_start = 1'b1;
      S_WAIT:   rf_we = alu_done;
      S_CHK_Z1: rf_raddr_a = R_M3;
      S_CHK_Z2: rf_raddr_a = R_M4;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
      ld_q    <= '0;
      k_q     <= '0;
      nbits_q <= '0;
      inv_q   <= '0;
      xz_q    <= 1'b0;
      done    <= 1'b0;
      ladder_step <= 1'b0;
      ladder_bit  <= 1'b0;
    end else begin
      done        <= 1'b0;
      ladder_step <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          k_q     <= key;
          xz_q    <= x_zero;
          nbits_q <= MW'(M);
          ld_q    <= '0;
          state_q <= S_LOAD;
        end
        S_LOAD: begin
          ld_q <= ld_q + 1'b1;
          if (ld_q == 2'd3) state_q <= S_TRIV;
        end
        S_TRIV: begin
          if (k_q == '0 || xz_q) begin
            pc_q <= 6'(PC_INF); state_q <= S_ISSUE;
          end else begin
            state_q <= S_SCAN;
          end
        end
        S_SCAN: begin
          // Shift out leading zeros, then the leading one itself.
          k_q     <= k_q << 1;
          nbits_q <= nbits_q - 1'b1;
          if (k_q[M-1]) begin
            pc_q    <= 6'(PC_INIT);
            state_q <= S_ISSUE;
          end
        end
        S_ISSUE: state_q <= S_WAIT;
        S_WAIT: if (alu_done) begin
          state_q <= S_ISSUE;
          pc_q    <= pc_q + 1'b1;
          unique case (pc_q)
            6'(PC_INIT_END):
              if (nbits_q == '0) state_q <= S_CHK_Z1;
            6'(PC_LAD_END): begin
              ladder_step <= 1'b1;
              ladder_bit  <= k_q[M-1];
              k_q         <= k_q << 1;
              nbits_q     <= nbits_q - 1'b1;
              if (nbits_q == MW'(1)) state_q <= S_CHK_Z1;
              else pc_q <= 6'(PC_LAD);
            end
            6'(PC_INF_END), 6'(PC_NEG_END), 6'(PC_CONV_END): begin
              state_q <= S_DONE;
            end
            6'(PC_PRE_END): inv_q <= MW'(M - 2);
            6'(PC_INV_END): begin
              inv_q <= inv_q - 1'b1;
              if (inv_q != MW'(1)) pc_q <= 6'(PC_INV);
            end
            default: ;
          endcase
        end
        S_CHK_Z1: begin
          if (rf_rdata_a_zero) begin pc_q <= 6'(PC_INF); state_q <= S_ISSUE; end
          else state_q <= S_CHK_Z2;
        end
        S_CHK_Z2: begin
          pc_q    <= rf_rdata_a_zero ? 6'(PC_NEG) : 6'(PC_PRE);
          state_q <= S_ISSUE;
        end
        S_DONE: begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_we_known_slot: assert property (@(posedge clk) disable iff (!rst_n)
    rf_we |-> (rf_waddr != R_X || rf_wsel == W_X));
endmodule
