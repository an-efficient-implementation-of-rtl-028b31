// Shared types and constants of the hybrid signcryption processor.
// The ECC processor's arithmetic unit executes one micro-operation at a time;
// the control unit's micro-program is a list of alu_uop_t words. Register
// addresses name the slots of the memory unit (ecc_regfile).
package ehsp_pkg;

  // Operations of the arithmetic unit. ADD and SQR finish in one cycle,
  // MUL takes one cycle per field bit (bit-serial multiplier).
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,   // d = a + b        (bitwise XOR)
    OP_SQR = 2'd1,   // d = a^2 mod f(x)
    OP_MUL = 2'd2,   // d = a * b mod f(x)
    OP_MOV = 2'd3    // d = a            (copy, used for constant loads)
  } alu_op_e;

  // Memory-unit slots. X, Y hold the input point, M1..M4 the ladder
  // coordinates, TMP the temporary of the document; T2..T7 are extra
  // temporaries used by the final conversion to affine coordinates.
  localparam int unsigned REGS = 16;
  typedef enum logic [3:0] {
    R_X   = 4'd0,  R_Y   = 4'd1,
    R_M1  = 4'd2,  R_M2  = 4'd3,  R_M3  = 4'd4,  R_M4 = 4'd5,
    R_TMP = 4'd6,  R_B   = 4'd7,  R_ONE = 4'd8,
    R_T2  = 4'd9,  R_T3  = 4'd10, R_T4  = 4'd11, R_T5 = 4'd12,
    R_T6  = 4'd13, R_QX  = 4'd14, R_QY  = 4'd15
  } reg_e;

  typedef struct packed {
    alu_op_e op;
    reg_e    dst;
    reg_e    srca;
    reg_e    srcb;
  } alu_uop_t;

  // Source of the memory unit's write data.
  typedef enum logic [2:0] {
    W_ALU = 3'd0,   // arithmetic-unit result
    W_X   = 3'd1,   // input point, x
    W_Y   = 3'd2,   // input point, y
    W_B   = 3'd3,   // curve constant b
    W_ONE = 3'd4    // field element 1
  } wsel_e;

  // Commands of the MKD hash sponge (mkd_hash).
  typedef enum logic [1:0] {
    HC_INIT    = 2'd0,  // clear the state
    HC_ABSORB  = 2'd1,  // XOR a block into the first RATE bits, permute
    HC_SQUEEZE = 2'd2   // permute without input (after reading rate_out)
  } hash_cmd_e;

endpackage
