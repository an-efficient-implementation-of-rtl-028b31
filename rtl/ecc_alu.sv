// Arithmetic unit of the ECC processor over GF(2^M).
// Holds the three field units of the document: an M-bit XOR adder, the
// wired-XOR squarer and the flexible bit-serial multiplier (here fixed to the
// processor's field by tying its size and polynomial inputs). A start pulse
// with op, a and b begins an operation; done pulses when y holds the result.
// Timing: ADD, SQR and MOV take one cycle (done one cycle after start); MUL
// takes M+2 cycles (M+1 in the multiplier, one to register the result).
// Following the document: adder, squarer and multiplier as the arithmetic
// unit. Own choices: a result register and a MOV operation for constant loads.
module ecc_alu
  import ehsp_pkg::*;
#(
  parameter int unsigned  M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  alu_op_e      op,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y,
  output logic         done
);
  localparam int unsigned MW = $clog2(M + 1);

  logic [M-1:0] sq, prod;
  logic         mul_start, mul_busy, mul_done;

  gf2m_squarer #(.M(M), .POLY(POLY)) u_sqr (.a(a), .y(sq));

  assign mul_start = start && (op == OP_MUL);

  gf2m_flex_multiplier #(.MMAX(M)) u_mul (
    .clk, .rst_n,
    .start(mul_start), .m(MW'(M)), .poly(POLY),
    .a, .b, .c(prod), .busy(mul_busy), .done(mul_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        unique case (op)
          OP_ADD: begin y <= a ^ b; done <= 1'b1; end
          OP_SQR: begin y <= sq;    done <= 1'b1; end
          OP_MOV: begin y <= a;     done <= 1'b1; end
          default: ;
        endcase
      end else if (mul_done) begin
        y    <= prod;
        done <= 1'b1;
      end
    end
  end

  a_no_start_while_mul: assert property (@(posedge clk) disable iff (!rst_n) mul_busy |-> !start);
endmodule
