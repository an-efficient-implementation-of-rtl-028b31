// ECC processor: scalar point multiplication Q = k x P on a binary curve
// y^2 + xy = x^3 + a x^2 + b over GF(2^M), using the Montgomery ladder in
// López-Dahab X/Z coordinates (the result does not depend on a).
// It joins the three units of the document: the control unit (ecc_control,
// an FSM with a micro-program), the memory unit (ecc_regfile, one write and
// two read ports) and the arithmetic unit (ecc_alu: adder, squarer,
// flexible bit-serial multiplier). The control unit loads x, y and b into
// the memory unit, runs the ladder and the affine conversion, and the
// results written to slots QX and QY are also captured in qx/qy.
// Interface: start pulse with k, x, y, b valid (sampled during the first
// five cycles after start, so hold them while busy); done pulses when qx, qy
// hold the result; (0,0) stands for the point at infinity.
// Timing: about (t-1)(6M+34) + (M-2)(M+5) + 11(M+3) + 30 cycles for a key
// whose leading one is bit t-1: about 193,000 cycles for a 163-bit key at
// M=163, 2.3 million for a 571-bit key at M=571.
// Following the document: the three-unit structure and Algorithm 1. Own
// choices: see ecc_control for the sequencing details.
module ecc_processor
  import ehsp_pkg::*;
#(
  parameter int unsigned  M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] x,
  input  logic [M-1:0] y,
  input  logic [M-1:0] b,
  output logic [M-1:0] qx,
  output logic [M-1:0] qy,
  output logic         busy,
  output logic         done,
  output logic         ladder_step,
  output logic         ladder_bit
);
  logic         rf_we;
  reg_e         rf_waddr, rf_raddr_a, rf_raddr_b;
  wsel_e        rf_wsel;
  logic [M-1:0] rf_wdata, rd_a, rd_b, alu_y;
  logic         alu_start, alu_done;
  alu_op_e      alu_op;

  ecc_control #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .key(k), .x_zero(x == '0),
    .rf_we, .rf_waddr, .rf_wsel, .rf_raddr_a, .rf_raddr_b,
    .rf_rdata_a_zero(rd_a == '0),
    .alu_start, .alu_op, .alu_done,
    .busy, .done, .ladder_step, .ladder_bit
  );

  always_comb begin
    unique case (rf_wsel)
      W_X:     rf_wdata = x;
      W_Y:     rf_wdata = y;
      W_B:     rf_wdata = b;
      W_ONE:   rf_wdata = M'(1);
      default: rf_wdata = alu_y;
    endcase
  end

  ecc_regfile #(.M(M), .REGS(REGS)) u_mem (
    .clk, .rst_n, .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .raddr_a(rf_raddr_a), .raddr_b(rf_raddr_b), .rdata_a(rd_a), .rdata_b(rd_b)
  );

  ecc_alu #(.M(M), .POLY(POLY)) u_alu (
    .clk, .rst_n, .start(alu_start), .op(alu_op), .a(rd_a), .b(rd_b),
    .y(alu_y), .done(alu_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qx <= '0;
      qy <= '0;
    end else if (rf_we) begin
      if (rf_waddr == R_QX) qx <= rf_wdata;
      if (rf_waddr == R_QY) qy <= rf_wdata;
    end
  end
endmodule
