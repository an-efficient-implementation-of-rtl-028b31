// Memory unit of the ECC processor: a distributed-RAM register file of
// REGS words of M bits with one write port and two asynchronous read ports,
// so that any slot can be written and any two slots read at once.
// Slot names (ehsp_pkg::reg_e): X and Y hold the input point, M1..M4 the
// ladder coordinates, TMP the temporary of the document; the others are
// constants and extra temporaries added for the affine conversion.
// Timing: writes take effect at the clock edge with we high; reads are
// combinational. Reset clears every slot.
// Following the document: X, Y, R_M1..R_M4, R_Temp, one M-bit write port and
// two M-bit read ports. Own choices: 16 slots and reset to zero.
module ecc_regfile #(
  parameter int unsigned M    = 163,
  parameter int unsigned REGS = 16,
  localparam int unsigned AW  = $clog2(REGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [M-1:0]  wdata,
  input  logic [AW-1:0] raddr_a,
  input  logic [AW-1:0] raddr_b,
  output logic [M-1:0]  rdata_a,
  output logic [M-1:0]  rdata_b
);
  logic [M-1:0] mem [REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(REGS); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule
