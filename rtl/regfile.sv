// regfile: the eight 16-bit user registers R0-R7 of WISC-SP22, with
// register-file bypassing.
//
// Two combinational read ports and one write port written on the rising
// clock edge. R0 is an ordinary register (it is not hard-wired to zero).
// When the write port targets a register that is read in the same cycle,
// the read port returns the value being written, so an instruction in
// Decode sees the result of the instruction in Write Back without a stall
// (the bypass the pipeline requires). Reset clearing all registers is this
// design's choice.
module regfile #(
  parameter int unsigned NREGS = 8,
  parameter int unsigned WIDTH = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] raddr1,
  input  logic [$clog2(NREGS)-1:0] raddr2,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     wen,
  output logic [WIDTH-1:0]         rdata1,
  output logic [WIDTH-1:0]         rdata2
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wen) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1 = (wen && waddr == raddr1) ? wdata : regs[raddr1];
    rdata2 = (wen && waddr == raddr2) ? wdata : regs[raddr2];
  end
endmodule
