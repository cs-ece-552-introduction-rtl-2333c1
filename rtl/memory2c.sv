// memory2c: single-cycle "perfect" memory of the early WISC-SP22 phases.
//
// 64 KiB of bytes holding 16-bit big-endian words (the byte at addr is the
// high byte). Unaligned word accesses are allowed. enable/wr select the
// operation: enable=0 no operation (data_out 0); enable=1, wr=0 read, with
// data_out following addr combinationally (flow-through); enable=1, wr=1
// write data_in at the rising clock edge (data_out 0).
// The program image is written through the load port (one word per cycle,
// at a byte address) instead of from a file, and createdump is only counted
// (dumps), since file input/output is not part of the hardware; both are
// this design's choices. The array is not reset.
module memory2c #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] data_in,
  output logic [15:0] data_out,
  input  logic [ADDR_W-1:0] addr,
  input  logic        enable,
  input  logic        wr,
  input  logic        createdump,
  // program load port
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [15:0]       load_data,
  output logic [15:0]       dumps
);
  logic [7:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] addr1, load_addr1;

  assign addr1      = addr + 1'b1;
  assign load_addr1 = load_addr + 1'b1;

  always_ff @(posedge clk) begin
    if (load_we) begin
      mem[load_addr]  <= load_data[15:8];
      mem[load_addr1] <= load_data[7:0];
    end else if (enable && wr) begin
      mem[addr]  <= data_in[15:8];
      mem[addr1] <= data_in[7:0];
    end
  end

  assign data_out = (enable && !wr) ? {mem[addr], mem[addr1]} : 16'h0000;

  always_ff @(posedge clk) begin
    if (rst)             dumps <= '0;
    else if (createdump) dumps <= dumps + 1'b1;
  end
endmodule
