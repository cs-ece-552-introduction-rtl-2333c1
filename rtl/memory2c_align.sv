// memory2c_align: aligned single-cycle memory (the memory of phase 2.1).
//
// Same interface and timing as memory2c plus err. Word accesses must be at
// even byte addresses: when enable is set and addr[0] is 1, err is raised,
// a read returns the aligned word (the word at addr with bit 0 cleared) and
// a write stores nothing. Built as a wrapper around memory2c, which is this
// design's choice.
module memory2c_align #(
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
  output logic        err,
  input  logic              load_we,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [15:0]       load_data,
  output logic [15:0]       dumps
);
  logic misaligned;
  assign misaligned = addr[0];
  assign err        = enable && misaligned;

  memory2c #(.ADDR_W(ADDR_W)) u_mem (
    .clk, .rst, .data_in, .data_out,
    .addr({addr[ADDR_W-1:1], 1'b0}),
    // a misaligned write is dropped; a misaligned read still returns data
    .enable(enable && !(wr && misaligned)),
    .wr, .createdump, .load_we, .load_addr, .load_data, .dumps
  );
endmodule
