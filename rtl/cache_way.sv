// cache_way: one way of the two-way set-associative WISC-SP22 cache.
//
// Holds, per set, a tag, a valid bit, a dirty bit and a line of WORDS 16-bit
// words. Lookup is combinational: for the set selected by index, hit is
// valid && tag == tag_in, and data_out is the word selected by word.
// On a clock edge: we writes data_in into that word (and marks the line
// dirty when set_dirty); we_tag installs tag_in as valid with dirty_in.
// Valid bits clear on reset. The geometry (256 sets of 4-word lines with a
// 5-bit tag for a 16-bit byte address) is this design's choice.
module cache_way #(
  parameter int unsigned SETS  = 256,
  parameter int unsigned WORDS = 4,
  parameter int unsigned TAG_W = 16 - $clog2(SETS) - $clog2(WORDS) - 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(SETS)-1:0]  index,
  input  logic [TAG_W-1:0]         tag_in,
  input  logic [$clog2(WORDS)-1:0] word,
  input  logic [15:0]              data_in,
  input  logic                     we,
  input  logic                     set_dirty,
  input  logic                     we_tag,
  input  logic                     dirty_in,
  output logic                     hit,
  output logic                     valid,
  output logic                     dirty,
  output logic [TAG_W-1:0]         tag_out,
  output logic [15:0]              data_out
);
  logic [TAG_W-1:0] tags  [SETS];
  logic [SETS-1:0]  valids, dirtys;
  logic [15:0]      data  [SETS][WORDS];

  assign valid    = valids[index];
  assign dirty    = dirtys[index];
  assign tag_out  = tags[index];
  assign hit      = valid && (tag_out == tag_in);
  assign data_out = data[index][word];

  always_ff @(posedge clk) begin
    if (rst) begin
      valids <= '0;
      dirtys <= '0;
    end else begin
      if (we_tag) begin
        valids[index] <= 1'b1;
        dirtys[index] <= dirty_in;
      end
      if (we && set_dirty) dirtys[index] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we_tag) tags[index] <= tag_in;
    if (we)     data[index][word] <= data_in;
  end
endmodule
