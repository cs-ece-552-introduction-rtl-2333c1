// tb_cache_way: installs tags and writes words into random sets of one
// cache way and checks hit, valid, dirty, tag and data against a
// reference; valid bits must clear on reset.
`timescale 1ns/1ps
module tb_cache_way;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] index;
  logic [4:0] tag_in, tag_out;
  logic [1:0] word;
  logic [15:0] data_in, data_out;
  logic we, set_dirty, we_tag, dirty_in, hit, valid, dirty;

  cache_way #(.SETS(256), .WORDS(4)) dut (.*);

  logic [4:0]  r_tag [256];
  logic        r_val [256], r_dirty [256];
  logic [15:0] r_data [256][4];
  logic        r_known [256][4];   // word written since reset
  int checks = 0, failures = 0, nhit = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    we = 0; set_dirty = 0; we_tag = 0; dirty_in = 0; index = 0; tag_in = 0; word = 0; data_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (r_val[i]) begin r_val[i] = 0; r_dirty[i] = 0; for (int w = 0; w < 4; w++) r_known[i][w] = 0; end
    for (int i = 0; i < 256; i += 17) begin index = 8'(i); #1; check(!valid, "valid clear after reset"); end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      index = 8'($urandom_range(0, 15)); tag_in = 5'($urandom_range(0, 3)); word = 2'($urandom);
      data_in = 16'($urandom); dirty_in = 1'($urandom);
      we = 1'($urandom); set_dirty = 1'($urandom); we_tag = ($urandom_range(0, 3) == 0);
      #1;
      check(valid == r_val[index], "valid");
      check(hit == (r_val[index] && r_tag[index] == tag_in), "hit");
      if (r_val[index]) begin
        check(tag_out == r_tag[index], "tag");
        check(dirty == r_dirty[index], "dirty");
        if (r_known[index][word]) check(data_out == r_data[index][word], "data");
      end
      if (hit) nhit++;
      @(posedge clk);
      if (we_tag) begin r_val[index] = 1; r_tag[index] = tag_in; r_dirty[index] = dirty_in; end
      if (we) begin r_data[index][word] = data_in; r_known[index][word] = 1; if (set_dirty) r_dirty[index] = 1; end
    end
    check(nhit > 0, "hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
