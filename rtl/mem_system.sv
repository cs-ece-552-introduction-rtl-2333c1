// mem_system: two-way set-associative cache in front of the banked main
// memory, with the same request interface as stallmem.
//
// Address split (16-bit byte address): tag = Addr[15:11], set index =
// Addr[10:3], word in line = Addr[2:1], Addr[0] must be 0 (else err).
// Policy: write-back, write-allocate.
//   Hit  : Done and CacheHit in the request cycle; a read returns the word
//          combinationally, a write updates the word and marks it dirty.
//   Miss : the victim way is chosen (an invalid way first, way 0 if both;
//          otherwise the victim-way bit). A dirty victim's four words are
//          written to memory (WB), the line is then read (FILL, four reads
//          to the four banks, data arrives LATENCY cycles later), its tag is
//          installed, and the original access completes from the cache
//          (DONE state): Done=1, CacheHit=0. Stall is raised from the cycle
//          after the miss until the access completes.
// The victim-way bit toggles on every accepted access, which makes the
// replacement deterministic, as the specification requires. The request
// must be held until Done. The line size, the victim-way rule and the
// state machine are this design's choices.
module mem_system
  import wisc_pkg::*;
#(
  parameter int unsigned SETS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] Addr,
  input  logic [15:0] DataIn,
  input  logic        Rd,
  input  logic        Wr,
  input  logic        createdump,
  output logic [15:0] DataOut,
  output logic        Done,
  output logic        Stall,
  output logic        CacheHit,
  output logic        err,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [15:0] load_data
);
  localparam int unsigned IW = $clog2(SETS);
  localparam int unsigned TW = 16 - IW - 3;

  typedef enum logic [1:0] { S_IDLE, S_WB, S_FILL, S_DONE } state_e;
  state_e state;

  // request latched at a miss
  logic [15:0] r_addr, r_data;
  logic        r_wr, r_way;
  logic [2:0]  issue_cnt, ret_cnt;
  logic        victimway;

  logic [15:0] cur_addr;
  logic [TW-1:0] tag;
  logic [IW-1:0] index;
  logic [1:0]    word;
  logic          req;

  // per-way signals
  logic          w_hit [2], w_valid [2], w_dirty [2];
  logic [TW-1:0] w_tag [2];
  logic [15:0]   w_data [2];
  logic          w_we [2], w_we_tag [2], w_set_dirty [2];
  logic [1:0]    w_word;
  logic [15:0]   w_wdata;

  // main memory
  logic [15:0] m_addr, m_wdata, m_rdata;
  logic        m_rd, m_wr, m_rvalid, m_stall, m_err;
  logic [3:0]  m_busy;

  assign req      = (Rd || Wr) && !Addr[0];
  assign err      = (Rd || Wr) && Addr[0];
  assign cur_addr = (state == S_IDLE) ? Addr : r_addr;
  assign tag      = cur_addr[15:16-TW];
  assign index    = cur_addr[IW+2:3];
  assign word     = cur_addr[2:1];

  logic hit_any, hit_way, miss_way;
  assign hit_any  = w_hit[0] || w_hit[1];
  assign hit_way  = w_hit[1];
  assign miss_way = !w_valid[0] ? 1'b0 : (!w_valid[1] ? 1'b1 : victimway);

  for (genvar w = 0; w < 2; w++) begin : g_way
    cache_way #(.SETS(SETS), .WORDS(4)) u_way (
      .clk, .rst, .index, .tag_in(tag), .word(w_word), .data_in(w_wdata),
      .we(w_we[w]), .set_dirty(w_set_dirty[w]), .we_tag(w_we_tag[w]), .dirty_in(1'b0),
      .hit(w_hit[w]), .valid(w_valid[w]), .dirty(w_dirty[w]), .tag_out(w_tag[w]),
      .data_out(w_data[w])
    );
  end

  banked_mem #(.BANKS(4), .LATENCY(2), .BUSY(4)) u_mem (
    .clk, .rst, .addr(m_addr), .data_in(m_wdata), .rd(m_rd), .wr(m_wr),
    .data_out(m_rdata), .rvalid(m_rvalid), .stall(m_stall), .err(m_err), .busy(m_busy),
    .load_we, .load_addr, .load_data
  );

  // ------------------------------------------------------------ datapath
  always_comb begin
    for (int w = 0; w < 2; w++) begin
      w_we[w] = 1'b0; w_we_tag[w] = 1'b0; w_set_dirty[w] = 1'b0;
    end
    w_word   = word;
    w_wdata  = DataIn;
    m_rd     = 1'b0;
    m_wr     = 1'b0;
    m_addr   = '0;
    m_wdata  = '0;
    Done     = 1'b0;
    CacheHit = 1'b0;
    DataOut  = '0;
    unique case (state)
      S_IDLE: if (req && hit_any) begin
        Done     = 1'b1;
        CacheHit = 1'b1;
        DataOut  = Rd ? w_data[hit_way] : '0;
        if (Wr) begin w_we[hit_way] = 1'b1; w_set_dirty[hit_way] = 1'b1; end
      end
      S_WB: begin
        // write back the victim's words 0..3 (one per bank)
        w_word  = issue_cnt[1:0];
        m_wr    = !issue_cnt[2];
        m_addr  = {w_tag[r_way], index, issue_cnt[1:0], 1'b0};
        m_wdata = w_data[r_way];
      end
      S_FILL: begin
        m_rd    = !issue_cnt[2];
        m_addr  = {tag, index, issue_cnt[1:0], 1'b0};
        w_word  = ret_cnt[1:0];
        w_wdata = m_rdata;
        w_we[r_way] = m_rvalid;
        w_we_tag[r_way] = m_rvalid && ret_cnt == 3'd3;
      end
      S_DONE: begin
        Done    = 1'b1;
        DataOut = r_wr ? '0 : w_data[r_way];
        w_wdata = r_data;
        if (r_wr) begin w_we[r_way] = 1'b1; w_set_dirty[r_way] = 1'b1; end
      end
      default: ;
    endcase
  end

  assign Stall = (state != S_IDLE) && (state != S_DONE);

  // --------------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      victimway <= 1'b0;
      issue_cnt <= '0;
      ret_cnt   <= '0;
      r_way     <= 1'b0;
      r_wr      <= 1'b0;
      r_addr    <= '0;
      r_data    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          victimway <= !victimway;
          if (!hit_any) begin
            r_addr    <= Addr;
            r_data    <= DataIn;
            r_wr      <= Wr;
            r_way     <= miss_way;
            issue_cnt <= '0;
            ret_cnt   <= '0;
            state     <= (w_valid[miss_way] && w_dirty[miss_way]) ? S_WB : S_FILL;
          end
        end
        S_WB: begin
          if (m_wr && !m_stall) issue_cnt <= issue_cnt + 1'b1;
          if (issue_cnt == 3'd4) begin issue_cnt <= '0; state <= S_FILL; end
        end
        S_FILL: begin
          if (m_rd && !m_stall) issue_cnt <= issue_cnt + 1'b1;
          if (m_rvalid) begin
            ret_cnt <= ret_cnt + 1'b1;
            if (ret_cnt == 3'd3) state <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (rst) !(Rd && Wr));
  // The requester must hold its request while a miss is serviced.
  a_hold:   assert property (@(posedge clk) disable iff (rst)
                             (state != S_IDLE) |-> ((Rd || Wr) && Addr == r_addr));
endmodule
