// bs_md_cache: BugSifter's dedicated metadata cache.
//
// A small set-associative, write-back, write-allocate cache that holds
// metadata only, so the filter logic, the stack update unit and the
// monitor's Load/Store Metadata instructions reach metadata in one cycle
// without touching the L1-D.  It is addressed by metadata byte address:
// the application virtual address scaled by the metadata factor, so a
// block covers a fixed range of application addresses.  Defaults follow the
// design: 4 KB, two-way.  The 64-byte block matches the other caches of the
// system and is this design's choice, as are write-back and LRU.
//
// It has one port.  Operations (bs_pkg::md_op_e):
//   MD_RD     read the 32-bit word at addr
//   MD_WR     write the word at addr under a bit mask (sub-block interface)
//   MD_WRBLK  set the whole block holding addr to wdata repeated
//             (block-wide interface); a miss allocates the block without
//             fetching it, since every bit is overwritten
//   MD_FLUSH  write back every dirty block and invalidate the cache; the
//             software handler for an oversized stack frame uses it
// A hit completes in the cycle after the request is accepted: rsp_valid is
// high and rsp_rdata holds the word read.  In that same cycle the cache
// accepts the next request, so hits stream at one per cycle.  A miss writes
// back a dirty victim and fetches the block over the fill path (one
// request, one response of a whole block each), then completes as a hit.
// Every accepted request gets exactly one rsp_valid.  stat_hit and
// stat_miss pulse once per completed or missing lookup.
module bs_md_cache
  import bs_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter int unsigned WAYS       = 2,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // request / response port
  input  logic                    req_valid,
  output logic                    req_ready,
  input  md_req_t                 req,
  output logic                    rsp_valid,
  output logic [XLEN-1:0]         rsp_rdata,
  // fill path to the L2
  output logic                    mem_req_valid,
  input  logic                    mem_req_ready,
  output logic                    mem_req_we,
  output logic [XLEN-1:0]         mem_req_addr,
  output logic [LINE_BYTES*8-1:0] mem_req_wdata,
  input  logic                    mem_rsp_valid,
  input  logic [LINE_BYTES*8-1:0] mem_rsp_rdata,
  // statistics
  output logic                    stat_hit,
  output logic                    stat_miss
);

  localparam int unsigned LINE_BITS = LINE_BYTES * 8;
  localparam int unsigned WPL       = LINE_BYTES / 4;
  localparam int unsigned SETS      = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W     = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WOFF_W    = $clog2(WPL);
  localparam int unsigned TAG_W     = XLEN - OFF_W - IDX_W;
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT,
    S_FLUSH, S_FWB_REQ, S_FWB_WAIT, S_FLUSH_DONE
  } state_e;

  state_e state, state_n;

  logic [LINE_BITS-1:0] data  [SETS][WAYS];
  logic [TAG_W-1:0]     tags  [SETS][WAYS];
  logic [WAYS-1:0]      valid [SETS];
  logic [WAYS-1:0]      dirty [SETS];
  logic [WAY_W-1:0]     lru   [SETS];   // way to evict next

  md_req_t              q;              // request being served
  logic [WAY_W-1:0]     vic;            // victim way of the current miss
  logic [IDX_W-1:0]     fset;           // flush walk position
  logic [WAY_W-1:0]     fway;

  logic [IDX_W-1:0]     idx;
  logic [TAG_W-1:0]     tag;
  logic [WOFF_W-1:0]    woff;
  logic                 hit;
  logic [WAY_W-1:0]     hway;
  logic [WAY_W-1:0]     vic_sel;
  logic                 accept;

  assign idx  = q.addr[OFF_W +: IDX_W];
  assign tag  = q.addr[XLEN-1 -: TAG_W];
  assign woff = q.addr[2 +: WOFF_W];

  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[idx][w] && tags[idx][w] == tag) begin
        hit  = 1'b1;
        hway = WAY_W'(w);
      end
    end
    // an invalid way is taken before the LRU one
    vic_sel = lru[idx];
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid[idx][w]) vic_sel = WAY_W'(w);
    end
  end

  logic lookup_done;   // a non-flush request completes this cycle
  assign lookup_done = (state == S_LOOKUP) && (q.op != MD_FLUSH) && hit;

  assign req_ready = (state == S_IDLE) || lookup_done;
  assign accept    = req_valid && req_ready;

  assign rsp_valid = lookup_done || (state == S_FLUSH_DONE);
  assign rsp_rdata = lookup_done ? data[idx][hway][woff*32 +: 32] : '0;

  assign stat_hit  = lookup_done;
  assign stat_miss = (state == S_LOOKUP) && (q.op != MD_FLUSH) && !hit;

  // fill path
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = '0;
    mem_req_wdata = '0;
    unique case (state)
      S_WB_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {tags[idx][vic], idx, {OFF_W{1'b0}}};
        mem_req_wdata = data[idx][vic];
      end
      S_FWB_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = {tags[fset][fway], fset, {OFF_W{1'b0}}};
        mem_req_wdata = data[fset][fway];
      end
      S_FILL_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_addr  = {tag, idx, {OFF_W{1'b0}}};
      end
      default: ;
    endcase
  end

  logic last_line;
  assign last_line = (32'(fset) == SETS - 1) && (32'(fway) == WAYS - 1);

  // next state
  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:
        if (accept) state_n = S_LOOKUP;
      S_LOOKUP: begin
        if (q.op == MD_FLUSH)                  state_n = S_FLUSH;
        else if (hit)                          state_n = accept ? S_LOOKUP : S_IDLE;
        else if (valid[idx][vic_sel] && dirty[idx][vic_sel]) state_n = S_WB_REQ;
        else if (q.op == MD_WRBLK)             state_n = S_LOOKUP;  // allocated, no fetch
        else                                   state_n = S_FILL_REQ;
      end
      S_WB_REQ:    if (mem_req_ready) state_n = S_WB_WAIT;
      S_WB_WAIT:   if (mem_rsp_valid) state_n = (q.op == MD_WRBLK) ? S_LOOKUP : S_FILL_REQ;
      S_FILL_REQ:  if (mem_req_ready) state_n = S_FILL_WAIT;
      S_FILL_WAIT: if (mem_rsp_valid) state_n = S_LOOKUP;
      S_FLUSH: begin
        if (valid[fset][fway] && dirty[fset][fway]) state_n = S_FWB_REQ;
        else if (last_line)                         state_n = S_FLUSH_DONE;
      end
      S_FWB_REQ:    if (mem_req_ready) state_n = S_FWB_WAIT;
      S_FWB_WAIT:   if (mem_rsp_valid) state_n = last_line ? S_FLUSH_DONE : S_FLUSH;
      S_FLUSH_DONE: state_n = S_IDLE;
      default:      state_n = S_IDLE;
    endcase
  end

  // control state, tags, valid/dirty/LRU bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      q     <= '0;
      vic   <= '0;
      fset  <= '0;
      fway  <= '0;
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
        lru[s]   <= '0;
      end
    end else begin
      state <= state_n;
      if (accept) q <= req;
      unique case (state)
        S_LOOKUP: begin
          if (q.op == MD_FLUSH) begin
            fset <= '0;
            fway <= '0;
          end else if (hit) begin
            if (q.op != MD_RD) dirty[idx][hway] <= 1'b1;
            lru[idx] <= (WAYS > 1) ? WAY_W'((32'(hway) + 1) % WAYS) : '0;
          end else begin
            vic <= vic_sel;
            if (!(valid[idx][vic_sel] && dirty[idx][vic_sel]) && q.op == MD_WRBLK) begin
              valid[idx][vic_sel] <= 1'b1;
              dirty[idx][vic_sel] <= 1'b0;
            end
          end
        end
        S_WB_WAIT:
          if (mem_rsp_valid) begin
            dirty[idx][vic] <= 1'b0;
            if (q.op == MD_WRBLK) valid[idx][vic] <= 1'b1;
            else                  valid[idx][vic] <= 1'b0;
          end
        S_FILL_WAIT:
          if (mem_rsp_valid) begin
            valid[idx][vic] <= 1'b1;
            dirty[idx][vic] <= 1'b0;
          end
        S_FLUSH, S_FWB_WAIT: begin
          if (state == S_FWB_WAIT ? mem_rsp_valid
                                  : !(valid[fset][fway] && dirty[fset][fway])) begin
            valid[fset][fway] <= 1'b0;
            dirty[fset][fway] <= 1'b0;
            if (32'(fway) == WAYS - 1) begin
              fway <= '0;
              fset <= fset + 1'b1;
            end else begin
              fway <= fway + 1'b1;
            end
          end
        end
        default: ;
      endcase
    end
  end

  // tag array: set on allocation (WRBLK miss or fill)
  always_ff @(posedge clk) begin
    if (state == S_LOOKUP && q.op == MD_WRBLK && !hit &&
        !(valid[idx][vic_sel] && dirty[idx][vic_sel]))
      tags[idx][vic_sel] <= tag;
    else if ((state == S_WB_WAIT && q.op == MD_WRBLK && mem_rsp_valid) ||
             (state == S_FILL_WAIT && mem_rsp_valid))
      tags[idx][vic] <= tag;
  end

  // data array
  always_ff @(posedge clk) begin
    if (lookup_done && q.op == MD_WR) begin
      data[idx][hway][woff*32 +: 32] <=
        (data[idx][hway][woff*32 +: 32] & ~q.wmask) | (q.wdata & q.wmask);
    end else if (lookup_done && q.op == MD_WRBLK) begin
      data[idx][hway] <= {WPL{q.wdata}};
    end else if (state == S_FILL_WAIT && mem_rsp_valid) begin
      data[idx][vic] <= mem_rsp_rdata;
    end
  end

endmodule
