// bs_filter_logic: decides, for each event, whether software must see it.
//
// For every event from the event dispatch logic it looks up the event type
// in the filter table, then:
//   * clean check (cc): reads the metadata of the operands the entry names
//     (src and/or dst) and filters the event if each equals the invariant;
//   * redundant update (ru): filters the event if the source metadata equals
//     the destination metadata, since the propagation would change nothing;
//   * partial filter (pf): the same check, but the event always reaches
//     software, with the simplified handler if the check passed and the
//     complex handler if it failed (AtomCheck's "same thread as last time");
//   * stack update (su): hands the frame to the stack update unit, unless
//     its metadata would not fit in the metadata cache, in which case the
//     event goes to software (whose handler flushes the cache first);
//   * no entry: the event goes to software with its full handler.
// Register metadata comes from the two read ports of the metadata register
// file in one cycle; memory metadata comes from the one-port metadata
// cache, one read per cycle, so an event with two memory operands reads
// over two consecutive cycles.  The metadata factor picks the item of
// 32 >> lf bits out of the cache word; items and the invariant are compared
// at that width.
//
// Timing: an event is accepted (ev_valid/ev_ready) in S_IDLE; metadata is
// read in S_READ (one cycle for register operands, one more per memory
// operand on a cache hit); the decision is made in S_EVAL.  A filtered
// event lets the next one in during S_EVAL, so register-only events are
// filtered every two cycles and one-memory-operand events every three.  A
// dispatched event waits in S_DISP for the dispatch stage and then in
// S_HANDLER until the monitor core reports the handler finished
// (hnd_done), so later events see the metadata that handler wrote.  Memory
// reads wait while the stack update unit is busy so they see its writes.
// res_valid pulses once per event with its outcome.  The one-at-a-time
// ordering, the wait for hnd_done and the precedence of cc over ru when an
// entry has both are this design's choices.  The entry's valid and
// event-type fields are not read here (the table has already matched them),
// and the cache request's write fields are constant because this port only
// reads.
module bs_filter_logic
  import bs_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic [XLEN-1:0]   inv,
  input  logic [LF_W-1:0]   lf,
  input  logic [XLEN-1:0]   su_call_val,
  input  logic [XLEN-1:0]   su_ret_val,
  // events in
  input  logic              ev_valid,
  output logic              ev_ready,
  input  ev_t               ev,
  // filter table lookup
  output logic [EVID_W-1:0] ft_evid,
  input  logic              ft_hit,
  input  ft_entry_t         ft_entry,
  // metadata register file, two read ports
  output logic [REG_W-1:0]  rf_raddr0,
  input  logic [XLEN-1:0]   rf_rdata0,
  output logic [REG_W-1:0]  rf_raddr1,
  input  logic [XLEN-1:0]   rf_rdata1,
  // metadata cache port (reads only)
  output logic              md_req_valid,
  input  logic              md_req_ready,
  output md_req_t           md_req,
  input  logic              md_rsp_valid,
  input  logic [XLEN-1:0]   md_rsp_rdata,
  // stack update unit
  output logic              su_valid,
  input  logic              su_ready,
  input  logic              su_busy,
  output logic [XLEN-1:0]   su_addr,
  output logic [XLEN-1:0]   su_len,
  output logic [XLEN-1:0]   su_val,
  // events for software
  output logic              disp_valid,
  input  logic              disp_ready,
  output ev_t               disp_ev,
  output hnd_e              disp_hnd,
  input  logic              hnd_done,
  // outcome of each event
  output logic              res_valid,
  output result_e           res
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_EVAL, S_SU, S_DISP, S_HANDLER} state_e;
  state_e state;

  ev_t             e;
  // action bits of the matching entry
  typedef struct packed {
    logic cc, ru, su, pf, su_ret;
  } act_t;
  act_t            ent;
  logic            ent_hit;
  logic            use_src, use_dst;
  logic            pend_src, pend_dst;   // memory reads still to issue
  logic            wait_src, wait_dst;   // memory reads issued, not answered
  logic [XLEN-1:0] src_md, dst_md;
  logic            src_rdy, dst_rdy;
  result_e         out_res;
  hnd_e            out_hnd;

  logic [XLEN-1:0] mask, invm;
  assign mask = item_mask(lf);
  assign invm = inv & mask;

  // ---------------------------------------------------------------- lookup
  assign ft_evid = ev.evid;

  // operands taking part in a check, decided at acceptance
  logic acc_use_src, acc_use_dst;
  assign acc_use_src = ft_hit && ft_entry.src && (ft_entry.cc || ft_entry.ru) &&
                       !ft_entry.su && ev.src.kind != OP_NONE;
  assign acc_use_dst = ft_hit && ft_entry.dst && (ft_entry.cc || ft_entry.ru) &&
                       !ft_entry.su && ev.dst.kind != OP_NONE;

  // ---------------------------------------------------------------- metadata reads
  assign rf_raddr0 = e.src.rnum;
  assign rf_raddr1 = e.dst.rnum;

  logic [XLEN+2:0] src_bit, dst_bit;
  logic [XLEN-3:0] rd_word;
  assign src_bit = md_bit_addr(e.src.addr[XLEN-1:2], lf);
  assign dst_bit = md_bit_addr(e.dst.addr[XLEN-1:2], lf);
  assign rd_word = pend_src ? src_bit[XLEN+2:5] : dst_bit[XLEN+2:5];

  assign md_req_valid = (state == S_READ) && (pend_src || pend_dst) && !su_busy;
  assign md_req.op    = MD_RD;
  assign md_req.addr  = {rd_word, 2'b00};
  assign md_req.wdata = '0;
  assign md_req.wmask = '0;

  // bit position of each memory item within its metadata word
  logic [4:0] src_sh, dst_sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_sh <= '0;
      dst_sh <= '0;
    end else if (state == S_READ) begin
      src_sh <= src_bit[4:0];
      dst_sh <= dst_bit[4:0];
    end
  end

  // ---------------------------------------------------------------- decision
  logic cc_ok, ru_ok, chk_ok;
  logic su_fits;
  logic [XLEN+5:0] su_bits;

  assign cc_ok  = (use_src || use_dst) &&
                  (!use_src || src_md == invm) && (!use_dst || dst_md == invm);
  assign ru_ok  = use_src && use_dst && (src_md == dst_md);
  assign chk_ok = (ent.cc && cc_ok) || (ent.ru && ru_ok);

  assign su_bits = ({6'b0, e.su_len} + 38'd3) >> 2 << (5 - lf);
  assign su_fits = su_bits <= 38'(CACHE_BYTES * 8);

  always_comb begin
    out_res = RES_DISPATCH;
    out_hnd = HND_FULL;
    if (!ent_hit) begin
      out_res = RES_DISPATCH;
    end else if (ent.su) begin
      out_res = su_fits ? RES_STACK_HW : RES_DISPATCH;
    end else if (ent.pf) begin
      out_res = chk_ok ? RES_DISP_SIMP : RES_DISP_CPLX;
      out_hnd = chk_ok ? HND_SIMPLE : HND_FULL;
    end else if (ent.cc && cc_ok) begin
      out_res = RES_FILT_CC;
    end else if (ent.ru && ru_ok) begin
      out_res = RES_FILT_RU;
    end
  end

  logic filtered_now;
  assign filtered_now = (state == S_EVAL) &&
                        (out_res == RES_FILT_CC || out_res == RES_FILT_RU);

  assign ev_ready  = (state == S_IDLE) || filtered_now;
  assign res_valid = (state == S_EVAL);
  assign res       = out_res;

  assign su_valid  = (state == S_SU);
  assign su_addr   = e.su_addr;
  assign su_len    = e.su_len;
  assign su_val    = ent.su_ret ? su_ret_val : su_call_val;

  assign disp_valid = (state == S_DISP);
  assign disp_ev    = e;

  logic accept;
  assign accept = ev_valid && ev_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      e        <= '0;
      ent      <= '0;
      ent_hit  <= 1'b0;
      use_src  <= 1'b0;
      use_dst  <= 1'b0;
      pend_src <= 1'b0;
      pend_dst <= 1'b0;
      wait_src <= 1'b0;
      wait_dst <= 1'b0;
      src_md   <= '0;
      dst_md   <= '0;
      src_rdy  <= 1'b0;
      dst_rdy  <= 1'b0;
      disp_hnd <= HND_FULL;
    end else begin
      if (accept) begin
        e        <= ev;
        ent      <= '{cc: ft_entry.cc, ru: ft_entry.ru, su: ft_entry.su,
                      pf: ft_entry.pf, su_ret: ft_entry.su_ret};
        ent_hit  <= ft_hit;
        use_src  <= acc_use_src;
        use_dst  <= acc_use_dst;
        pend_src <= acc_use_src && ev.src.kind == OP_MEM;
        pend_dst <= acc_use_dst && ev.dst.kind == OP_MEM;
        src_rdy  <= !(acc_use_src && ev.src.kind == OP_MEM);
        dst_rdy  <= !(acc_use_dst && ev.dst.kind == OP_MEM);
        wait_src <= 1'b0;
        wait_dst <= 1'b0;
        state    <= (ft_hit && !ft_entry.su) ? S_READ : S_EVAL;
      end else begin
        unique case (state)
          S_READ: begin
            // register operands: both ports in one cycle
            if (e.src.kind == OP_REG) src_md <= rf_rdata0 & mask;
            if (e.dst.kind == OP_REG) dst_md <= rf_rdata1 & mask;
            // memory operands: one cache read per cycle, source first
            if (md_req_valid && md_req_ready) begin
              if (pend_src) begin
                pend_src <= 1'b0;
                wait_src <= 1'b1;
              end else begin
                pend_dst <= 1'b0;
                wait_dst <= 1'b1;
              end
            end
            if (md_rsp_valid) begin
              if (wait_src) begin
                wait_src <= 1'b0;
                src_rdy  <= 1'b1;
                src_md   <= (md_rsp_rdata >> src_sh) & mask;
              end else if (wait_dst) begin
                wait_dst <= 1'b0;
                dst_rdy  <= 1'b1;
                dst_md   <= (md_rsp_rdata >> dst_sh) & mask;
              end
            end
            if ((src_rdy || (md_rsp_valid && wait_src)) &&
                (dst_rdy || (md_rsp_valid && wait_dst && !wait_src)))
              state <= S_EVAL;
          end
          S_EVAL: begin
            unique case (out_res)
              RES_FILT_CC, RES_FILT_RU: state <= S_IDLE;
              RES_STACK_HW:             state <= S_SU;
              default: begin
                disp_hnd <= out_hnd;
                state    <= S_DISP;
              end
            endcase
          end
          S_SU:      if (su_ready)   state <= S_IDLE;
          S_DISP:    if (disp_ready) state <= S_HANDLER;
          S_HANDLER: if (hnd_done)   state <= S_IDLE;
          default:   state <= S_IDLE;
        endcase
      end
    end
  end

  // Offers to the stack update unit and to dispatch are held until taken.
  a_su_hold: assert property (@(posedge clk) disable iff (!rst_n)
      su_valid && !su_ready |=> su_valid && $stable(su_addr) && $stable(su_len) &&
                                $stable(su_val))
    else $error("stack update command changed before it was taken");
  a_disp_hold: assert property (@(posedge clk) disable iff (!rst_n)
      disp_valid && !disp_ready |=> disp_valid && $stable(disp_ev) && $stable(disp_hnd))
    else $error("dispatch request changed before it was taken");
  // Cache reads are only made while the stack update unit is idle.
  a_rd_after_su: assert property (@(posedge clk) disable iff (!rst_n)
      md_req_valid |-> !su_busy)
    else $error("metadata read issued while a stack update was running");

endmodule
