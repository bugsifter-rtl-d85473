// bugsifter: the BugSifter monitoring accelerator, top level.
//
// BugSifter sits beside the core that runs an instruction-grain monitor.
// The application core's committed instructions arrive as a stream of
// events; without BugSifter every event runs a software handler that
// checks and updates metadata.  BugSifter does the common cases in
// hardware: it drops events whose check would pass (clean check) or whose
// update would change nothing (redundant update), runs stack-frame metadata
// updates itself, and for the rest hands the monitor core the address of
// the handler to run, a simplified one where a partial check already
// passed.  All of it is programmed by monitor software, so one design
// serves many monitors.
//
// Blocks:  bs_cfg_regs (invariant, metadata factor, stack values),
// bs_filter_table (30 entries), bs_md_rf (8 x 32-bit register metadata),
// bs_filter_logic, bs_stack_update_unit, bs_md_arb + bs_md_cache (4 KB,
// two-way, fill path to the L2) and bs_event_dispatch (handler jump table).
//
// Programming port (cfg_we, cfg_addr, cfg_wdata), one word per write:
//   0x000-0x01D  filter table entry n, cfg_wdata[15:0] = bs_pkg::ft_entry_t
//   0x020-0x023  INV, MFACTOR, SU_CALL, SU_RET (see bs_cfg_regs)
//   0x200-0x3FF  jump table entry {variant, event type}
// This map is this design's choice.
//
// Event port: ev_valid/ev_ready with a bs_pkg::ev_t.  Handler port:
// hnd_valid/hnd_ready with the event, the variant and the handler address;
// the core pulses hnd_done when the handler has finished, and only then
// does BugSifter take the next event.  The core writes register metadata
// through mdrf_*, and reads/writes memory metadata (Load/Store Metadata,
// and a flush before a software stack update) through sw_md_*.  The l2_*
// port is the cache's fill path.  res_valid/res report each event's
// outcome; the stat_* outputs pulse for counting.
module bugsifter
  import bs_pkg::*;
#(
  parameter int unsigned FT_ENTRIES  = 30,
  parameter int unsigned CACHE_BYTES = 4096,
  parameter int unsigned CACHE_WAYS  = 2,
  parameter int unsigned LINE_BYTES  = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // programming
  input  logic                    cfg_we,
  input  logic [9:0]              cfg_addr,
  input  logic [XLEN-1:0]         cfg_wdata,
  // events from the event queue
  input  logic                    ev_valid,
  output logic                    ev_ready,
  input  ev_t                     ev,
  // handlers for the monitor core
  output logic                    hnd_valid,
  input  logic                    hnd_ready,
  output ev_t                     hnd_ev,
  output hnd_e                    hnd_kind,
  output logic [XLEN-1:0]         hnd_pc,
  input  logic                    hnd_done,
  // monitor core: register metadata writes
  input  logic                    mdrf_we,
  input  logic [REG_W-1:0]        mdrf_waddr,
  input  logic [XLEN-1:0]         mdrf_wdata,
  // monitor core: Load/Store Metadata
  input  logic                    sw_md_valid,
  output logic                    sw_md_ready,
  input  md_req_t                 sw_md_req,
  output logic                    sw_md_rsp_valid,
  output logic [XLEN-1:0]         sw_md_rsp_rdata,
  // fill path to the L2
  output logic                    l2_req_valid,
  input  logic                    l2_req_ready,
  output logic                    l2_req_we,
  output logic [XLEN-1:0]         l2_req_addr,
  output logic [LINE_BYTES*8-1:0] l2_req_wdata,
  input  logic                    l2_rsp_valid,
  input  logic [LINE_BYTES*8-1:0] l2_rsp_rdata,
  // outcome and statistics
  output logic                    res_valid,
  output result_e                 res,
  output logic                    stat_md_hit,
  output logic                    stat_md_miss,
  output logic                    stat_su_blk,
  output logic                    stat_su_word,
  output logic                    stat_su_done
);

  localparam int unsigned FT_IW = $clog2(FT_ENTRIES);

  // ---------------------------------------------------------------- programming decode
  logic cfg_ft_we, cfg_reg_we, cfg_jt_we;
  assign cfg_ft_we  = cfg_we && (cfg_addr[9:5] == 5'b00000);
  assign cfg_reg_we = cfg_we && (cfg_addr[9:2] == 8'b0000_1000);
  assign cfg_jt_we  = cfg_we && cfg_addr[9];

  logic [XLEN-1:0] inv, su_call_val, su_ret_val;
  logic [LF_W-1:0] lf;

  bs_cfg_regs u_cfg (
    .clk, .rst_n,
    .we          (cfg_reg_we),
    .waddr       (cfg_addr[1:0]),
    .wdata       (cfg_wdata),
    .inv         (inv),
    .lf          (lf),
    .su_call_val (su_call_val),
    .su_ret_val  (su_ret_val)
  );

  logic [EVID_W-1:0] ft_evid;
  logic              ft_hit;
  ft_entry_t         ft_entry;

  bs_filter_table #(.ENTRIES(FT_ENTRIES)) u_ft (
    .clk, .rst_n,
    .we     (cfg_ft_we),
    .widx   (cfg_addr[FT_IW-1:0]),
    .wentry (ft_entry_t'(cfg_wdata[$bits(ft_entry_t)-1:0])),
    .evid   (ft_evid),
    .hit    (ft_hit),
    .entry  (ft_entry)
  );

  logic [REG_W-1:0] rf_raddr0, rf_raddr1;
  logic [XLEN-1:0]  rf_rdata0, rf_rdata1;

  bs_md_rf #(.NREG(NREGS), .WIDTH(XLEN)) u_rf (
    .clk, .rst_n,
    .raddr0 (rf_raddr0), .rdata0 (rf_rdata0),
    .raddr1 (rf_raddr1), .rdata1 (rf_rdata1),
    .we     (mdrf_we), .waddr (mdrf_waddr), .wdata (mdrf_wdata)
  );

  // ---------------------------------------------------------------- filter logic
  logic            fl_md_valid, fl_md_ready, fl_md_rsp_valid;
  md_req_t         fl_md_req;
  logic [XLEN-1:0] md_rdata;
  logic            su_valid, su_ready, su_busy;
  logic [XLEN-1:0] su_addr, su_len, su_val;
  logic            disp_valid, disp_ready;
  ev_t             disp_ev;
  hnd_e            disp_hnd;

  bs_filter_logic #(.CACHE_BYTES(CACHE_BYTES)) u_fl (
    .clk, .rst_n,
    .inv, .lf, .su_call_val, .su_ret_val,
    .ev_valid, .ev_ready, .ev,
    .ft_evid, .ft_hit, .ft_entry,
    .rf_raddr0, .rf_rdata0, .rf_raddr1, .rf_rdata1,
    .md_req_valid (fl_md_valid),
    .md_req_ready (fl_md_ready),
    .md_req       (fl_md_req),
    .md_rsp_valid (fl_md_rsp_valid),
    .md_rsp_rdata (md_rdata),
    .su_valid, .su_ready, .su_busy, .su_addr, .su_len, .su_val,
    .disp_valid, .disp_ready, .disp_ev, .disp_hnd,
    .hnd_done,
    .res_valid, .res
  );

  // ---------------------------------------------------------------- stack update unit
  logic    su_md_valid, su_md_ready, su_md_rsp_valid;
  md_req_t su_md_req;

  bs_stack_update_unit #(.LINE_BYTES(LINE_BYTES)) u_su (
    .clk, .rst_n, .lf,
    .cmd_valid    (su_valid),
    .cmd_ready    (su_ready),
    .cmd_addr     (su_addr),
    .cmd_len      (su_len),
    .cmd_val      (su_val),
    .md_req_valid (su_md_valid),
    .md_req_ready (su_md_ready),
    .md_req       (su_md_req),
    .md_rsp_valid (su_md_rsp_valid),
    .busy         (su_busy),
    .done         (stat_su_done),
    .stat_blk     (stat_su_blk),
    .stat_word    (stat_su_word)
  );

  // ---------------------------------------------------------------- metadata cache
  logic [2:0] arb_valid, arb_ready, arb_rsp_valid;
  md_req_t    arb_req [3];
  logic       c_valid, c_ready, c_rsp_valid;
  md_req_t    c_req;

  assign arb_valid  = {sw_md_valid, fl_md_valid, su_md_valid};
  assign arb_req[0] = su_md_req;
  assign arb_req[1] = fl_md_req;
  assign arb_req[2] = sw_md_req;
  assign su_md_ready     = arb_ready[0];
  assign fl_md_ready     = arb_ready[1];
  assign sw_md_ready     = arb_ready[2];
  assign su_md_rsp_valid = arb_rsp_valid[0];
  assign fl_md_rsp_valid = arb_rsp_valid[1];
  assign sw_md_rsp_valid = arb_rsp_valid[2];
  assign sw_md_rsp_rdata = md_rdata;

  bs_md_arb #(.N(3)) u_arb (
    .clk, .rst_n,
    .in_valid      (arb_valid),
    .in_ready      (arb_ready),
    .in_req        (arb_req),
    .in_rsp_valid  (arb_rsp_valid),
    .out_valid     (c_valid),
    .out_ready     (c_ready),
    .out_req       (c_req),
    .out_rsp_valid (c_rsp_valid)
  );

  bs_md_cache #(
    .SIZE_BYTES (CACHE_BYTES),
    .WAYS       (CACHE_WAYS),
    .LINE_BYTES (LINE_BYTES)
  ) u_cache (
    .clk, .rst_n,
    .req_valid     (c_valid),
    .req_ready     (c_ready),
    .req           (c_req),
    .rsp_valid     (c_rsp_valid),
    .rsp_rdata     (md_rdata),
    .mem_req_valid (l2_req_valid),
    .mem_req_ready (l2_req_ready),
    .mem_req_we    (l2_req_we),
    .mem_req_addr  (l2_req_addr),
    .mem_req_wdata (l2_req_wdata),
    .mem_rsp_valid (l2_rsp_valid),
    .mem_rsp_rdata (l2_rsp_rdata),
    .stat_hit      (stat_md_hit),
    .stat_miss     (stat_md_miss)
  );

  // ---------------------------------------------------------------- handler dispatch
  bs_event_dispatch u_disp (
    .clk, .rst_n,
    .jt_we       (cfg_jt_we),
    .jt_waddr    (cfg_addr[EVID_W:0]),
    .jt_wdata    (cfg_wdata),
    .in_valid    (disp_valid),
    .in_ready    (disp_ready),
    .in_ev       (disp_ev),
    .in_hnd      (disp_hnd),
    .out_valid   (hnd_valid),
    .out_ready   (hnd_ready),
    .out_ev      (hnd_ev),
    .out_hnd     (hnd_kind),
    .out_handler (hnd_pc)
  );

endmodule
