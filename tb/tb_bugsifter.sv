// tb_bugsifter: end-to-end test of the BugSifter top at its default sizes
// (30-entry filter table, 4 KB two-way metadata cache, 8 metadata
// registers).
//
// The test programs BugSifter, as monitor software would, for six monitors
// in turn: MemCheck, TaintCheck, AddrCheck, AtomCheck, LockSet and MemLeak,
// each with its own metadata factor (4, 4, 8, 4, 1 and 32), invariant,
// stack values and filter-table entries.  It then sends random events
// (loads, stores, register moves, two-memory-operand moves, indirect jumps,
// calls and returns, malloc, an uncommon instruction) and plays the monitor
// core: for each dispatched event it checks the handler address and runs a
// handler that updates metadata through the register-file port and the
// Load/Store Metadata port.  A reference model of all metadata predicts
// every event's outcome, which is compared with BugSifter's.  At the end of
// each monitor the cache is flushed and every metadata item in the L2 is
// compared with the reference.  A final run of back-to-back filtered
// events checks the filtering rate, two cycles per register-only event.
//
// Every mechanism must happen at least once, or the test fails: clean
// check, redundant update, hardware stack update, full, simplified and
// complex handler dispatch, oversized stack frame sent to software, cache
// hit, miss, dirty write-back and flush, block-wide and sub-block writes,
// a two-memory-operand event, a filter read held back by a running stack
// update, and a handler port held back by the core.
module tb_bugsifter;
  import bs_pkg::*;

  localparam int unsigned LINE = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUT
  logic              cfg_we;
  logic [9:0]        cfg_addr;
  logic [31:0]       cfg_wdata;
  logic              ev_valid, ev_ready;
  ev_t               ev;
  logic              hnd_valid, hnd_ready, hnd_done;
  ev_t               hnd_ev;
  hnd_e              hnd_kind;
  logic [31:0]       hnd_pc;
  logic              mdrf_we;
  logic [2:0]        mdrf_waddr;
  logic [31:0]       mdrf_wdata;
  logic              sw_md_valid, sw_md_ready, sw_md_rsp_valid;
  md_req_t           sw_md_req;
  logic [31:0]       sw_md_rsp_rdata;
  logic              l2_req_valid, l2_req_ready, l2_req_we, l2_rsp_valid;
  logic [31:0]       l2_req_addr;
  logic [LINE*8-1:0] l2_req_wdata, l2_rsp_rdata;
  logic              res_valid;
  result_e           res;
  logic              st_hit, st_miss, st_blk, st_word, st_sudone;
  int                l2_reads, l2_writes;

  bugsifter u_dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .ev_valid, .ev_ready, .ev,
    .hnd_valid, .hnd_ready, .hnd_ev, .hnd_kind, .hnd_pc, .hnd_done,
    .mdrf_we, .mdrf_waddr, .mdrf_wdata,
    .sw_md_valid, .sw_md_ready, .sw_md_req, .sw_md_rsp_valid, .sw_md_rsp_rdata,
    .l2_req_valid, .l2_req_ready, .l2_req_we, .l2_req_addr, .l2_req_wdata,
    .l2_rsp_valid, .l2_rsp_rdata,
    .res_valid, .res,
    .stat_md_hit (st_hit), .stat_md_miss (st_miss),
    .stat_su_blk (st_blk), .stat_su_word (st_word), .stat_su_done (st_sudone)
  );

  // L2 with the 10-cycle latency of the evaluated system; metadata starts at 0
  bs_l2_model #(.LINE_BYTES(LINE), .LAT(10), .INIT_ADDR(1'b0), .INIT_WORD(32'h0)) u_l2 (
    .clk, .rst_n, .req_valid (l2_req_valid), .req_ready (l2_req_ready),
    .req_we (l2_req_we), .req_addr (l2_req_addr), .req_wdata (l2_req_wdata),
    .rsp_valid (l2_rsp_valid), .rsp_rdata (l2_rsp_rdata),
    .n_reads (l2_reads), .n_writes (l2_writes)
  );

  // ------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int n_res [result_e];
  int n_hit = 0, n_miss = 0, n_blk = 0, n_word = 0, n_su_stall = 0;
  int n_hnd_wait = 0, n_two_mem = 0, n_oversize = 0, n_flush = 0;
  always @(posedge clk) begin
    if (st_hit)  n_hit++;
    if (st_miss) n_miss++;
    if (st_blk)  n_blk++;
    if (st_word) n_word++;
    if (u_dut.u_fl.md_req_valid == 1'b0 && u_dut.u_fl.state == 3'd1 &&
        (u_dut.u_fl.pend_src || u_dut.u_fl.pend_dst) && u_dut.su_busy)
      n_su_stall++;
  end

  // ------------------------------------------------------------ event types
  localparam logic [7:0] E_LD   = 8'h10;  // mov mem, reg
  localparam logic [7:0] E_MOV  = 8'h11;  // mov reg, reg
  localparam logic [7:0] E_ST   = 8'h12;  // mov reg, mem
  localparam logic [7:0] E_CALL = 8'h13;
  localparam logic [7:0] E_RET  = 8'h14;
  localparam logic [7:0] E_MOVS = 8'h16;  // mem to mem
  localparam logic [7:0] E_JMP  = 8'h18;  // indirect jump through a register
  localparam logic [7:0] E_MALL = 8'h20;  // malloc, always software
  localparam logic [7:0] E_UNC  = 8'h21;  // uncommon instruction, always software

  function automatic logic [31:0] jt_val(input logic v, input logic [7:0] id);
    return 32'h8000_0000 | (32'(v) << 12) | (32'(id) << 4);
  endfunction

  // ------------------------------------------------------------ monitor state
  logic [2:0]  lf;
  logic [31:0] inv, call_v, ret_v, alloc_v;
  logic [31:0] base;                       // application window of this monitor
  ft_entry_t   tbl [logic [7:0]];
  logic [31:0] refmd [logic [29:0]];       // item per application word
  logic [31:0] refrf [8];

  function automatic logic [31:0] imask();
    return 32'hFFFF_FFFF >> (32 - (32 >> lf));
  endfunction
  function automatic logic [31:0] rd_item(input logic [29:0] w);
    return refmd.exists(w) ? refmd[w] : 32'h0;
  endfunction
  function automatic logic [31:0] opmd(input opnd_t o);
    if (o.kind == OP_REG) return refrf[o.rnum] & imask();
    return rd_item(o.addr[31:2]);
  endfunction

  function automatic result_e expect_res(input ev_t e);
    ft_entry_t t;
    bit us, ud, cc, ru, ok;
    logic [31:0] s, d, iv;
    if (!tbl.exists(e.evid)) return RES_DISPATCH;
    t = tbl[e.evid];
    if (t.su)
      return ((longint'(e.su_len) + 3) / 4 * (32 >> lf) <= 4096 * 8) ? RES_STACK_HW : RES_DISPATCH;
    iv = inv & imask();
    us = t.src && e.src.kind != OP_NONE;
    ud = t.dst && e.dst.kind != OP_NONE;
    s  = opmd(e.src);
    d  = opmd(e.dst);
    cc = (us || ud) && (!us || s == iv) && (!ud || d == iv);
    ru = us && ud && s == d;
    ok = (t.cc && cc) || (t.ru && ru);
    if (t.pf) return ok ? RES_DISP_SIMP : RES_DISP_CPLX;
    if (t.cc && cc) return RES_FILT_CC;
    if (t.ru && ru) return RES_FILT_RU;
    return RES_DISPATCH;
  endfunction

  // ------------------------------------------------------------ ports
  task automatic cfg(input logic [9:0] a, input logic [31:0] d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic sw_op(input md_op_e o, input logic [31:0] a, input logic [31:0] d,
                       input logic [31:0] m, output logic [31:0] rd);
    @(negedge clk);
    sw_md_valid = 1'b1;
    sw_md_req   = '{op: o, addr: a, wdata: d, wmask: m};
    while (!sw_md_ready) @(negedge clk);
    forever begin
      @(negedge clk);
      sw_md_valid = 1'b0;
      if (sw_md_rsp_valid) break;
    end
    rd = sw_md_rsp_rdata;
  endtask

  // Store Metadata of one application word's item (the handler's write)
  task automatic store_item(input logic [29:0] w, input logic [31:0] v);
    longint unsigned b;
    logic [31:0] rd;
    b = longint'(w) * (32 >> lf);
    sw_op(MD_WR, 32'((b / 32) * 4), (v & imask()) << (b % 32), imask() << (b % 32), rd);
    refmd[w] = v & imask();
  endtask

  task automatic store_reg(input logic [2:0] r, input logic [31:0] v);
    @(negedge clk);
    mdrf_we = 1'b1; mdrf_waddr = r; mdrf_wdata = v;
    @(negedge clk);
    mdrf_we = 1'b0;
    refrf[r] = v;
  endtask

  task automatic store_opnd(input opnd_t o, input logic [31:0] v);
    if (o.kind == OP_REG)      store_reg(o.rnum, v & imask());
    else if (o.kind == OP_MEM) store_item(o.addr[31:2], v);
  endtask

  // the monitor core's software handler for a dispatched event
  task automatic run_handler(input ev_t e, input hnd_e k);
    ft_entry_t t;
    logic [31:0] rd;
    bit has;
    has = tbl.exists(e.evid);
    t   = has ? tbl[e.evid] : '0;
    if (e.evid == E_MALL) begin
      for (logic [29:0] w = e.su_addr[31:2]; w < (e.su_addr + e.su_len) >> 2; w++)
        store_item(w, alloc_v);
    end else if (has && t.su) begin
      // a frame too large for the metadata cache: flush, then a software loop
      sw_op(MD_FLUSH, 0, 0, 0, rd);
      n_flush++;
      n_oversize++;
      for (logic [29:0] w = e.su_addr[31:2]; w < (e.su_addr + e.su_len + 3) >> 2; w++)
        store_item(w, t.su_ret ? ret_v : call_v);
    end else if (has && t.pf) begin
      // complex handler records the current owner; the simple one updates
      // only software tables
      if (k == HND_FULL) begin
        if (t.src && e.src.kind != OP_NONE) store_opnd(e.src, inv);
        if (t.dst && e.dst.kind != OP_NONE) store_opnd(e.dst, inv);
      end
    end else if (e.src.kind != OP_NONE && e.dst.kind != OP_NONE) begin
      store_opnd(e.dst, opmd(e.src));       // propagation
    end else if (e.src.kind != OP_NONE) begin
      store_opnd(e.src, inv);               // report, then mark clean
    end
  endtask

  // send one event and follow it to its end
  task automatic run_event(input ev_t e);
    result_e x, got;
    ev_t     he;
    hnd_e    hk;
    logic [31:0] hp;
    int      w;
    x = expect_res(e);
    if (tbl.exists(e.evid) && !tbl[e.evid].su && e.src.kind == OP_MEM && e.dst.kind == OP_MEM &&
        tbl[e.evid].src && tbl[e.evid].dst)
      n_two_mem++;
    @(negedge clk);
    ev_valid = 1'b1;
    ev = e;
    while (!ev_ready) @(negedge clk);
    forever begin
      @(negedge clk);
      ev_valid = 1'b0;
      if (res_valid) break;
    end
    got = res;
    check(got == x, $sformatf("evid %h: outcome %s expected %s", e.evid, got.name(), x.name()));
    n_res[got] = n_res.exists(got) ? n_res[got] + 1 : 1;
    if (got == RES_STACK_HW) begin
      logic [31:0] v;
      v = tbl[e.evid].su_ret ? ret_v : call_v;
      for (logic [29:0] a = e.su_addr[31:2]; a < (e.su_addr + e.su_len + 3) >> 2; a++)
        refmd[a] = v & imask();
    end else if (got == RES_DISPATCH || got == RES_DISP_SIMP || got == RES_DISP_CPLX) begin
      // the core is sometimes slow to take the handler
      w = $urandom_range(0, 3);
      while (!hnd_valid) @(negedge clk);
      repeat (w) begin
        n_hnd_wait++;
        @(negedge clk);
      end
      hnd_ready = 1'b1;
      he = hnd_ev; hk = hnd_kind; hp = hnd_pc;
      @(negedge clk);
      hnd_ready = 1'b0;
      check(he == e, "handler event");
      check(hk == (got == RES_DISP_SIMP ? HND_SIMPLE : HND_FULL), "handler variant");
      check(hp == jt_val(hk, e.evid), $sformatf("handler address %h", hp));
      run_handler(e, hk);
      @(negedge clk);
      hnd_done = 1'b1;
      @(negedge clk);
      hnd_done = 1'b0;
    end
  endtask

  // ------------------------------------------------------------ monitors
  task automatic set_entry(input int idx, input logic [7:0] id, input bit s, input bit d,
                           input bit cc, input bit ru, input bit su, input bit pf, input bit rt);
    ft_entry_t t;
    t = '{valid: 1'b1, evid: id, src: s, dst: d, cc: cc, ru: ru, su: su, pf: pf, su_ret: rt};
    tbl[id] = t;
    cfg(10'(idx), 32'(t));
  endtask

  task automatic clear_table();
    for (int i = 0; i < 30; i++) cfg(10'(i), 32'h0);
    tbl.delete();
  endtask

  task automatic setup(input int p, input logic [5:0] factor, input logic [31:0] i,
                       input logic [31:0] cv, input logic [31:0] rv, input logic [31:0] av);
    clear_table();
    case (factor)
      1: lf = 0; 2: lf = 1; 4: lf = 2; 8: lf = 3; 16: lf = 4; default: lf = 5;
    endcase
    inv = i; call_v = cv; ret_v = rv; alloc_v = av;
    cfg(10'h020, inv);
    cfg(10'h021, 32'(factor));
    cfg(10'h022, cv);
    cfg(10'h023, rv);
    // each monitor's metadata lives 1 MB apart in metadata space
    base = 32'(p) * 32'h0010_0000 * 32'(factor);
    refmd.delete();
    for (int r = 0; r < 8; r++) store_reg(3'(r), (r % 2 == 0) ? inv & imask() : 32'h0);
  endtask

  function automatic opnd_t mem_op(input int nwords);
    opnd_t o;
    o.kind = OP_MEM; o.rnum = '0;
    o.addr = base + 32'(4 * $urandom_range(0, nwords - 1));
    return o;
  endfunction
  function automatic opnd_t reg_op();
    opnd_t o;
    o.kind = OP_REG; o.rnum = 3'($urandom_range(0, 7)); o.addr = '0;
    return o;
  endfunction

  // random events of the given types; stack frames lie in the upper half
  task automatic stream(input int n, input int nwords, input logic [7:0] ids [],
                        input bit oversize);
    ev_t e;
    for (int i = 0; i < n; i++) begin
      e = '0;
      e.pc = $urandom;
      e.evid = ids[$urandom_range(0, ids.size() - 1)];
      if ($urandom_range(0, 99) < 3) e.evid = E_MALL;
      else if ($urandom_range(0, 99) < 2) e.evid = E_UNC;
      unique case (e.evid)
        E_LD:   begin e.src = mem_op(nwords); e.dst = reg_op(); end
        E_MOV:  begin e.src = reg_op();       e.dst = reg_op(); end
        E_ST:   begin e.src = reg_op();       e.dst = mem_op(nwords); end
        E_MOVS: begin e.src = mem_op(nwords); e.dst = mem_op(nwords); end
        E_JMP:  begin e.src = reg_op(); end
        E_UNC:  begin e.src = mem_op(nwords); e.dst = mem_op(nwords); end
        default: ;
      endcase
      if (e.evid == E_CALL || e.evid == E_RET) begin
        e.su_addr = base + 32'(4 * nwords) + 32'(4 * $urandom_range(0, 4095));
        e.su_len  = 32'($urandom_range(1, 160) * 4);
        if (oversize && $urandom_range(0, 199) == 0) e.su_len = 32'd20000;
      end
      if (e.evid == E_MALL) begin
        e.su_addr = base + 32'(4 * $urandom_range(0, nwords - 64));
        e.su_len  = 32'(4 * $urandom_range(1, 64));
      end
      run_event(e);
    end
  endtask

  // flush the cache and compare every metadata item in the L2
  task automatic verify_l2(input string name);
    logic [31:0] rd;
    int wb0;
    wb0 = l2_writes;
    sw_op(MD_FLUSH, 0, 0, 0, rd);
    n_flush++;
    foreach (refmd[w]) begin
      longint unsigned b;
      logic [LINE*8-1:0] l;
      logic [31:0] word;
      b = longint'(w) * (32 >> lf);
      l = u_l2.peek(32'((b / (LINE * 8)) * LINE));
      word = l[(b % (LINE * 8)) / 32 * 32 +: 32];
      check(((word >> (b % 32)) & imask()) == refmd[w],
            $sformatf("%s: metadata of word %h in L2", name, w));
    end
    // Load Metadata after the flush reads the same values back
    for (int k = 0; k < 50; k++) begin
      opnd_t o;
      longint unsigned b;
      o = mem_op(4096);
      b = longint'(o.addr[31:2]) * (32 >> lf);
      sw_op(MD_RD, 32'((b / 32) * 4), 0, 0, rd);
      check(((rd >> (b % 32)) & imask()) == rd_item(o.addr[31:2]), $sformatf("%s: Load Metadata", name));
    end
    $display("%s: %0d metadata words checked, %0d blocks written back by the flush",
             name, refmd.num(), l2_writes - wb0);
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ids [];
    ev_t e;
    int acc, nres, t0, c0;
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    ev_valid = 1'b0; ev = '0; hnd_ready = 1'b0; hnd_done = 1'b0;
    mdrf_we = 1'b0; mdrf_waddr = '0; mdrf_wdata = '0;
    sw_md_valid = 1'b0; sw_md_req = '0;
    lf = 3'd2; inv = '0; call_v = '0; ret_v = '0; alloc_v = '0; base = '0;
    for (int r = 0; r < 8; r++) refrf[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < 512; k++) cfg(10'h200 | 10'(k), jt_val(k[8], k[7:0]));

    // MemCheck: 0 unallocated, 1 uninitialised, 2 initialised; factor 4
    setup(1, 4, 32'd2, 32'd1, 32'd0, 32'd1);
    set_entry(0, E_LD,   1, 1, 1, 0, 0, 0, 0);
    set_entry(1, E_MOV,  1, 1, 0, 1, 0, 0, 0);
    set_entry(2, E_ST,   1, 1, 0, 1, 0, 0, 0);
    set_entry(3, E_MOVS, 1, 1, 0, 1, 0, 0, 0);
    set_entry(4, E_CALL, 0, 0, 0, 0, 1, 0, 0);
    set_entry(5, E_RET,  0, 0, 0, 0, 1, 0, 1);
    ids = '{E_LD, E_LD, E_MOV, E_MOV, E_ST, E_MOVS, E_CALL, E_RET};
    stream(1500, 4096, ids, 1'b1);
    verify_l2("MemCheck");

    // TaintCheck: 0 untainted; no stack updates
    setup(2, 4, 32'd0, 32'd0, 32'd0, 32'd1);
    set_entry(0, E_MOV, 1, 1, 0, 1, 0, 0, 0);
    set_entry(1, E_ST,  1, 1, 0, 1, 0, 0, 0);
    set_entry(2, E_LD,  1, 1, 0, 1, 0, 0, 0);
    set_entry(3, E_JMP, 1, 0, 1, 0, 0, 0, 0);
    ids = '{E_MOV, E_ST, E_LD, E_JMP};
    stream(800, 4096, ids, 1'b0);
    verify_l2("TaintCheck");

    // AddrCheck: one bit per byte, 4'hF = word allocated; factor 8
    setup(3, 8, 32'hF, 32'hF, 32'h0, 32'hF);
    set_entry(0, E_LD,   1, 0, 1, 0, 0, 0, 0);
    set_entry(1, E_ST,   0, 1, 1, 0, 0, 0, 0);
    set_entry(2, E_CALL, 0, 0, 0, 0, 1, 0, 0);
    set_entry(3, E_RET,  0, 0, 0, 0, 1, 0, 1);
    ids = '{E_LD, E_ST, E_CALL, E_RET};
    stream(800, 4096, ids, 1'b0);
    verify_l2("AddrCheck");

    // AtomCheck: last-accessing thread per word, partial filtering; factor 4
    setup(4, 4, 32'd5, 32'd0, 32'd0, 32'd5);
    set_entry(0, E_LD, 1, 0, 1, 0, 0, 1, 0);
    set_entry(1, E_ST, 0, 1, 1, 0, 0, 1, 0);
    ids = '{E_LD, E_ST};
    stream(500, 1024, ids, 1'b0);
    inv = 32'd6;                 // another thread is scheduled
    cfg(10'h020, inv);
    stream(300, 1024, ids, 1'b0);
    verify_l2("AtomCheck");

    // LockSet: one word per word, 1 = thread-local; factor 1
    setup(5, 1, 32'd1, 32'd1, 32'd0, 32'd1);
    set_entry(0, E_LD,   1, 0, 1, 0, 0, 0, 0);
    set_entry(1, E_ST,   0, 1, 1, 0, 0, 0, 0);
    set_entry(2, E_CALL, 0, 0, 0, 0, 1, 0, 0);
    set_entry(3, E_RET,  0, 0, 0, 0, 1, 0, 1);
    ids = '{E_LD, E_ST, E_LD, E_ST, E_CALL, E_RET};
    stream(800, 4096, ids, 1'b0);
    verify_l2("LockSet");

    // MemLeak: one pointer bit per word, 0 = not a pointer; factor 32
    setup(6, 32, 32'd0, 32'd0, 32'd0, 32'd0);
    set_entry(0, E_LD,  1, 1, 1, 0, 0, 0, 0);
    set_entry(1, E_MOV, 1, 1, 0, 1, 0, 0, 0);
    set_entry(2, E_ST,  1, 1, 1, 1, 0, 0, 0);
    ids = '{E_LD, E_MOV, E_ST};
    stream(800, 4096, ids, 1'b0);
    verify_l2("MemLeak");

    // filtering rate: register moves with equal metadata, back to back
    store_reg(3'd1, refrf[0]);
    e = '0; e.evid = E_MOV;
    e.src = '{kind: OP_REG, rnum: 3'd0, addr: '0};
    e.dst = '{kind: OP_REG, rnum: 3'd1, addr: '0};
    @(negedge clk);
    ev_valid = 1'b1; ev = e;
    acc = 0; nres = 0; t0 = 0; c0 = 0;
    while (acc < 32) begin
      if (ev_ready) acc++;
      if (res_valid) begin
        nres++;
        check(res == RES_FILT_RU, "rate run filtered");
      end
      @(negedge clk);
      c0++;
    end
    ev_valid = 1'b0;
    repeat (4) begin
      if (res_valid) nres++;
      @(negedge clk);
    end
    check(nres == 32, $sformatf("rate run outcomes %0d", nres));
    check(c0 <= 2 * 32, $sformatf("32 filtered register events took %0d cycles", c0));
    n_res[RES_FILT_RU] += 32;

    // every mechanism happened
    foreach (n_res[k]) $display("outcome %-14s %0d", k.name(), n_res[k]);
    $display("cache hits %0d misses %0d, L2 reads %0d writes %0d, flushes %0d",
             n_hit, n_miss, l2_reads, l2_writes, n_flush);
    $display("stack writes: block %0d word %0d; oversized frames %0d",
             n_blk, n_word, n_oversize);
    $display("two-memory-operand events %0d, reads held by stack update %0d, handler waits %0d",
             n_two_mem, n_su_stall, n_hnd_wait);
    for (int k = 0; k < 6; k++)
      check(n_res.exists(result_e'(k)) && n_res[result_e'(k)] > 0,
            $sformatf("outcome %s happened", result_e'(k)));
    check(n_hit > 0 && n_miss > 0, "cache hits and misses");
    check(l2_writes > 0 && n_flush > 0, "write-backs and flushes");
    check(n_blk > 0 && n_word > 0, "block-wide and sub-block stack writes");
    check(n_oversize > 0, "oversized stack frame sent to software");
    check(n_two_mem > 0, "two-memory-operand event");
    check(n_su_stall > 0, "filter read held back by a stack update");
    check(n_hnd_wait > 0, "handler port held back by the core");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
