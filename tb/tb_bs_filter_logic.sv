// tb_bs_filter_logic: self-checking test of the filter logic on its own.
//
// The test supplies the filter table (a table of monitor-like entries),
// the metadata register file, a metadata memory behind the cache port
// (one-cycle answers, random ready), the stack update unit's handshake and
// the monitor core (random dispatch ready, handler finishing a few cycles
// later).  Random events with register, memory or no operands are sent;
// each event's outcome is worked out by the test from the same metadata and
// compared with res, and dispatched events and stack-update commands are
// compared field by field.  A final phase with everything always ready
// checks the rate: register-only filtered events every two cycles, and an
// event with two memory operands reading the cache in two consecutive
// cycles.
module tb_bs_filter_logic;
  import bs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] inv, su_call_val, su_ret_val;
  logic [2:0]  lf;
  logic        ev_valid, ev_ready;
  ev_t         ev;
  logic [7:0]  ft_evid;
  logic        ft_hit;
  ft_entry_t   ft_entry;
  logic [2:0]  ra0, ra1;
  logic [31:0] rd0, rd1;
  logic        md_valid, md_ready, md_rsp_valid;
  md_req_t     md_req;
  logic [31:0] md_rsp_rdata;
  logic        su_valid, su_ready, su_busy;
  logic [31:0] su_addr, su_len, su_val;
  logic        disp_valid, disp_ready, hnd_done, res_valid;
  ev_t         disp_ev;
  hnd_e        disp_hnd;
  result_e     res;

  bs_filter_logic dut (.*, .md_req_valid(md_valid), .md_req_ready(md_ready),
                       .rf_raddr0(ra0), .rf_rdata0(rd0), .rf_raddr1(ra1), .rf_rdata1(rd1));

  // ------------------------------------------------------------ environment
  ft_entry_t   tbl [logic [7:0]];
  logic [31:0] rf [8];
  bit          fast;   // everything always ready

  always_comb begin
    ft_hit   = tbl.exists(ft_evid);
    ft_entry = ft_hit ? tbl[ft_evid] : '0;
  end
  assign rd0 = rf[ra0];
  assign rd1 = rf[ra1];

  function automatic logic [31:0] mdw(input logic [31:0] a);
    // metadata word content: a few distinct item values per address
    logic [31:0] h;
    h = a * 32'h2545_F491;
    return {8{1'b0, h[12:10]}} ^ {8{h[31], 3'b000}};
  endfunction

  int rd_cycles [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    md_rsp_valid <= md_valid && md_ready;
    if (md_valid && md_ready) begin
      md_rsp_rdata <= mdw(md_req.addr);
      rd_cycles.push_back(cyc);
    end
    md_ready   <= fast || ($urandom_range(0, 2) != 0);
    disp_ready <= fast || ($urandom_range(0, 1) != 0);
    su_ready   <= fast || ($urandom_range(0, 2) != 0);
  end

  // stack update unit stand-in: busy for a few cycles after each command
  int su_cnt = 0;
  always @(posedge clk) begin
    if (su_valid && su_ready) su_cnt <= $urandom_range(1, 6);
    else if (su_cnt > 0)      su_cnt <= su_cnt - 1;
  end
  assign su_busy = (su_cnt != 0);

  // monitor core stand-in: the handler ends a few cycles after dispatch
  int hnd_cnt = 0;
  always @(posedge clk) begin
    hnd_done <= 1'b0;
    if (disp_valid && disp_ready) hnd_cnt <= fast ? 1 : $urandom_range(1, 5);
    else if (hnd_cnt > 1)         hnd_cnt <= hnd_cnt - 1;
    else if (hnd_cnt == 1) begin
      hnd_cnt  <= 0;
      hnd_done <= 1'b1;
    end
  end

  // ------------------------------------------------------------ reference
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] opmd(input opnd_t o, input logic [2:0] l);
    logic [31:0] m;
    longint unsigned b;
    m = 32'hFFFF_FFFF >> (32 - (32 >> l));
    if (o.kind == OP_REG) return rf[o.rnum] & m;
    b = longint'(o.addr[31:2]) * (32 >> l);
    return (mdw(32'((b / 32) * 4)) >> (b % 32)) & m;
  endfunction

  function automatic result_e expect_res(input ev_t e, input logic [2:0] l);
    ft_entry_t t;
    bit us, ud, cc, ru, ok;
    logic [31:0] m, s, d;
    if (!tbl.exists(e.evid)) return RES_DISPATCH;
    t = tbl[e.evid];
    if (t.su)
      return ((longint'(e.su_len) + 3) / 4 * (32 >> l) <= 4096 * 8) ? RES_STACK_HW : RES_DISPATCH;
    m  = 32'hFFFF_FFFF >> (32 - (32 >> l));
    us = t.src && e.src.kind != OP_NONE;
    ud = t.dst && e.dst.kind != OP_NONE;
    s  = opmd(e.src, l);
    d  = opmd(e.dst, l);
    cc = (us || ud) && (!us || s == (inv & m)) && (!ud || d == (inv & m));
    ru = us && ud && s == d;
    ok = (t.cc && cc) || (t.ru && ru);
    if (t.pf) return ok ? RES_DISP_SIMP : RES_DISP_CPLX;
    if (t.cc && cc) return RES_FILT_CC;
    if (t.ru && ru) return RES_FILT_RU;
    return RES_DISPATCH;
  endfunction

  ev_t     sent_q [$];
  result_e exp_q  [$];
  int      seen [result_e];
  ev_t     dq_ev [$];
  hnd_e    dq_h  [$];

  // outcome monitor
  always @(posedge clk) begin
    if (rst_n && res_valid) begin
      ev_t e;
      result_e x;
      if (exp_q.size() == 0) check(1'b0, "outcome with no event");
      else begin
        e = sent_q.pop_front();
        x = exp_q.pop_front();
        check(res == x, $sformatf("event evid %0d: outcome %s expected %s", e.evid, res.name(), x.name()));
        seen[res] = seen.exists(res) ? seen[res] + 1 : 1;
        if (x == RES_DISPATCH || x == RES_DISP_SIMP || x == RES_DISP_CPLX) begin
          dq_ev.push_back(e);
          dq_h.push_back(x == RES_DISP_SIMP ? HND_SIMPLE : HND_FULL);
        end
      end
    end
    if (rst_n && su_valid && su_ready)
      check(su_addr == dut.e.su_addr && su_len == dut.e.su_len &&
            su_val == (tbl[dut.e.evid].su_ret ? su_ret_val : su_call_val), "stack update command");
    if (rst_n && disp_valid && disp_ready) begin
      if (dq_ev.size() == 0) check(1'b0, "dispatch with no dispatched outcome");
      else check(disp_ev == dq_ev.pop_front() && disp_hnd == dq_h.pop_front(),
                 "dispatched event and handler variant");
    end
  end

  function automatic opnd_t rand_op();
    opnd_t o;
    o.kind = opkind_e'($urandom_range(0, 2));
    o.rnum = 3'($urandom_range(0, 7));
    o.addr = $urandom_range(0, 65535);
    return o;
  endfunction

  task automatic send(input ev_t e);
    @(negedge clk);
    ev_valid = 1'b1;
    ev = e;
    sent_q.push_back(e);
    exp_q.push_back(expect_res(e, lf));
    do @(posedge clk); while (!ev_ready);
    @(negedge clk);
    ev_valid = 1'b0;
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev_t e;
    int t0, n0;
    ev_valid = 1'b0; ev = '0; fast = 1'b0;
    inv = 32'h0; lf = 3'd2; su_call_val = 32'h11; su_ret_val = 32'h22;
    for (int i = 0; i < 8; i++) rf[i] = {8{1'b0, 3'(i % 3)}};
    // event types: a MemCheck-like set, an AtomCheck-like partial filter
    // and two stack events
    tbl[8'h01] = '{valid:1, evid:8'h01, src:1, dst:1, cc:1, ru:0, su:0, pf:0, su_ret:0};
    tbl[8'h02] = '{valid:1, evid:8'h02, src:1, dst:1, cc:0, ru:1, su:0, pf:0, su_ret:0};
    tbl[8'h03] = '{valid:1, evid:8'h03, src:1, dst:0, cc:1, ru:0, su:0, pf:0, su_ret:0};
    tbl[8'h04] = '{valid:1, evid:8'h04, src:1, dst:0, cc:1, ru:0, su:0, pf:1, su_ret:0};
    tbl[8'h05] = '{valid:1, evid:8'h05, src:0, dst:0, cc:0, ru:0, su:1, pf:0, su_ret:0};
    tbl[8'h06] = '{valid:1, evid:8'h06, src:0, dst:0, cc:0, ru:0, su:1, pf:0, su_ret:1};
    tbl[8'h07] = '{valid:1, evid:8'h07, src:1, dst:1, cc:1, ru:1, su:0, pf:0, su_ret:0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 4000; i++) begin
      if (i % 500 == 0) begin
        // configuration changes only between events
        while (exp_q.size() != 0 || dq_ev.size() != 0 || hnd_cnt != 0 || hnd_done)
          @(posedge clk);
        @(negedge clk);
        lf  = 3'($urandom_range(0, 5));
        inv = (i % 1000 == 0) ? 32'h0 : 32'h1111_1111;
      end
      e.evid    = 8'($urandom_range(0, 8));
      e.pc      = $urandom;
      e.src     = rand_op();
      e.dst     = rand_op();
      e.su_addr = $urandom & ~32'h3;
      e.su_len  = ($urandom_range(0, 9) == 0) ? $urandom_range(4096, 40000) : $urandom_range(4, 512);
      send(e);
    end
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "every event had an outcome");
    foreach (seen[k]) $display("outcome %s: %0d", k.name(), seen[k]);
    check(seen.num() == 6, "all six outcomes happened");

    // rate: register-only redundant updates, back to back
    fast = 1'b1; lf = 3'd2;
    repeat (4) @(posedge clk);
    e = '0; e.evid = 8'h02;
    e.src = '{kind: OP_REG, rnum: 3'd0, addr: 0};
    e.dst = '{kind: OP_REG, rnum: 3'd3, addr: 0};   // rf[0] == rf[3]
    @(negedge clk);
    ev_valid = 1'b1; ev = e;
    for (int i = 0; i < 20; i++) begin
      sent_q.push_back(e); exp_q.push_back(RES_FILT_RU);
    end
    t0 = cyc; n0 = 0;
    while (n0 < 20) begin
      @(posedge clk);
      if (ev_ready) n0++;
      @(negedge clk);
    end
    ev_valid = 1'b0;
    check(cyc - t0 <= 2 * 20 + 1, $sformatf("20 register events took %0d cycles", cyc - t0));
    repeat (5) @(posedge clk);

    // two memory operands: cache reads in consecutive cycles
    rd_cycles.delete();
    e.evid = 8'h01;
    e.src = '{kind: OP_MEM, rnum: 0, addr: 32'h100};
    e.dst = '{kind: OP_MEM, rnum: 0, addr: 32'h2000};
    send(e);
    repeat (10) @(posedge clk);
    check(rd_cycles.size() == 2 && rd_cycles[1] == rd_cycles[0] + 1,
          "two memory operands read in consecutive cycles");
    check(exp_q.size() == 0, "all outcomes seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
