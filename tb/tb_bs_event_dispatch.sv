// tb_bs_event_dispatch: programs the 512-entry handler jump table, then
// sends random events with random handler variants while the monitor core
// side is randomly not ready.  Every event must come out once, in order,
// with the handler address programmed for {variant, event type}; with the
// output always ready, events pass one per cycle, one cycle after entry.
module tb_bs_event_dispatch;
  import bs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        jt_we, in_valid, in_ready, out_valid, out_ready;
  logic [8:0]  jt_waddr;
  logic [31:0] jt_wdata, out_handler;
  ev_t         in_ev, out_ev;
  hnd_e        in_hnd, out_hnd;

  bs_event_dispatch dut (.*);

  logic [31:0] jt [512];
  ev_t         q_ev [$];
  hnd_e        q_h  [$];
  bit          fast;
  int          n_out = 0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      ev_t  e;
      hnd_e h;
      n_out++;
      if (q_ev.size() == 0) check(1'b0, "output with nothing sent");
      else begin
        e = q_ev.pop_front();
        h = q_h.pop_front();
        check(out_ev == e && out_hnd == h && out_handler == jt[{h, e.evid}],
              $sformatf("event %0d handler %h", e.evid, out_handler));
      end
    end
    out_ready <= fast || ($urandom_range(0, 2) != 0);
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    jt_we = 1'b0; jt_waddr = '0; jt_wdata = '0; in_valid = 1'b0; in_ev = '0;
    in_hnd = HND_FULL; fast = 1'b0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      jt_we = 1'b1; jt_waddr = 9'(i); jt_wdata = $urandom; jt[i] = jt_wdata;
    end
    @(negedge clk);
    jt_we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      if (i == 1500) begin
        fast = 1'b1;
        @(negedge clk);
        t0 = n_out;
      end
      in_valid = ($urandom_range(0, 3) != 0) || fast;
      in_ev    = ev_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      in_hnd   = hnd_e'($urandom_range(0, 1));
      @(posedge clk);
      if (in_valid && in_ready) begin
        q_ev.push_back(in_ev);
        q_h.push_back(in_hnd);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(n_out - t0 >= 498, $sformatf("full rate: %0d out in 500 cycles", n_out - t0));
    repeat (20) @(posedge clk);
    check(q_ev.size() == 0, "every event came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
