// tb_bs_md_cache: self-checking test of the metadata cache at its default
// size (4 KB, two-way, 64-byte blocks) against a word-level reference
// memory.  Random reads, masked word writes and block-wide writes go to a
// 16 KB metadata window, four times the cache, so there are conflict misses
// and dirty write-backs.  Every read is compared with the reference; a
// repeated access must hit and answer in the next cycle; a burst of reads
// to one block must stream one per cycle.  At the end a flush must write
// every dirty block back so the L2 model matches the reference, and leave
// the cache empty.
module tb_bs_md_cache;
  import bs_pkg::*;

  localparam int unsigned LINE = 64;
  localparam int unsigned WIN  = 16384;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, rsp_valid;
  md_req_t         req;
  logic [31:0]     rsp_rdata;
  logic            mreq_valid, mreq_ready, mreq_we, mrsp_valid;
  logic [31:0]     mreq_addr;
  logic [LINE*8-1:0] mreq_wdata, mrsp_rdata;
  logic            st_hit, st_miss;
  int              l2_reads, l2_writes;

  bs_md_cache dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata,
    .mem_req_valid (mreq_valid), .mem_req_ready (mreq_ready),
    .mem_req_we (mreq_we), .mem_req_addr (mreq_addr),
    .mem_req_wdata (mreq_wdata), .mem_rsp_valid (mrsp_valid),
    .mem_rsp_rdata (mrsp_rdata), .stat_hit (st_hit), .stat_miss (st_miss)
  );

  bs_l2_model #(.LINE_BYTES(LINE), .LAT(3)) u_l2 (
    .clk, .rst_n, .req_valid (mreq_valid), .req_ready (mreq_ready),
    .req_we (mreq_we), .req_addr (mreq_addr), .req_wdata (mreq_wdata),
    .rsp_valid (mrsp_valid), .rsp_rdata (mrsp_rdata),
    .n_reads (l2_reads), .n_writes (l2_writes)
  );

  int checks = 0, failures = 0;
  int hits = 0, misses = 0;
  logic [31:0] refm [logic [31:0]];

  always @(posedge clk) begin
    if (st_hit)  hits++;
    if (st_miss) misses++;
  end

  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return refm.exists(a) ? refm[a] : a;   // L2 initial content: own address
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one operation; returns read data and cycles from acceptance to response
  task automatic op(input md_op_e o, input logic [31:0] a, input logic [31:0] d,
                    input logic [31:0] m, output logic [31:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1'b1;
    req = '{op: o, addr: a, wdata: d, wmask: m};
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!rsp_valid) begin
      @(negedge clk);
      lat++;
    end
    rd = rsp_rdata;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, a, d, m;
    int lat, n;
    req_valid = 1'b0;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // first touch misses, second hits with one-cycle latency
    op(MD_RD, 32'h100, 0, 0, rd, lat);
    check(rd == 32'h100, "cold read data");
    check(lat > 1, "cold read should miss");
    op(MD_RD, 32'h104, 0, 0, rd, lat);
    check(rd == 32'h104 && lat == 1, "hit read: data and one-cycle latency");

    // random traffic
    for (int i = 0; i < 6000; i++) begin
      a = $urandom_range(0, WIN / 4 - 1) * 4;
      n = $urandom_range(0, 9);
      case (n)
        0, 1, 2, 3, 4: begin
          op(MD_RD, a, 0, 0, rd, lat);
          check(rd == ref_rd(a), $sformatf("read %h got %h exp %h", a, rd, ref_rd(a)));
        end
        5, 6, 7, 8: begin
          d = $urandom; m = $urandom;
          op(MD_WR, a, d, m, rd, lat);
          refm[a] = (ref_rd(a) & ~m) | (d & m);
        end
        default: begin
          d = $urandom;
          op(MD_WRBLK, a, d, 0, rd, lat);
          for (int w = 0; w < LINE / 4; w++) refm[{a[31:6], 6'b0} + 4 * w] = d;
        end
      endcase
      // a repeat of the same address is always a one-cycle hit
      if (i % 50 == 0) begin
        op(MD_RD, a, 0, 0, rd, lat);
        check(rd == ref_rd(a) && lat == 1, "repeat access hits in one cycle");
      end
    end

    // streaming: 16 reads of one resident block, back to back
    op(MD_RD, 32'h2000, 0, 0, rd, lat);
    @(negedge clk);
    req_valid = 1'b1;
    n = 0;
    for (int c = 0; c < 40 && n < 16; c++) begin
      req = '{op: MD_RD, addr: 32'h2000 + 4 * n, wdata: 0, wmask: 0};
      @(posedge clk);
      if (req_ready) n++;
      @(negedge clk);
      if (n == 16) req_valid = 1'b0;
      if (c == 16) check(n == 16, "16 hits accepted in 16 cycles");
    end
    req_valid = 1'b0;
    @(negedge clk);

    // flush writes back every dirty block and empties the cache
    n = l2_writes;
    op(MD_FLUSH, 0, 0, 0, rd, lat);
    check(l2_writes > n, "flush wrote dirty blocks back");
    for (int b = 0; b < WIN; b += LINE) begin
      logic [LINE*8-1:0] l;
      l = u_l2.peek(b);
      for (int w = 0; w < LINE / 4; w++)
        check(l[w*32 +: 32] == ref_rd(b + 4 * w), $sformatf("L2 after flush %h", b + 4 * w));
    end
    n = misses;
    op(MD_RD, 32'h104, 0, 0, rd, lat);
    check(misses == n + 1 && rd == ref_rd(32'h104), "read after flush misses and is correct");

    check(hits > 1000 && misses > 500, $sformatf("hits %0d misses %0d", hits, misses));
    $display("hits=%0d misses=%0d l2_reads=%0d l2_writes=%0d", hits, misses, l2_reads, l2_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
