// bs_cache_sweep_point: one point of the metadata cache size sweep, for
// tb_md_cache_sweep.  It holds a metadata cache of SIZE_BYTES (two-way,
// 64-byte blocks) with its own L2 model and, once start is seen, runs the
// same access program as every other point, checking all data itself:
//
//   A. working set: four passes of word reads over a 4 KB metadata region
//      (the region one 4 KB cache holds exactly).  Each pass reads every
//      word of every block in order.  The program checks each read's data
//      and that every hit answers in the cycle after acceptance, and counts
//      the misses of the four passes.
//   B. random traffic: reads, masked word writes and block-wide writes to
//      an 8 KB window, every read compared with a reference memory, then a
//      flush, after which the L2 must hold the reference contents.
//
// The random program comes from a 32-bit xorshift generator seeded with
// SEED, so all points see the identical stream and their miss counts can be
// compared.  Results: done, checks, failures, miss_ws (misses in A) and
// miss_rnd (misses in B).  The access program and the region sizes are this
// test's own; the sweep range of cache sizes follows the design's
// evaluation.
module bs_cache_sweep_point
  import bs_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter logic [31:0] SEED       = 32'h1234_5678
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   miss_ws,
  output int   miss_rnd
);

  localparam int unsigned LINE = 64;
  localparam int unsigned WS   = 4096;   // working-set region, bytes
  localparam int unsigned WIN  = 8192;   // random window, bytes
  localparam int unsigned NRND = 3000;   // random operations

  logic              req_valid, req_ready, rsp_valid;
  md_req_t           req;
  logic [31:0]       rsp_rdata;
  logic              mreq_valid, mreq_ready, mreq_we, mrsp_valid;
  logic [31:0]       mreq_addr;
  logic [LINE*8-1:0] mreq_wdata, mrsp_rdata;
  logic              st_hit, st_miss;
  int                l2_reads, l2_writes;

  bs_md_cache #(.SIZE_BYTES(SIZE_BYTES), .WAYS(2), .LINE_BYTES(LINE)) u_cache (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rsp_valid, .rsp_rdata,
    .mem_req_valid (mreq_valid), .mem_req_ready (mreq_ready),
    .mem_req_we (mreq_we), .mem_req_addr (mreq_addr),
    .mem_req_wdata (mreq_wdata), .mem_rsp_valid (mrsp_valid),
    .mem_rsp_rdata (mrsp_rdata), .stat_hit (st_hit), .stat_miss (st_miss)
  );

  bs_l2_model #(.LINE_BYTES(LINE), .LAT(10)) u_l2 (
    .clk, .rst_n, .req_valid (mreq_valid), .req_ready (mreq_ready),
    .req_we (mreq_we), .req_addr (mreq_addr), .req_wdata (mreq_wdata),
    .rsp_valid (mrsp_valid), .rsp_rdata (mrsp_rdata),
    .n_reads (l2_reads), .n_writes (l2_writes)
  );

  int misses = 0;
  always @(posedge clk) if (st_miss) misses++;

  logic [31:0] refm [logic [31:0]];
  logic [31:0] rng;

  function automatic logic [31:0] ref_rd(input logic [31:0] a);
    return refm.exists(a) ? refm[a] : a;   // L2 initial content: own address
  endfunction

  task automatic next_rand(output logic [31:0] r);
    rng = rng ^ (rng << 13);
    rng = rng ^ (rng >> 17);
    rng = rng ^ (rng << 5);
    r   = rng;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0d B cache): %s", SIZE_BYTES, what);
    end
  endtask

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

  initial begin
    logic [31:0] rd, a, d, m, r;
    int lat, m0;
    done      = 1'b0;
    checks    = 0;
    failures  = 0;
    miss_ws   = 0;
    miss_rnd  = 0;
    req_valid = 1'b0;
    req       = '0;
    rng       = SEED;
    wait (start);

    // A. working set
    m0 = misses;
    for (int p = 0; p < 4; p++)
      for (int b = 0; b < WS; b += 4) begin
        int mb;
        mb = misses;
        op(MD_RD, b, 0, 0, rd, lat);
        check(rd == ref_rd(b), $sformatf("working-set read %h", b));
        if (misses == mb)
          check(lat == 1, $sformatf("hit at %h answered after %0d cycles", b, lat));
      end
    miss_ws = misses - m0;

    // B. random traffic
    m0 = misses;
    for (int i = 0; i < NRND; i++) begin
      next_rand(r);
      a = (r % (WIN / 4)) * 4;
      next_rand(r);
      case (r % 10)
        0, 1, 2, 3, 4: begin
          op(MD_RD, a, 0, 0, rd, lat);
          check(rd == ref_rd(a), $sformatf("read %h got %h exp %h", a, rd, ref_rd(a)));
        end
        5, 6, 7, 8: begin
          next_rand(d);
          next_rand(m);
          op(MD_WR, a, d, m, rd, lat);
          refm[a] = (ref_rd(a) & ~m) | (d & m);
        end
        default: begin
          next_rand(d);
          op(MD_WRBLK, a, d, 0, rd, lat);
          for (int w = 0; w < LINE / 4; w++) refm[{a[31:6], 6'b0} + 4 * w] = d;
        end
      endcase
    end
    miss_rnd = misses - m0;

    op(MD_FLUSH, 0, 0, 0, rd, lat);
    for (int b = 0; b < WIN; b += LINE) begin
      logic [LINE*8-1:0] l;
      l = u_l2.peek(b);
      for (int w = 0; w < LINE / 4; w++)
        check(l[w*32 +: 32] == ref_rd(b + 4 * w), $sformatf("L2 after flush %h", b + 4 * w));
    end
    done = 1'b1;
  end

endmodule
