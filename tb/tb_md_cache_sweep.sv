// tb_md_cache_sweep: the metadata cache across the range of sizes the
// design was evaluated over, 512 B to 16 KB in powers of two, all two-way
// with 64-byte blocks.  Six bs_cache_sweep_point instances run the
// identical access program in parallel, each checking its own data (reads
// against a reference memory, L2 contents after a flush, one-cycle hits).
//
// Across the sizes this test checks the capacity behaviour the sweep is
// about, with counts worked out from the program, not from the cache:
//   * four passes over a 4 KB working set (64 blocks) miss only on the
//     first touch of each block in caches of 4 KB and more, 64 misses;
//   * in smaller caches every set sees more blocks in cyclic order than it
//     has ways, so LRU keeps none across passes: all 4 x 64 = 256 block
//     visits miss;
//   * random traffic over an 8 KB window (128 blocks) misses at most 128
//     times in the 8 KB and 16 KB caches, and the smallest cache misses
//     more than the largest.
// It prints the miss counts of each size, the shape of a miss-rate curve.
module tb_md_cache_sweep;

  localparam int NPT = 6;
  localparam int unsigned SIZES [NPT] = '{512, 1024, 2048, 4096, 8192, 16384};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  always #5 clk = ~clk;

  logic [NPT-1:0] done;
  int pchecks [NPT], pfail [NPT], mws [NPT], mrnd [NPT];

  for (genvar i = 0; i < NPT; i++) begin : g_pt
    bs_cache_sweep_point #(.SIZE_BYTES(SIZES[i]), .SEED(32'hC0FF_EE11)) u_pt (
      .clk, .rst_n, .start,
      .done     (done[i]),
      .checks   (pchecks[i]),
      .failures (pfail[i]),
      .miss_ws  (mws[i]),
      .miss_rnd (mrnd[i])
    );
  end

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    start = 1'b1;
    wait (&done);
    @(posedge clk);
    for (int i = 0; i < NPT; i++) begin
      checks   += pchecks[i];
      failures += pfail[i];
      $display("cache %5d B: working-set misses %4d, random misses %4d of 3000 operations",
               SIZES[i], mws[i], mrnd[i]);
      if (SIZES[i] >= 4096)
        check(mws[i] == 64, $sformatf("%0d B: working set should miss 64 times, got %0d",
                                      SIZES[i], mws[i]));
      else
        check(mws[i] == 256, $sformatf("%0d B: working set should miss 256 times, got %0d",
                                       SIZES[i], mws[i]));
      if (SIZES[i] >= 8192)
        check(mrnd[i] <= 128, $sformatf("%0d B: random traffic over 8 KB missed %0d times",
                                        SIZES[i], mrnd[i]));
    end
    check(mrnd[0] > mrnd[NPT-1], "smallest cache should miss more than the largest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
