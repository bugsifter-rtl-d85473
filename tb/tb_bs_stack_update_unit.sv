// tb_bs_stack_update_unit: self-checking test of the stack update unit.
//
// A small metadata memory stands in for the metadata cache: it accepts a
// request when its random ready is high, applies block-wide and masked word
// writes and acknowledges one cycle later.  Random frames (word-aligned or
// not, short and up to 2 KB) are updated under each metadata factor.  After
// each command the test checks, item by item, that every application word
// of the frame now has the requested value and that the words around the
// frame are untouched; that the number of block-wide and word writes is the
// minimum (one per block the frame covers completely, one per other word it
// touches); and, with the memory always ready, that the command takes no
// more than one cycle per write plus three.
module tb_bs_stack_update_unit;
  import bs_pkg::*;

  localparam int unsigned LINE = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]  lf;
  logic        cmd_valid, cmd_ready;
  logic [31:0] cmd_addr, cmd_len, cmd_val;
  logic        md_valid, md_ready, md_rsp;
  md_req_t     md_req;
  logic        busy, done, s_blk, s_word;
  bit          always_ready;

  bs_stack_update_unit dut (
    .clk, .rst_n, .lf, .cmd_valid, .cmd_ready, .cmd_addr, .cmd_len, .cmd_val,
    .md_req_valid (md_valid), .md_req_ready (md_ready), .md_req,
    .md_rsp_valid (md_rsp), .busy, .done, .stat_blk (s_blk), .stat_word (s_word)
  );

  // metadata memory, 32-bit words by metadata byte address
  logic [31:0] mem [logic [31:0]];
  function automatic logic [31:0] init_word(input logic [31:0] a);
    return a * 32'h9E37_79B1 ^ 32'h5A5A_A5A5;
  endfunction
  function automatic logic [31:0] rdw(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  always @(posedge clk) begin
    md_rsp <= md_valid && md_ready;
    if (md_valid && md_ready) begin
      if (md_req.op == MD_WRBLK) begin
        for (int w = 0; w < LINE / 4; w++)
          mem[{md_req.addr[31:6], 6'b0} + 32'(4 * w)] = md_req.wdata;
      end else if (md_req.op == MD_WR) begin
        mem[{md_req.addr[31:2], 2'b0}] =
          (rdw({md_req.addr[31:2], 2'b0}) & ~md_req.wmask) | (md_req.wdata & md_req.wmask);
      end
    end
    md_ready <= always_ready ? 1'b1 : ($urandom_range(0, 3) != 0);
  end

  int n_blk, n_word;
  always @(posedge clk) begin
    if (s_blk)  n_blk++;
    if (s_word) n_word++;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // metadata item of application word index wi under factor 2**l
  function automatic logic [31:0] item(input logic [29:0] wi, input logic [2:0] l);
    longint unsigned bit_a;
    int iw;
    logic [31:0] wv;
    iw    = 32 >> l;
    bit_a = longint'(wi) * iw;
    wv    = rdw(32'((bit_a / 32) * 4));
    return (wv >> (bit_a % 32)) & (32'hFFFF_FFFF >> (32 - iw));
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, exp_blk, exp_word, iw;
    longint unsigned sb, eb, blk_bits;
    logic [29:0] w0, w1;
    cmd_valid = 1'b0;
    cmd_addr = '0; cmd_len = '0; cmd_val = '0; lf = 3'd2;
    md_ready = 1'b0; always_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    blk_bits = LINE * 8;

    for (int t = 0; t < 400; t++) begin
      lf = 3'($urandom_range(0, 5));
      iw = 32 >> lf;
      cmd_addr = 32'h0010_0000 + $urandom_range(0, 4095);
      if (t % 4 != 0) cmd_addr[1:0] = 2'b00;
      cmd_len  = (t % 5 == 0) ? $urandom_range(0, 16) : $urandom_range(1, 2048);
      cmd_val  = $urandom;
      always_ready = (t % 2 == 0);
      w0 = cmd_addr[31:2];
      w1 = 30'((cmd_addr + cmd_len + 3) >> 2);

      // the minimum number of writes
      sb = longint'(w0) * iw;
      eb = longint'(w1) * iw;
      exp_blk = 0; exp_word = 0;
      for (longint unsigned b = (sb / blk_bits) * blk_bits; b < eb && sb < eb; b += blk_bits) begin
        if (b >= sb && b + blk_bits <= eb) exp_blk++;
        else
          for (longint unsigned w = b; w < b + blk_bits; w += 32)
            if (w + 32 > sb && w < eb) exp_word++;
      end

      n_blk = 0; n_word = 0;
      @(negedge clk);
      cmd_valid = 1'b1;
      do @(posedge clk); while (!cmd_ready);
      @(negedge clk);
      cmd_valid = 1'b0;
      cyc = 0;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end

      for (logic [29:0] w = w0 - 3; w != w1 + 3; w++) begin
        if (w >= w0 && w < w1)
          check(item(w, lf) == (cmd_val & (32'hFFFF_FFFF >> (32 - iw))),
                $sformatf("t%0d word %h inside frame", t, w));
        else begin
          // untouched: the item still has its initial value
          logic [31:0] save [logic [31:0]];
          logic [31:0] got;
          got = item(w, lf);
          save = mem;
          mem.delete();
          check(got == item(w, lf), $sformatf("t%0d word %h outside frame changed", t, w));
          mem = save;
        end
      end
      check(n_blk == exp_blk && n_word == exp_word,
            $sformatf("t%0d writes blk %0d/%0d word %0d/%0d a=%h len=%0d lf=%0d cyc=%0d", t, n_blk, exp_blk, n_word, exp_word, cmd_addr, cmd_len, lf, cyc));
      if (always_ready)
        check(cyc <= n_blk + n_word + 3, $sformatf("t%0d took %0d cycles for %0d writes",
                                                   t, cyc, n_blk + n_word));
      // start the next frame from fresh memory
      mem.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
