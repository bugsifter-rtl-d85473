// tb_bs_filter_table: programs random entries into the 30-entry filter
// table and checks every lookup against a copy kept by the test: a valid
// entry with the event type hits and returns its fields, the lowest-numbered
// one when two share a type, an invalidated entry no longer hits, and after
// reset nothing hits.
module tb_bs_filter_table;
  import bs_pkg::*;

  localparam int unsigned N = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        we, hit;
  logic [4:0]  widx;
  ft_entry_t   wentry, entry;
  logic [7:0]  evid;

  bs_filter_table dut (.clk, .rst_n, .we, .widx, .wentry, .evid, .hit, .entry);

  ft_entry_t copy [N];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic lookup_all();
    for (int k = 0; k < 256; k++) begin
      bit      eh;
      ft_entry_t ee;
      eh = 0; ee = '0;
      for (int i = 0; i < N; i++)
        if (!eh && copy[i].valid && copy[i].evid == 8'(k)) begin
          eh = 1; ee = copy[i];
        end
      evid = 8'(k);
      #1;
      check(hit == eh && (!eh || entry == ee), $sformatf("lookup %0d", k));
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; widx = '0; wentry = '0; evid = '0;
    for (int i = 0; i < N; i++) copy[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    lookup_all();
    for (int r = 0; r < 20; r++) begin
      for (int j = 0; j < 10; j++) begin
        ft_entry_t x;
        int i;
        i = $urandom_range(0, N - 1);
        x = ft_entry_t'($urandom);
        x.evid  = 8'($urandom_range(0, 40));   // collisions are likely
        x.valid = ($urandom_range(0, 4) != 0);
        @(negedge clk);
        we = 1'b1; widx = 5'(i); wentry = x;
        @(negedge clk);
        we = 1'b0;
        copy[i] = x;
      end
      lookup_all();
    end
    rst_n = 1'b0;
    #1;
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) copy[i] = '0;
    @(negedge clk);
    lookup_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
