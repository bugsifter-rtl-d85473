// tb_bs_md_rf: random writes to the eight register-metadata registers with
// both read ports checked every cycle against a copy kept by the test; a
// read of the register being written returns the old value in that cycle.
module tb_bs_md_rf;
  import bs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]  ra0, ra1, wa;
  logic [31:0] rd0, rd1, wd;
  logic        we;

  bs_md_rf dut (.clk, .rst_n, .raddr0 (ra0), .rdata0 (rd0), .raddr1 (ra1),
                .rdata1 (rd1), .we, .waddr (wa), .wdata (wd));

  logic [31:0] copy [8];

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
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
    we = 1'b0; wa = '0; wd = '0; ra0 = '0; ra1 = '0;
    for (int i = 0; i < 8; i++) copy[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 1) != 0);
      wa  = 3'($urandom_range(0, 7));
      wd  = $urandom;
      ra0 = 3'($urandom_range(0, 7));
      ra1 = (c % 3 == 0) ? wa : 3'($urandom_range(0, 7));
      #1;
      check(rd0 == copy[ra0] && rd1 == copy[ra1], $sformatf("cycle %0d reads", c));
      @(posedge clk);
      if (we) copy[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
