// tb_bs_cfg_regs: checks the reset values of the monitor registers, that
// each register takes its writes, that the metadata factor is kept as its
// logarithm for 1, 2, 4 and 8 and that any other factor write is ignored.
module tb_bs_cfg_regs;
  import bs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        we;
  logic [1:0]  waddr;
  logic [2:0]  lf;
  logic [31:0] wdata, inv, cv, rv;

  bs_cfg_regs dut (.clk, .rst_n, .we, .waddr, .wdata, .inv, .lf,
                   .su_call_val (cv), .su_ret_val (rv));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    we = 1'b1; waddr = a; wdata = d;
    @(negedge clk);
    we = 1'b0;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, einv, ecv, erv;
    logic [2:0]  elf;
    we = 1'b0; waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(inv == 0 && lf == 3'd2 && cv == 0 && rv == 0, "reset values");
    einv = 0; elf = 2; ecv = 0; erv = 0;
    for (int i = 0; i < 500; i++) begin
      logic [1:0] a;
      a = 2'($urandom_range(0, 3));
      d = $urandom;
      if (a == 1) begin
        int k;
        k = $urandom_range(0, 7);
        d = (k < 6) ? (32'd1 << k) : $urandom_range(0, 20);
      end
      wr(a, d);
      case (a)
        2'd0: einv = d;
        2'd1: if (d == 1) elf = 0; else if (d == 2) elf = 1;
              else if (d == 4) elf = 2; else if (d == 8) elf = 3;
              else if (d == 16) elf = 4; else if (d == 32) elf = 5;
        2'd2: ecv = d;
        default: erv = d;
      endcase
      check(inv == einv && lf == elf && cv == ecv && rv == erv,
            $sformatf("after write %0d <- %h", a, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
