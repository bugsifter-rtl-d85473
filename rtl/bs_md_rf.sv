// bs_md_rf: the metadata register file.
//
// Holds the metadata of the eight IA32 general-purpose registers, one
// 32-bit register each, so the filter logic can read the metadata of a
// source and a destination register in the same cycle through its two
// read ports.  Monitor software (the handlers that run for unfiltered
// events) updates it through the write port.  Reads are combinational;
// a write lands on the clock edge, and a read of the register being
// written returns the old value in that cycle.  Eight 32-bit registers and
// two ports follow the design; the separate write port and reset to zero
// are this design's choices.
module bs_md_rf
  import bs_pkg::*;
#(
  parameter int unsigned NREG  = 8,
  parameter int unsigned WIDTH = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] raddr0,
  output logic [WIDTH-1:0]        rdata0,
  input  logic [$clog2(NREG)-1:0] raddr1,
  output logic [WIDTH-1:0]        rdata1,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] waddr,
  input  logic [WIDTH-1:0]        wdata
);

  logic [WIDTH-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata0 = regs[raddr0];
  assign rdata1 = regs[raddr1];

endmodule
