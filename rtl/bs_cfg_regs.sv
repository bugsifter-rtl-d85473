// bs_cfg_regs: BugSifter's programmable monitor registers.
//
// Monitor software programs four registers before monitoring starts:
//   addr 0  INV      the invariant value clean checks compare against
//   addr 1  MFACTOR  the metadata factor, the ratio of the application word
//                    size to the metadata item size: 1, 2, 4, 8, 16 or 32
//   addr 2  SU_CALL  the value the stack update unit writes on a call/push
//   addr 3  SU_RET   the value it writes on a return/pop
// The invariant and the metadata factor are named by the design; the two
// stack-update values are the "two predefined values" of the stack update
// unit, placed here so one write port programs them all.  The register
// map, the reset values (INV 0, factor 4, both values 0) and the rule that
// a factor write other than a power of two from 1 to 32 is ignored are this design's choices.
// The factor is kept as its base-2 logarithm (lf), which is what the other
// blocks use.  Writes take effect on the next clock edge; reads are
// combinational.
module bs_cfg_regs
  import bs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            we,
  input  logic [1:0]      waddr,
  input  logic [XLEN-1:0] wdata,
  output logic [XLEN-1:0] inv,
  output logic [LF_W-1:0] lf,       // log2 of the metadata factor
  output logic [XLEN-1:0] su_call_val,
  output logic [XLEN-1:0] su_ret_val
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inv         <= '0;
      lf          <= 3'd2;
      su_call_val <= '0;
      su_ret_val  <= '0;
    end else if (we) begin
      unique case (waddr)
        2'd0: inv <= wdata;
        2'd1: begin
          case (wdata)
            32'd1:   lf <= 3'd0;
            32'd2:   lf <= 3'd1;
            32'd4:   lf <= 3'd2;
            32'd8:   lf <= 3'd3;
            32'd16:  lf <= 3'd4;
            32'd32:  lf <= 3'd5;
            default: lf <= lf;
          endcase
        end
        2'd2: su_call_val <= wdata;
        2'd3: su_ret_val  <= wdata;
      endcase
    end
  end

endmodule
