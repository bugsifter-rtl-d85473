// bs_stack_update_unit: sets the metadata of a whole stack frame in hardware.
//
// On a function call or return (or a push/pop) the monitor must set the
// metadata of every word of the frame to one known value, for example
// "allocated but uninitialised" on a call and "unallocated" on a return.
// Done in software this is a loop of over a hundred instructions; here a
// small state machine issues the writes to the metadata cache itself.
//
// A command gives the frame's lowest application address (esp), its length
// in bytes and the value to write.  The unit maps the frame to a range of
// metadata bits with the metadata factor (one item of 32 >> lf bits per
// application word; the frame is taken as whole words, start rounded down,
// end rounded up) and covers that range with as few writes as it can: a
// block-wide write (MD_WRBLK) for each metadata block the range covers
// completely, and a masked sub-block word write (MD_WR) for each partly
// covered word at the two ends.  The value's low item is repeated across
// the 32-bit pattern.
//
// Timing: cmd_valid/cmd_ready; the unit accepts a command only when idle
// and raises busy until the last write has been acknowledged by the cache,
// then pulses done.  One write is issued per cycle the cache accepts one.
// The design gives the FSM, the two write interfaces and the use of esp and
// length; the rounding to words and the issue order (ascending) are this
// design's choices.
module bs_stack_update_unit
  import bs_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [LF_W-1:0] lf,          // log2 of the metadata factor
  // command
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic [XLEN-1:0] cmd_addr,    // application address of the frame
  input  logic [XLEN-1:0] cmd_len,     // frame length in bytes
  input  logic [XLEN-1:0] cmd_val,     // metadata value for every word
  // metadata cache port
  output logic            md_req_valid,
  input  logic            md_req_ready,
  output md_req_t         md_req,
  input  logic            md_rsp_valid,
  // status
  output logic            busy,
  output logic            done,
  output logic            stat_blk,    // a block-wide write was issued
  output logic            stat_word    // a sub-block write was issued
);

  localparam int unsigned BW     = XLEN + 4;            // metadata bit address width
  localparam int unsigned BLK_B  = LINE_BYTES * 8;      // bits per block
  localparam int unsigned BLK_L  = $clog2(BLK_B);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [BW-1:0]   cur, endb;
  logic [XLEN-1:0] pat;
  logic [1:0]      outst;         // writes issued but not yet acknowledged

  // frame bounds in application words
  logic [XLEN-1:0] end_byte;
  logic [XLEN-2:0] end_word;
  assign end_byte = cmd_addr + cmd_len + 32'd3;
  // a frame that runs past the top of the address space is clipped to it
  assign end_word = (end_byte < cmd_addr) ? {1'b1, {(XLEN-2){1'b0}}}
                                          : {1'b0, end_byte[XLEN-1:2]};

  // next write
  logic            blk_ok;
  logic [BW-1:0]   wbase, wnext, hi_rel;
  logic [5:0]      lo, hi;
  logic [XLEN-1:0] mask;

  assign blk_ok = (cur[BLK_L-1:0] == '0) && (endb - cur >= BW'(BLK_B));
  assign wbase  = {cur[BW-1:5], 5'b0};
  assign wnext  = wbase + BW'(32);
  assign hi_rel = endb - wbase;
  assign lo     = {1'b0, cur[4:0]};
  assign hi     = (hi_rel >= BW'(32)) ? 6'd32 : hi_rel[5:0];
  always_comb begin
    for (int i = 0; i < 32; i++) mask[i] = (6'(i) >= lo) && (6'(i) < hi);
  end

  assign cmd_ready    = (state == S_IDLE);
  assign busy         = (state != S_IDLE);
  assign md_req_valid = (state == S_RUN) && (cur < endb) && (outst != 2'd3);
  always_comb begin
    md_req.op    = blk_ok ? MD_WRBLK : MD_WR;
    md_req.addr  = blk_ok ? cur[XLEN+2:3] : {wbase[XLEN+2:5], 2'b00};
    md_req.wdata = pat;
    md_req.wmask = blk_ok ? '1 : mask;
  end

  logic issue;
  assign issue     = md_req_valid && md_req_ready;
  assign stat_blk  = issue && blk_ok;
  assign stat_word = issue && !blk_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      endb  <= '0;
      pat   <= '0;
      outst <= '0;
      done  <= 1'b0;
    end else begin
      done  <= 1'b0;
      outst <= outst + {1'b0, issue} - {1'b0, md_rsp_valid};
      unique case (state)
        S_IDLE:
          if (cmd_valid) begin
            cur   <= {1'b0, md_bit_addr(cmd_addr[XLEN-1:2], lf)};
            endb  <= ({5'b00000, end_word} << 5) >> lf;
            pat   <= replicate(cmd_val, lf);
            state <= S_RUN;
          end
        S_RUN: begin
          if (issue) cur <= blk_ok ? cur + BW'(BLK_B) : wnext;
          if (cur >= endb || (issue && (blk_ok ? cur + BW'(BLK_B) : wnext) >= endb))
            state <= S_DRAIN;
        end
        S_DRAIN:
          if (outst == 2'd0 || (outst == 2'd1 && md_rsp_valid)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A write offered to the cache is held, unchanged, until accepted.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      md_req_valid && !md_req_ready |=> md_req_valid && $stable(md_req))
    else $error("cache write changed before it was accepted");
  // Every acknowledgement belongs to an issued write.
  a_no_stray_ack: assert property (@(posedge clk) disable iff (!rst_n)
      md_rsp_valid |-> outst != 2'd0)
    else $error("cache acknowledged a write that was never issued");

endmodule
