// bs_event_dispatch: jump table that turns an unfiltered event into a
// software handler address for the monitor core.
//
// Events that BugSifter cannot filter leave it with the handler variant to
// run: the full handler, or, for partial filtering, the simplified handler
// (check passed) or the complex one (check failed, which uses the full
// entry).  The table is indexed by {variant, event type}: 2 x 256 handler
// addresses that monitor software programs before it starts.  The table
// size, its indexing and the one-entry output register are this design's
// choices; the design only says that light-weight logic selects the
// handler from a jump table of function pointers.
//
// Timing: valid/ready on both sides.  An accepted event appears on the
// output one cycle later; the output register accepts a new event in the
// cycle its current one leaves, so it passes one event per cycle.
module bs_event_dispatch
  import bs_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // programming port
  input  logic               jt_we,
  input  logic [EVID_W:0]    jt_waddr,   // {variant, event type}
  input  logic [XLEN-1:0]    jt_wdata,
  // events from the filter logic
  input  logic               in_valid,
  output logic               in_ready,
  input  ev_t                in_ev,
  input  hnd_e               in_hnd,
  // to the monitor core
  output logic               out_valid,
  input  logic               out_ready,
  output ev_t                out_ev,
  output hnd_e               out_hnd,
  output logic [XLEN-1:0]    out_handler
);

  localparam int unsigned JT = 2 << EVID_W;

  logic [XLEN-1:0] jt [JT];

  always_ff @(posedge clk) begin
    if (jt_we) jt[jt_waddr] <= jt_wdata;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_ev      <= '0;
      out_hnd     <= HND_FULL;
      out_handler <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ev      <= in_ev;
        out_hnd     <= in_hnd;
        out_handler <= jt[{in_hnd, in_ev.evid}];
      end
    end
  end

  // A handler offered to the core stays offered, unchanged, until taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_ev) && $stable(out_hnd) &&
                                  $stable(out_handler))
    else $error("handler output changed before the core took it");

endmodule
