// bs_filter_table: the configurable BugSifter filter table.
//
// One entry per filterable event type says how BugSifter treats it: which
// operands' metadata take part (src, dst) and which action applies: clean
// check (cc), redundant update (ru) or stack update (su).  The table holds
// 30 entries, enough for the heavily used subset of IA32.  Event types with
// no entry, or with more than two operands, are not entered and go to
// software.
//
// The table is searched by event type: every valid entry compares its key
// with the event's type and the lowest-numbered match wins.  Making the
// table associative (rather than indexed by the type code) and the pf and
// su_ret fields are this design's choices; the key and the five columns are
// the ones the design's filtering example shows.  Software writes entry
// widx with we; lookup is combinational.  Reset clears every valid bit.
module bs_filter_table
  import bs_pkg::*;
#(
  parameter int unsigned ENTRIES = 30
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // programming port
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] widx,
  input  ft_entry_t                  wentry,
  // lookup port
  input  logic [EVID_W-1:0]          evid,
  output logic                       hit,
  output ft_entry_t                  entry
);

  ft_entry_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (we && (32'(widx) < ENTRIES)) begin
      tbl[widx] <= wentry;
    end
  end

  always_comb begin
    hit   = 1'b0;
    entry = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].evid == evid) begin
        hit   = 1'b1;
        entry = tbl[i];
      end
    end
  end

endmodule
