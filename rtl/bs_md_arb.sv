// bs_md_arb: shares the metadata cache's single port among its users.
//
// Requester 0 has the highest priority.  In BugSifter the stack update unit
// is requester 0, the filter logic 1 and the monitor core's Load/Store
// Metadata instructions 2.  The grant is combinational; the requester whose
// request the cache accepts is remembered, and the cache's response
// (rsp_valid) is steered back to it.  This works because the cache has at
// most one request in flight: it accepts the next one only in the cycle it
// answers the last.  Fixed priority is this design's choice.
module bs_md_arb
  import bs_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   in_valid,
  output logic [N-1:0]   in_ready,
  input  md_req_t        in_req [N],
  output logic [N-1:0]   in_rsp_valid,
  output logic           out_valid,
  input  logic           out_ready,
  output md_req_t        out_req,
  input  logic           out_rsp_valid
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] sel, owner;

  always_comb begin
    sel = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (in_valid[i]) sel = IW'(i);
    end
  end

  assign out_valid = |in_valid;
  assign out_req   = in_req[sel];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_ready[i]     = out_ready && (sel == IW'(i));
      in_rsp_valid[i] = out_rsp_valid && (owner == IW'(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      owner <= '0;
    else if (out_valid && out_ready) owner <= sel;
  end

endmodule
