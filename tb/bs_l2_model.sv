// bs_l2_model: behavioural model of the L2 behind the metadata cache's fill
// path, for testbenches only.  It takes one block request at a time and
// answers it LAT cycles later: a read returns the stored block, or for a
// block never written the initial content; a write stores the block and is
// acknowledged the same way.  The initial content of block-address a is,
// in each 32-bit word w, INIT_WORD when INIT_ADDR is 0, else the word's own
// byte address a + 4*w.  The model counts reads and writes.
module bs_l2_model #(
  parameter int unsigned  LINE_BYTES = 64,
  parameter int unsigned  LAT        = 4,
  parameter bit           INIT_ADDR  = 1'b1,
  parameter logic [31:0]  INIT_WORD  = 32'h0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic                    req_we,
  input  logic [31:0]             req_addr,
  input  logic [LINE_BYTES*8-1:0] req_wdata,
  output logic                    rsp_valid,
  output logic [LINE_BYTES*8-1:0] rsp_rdata,
  output int                      n_reads,
  output int                      n_writes
);

  logic [LINE_BYTES*8-1:0] mem [logic [31:0]];
  int                      cnt;
  logic                    busy;
  logic                    q_we;
  logic [31:0]             q_addr;
  logic [LINE_BYTES*8-1:0] q_wdata;

  function automatic logic [LINE_BYTES*8-1:0] peek(input logic [31:0] a);
    logic [LINE_BYTES*8-1:0] l;
    if (mem.exists(a)) return mem[a];
    for (int w = 0; w < LINE_BYTES / 4; w++)
      l[w*32 +: 32] = INIT_ADDR ? a + 32'(4 * w) : INIT_WORD;
    return l;
  endfunction

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= 0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      n_reads   <= 0;
      n_writes  <= 0;
      q_we      <= 1'b0;
      q_addr    <= '0;
      q_wdata   <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy    <= 1'b1;
        cnt     <= LAT;
        q_we    <= req_we;
        q_addr  <= req_addr;
        q_wdata <= req_wdata;
      end else if (busy) begin
        if (cnt > 1) cnt <= cnt - 1;
        else begin
          busy      <= 1'b0;
          rsp_valid <= 1'b1;
          if (q_we) begin
            n_writes   <= n_writes + 1;
          end else begin
            rsp_rdata  <= peek(q_addr);
            n_reads    <= n_reads + 1;
          end
        end
      end
    end
  end

  // the store itself; an associative array cannot take a nonblocking write
  always @(posedge clk) begin
    if (rst_n && busy && cnt <= 1 && q_we) mem[q_addr] = q_wdata;
  end

endmodule
