// bs_pkg: types and constants shared by the BugSifter blocks.
//
// BugSifter sits between the event dispatch logic of a monitor core and the
// software handlers that check every application instruction.  Each event
// (one committed application instruction, or a stack frame allocation or
// release) is described by an ev_t.  An event names at most two operands,
// a source and a destination, each either an application register (whose
// metadata lives in the metadata register file) or a memory word (whose
// metadata lives in the metadata cache).  Events with more operands are
// never entered in the filter table and always reach software.
//
// The filter table holds, per event type, the columns src, dst, cc (clean
// check), ru (redundant update) and su (stack update).  The pf bit (partial
// filtering, used by AtomCheck-like monitors) and the su_ret bit (which of
// the two stack-update values to write) are this design's own additions to
// make those two mechanisms programmable per event type.
//
// Metadata cache requests (md_req_t) address the metadata space in bytes.
// Four operations exist: read a 32-bit word, write a word under a bit mask
// (sub-block interface), fill a whole block with a 32-bit pattern
// (block-wide interface) and write back plus invalidate everything.
package bs_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned XLEN       = 32;  // IA32 word and address width
  localparam int unsigned EVID_W     = 8;   // event type code width (assumed)
  localparam int unsigned NREGS      = 8;   // IA32 general purpose registers
  localparam int unsigned REG_W      = $clog2(NREGS);

  // ---------------------------------------------------------------- events
  typedef enum logic [1:0] {
    OP_NONE = 2'd0,
    OP_REG  = 2'd1,
    OP_MEM  = 2'd2
  } opkind_e;

  typedef struct packed {
    opkind_e           kind;
    logic [REG_W-1:0]  rnum;   // register number when kind == OP_REG
    logic [XLEN-1:0]   addr;   // application virtual address when OP_MEM
  } opnd_t;

  typedef struct packed {
    logic [EVID_W-1:0] evid;   // event type, the filter table key
    logic [XLEN-1:0]   pc;     // application program counter
    opnd_t             src;
    opnd_t             dst;
    logic [XLEN-1:0]   su_addr; // stack update: lowest application address
    logic [XLEN-1:0]   su_len;  // stack update: frame length in bytes
  } ev_t;

  // ---------------------------------------------------------------- filter table
  typedef struct packed {
    logic              valid;
    logic [EVID_W-1:0] evid;
    logic              src;    // source operand metadata takes part
    logic              dst;    // destination operand metadata takes part
    logic              cc;     // clean check against the invariant
    logic              ru;     // redundant update: source == destination
    logic              su;     // stack update, done by the stack update unit
    logic              pf;     // partial filter: check picks simple/complex handler
    logic              su_ret; // stack update writes the return value (else call value)
  } ft_entry_t;

  // What became of an event.
  typedef enum logic [2:0] {
    RES_FILT_CC   = 3'd0,  // filtered, clean check passed
    RES_FILT_RU   = 3'd1,  // filtered, redundant update
    RES_STACK_HW  = 3'd2,  // handed to the stack update unit
    RES_DISPATCH  = 3'd3,  // full software handler
    RES_DISP_SIMP = 3'd4,  // partial filter hit: simplified handler
    RES_DISP_CPLX = 3'd5   // partial filter miss: complex handler
  } result_e;

  // Variant of handler selected in the jump table.
  typedef enum logic {
    HND_FULL   = 1'b0,
    HND_SIMPLE = 1'b1
  } hnd_e;

  // ---------------------------------------------------------------- metadata cache
  typedef enum logic [1:0] {
    MD_RD    = 2'd0,   // read one 32-bit metadata word
    MD_WR    = 2'd1,   // write one word under a bit mask
    MD_WRBLK = 2'd2,   // set a whole block to a replicated 32-bit pattern
    MD_FLUSH = 2'd3    // write back dirty blocks and invalidate all
  } md_op_e;

  typedef struct packed {
    md_op_e           op;
    logic [XLEN-1:0]  addr;   // metadata byte address
    logic [XLEN-1:0]  wdata;
    logic [XLEN-1:0]  wmask;  // bit mask for MD_WR
  } md_req_t;

  // Item width in bits of one application word's metadata for a metadata
  // factor of 2**lf (lf = 0..5): 32, 16, 8, 4, 2 or 1 bits.
  localparam int unsigned LF_W = 3;
  function automatic logic [XLEN-1:0] item_mask(input logic [LF_W-1:0] lf);
    return 32'hFFFF_FFFF >> ((32 - (32 >> lf)));
  endfunction

  // Bit address, in metadata space, of the item of application word wi
  // (byte address divided by four).  35 bits wide so factor 1 does not wrap.
  function automatic logic [XLEN+2:0] md_bit_addr(input logic [XLEN-3:0] wi,
                                                  input logic [LF_W-1:0] lf);
    logic [XLEN+2:0] w;
    w = {3'b000, wi, 2'b00};            // word index * 4
    return (w << 3) >> lf;              // word index * (32 >> lf)
  endfunction

  // The low item of v copied across a 32-bit word.
  function automatic logic [XLEN-1:0] replicate(input logic [XLEN-1:0] v,
                                                input logic [LF_W-1:0] lf);
    case (lf)
      3'd0:    return v;
      3'd1:    return {2{v[15:0]}};
      3'd2:    return {4{v[7:0]}};
      3'd3:    return {8{v[3:0]}};
      3'd4:    return {16{v[1:0]}};
      default: return {32{v[0]}};
    endcase
  endfunction

endpackage
