// atx_pkg: shared types and constants of the ATX Unified Transfer Engine (UTE).
//
// The UTE sits next to the L2 cache of a CPU core. The core sends it ATX
// instructions (tasks); the UTE fetches each task's input data from memory with
// programmable Stream Units, writes it into the input buffers of a near-core
// accelerator (NCA), and returns the NCA's result to the core.
//
// Following the design: a task carries a virtual-accelerator (VAcc) id and
// runtime constants packed in one 512-bit vector register, {VAccId, c0..c6}
// in 64-bit slots; a bound expression (bexp) is a 2-byte word Op1(I1, Op2(I2, I3))
// whose operators are add, multiply, compare or shift. The bit layout of the
// bexp, the operand specifier codes, the configuration opcodes and all widths
// below are this implementation's own choices.
package atx_pkg;

  localparam int unsigned ADDR_W    = 48;   // virtual address width
  localparam int unsigned WORD_W    = 64;   // width of a runtime constant / parent datum
  localparam int unsigned NCONST    = 7;    // runtime constants per task (slots 1..7 of the vector register)
  localparam int unsigned VACC_W    = 8;    // VAcc id width (slot 0 of the vector register)
  localparam int unsigned TAG_W     = 4;    // ATX instruction tag (index in the core's 16-entry ATX Queue)
  localparam int unsigned VREG_W    = 512;  // vector register width (input and output operand)
  localparam int unsigned MAX_STREAMS = 4;  // streams per task type
  localparam int unsigned SID_W     = $clog2(MAX_STREAMS);
  localparam int unsigned TYPE_W    = 8;    // NCA type identifier
  localparam int unsigned NCAADDR_W = 16;   // byte address inside a 32 KB input buffer (+1 spare bit)
  localparam int unsigned CNT_W     = 8;    // elements in one coalesced access (<= line bytes)
  localparam int unsigned AGE_W     = 8;    // task sequence number used for age-based scheduling

  // Bound-expression operators.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_MUL = 2'd1,
    OP_CMP = 2'd2,   // a < b ? 1 : 0 (unsigned)
    OP_SHL = 2'd3    // a << b[5:0]
  } bop_e;

  // Bound-expression operand specifiers (4 bits). Codes 0..6 select runtime constant c0..c6.
  localparam logic [3:0] SPEC_ZERO  = 4'd7;
  localparam logic [3:0] SPEC_P0    = 4'd8;   // parent[i]
  localparam logic [3:0] SPEC_P1    = 4'd9;   // parent[i+1]
  localparam logic [3:0] SPEC_REP   = 4'd10;  // repetition index i
  localparam logic [3:0] SPEC_ESIZE = 4'd11;  // element size of this stream, in bytes
  localparam logic [3:0] SPEC_ONE   = 4'd12;

  // 16-bit bexp: value = op1(I1, op2(I2, I3))
  typedef struct packed {
    bop_e       op1;
    bop_e       op2;
    logic [3:0] i1;
    logic [3:0] i2;
    logic [3:0] i3;
  } bexp_t;

  // Per-stream configuration held in the VAcc-to-Streams Mapping.
  typedef struct packed {
    logic [3:0]           esize;      // element size in bytes: 1, 2, 4 or 8
    logic                 has_parent;
    logic [SID_W-1:0]     parent;     // parent stream index (valid if has_parent)
    bexp_t                beg;
    bexp_t                fin;        // end bound (exclusive)
    logic [15:0]          stride;     // memory stride, in elements
    logic [NCAADDR_W-1:0] nca_base;   // first scratchpad byte written by this stream
    logic [7:0]           nca_stride; // scratchpad stride, in elements
  } stream_cfg_t;

  typedef logic [NCONST-1:0][WORD_W-1:0] consts_t;

  // A task as it travels from the core to the UTE.
  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [VACC_W-1:0] vacc;
    consts_t           c;
  } task_t;

  // Configuration-register operations written by the core.
  typedef enum logic [3:0] {
    CFG_CHECK_TYPE  = 4'd0,  // read: is an NCA of type data present?
    CFG_MAP_TYPE    = 4'd1,  // map VAcc -> NCA type
    CFG_NUM_STREAMS = 4'd2,
    CFG_SIZE        = 4'd3,
    CFG_PARENT      = 4'd4,  // data = parent index, or all ones for a root stream
    CFG_BEXP_BEG    = 4'd5,
    CFG_BEXP_END    = 4'd6,
    CFG_STRIDE      = 4'd7,
    CFG_NCA_BASE    = 4'd8,
    CFG_NCA_STRIDE  = 4'd9,
    CFG_REMOVE      = 4'd10  // remove a VAcc from both mappings
  } cfg_op_e;

  typedef struct packed {
    cfg_op_e           op;
    logic [VACC_W-1:0] vacc;
    logic [SID_W-1:0]  stream;
    logic [WORD_W-1:0] data;
  } cfg_req_t;

  // One coalesced access: up to cnt elements of one memory line.
  typedef struct packed {
    logic [ADDR_W-1:0]    line;     // line-aligned byte address
    logic [7:0]           off;      // byte offset of the first element in the line
    logic [CNT_W-1:0]     cnt;      // number of elements
    logic [7:0]           mstep;    // byte distance between elements in the line
    logic [NCAADDR_W-1:0] nca;      // scratchpad byte address of the first element
    logic [NCAADDR_W-1:0] nstep;    // scratchpad byte distance between elements
    logic [3:0]           esize;
    logic [15:0]          seq;      // stream element index of the first element
    logic                 pf;       // prefetch only: no data comes back
  } access_t;

  // Bound-expression evaluation shared by the Bounds ALU.
  function automatic logic [WORD_W-1:0] bop(bop_e op, logic [WORD_W-1:0] a, logic [WORD_W-1:0] b);
    unique case (op)
      OP_ADD: return a + b;
      OP_MUL: return a * b;
      OP_CMP: return (a < b) ? WORD_W'(1) : '0;
      default: return a << b[5:0];
    endcase
  endfunction

endpackage
