// atx_top: one core's ATX near-core accelerator complex: the Unified Transfer
// Engine (UTE) and its near-core accelerators (NCAs), each NCA with two input
// buffers (scratchpads), one per UTE PAcc port, for double buffering.
//
// The core side is the ATX port (tasks in, tagged 512-bit results and
// exceptions out, squashes in) plus the UTE configuration registers; the memory
// side is the UTE's read port into the core's L2 cache, which translates and
// serves virtual addresses. Nothing here writes memory: results only go back to
// the core's registers. The core, its ATX scheduler, the L2 (with TLB) and the
// accelerators' kernels beyond the example are outside this module.
// Following the design: three NCAs, two 32 KB input buffers per NCA, and the UTE
// sizes given in its own header. The three NCAs all run the example row-sum
// kernel, but carry distinct type identifiers (NCA n has type n+1), standing for
// the design's three different NCAs: a task type mapped to type t runs only on
// that NCA's two ports.
// A lint note that rst_n is used both asynchronously and synchronously comes
// from the assertions' disable iff, not from logic: all flops reset
// asynchronously.
module atx_top
  import atx_pkg::*;
#(
  parameter int unsigned N_NCA      = 3,
  parameter int unsigned N_SU       = 32,
  parameter int unsigned LDQ_N      = 128,
  parameter int unsigned LINE_BYTES = 128,
  parameter int unsigned PDQ_BYTES  = 1024,
  parameter int unsigned BUF_BYTES  = 32768,
  parameter int unsigned VAL_BASE   = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      task_valid,
  output logic                      task_ready,
  input  task_t                     task_in,
  input  logic                      squash_valid,
  input  logic [TAG_W-1:0]          squash_tag,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [TAG_W-1:0]          out_tag,
  output logic [VREG_W-1:0]         out_data,
  output logic                      exc_valid,
  output logic [TAG_W-1:0]          exc_tag,
  input  logic                      cfg_valid,
  input  cfg_req_t                  cfg,
  output logic [WORD_W-1:0]         cfg_rdata,
  output logic                      cfg_err,
  input  logic                      pf_enable,
  output logic                      mem_req_valid,
  output logic [ADDR_W-1:0]         mem_req_addr,
  output logic [$clog2(LDQ_N)-1:0]  mem_req_tag,
  output logic                      mem_req_pf,
  input  logic                      mem_req_ready,
  input  logic                      mem_rsp_valid,
  input  logic [$clog2(LDQ_N)-1:0]  mem_rsp_tag,
  input  logic [LINE_BYTES*8-1:0]   mem_rsp_data,
  output logic                      dispatch_real,
  output logic                      dispatch_pf
);

  localparam int unsigned N_PORTS = 2 * N_NCA;

  // NCA n has type identifier n+1; both PAcc ports of an NCA share its type
  function automatic logic [N_PORTS*TYPE_W-1:0] port_types();
    logic [N_PORTS*TYPE_W-1:0] t;
    for (int p = 0; p < N_PORTS; p++) t[p*TYPE_W +: TYPE_W] = TYPE_W'(p / 2 + 1);
    return t;
  endfunction
  localparam logic [N_PORTS*TYPE_W-1:0] PORT_TYPES = port_types();

  logic [N_PORTS-1:0]             buf_wr, run_req, run_ack, kill, nca_done;
  access_t                        cb_acc;
  logic [LINE_BYTES*8-1:0]        cb_data;
  consts_t [N_PORTS-1:0]          run_c;
  logic [N_PORTS-1:0][VREG_W-1:0] nca_out;

  ute #(.N_NCA(N_NCA), .N_SU(N_SU), .LDQ_N(LDQ_N), .LINE_BYTES(LINE_BYTES),
        .PDQ_BYTES(PDQ_BYTES), .PORT_TYPES(PORT_TYPES)) u_ute (
    .clk, .rst_n, .task_valid, .task_ready, .task_in, .squash_valid, .squash_tag,
    .out_valid, .out_ready, .out_tag, .out_data, .exc_valid, .exc_tag,
    .cfg_valid, .cfg, .cfg_rdata, .cfg_err, .pf_enable,
    .mem_req_valid, .mem_req_addr, .mem_req_tag, .mem_req_pf, .mem_req_ready,
    .mem_rsp_valid, .mem_rsp_tag, .mem_rsp_data,
    .buf_wr, .cb_acc, .cb_data, .run_req, .run_c, .run_ack, .kill, .nca_done, .nca_out,
    .dispatch_real, .dispatch_pf);

  for (genvar n = 0; n < N_NCA; n++) begin : g_nca
    logic                         rd_sel;
    logic [$clog2(BUF_BYTES)-1:0] rd_addr;
    logic [1:0][63:0]             rd_data;
    logic [VREG_W-1:0]            result;

    for (genvar b = 0; b < 2; b++) begin : g_buf
      input_buffer #(.BYTES(BUF_BYTES), .LINE_BYTES(LINE_BYTES)) u_buf (
        .clk, .wr_valid(buf_wr[2*n+b]), .wr_acc(cb_acc), .wr_data(cb_data),
        .rd_addr, .rd_data(rd_data[b]));
    end

    rowsum_nca #(.BUF_BYTES(BUF_BYTES), .VAL_BASE(VAL_BASE)) u_nca (
      .clk, .rst_n, .run_req(run_req[2*n +: 2]), .run_c(run_c[2*n +: 2]),
      .run_ack(run_ack[2*n +: 2]), .kill(kill[2*n +: 2]), .done(nca_done[2*n +: 2]),
      .out_data(result), .rd_sel, .rd_addr, .rd_data);

    assign nca_out[2*n]   = result;
    assign nca_out[2*n+1] = result;
  end

endmodule
