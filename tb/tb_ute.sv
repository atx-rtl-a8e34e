// tb_ute: test of the Unified Transfer Engine at reduced sizes, with one
// row-sum NCA and its two input buffers attached, and a behavioural L2.
//
// Sizes: 8 Stream Units, 16 LDQ entries, 64-byte Common Bus, 256-byte PDQ,
// 4-entry InTaskQ, 4 KB input buffers. The core model configures the CSR
// row-sum task type, issues 14 tasks (16 rows each) with up to 7 in flight,
// squashes one while it loads and issues it again, and sends one task of an
// unmapped type. Every result must carry the right tag and the 16 row sums;
// the unmapped task must raise an exception; the InTaskQ must fill, and both
// assisted and predicted prefetches must be dispatched.
module tb_ute;
  import atx_pkg::*;
  localparam int NT = 14, NROWS = 16 * NT, LB = 64, LDQ = 16, BB = 4096, VB = 1024;
  localparam longint ROWP = 64'h1_0000, VALS = 64'h20_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic task_valid = 0, task_ready, squash_valid = 0, out_valid, out_ready = 1, exc_valid;
  task_t task_in;
  logic [TAG_W-1:0] squash_tag = '0, out_tag, exc_tag;
  logic [VREG_W-1:0] out_data;
  logic cfg_valid = 0, cfg_err, pf_enable = 1;
  cfg_req_t cfg;
  logic [WORD_W-1:0] cfg_rdata;
  logic mem_req_valid, mem_req_pf, mem_req_ready, mem_rsp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [$clog2(LDQ)-1:0] mem_req_tag, mem_rsp_tag;
  logic [LB*8-1:0] mem_rsp_data;
  logic [1:0] buf_wr, run_req, run_ack, kill, nca_done;
  access_t cb_acc;
  logic [LB*8-1:0] cb_data;
  consts_t [1:0] run_c;
  logic [1:0][VREG_W-1:0] nca_out;
  logic dispatch_real, dispatch_pf;
  logic rd_sel;
  logic [$clog2(BB)-1:0] rd_addr;
  logic [1:0][63:0] rd_data;

  ute #(.N_NCA(1), .N_SU(8), .LDQ_N(LDQ), .LINE_BYTES(LB), .PDQ_BYTES(256), .INTQ_DEPTH(4)) dut (.*);

  for (genvar b = 0; b < 2; b++) begin : g_buf
    input_buffer #(.BYTES(BB), .LINE_BYTES(LB)) u_buf (
      .clk, .wr_valid(buf_wr[b]), .wr_acc(cb_acc), .wr_data(cb_data), .rd_addr, .rd_data(rd_data[b]));
  end
  rowsum_nca #(.BUF_BYTES(BB), .VAL_BASE(VB)) u_nca (
    .clk, .rst_n, .run_req, .run_c, .run_ack, .kill, .done(nca_done), .out_data(nca_out[0]),
    .rd_sel, .rd_addr, .rd_data);
  assign nca_out[1] = nca_out[0];

  l2_mem_model #(.LINE_BYTES(LB), .TAG_BITS($clog2(LDQ))) l2 (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_addr(mem_req_addr), .req_tag(mem_req_tag),
    .req_pf(mem_req_pf), .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid),
    .rsp_tag(mem_rsp_tag), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0, n_done = 0, n_exc = 0, n_qfull = 0, n_apf = 0, n_ppf = 0;
  longint unsigned row_ptr [NROWS+1];
  logic [31:0] row_sum [NROWS];
  logic [15:0] busy_tag = '0;
  int tag_task [16];
  int n_accepted = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (task_valid && task_ready) n_accepted++;
    if (task_valid && !task_ready) n_qfull++;
    if (dut.dispatch_apf) n_apf++;
    if (dut.dispatch_ppf) n_ppf++;
    if (exc_valid) begin
      n_exc++; checks++;
      if (exc_tag != 4'd14) begin failures++; $display("exception for tag %0d", exc_tag); end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (!busy_tag[out_tag]) begin failures++; $display("result for idle tag %0d", out_tag); end
      else begin
        for (int r = 0; r < 16; r++)
          if (out_data[32*r +: 32] !== row_sum[16 * tag_task[out_tag] + r]) begin
            failures++;
            $display("task %0d row %0d: %h expected %h", tag_task[out_tag], r, out_data[32*r +: 32],
                     row_sum[16 * tag_task[out_tag] + r]);
            break;
          end
        busy_tag[out_tag] <= 1'b0;
        n_done++;
      end
    end
  end

  function automatic bexp_t be(bop_e o1, bop_e o2, logic [3:0] a, logic [3:0] b, logic [3:0] c);
    return '{op1: o1, op2: o2, i1: a, i2: b, i3: c};
  endfunction

  task automatic cfg_write(cfg_op_e op, int s, logic [63:0] data);
    cfg = '0; cfg.op = op; cfg.vacc = 8'd1; cfg.stream = SID_W'(s); cfg.data = data;
    cfg_valid = 1; @(negedge clk); cfg_valid = 0; @(negedge clk);
  endtask

  task automatic issue(int t, int vacc, int tag);
    int target;
    task_in = '0; task_in.tag = TAG_W'(tag); task_in.vacc = VACC_W'(vacc);
    task_in.c[0] = ROWP + 64'(16 * t) * 8; task_in.c[1] = ROWP + 64'(16 * t + 16) * 8;
    task_in.c[2] = VALS; task_in.c[3] = 64'd4;
    task_valid = 1; target = n_accepted + 1;
    while (n_accepted < target) @(negedge clk);
    task_valid = 0;
  endtask

  initial begin
    cfg = '0; task_in = '0;
    row_ptr[0] = 0;
    for (int r = 0; r < NROWS; r++) begin
      int len;
      len = $urandom % 25;
      row_sum[r] = 0;
      for (int e = 0; e < len; e++) begin
        logic [31:0] v;
        v = $urandom;
        l2.poke32(VALS + (row_ptr[r] + e) * 4, v);
        row_sum[r] += v;
      end
      row_ptr[r+1] = row_ptr[r] + len;
    end
    for (int r = 0; r <= NROWS; r++) l2.poke64(ROWP + r * 8, row_ptr[r]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    cfg_write(CFG_MAP_TYPE, 0, 64'd1);
    cfg_write(CFG_NUM_STREAMS, 0, 64'd2);
    cfg_write(CFG_SIZE, 0, 64'd8);
    cfg_write(CFG_PARENT, 0, '1);
    cfg_write(CFG_BEXP_BEG, 0, 64'(be(OP_ADD, OP_ADD, 4'd0, SPEC_ZERO, SPEC_ZERO)));
    cfg_write(CFG_BEXP_END, 0, 64'(be(OP_ADD, OP_ADD, 4'd1, SPEC_ESIZE, SPEC_ZERO)));
    cfg_write(CFG_SIZE, 1, 64'd4);
    cfg_write(CFG_PARENT, 1, 64'd0);
    cfg_write(CFG_BEXP_BEG, 1, 64'(be(OP_ADD, OP_MUL, 4'd2, SPEC_P0, 4'd3)));
    cfg_write(CFG_BEXP_END, 1, 64'(be(OP_ADD, OP_MUL, 4'd2, SPEC_P1, 4'd3)));
    cfg_write(CFG_NCA_BASE, 1, 64'(VB));
    issue(0, 5, 14);
    for (int t = 0; t < NT; t++) begin
      int tag;
      tag = t % 7;
      while (busy_tag[tag]) @(negedge clk);
      tag_task[tag] = t; busy_tag[tag] = 1'b1;
      issue(t, 1, tag);
      if (t == 3) begin
        repeat (2) @(negedge clk);
        squash_valid = 1; squash_tag = TAG_W'(tag); @(negedge clk); squash_valid = 0;
        repeat (2) @(negedge clk);
        issue(t, 1, tag);
      end
    end
    while (busy_tag != '0) @(negedge clk);
    $display("exceptions=%0d qfull=%0d assisted_pf=%0d predicted_pf=%0d", n_exc, n_qfull, n_apf, n_ppf);
    checks++; if (n_done != NT) begin failures++; $display("done %0d of %0d", n_done, NT); end
    checks++; if (n_exc != 1) begin failures++; $display("exceptions %0d", n_exc); end
    checks++; if (n_qfull == 0) begin failures++; $display("InTaskQ never full"); end
    checks++; if (n_apf == 0) begin failures++; $display("no assisted prefetch"); end
    checks++; if (n_ppf == 0) begin failures++; $display("no predicted prefetch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
