// tb_atx_top: end-to-end test of the ATX complex at its default sizes.
//
// A core model configures three task types (VAcc 1..3, one per NCA type) for
// the CSR row-sum task (two streams: S1 reads the row pointers of 16 rows plus
// one, S2 is S1's child and reads each row's values, with bounds
// vals + parent[i]*4 .. vals + parent[i+1]*4), then issues one task per block
// of 16 rows, most of them to NCA type 1, up to 15 in flight, and checks every
// 512-bit result against sums computed here. A behavioural L2 answers out of
// order with random latency and back-pressure. For a while the core stops
// taking results, so PAcc ports stay occupied and the InTaskQ fills. Along the
// way it exercises: the NCA type check, an unmapped task type (exception), a
// squash of a task in flight followed by its re-execution, and CAM overflow on
// configuration; and it counts out-of-order dispatch, access coalescing, double
// buffering, InTaskQ-full stalls, assisted and predicted task prefetches and L2
// back-pressure. Each of those must happen at least once.
module tb_atx_top;
  import atx_pkg::*;

  localparam int NT      = 40;                 // tasks (16 rows each)
  localparam int NROWS   = 16 * NT;
  localparam longint ROWP = 64'h1_0000;
  localparam longint VALS = 64'h20_0000;
  localparam int SQ_TASK = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic task_valid, task_ready, squash_valid, out_valid, out_ready, exc_valid;
  task_t task_in;
  logic [TAG_W-1:0] squash_tag, out_tag, exc_tag;
  logic [VREG_W-1:0] out_data;
  logic cfg_valid, cfg_err, pf_enable;
  cfg_req_t cfg;
  logic [WORD_W-1:0] cfg_rdata;
  logic mem_req_valid, mem_req_pf, mem_req_ready, mem_rsp_valid;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [6:0] mem_req_tag, mem_rsp_tag;
  logic [1023:0] mem_rsp_data;
  logic dispatch_real, dispatch_pf;

  atx_top dut (.*);

  l2_mem_model #(.LINE_BYTES(128), .TAG_BITS(7)) l2 (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_addr(mem_req_addr), .req_tag(mem_req_tag),
    .req_pf(mem_req_pf), .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid),
    .rsp_tag(mem_rsp_tag), .rsp_data(mem_rsp_data));

  int checks = 0, failures = 0;
  longint unsigned row_ptr [NROWS+1];
  logic [31:0] row_sum [NROWS];

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: busy_tags=%b inq=%0d ports_busy=%b su_busy=%h su_done=%h ldq=%0d",
             busy_tag, dut.u_ute.q_count, dut.u_ute.p_busy, dut.u_ute.su_busy, dut.u_ute.su_done,
             dut.u_ute.ldq_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_ooo = 0, n_coal = 0, n_dbuf = 0, n_qfull = 0, n_apf = 0, n_ppf = 0, n_l2_stall = 0;
  logic cfg_err_seen = 1'b0;
  always @(posedge clk) if (rst_n && cfg_err) cfg_err_seen <= 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ute.dispatch_real && dut.u_ute.u_inq.sel_idx != 0) n_ooo++;
    if (dut.u_ute.u_ldq.alloc && dut.u_ute.u_ldq.in_acc.cnt > 1) n_coal++;
    if ((dut.u_ute.buf_wr[1] && dut.g_nca[0].u_nca.st != 0 && !dut.g_nca[0].u_nca.cur) ||
        (dut.u_ute.buf_wr[0] && dut.g_nca[0].u_nca.st != 0 &&  dut.g_nca[0].u_nca.cur)) n_dbuf++;
    if (task_valid && !task_ready) n_qfull++;
    if (dut.u_ute.dispatch_apf) n_apf++;
    if (dut.u_ute.dispatch_ppf) n_ppf++;
    if ($test$plusargs("trace")) begin
      if (dut.u_ute.dispatch_real) $display("%0t dispatch tag %0d port %0d sus %h", $time, dut.u_ute.sel_task.tag, dut.u_ute.pa_idx, dut.u_ute.task_sus);
      if (dispatch_pf) $display("%0t pf dispatch sus %h c0=%h", $time, dut.u_ute.task_sus, dut.u_ute.pf_task.c[0]);
      if (task_valid && task_ready) $display("%0t accept tag %0d", $time, task_in.tag);
      if (dut.u_ute.run_ack != 0) $display("%0t run_ack %b", $time, dut.u_ute.run_ack);
      if (dut.u_ute.nca_done != 0) $display("%0t nca_done %b", $time, dut.u_ute.nca_done);
      for (int p = 0; p < 6; p++) if (dut.u_ute.buf_wr[p])
        $display("%0t wr port %0d su %0d line %h off %0d cnt %0d nca %0d es %0d", $time, p, dut.u_ute.cb_su,
                 dut.u_ute.cb_acc.line, dut.u_ute.cb_acc.off, dut.u_ute.cb_acc.cnt, dut.u_ute.cb_acc.nca, dut.u_ute.cb_acc.esize);
    end
    if (mem_req_valid && !mem_req_ready) n_l2_stall++;
  end

  function automatic bexp_t be(bop_e o1, bop_e o2, logic [3:0] a, logic [3:0] b, logic [3:0] c);
    return '{op1: o1, op2: o2, i1: a, i2: b, i3: c};
  endfunction

  task automatic cfg_write(cfg_op_e op, int vacc, int stream, logic [63:0] data);
    cfg_valid   = 1'b1;
    cfg.op      = op;
    cfg.vacc    = VACC_W'(vacc);
    cfg.stream  = SID_W'(stream);
    cfg.data    = data;
    @(negedge clk);
    cfg_valid   = 1'b0;
    @(negedge clk);
  endtask

  // ---------------- core model ----------------
  logic [15:0] busy_tag;
  int          tag_task [16];
  int          n_done = 0, n_exc = 0, n_squash = 0;
  logic        squashed_seen;

  function automatic logic [VREG_W-1:0] expect_out(int t);
    logic [VREG_W-1:0] e;
    for (int r = 0; r < 16; r++) e[32*r +: 32] = row_sum[16*t + r];
    return e;
  endfunction

  int n_accepted = 0;
  always @(posedge clk) if (task_valid && task_ready) n_accepted++;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (!busy_tag[out_tag]) begin
        failures++;
        $display("result for tag %0d that is not in flight", out_tag);
      end else begin
        if (out_data !== expect_out(tag_task[out_tag])) begin
          failures++;
          for (int r = 0; r < 16; r++)
            if (out_data[32*r +: 32] !== expect_out(tag_task[out_tag])[32*r +: 32])
              $display("task %0d lane %0d: %h expected %h", tag_task[out_tag], r,
                       out_data[32*r +: 32], expect_out(tag_task[out_tag])[32*r +: 32]);
        end
        if ($test$plusargs("trace")) $display("%0t result tag %0d task %0d", $time, out_tag, tag_task[out_tag]);
        busy_tag[out_tag] <= 1'b0;
        n_done++;
      end
    end
    if (exc_valid) begin
      n_exc++;
      checks++;
      if (exc_tag != 4'd15) begin
        failures++;
        $display("exception for wrong tag %0d", exc_tag);
      end
    end
  end

  task automatic issue(int t, int vacc, int tag);
    int target;
    task_in.tag  = TAG_W'(tag);
    task_in.vacc = VACC_W'(vacc);
    task_in.c    = '0;
    task_in.c[0] = ROWP + 64'(16 * t) * 8;
    task_in.c[1] = ROWP + 64'(16 * t + 16) * 8;
    task_in.c[2] = VALS;
    task_in.c[3] = 64'd4;
    task_valid   = 1'b1;
    target       = n_accepted + 1;
    while (n_accepted < target) @(negedge clk);
    task_valid   = 1'b0;
  endtask

  initial begin
    task_valid = 0; squash_valid = 0; cfg_valid = 0; cfg = '0; task_in = '0;
    pf_enable = 1; out_ready = 1; busy_tag = '0; squash_tag = '0;
    // memory image: CSR matrix with random row lengths and values
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

    // NCA type check
    cfg_write(CFG_CHECK_TYPE, 0, 0, 64'd3);
    checks++; if (cfg_rdata != 1) begin failures++; $display("type 3 not found"); end
    cfg_write(CFG_CHECK_TYPE, 0, 0, 64'd5);
    checks++; if (cfg_rdata != 0) begin failures++; $display("type 5 found"); end

    // task types 1..3: CSR row sums on NCA types 1..3
    for (int v = 1; v <= 3; v++) begin
      cfg_write(CFG_MAP_TYPE, v, 0, 64'(v));
      cfg_write(CFG_NUM_STREAMS, v, 0, 64'd2);
      cfg_write(CFG_SIZE, v, 0, 64'd8);
      cfg_write(CFG_PARENT, v, 0, '1);
      cfg_write(CFG_BEXP_BEG, v, 0, 64'(be(OP_ADD, OP_ADD, 4'd0, SPEC_ZERO, SPEC_ZERO)));
      cfg_write(CFG_BEXP_END, v, 0, 64'(be(OP_ADD, OP_ADD, 4'd1, SPEC_ESIZE, SPEC_ZERO)));
      cfg_write(CFG_NCA_BASE, v, 0, 64'd0);
      cfg_write(CFG_SIZE, v, 1, 64'd4);
      cfg_write(CFG_PARENT, v, 1, 64'd0);
      cfg_write(CFG_BEXP_BEG, v, 1, 64'(be(OP_ADD, OP_MUL, 4'd2, SPEC_P0, 4'd3)));
      cfg_write(CFG_BEXP_END, v, 1, 64'(be(OP_ADD, OP_MUL, 4'd2, SPEC_P1, 4'd3)));
      cfg_write(CFG_NCA_BASE, v, 1, 64'd1024);
    end

    // an unmapped task type raises an exception
    issue(0, 9, 15);
    repeat (3) @(negedge clk);

    // the core stops taking results for a while during the second half
    fork
      begin
        while (n_done < NT / 2) @(negedge clk);
        out_ready = 1'b0;
        repeat (3000) @(negedge clk);
        out_ready = 1'b1;
      end
    join_none

    for (int t = 0; t < NT; t++) begin
      int tag, vacc;
      tag  = t % 15;
      vacc = (t % 5 < 3) ? 1 : t % 5 - 1;
      while (busy_tag[tag]) @(negedge clk);
      tag_task[tag] = t;
      busy_tag[tag] = 1'b1;
      issue(t, vacc, tag);
      if (t == SQ_TASK) begin
        // squash it while it loads, then execute it again
        repeat (2) @(negedge clk);
        squash_valid = 1'b1;
        squash_tag   = TAG_W'(tag);
        @(negedge clk);
        squash_valid = 1'b0;
        n_squash++;
        repeat (2) @(negedge clk);
        issue(t, vacc, tag);
      end
    end
    while (busy_tag != '0) @(negedge clk);

    // configuration overflow: 16 entries, three in use
    for (int v = 4; v <= 16; v++) cfg_write(CFG_MAP_TYPE, v, 0, 64'd1);
    checks++; if (cfg_err_seen) begin failures++; $display("early CAM overflow"); end
    cfg_write(CFG_MAP_TYPE, 17, 0, 64'd1);
    checks++; if (!cfg_err_seen) begin failures++; $display("no CAM overflow"); end

    checks++; if (n_done != NT) begin failures++; $display("done %0d of %0d", n_done, NT); end
    checks++; if (n_exc != 1) begin failures++; $display("exceptions %0d", n_exc); end
    $display("mechanisms: ooo=%0d coalesced=%0d dbuf=%0d qfull=%0d assisted_pf=%0d predicted_pf=%0d pf_req=%0d l2_stall=%0d squash=%0d",
             n_ooo, n_coal, n_dbuf, n_qfull, n_apf, n_ppf, l2.n_prefetches, n_l2_stall, n_squash);
    checks++; if (n_ooo == 0)      begin failures++; $display("no out-of-order dispatch"); end
    checks++; if (n_coal == 0)     begin failures++; $display("no coalescing"); end
    checks++; if (n_dbuf == 0)     begin failures++; $display("no double buffering"); end
    checks++; if (n_qfull == 0)    begin failures++; $display("no InTaskQ stall"); end
    checks++; if (n_apf == 0) begin failures++; $display("no assisted task prefetch"); end
    checks++; if (n_ppf == 0) begin failures++; $display("no predicted task prefetch"); end
    checks++; if (l2.n_prefetches == 0) begin failures++; $display("no L2 prefetch requests"); end
    checks++; if (n_l2_stall == 0) begin failures++; $display("no L2 back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
