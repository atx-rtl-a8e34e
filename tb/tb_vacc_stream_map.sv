// tb_vacc_stream_map: test of the VAcc-to-Streams Mapping.
//
// Configures two task types field by field (stream count, element size,
// parent, both bound expressions, strides, scratchpad base) and checks both
// lookup ports and the read-by-entry port, including the defaults of fields
// never written, removal, and the error for a new VAcc when the table is full.
module tb_vacc_stream_map;
  import atx_pkg::*;
  localparam int NE = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_valid = 0, cfg_err, lk_hit, lk2_hit;
  cfg_req_t cfg;
  logic [VACC_W-1:0] lk_vacc = '0, lk2_vacc = '0;
  logic [$clog2(NE)-1:0] lk_idx, lk2_idx, rd_idx = '0;
  logic [SID_W:0] lk_nstreams, lk2_nstreams;
  stream_cfg_t [MAX_STREAMS-1:0] rd_cfg;
  int checks = 0, failures = 0, n_err = 0;

  vacc_stream_map #(.N_ENTRIES(NE)) dut (.*);

  always @(posedge clk) if (cfg_err) n_err++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(cfg_op_e op, int vacc, int s, logic [63:0] data);
    cfg = '0; cfg.op = op; cfg.vacc = VACC_W'(vacc); cfg.stream = SID_W'(s); cfg.data = data;
    cfg_valid = 1; @(negedge clk); cfg_valid = 0;
  endtask

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("failed: %s", what); end
  endtask

  initial begin
    bexp_t b1, b2;
    b1 = '{op1: OP_ADD, op2: OP_MUL, i1: 4'd2, i2: SPEC_P0, i3: 4'd3};
    b2 = '{op1: OP_SHL, op2: OP_CMP, i1: 4'd5, i2: SPEC_REP, i3: SPEC_ONE};
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(CFG_NUM_STREAMS, 4, 0, 2);
    wr(CFG_SIZE, 4, 1, 4);
    wr(CFG_PARENT, 4, 0, '1);
    wr(CFG_PARENT, 4, 1, 0);
    wr(CFG_BEXP_BEG, 4, 1, 64'(b1));
    wr(CFG_BEXP_END, 4, 1, 64'(b2));
    wr(CFG_STRIDE, 4, 1, 3);
    wr(CFG_NCA_BASE, 4, 1, 1024);
    wr(CFG_NCA_STRIDE, 4, 1, 2);
    wr(CFG_NUM_STREAMS, 8, 0, 1);
    lk_vacc = 8'd4; lk2_vacc = 8'd8; #1;
    chk("lookup 4", lk_hit && lk_nstreams == 2);
    chk("lookup 8", lk2_hit && lk2_nstreams == 1 && lk2_idx != lk_idx);
    rd_idx = lk_idx; #1;
    chk("root stream", !rd_cfg[0].has_parent && rd_cfg[0].esize == 8 && rd_cfg[0].stride == 1);
    chk("child parent", rd_cfg[1].has_parent && rd_cfg[1].parent == 0);
    chk("child size", rd_cfg[1].esize == 4);
    chk("child bexps", rd_cfg[1].beg == b1 && rd_cfg[1].fin == b2);
    chk("child strides", rd_cfg[1].stride == 3 && rd_cfg[1].nca_stride == 2);
    chk("child base", rd_cfg[1].nca_base == 1024 && rd_cfg[0].nca_base == 0);
    rd_idx = lk2_idx; #1;
    chk("other type untouched", rd_cfg[1].esize == 8 && !rd_cfg[1].has_parent);
    chk("no error yet", n_err == 0);
    wr(CFG_NUM_STREAMS, 9, 0, 1); @(negedge clk);
    chk("error on full table", n_err == 1);
    lk_vacc = 8'd9; #1; chk("overflowed type not present", !lk_hit);
    wr(CFG_REMOVE, 4, 0, 0);
    lk_vacc = 8'd4; #1; chk("removed", !lk_hit);
    wr(CFG_NUM_STREAMS, 9, 0, 3);
    lk_vacc = 8'd9; #1; chk("reused entry", lk_hit && lk_nstreams == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
