// tb_stream_unit: test of two Stream Units running the example row-sum
// streams: a root stream over a block of row pointers (8-byte elements, bounds
// c0 .. c1+8) and its child over the rows' values (4-byte elements, bounds
// c2 + parent[i]*4 .. c2 + parent[i+1]*4).
//
// The testbench plays scheduler and memory: it grants requests at random,
// answers them out of order after random delays, and forwards the parent's
// answers into the child's Parent Data Queue. Every element of both streams
// must be requested exactly once, at the right memory address and scratchpad
// address, empty rows must produce nothing, prefetch mode must mark the child's
// accesses, and both units must signal done once all data has returned.
module tb_stream_unit;
  import atx_pkg::*;
  localparam int LB = 128, PB = 1024;
  localparam longint ROWP = 64'h1000, VALS = 64'h10_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] start = '0, req_valid, req_grant = '0, ret_valid = '0, busy, done, pin_valid;
  stream_cfg_t [1:0] cfg;
  consts_t c;
  logic pf = 0, flush = 0, release_su = 0;
  logic [1:0] leaf = 2'b10;
  access_t [1:0] req;
  access_t pin_acc;
  logic [LB*8-1:0] pin_data;
  logic [1:0][AGE_W-1:0] age;
  logic [1:0][CNT_W-1:0] ret_cnt;
  logic [1:0][$clog2(PB/8):0] pdq_free;
  int checks = 0, failures = 0;
  longint ptr [17];

  for (genvar s = 0; s < 2; s++) begin : g_su
    stream_unit #(.LINE_BYTES(LB), .PDQ_BYTES(PB)) u (
      .clk, .rst_n, .start(start[s]), .start_cfg(cfg[s]), .start_c(c), .start_pf(pf),
      .start_leaf(leaf[s]), .start_age(8'd3), .flush, .release_su,
      .pin_valid(pin_valid[s]), .pin_acc, .pin_data, .parent_done(s == 1 ? done[0] : 1'b0),
      .child_free(s == 0 ? pdq_free[1] : ($clog2(PB/8)+1)'(0)),
      .req_valid(req_valid[s]), .req(req[s]), .age(age[s]), .req_grant(req_grant[s]),
      .ret_valid(ret_valid[s]), .ret_cnt(ret_cnt[s]), .pdq_free(pdq_free[s]), .busy(busy[s]),
      .done(done[s]));
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mem8(longint a);
    if (a >= ROWP && a < ROWP + 17 * 8) return 8'(ptr[(a - ROWP) / 8] >> (8 * ((a - ROWP) % 8)));
    return 8'(a);
  endfunction

  // outstanding accesses
  access_t q_acc [$];
  int      q_su [$], q_due [$];
  int      cyc = 0;
  int      seen [2][int];    // element byte address -> scratchpad address
  logic    any_pf;

  always @(posedge clk) cyc++;

  task automatic run(int first_row, logic prefetch);
    int n_exp, waited;
    ptr[0] = 1000 * first_row;
    for (int r = 0; r < 16; r++) ptr[r+1] = ptr[r] + (($urandom % 3 == 0) ? 0 : $urandom % 40);
    c = '0;
    c[0] = ROWP; c[1] = ROWP + 16 * 8; c[2] = VALS; c[3] = 4;
    pf = prefetch;
    seen[0].delete(); seen[1].delete();
    any_pf = 0;
    start = 2'b11; @(negedge clk); start = 2'b00;
    waited = 0;
    while (!(done == 2'b11 && q_acc.size() == 0) && waited < 20000) begin
      // grant at random, one per cycle
      req_grant = '0;
      for (int s = 0; s < 2; s++)
        if (req_grant == '0 && req_valid[s] && $urandom % 2) req_grant[s] = 1'b1;
      // answer one outstanding access whose time has come, in random order
      ret_valid = '0; pin_valid = '0;
      if (q_acc.size() > 0) begin
        int k;
        k = $urandom % q_acc.size();
        if (q_due[k] <= cyc) begin
          ret_valid[q_su[k]] = 1'b1;
          ret_cnt[q_su[k]]   = q_acc[k].cnt;
          pin_acc            = q_acc[k];
          for (int b = 0; b < LB; b++) pin_data[8*b +: 8] = mem8(q_acc[k].line + b);
          pin_valid[1]       = (q_su[k] == 0);
          q_acc.delete(k); q_su.delete(k); q_due.delete(k);
        end
      end
      @(posedge clk);
      for (int s = 0; s < 2; s++) if (req_grant[s] && req_valid[s]) begin
        for (int e = 0; e < req[s].cnt; e++) begin
          int a;
          a = int'(req[s].line) + req[s].off + e * req[s].mstep;
          checks++;
          if (seen[s].exists(a)) begin failures++; $display("stream %0d: element %h twice", s, a); end
          seen[s][a] = req[s].nca + e * req[s].nstep;
        end
        if (req[s].pf) any_pf = 1;
        if (!req[s].pf) begin
          q_acc.push_back(req[s]); q_su.push_back(s); q_due.push_back(cyc + $urandom % 30);
        end
      end
      @(negedge clk);
      waited++;
    end
    req_grant = '0; ret_valid = '0; pin_valid = '0;
    checks++; if (done != 2'b11) begin failures++; $display("not done"); end
    // parent: 17 row pointers at scratchpad 0, 8, ...
    checks++; if (seen[0].num() != 17) begin failures++; $display("parent elements %0d", seen[0].num()); end
    for (int r = 0; r <= 16; r++) begin
      checks++;
      if (!seen[0].exists(int'(ROWP) + r * 8) || seen[0][int'(ROWP) + r * 8] != r * 8) begin
        failures++; $display("row pointer %0d missing or misplaced", r);
      end
    end
    // child: values ptr[0] .. ptr[16]-1 at scratchpad 1024 + 4*k
    n_exp = int'(ptr[16] - ptr[0]);
    checks++; if (seen[1].num() != n_exp) begin failures++; $display("child elements %0d expected %0d", seen[1].num(), n_exp); end
    for (int k = 0; k < n_exp; k++) begin
      int a;
      a = int'(VALS) + int'(ptr[0] + k) * 4;
      checks++;
      if (!seen[1].exists(a) || seen[1][a] != 1024 + 4 * k) begin
        failures++; if (failures < 10) $display("value %0d missing or misplaced", k);
      end
    end
    checks++; if (any_pf !== prefetch) begin failures++; $display("prefetch marking %b", any_pf); end
    release_su = 1; @(negedge clk); release_su = 0;
  endtask

  initial begin
    cfg = '0;
    cfg[0].esize = 4'd8; cfg[0].stride = 16'd1; cfg[0].nca_stride = 8'd1;
    cfg[0].beg = '{op1: OP_ADD, op2: OP_ADD, i1: 4'd0, i2: SPEC_ZERO, i3: SPEC_ZERO};
    cfg[0].fin = '{op1: OP_ADD, op2: OP_ADD, i1: 4'd1, i2: SPEC_ESIZE, i3: SPEC_ZERO};
    cfg[1].esize = 4'd4; cfg[1].stride = 16'd1; cfg[1].nca_stride = 8'd1; cfg[1].nca_base = 16'd1024;
    cfg[1].has_parent = 1'b1; cfg[1].parent = '0;
    cfg[1].beg = '{op1: OP_ADD, op2: OP_MUL, i1: 4'd2, i2: SPEC_P0, i3: 4'd3};
    cfg[1].fin = '{op1: OP_ADD, op2: OP_MUL, i1: 4'd2, i2: SPEC_P1, i3: 4'd3};
    c = '0; pin_acc = '0; pin_data = '0; pin_valid = '0; ret_cnt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) run(n, n % 4 == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
