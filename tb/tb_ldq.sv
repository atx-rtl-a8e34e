// tb_ldq: test of the Load Queue.
//
// Random accesses from random Stream Units go in; an L2 model here answers
// them in random order after random delays, with random back-pressure. Every
// Common Bus beat must carry the access and Stream Unit recorded for its tag and
// the L2 data; the number of outstanding reads must never exceed the entries;
// prefetch accesses must take no entry and produce no beat; and answers for
// Stream Units flushed by a squash must be dropped.
module tb_ldq;
  import atx_pkg::*;
  localparam int NE = 8, NS = 4, LB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, mem_req_valid, mem_req_pf, mem_req_ready = 1, mem_rsp_valid = 0, cb_valid;
  access_t in_acc, cb_acc;
  logic [$clog2(NS)-1:0] in_su = '0, cb_su;
  logic [NS-1:0] flush_su = '0;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [$clog2(NE)-1:0] mem_req_tag, mem_rsp_tag = '0;
  logic [LB*8-1:0] mem_rsp_data = '0, cb_data;
  logic [$clog2(NE):0] n_busy;
  int checks = 0, failures = 0, n_full = 0, n_beats = 0, n_dropped = 0, n_pf = 0;

  ldq #(.N_ENTRIES(NE), .N_SU(NS), .LINE_BYTES(LB)) dut (.*);

  // what the testbench expects per tag
  access_t exp_acc [NE];
  int      exp_su  [NE];
  logic [NE-1:0] pend = '0, dead = '0;
  int      due [NE];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [LB*8-1:0] line_data(logic [ADDR_W-1:0] a);
    return {LB/8{a[31:0] ^ 32'hdead_beef, a[31:0]}};
  endfunction

  // L2 model: answers at negedge, one per cycle, in random order
  int cyc = 0;
  initial begin
    forever begin
      @(negedge clk);
      cyc++;
      mem_rsp_valid = 0;
      flush_su = '0;
      mem_req_ready = ($urandom % 4) != 0;
      for (int k = 0; k < NE; k++) begin
        int t;
        t = (k + cyc) % NE;
        if (!mem_rsp_valid && pend[t] && due[t] <= cyc && $urandom % 2) begin
          mem_rsp_valid = 1; mem_rsp_tag = t[$clog2(NE)-1:0];
          mem_rsp_data = line_data(exp_acc[t].line);
        end
      end
      if (rst_n && $urandom % 50 == 0) begin
        flush_su = NS'(1) << ($urandom % NS);
        for (int t = 0; t < NE; t++) if (pend[t] && flush_su[exp_su[t]]) dead[t] = 1'b1;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (32'(n_busy) > NE || 32'(n_busy) != $countones(pend)) begin
      failures++; $display("busy %0d pending %0d", n_busy, $countones(pend));
    end
    if (32'(n_busy) == NE) n_full++;
    if (mem_rsp_valid) begin
      checks++;
      if (cb_valid === dead[mem_rsp_tag]) begin
        failures++; $display("tag %0d: beat %b but dropped %b", mem_rsp_tag, cb_valid, dead[mem_rsp_tag]);
      end
      if (cb_valid) begin
        n_beats++;
        checks++;
        if (cb_acc !== exp_acc[mem_rsp_tag] || 32'(cb_su) != exp_su[mem_rsp_tag] ||
            cb_data !== line_data(exp_acc[mem_rsp_tag].line)) begin
          failures++; $display("tag %0d: wrong beat", mem_rsp_tag);
        end
      end else n_dropped++;
      pend[mem_rsp_tag] = 1'b0;
      dead[mem_rsp_tag] = 1'b0;
    end
    if (mem_req_valid && mem_req_ready) begin
      checks++;
      if (mem_req_addr !== in_acc.line || mem_req_pf !== in_acc.pf) begin failures++; $display("request mismatch"); end
      if (in_acc.pf) n_pf++;
      else begin
        if (pend[mem_req_tag]) begin failures++; $display("tag %0d reused", mem_req_tag); end
        pend[mem_req_tag]    = 1'b1;
        exp_acc[mem_req_tag] = in_acc;
        exp_su[mem_req_tag]  = in_su;
        due[mem_req_tag]     = cyc + $urandom % 40;
      end
    end
  end

  initial begin
    in_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      #1;
      if (!(in_valid && !in_ready) || $urandom % 8 == 0) begin
        in_valid = ($urandom % 3) != 0;
        in_acc = '0;
        in_acc.line = {$urandom, $urandom} & ~ADDR_W'(LB - 1);
        in_acc.cnt = 8'(1 + $urandom % 4); in_acc.esize = 4'd4; in_acc.off = 8'($urandom % LB);
        in_acc.pf = ($urandom % 8) == 0;
        in_su = $clog2(NS)'($urandom);
      end
    end
    in_valid = 0;
    repeat (200) @(negedge clk);
    checks++; if (n_full == 0 || n_beats == 0 || n_dropped == 0 || n_pf == 0) begin
      failures++; $display("not exercised: full %0d beats %0d dropped %0d prefetches %0d", n_full, n_beats, n_dropped, n_pf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
