// tb_intaskq: test of the InTaskQ.
//
// Fills the queue with tasks needing different PAcc ports and Stream Unit
// counts, then checks that the oldest task whose resources are free is offered
// (so a blocked head does not block younger tasks), that dequeue keeps the
// order of the rest, that a squash removes a task by tag, that the queue reports
// full, and that the assisted-prefetch output offers each task only once.
module tb_intaskq;
  import atx_pkg::*;
  localparam int D = 4, NP = 4, NS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, squash_valid = 0, sel_valid, deq = 0, apf_valid, apf_mark = 0;
  task_t in_task, sel_task, apf_task;
  logic [NP-1:0] in_mask = '0, free_ports = '1, sel_mask;
  logic [3:0] in_sidx = '0, sel_sidx, apf_sidx;
  logic [SID_W:0] in_nstreams = '0, sel_nstreams, apf_nstreams;
  logic [TAG_W-1:0] squash_tag = '0;
  logic [$clog2(NS):0] free_sus = 8;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;

  intaskq #(.DEPTH(D), .N_PORTS(NP), .N_SU(NS), .MAP_W(4)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(int tag, logic [NP-1:0] m, int ns);
    in_task = '0; in_task.tag = TAG_W'(tag); in_task.c[0] = 64'(tag * 100);
    in_mask = m; in_nstreams = (SID_W+1)'(ns); in_sidx = 4'(tag);
    in_valid = 1; @(negedge clk); in_valid = 0;
  endtask

  task automatic expect_sel(logic v, int tag);
    @(negedge clk); #1;
    checks++;
    if (sel_valid !== v || (v && (sel_task.tag != TAG_W'(tag) || sel_task.c[0] != 64'(tag * 100) ||
                                   sel_sidx != 4'(tag)))) begin
      failures++;
      $display("offered %b tag %0d, expected %b %0d", sel_valid, sel_task.tag, v, tag);
    end
  endtask

  initial begin
    in_task = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    push(1, 4'b0001, 2);
    push(2, 4'b0010, 4);
    push(3, 4'b0001, 1);
    push(4, 4'b1100, 2);
    @(negedge clk); #1; checks++; if (in_ready || count != 4) begin failures++; $display("not full: %0d", count); end
    expect_sel(1, 1);
    free_ports = 4'b1110; expect_sel(1, 2);          // head's port busy: next one goes
    free_sus = 3;         expect_sel(1, 4);          // task 2 needs 4 SUs
    free_ports = 4'b0000; expect_sel(0, 0);
    free_ports = 4'b1111; free_sus = 8;
    @(negedge clk); #1; checks++; if (!apf_valid || apf_task.tag != 1) begin failures++; $display("apf head"); end
    apf_mark = 1; @(negedge clk); apf_mark = 0;
    @(negedge clk); #1; checks++; if (!apf_valid || apf_task.tag != 2) begin failures++; $display("apf second: %0d", apf_task.tag); end
    free_ports = 4'b1110; expect_sel(1, 2);
    deq = 1; @(negedge clk); deq = 0;
    free_ports = 4'b1111; expect_sel(1, 1);
    checks++; if (count != 3) begin failures++; $display("count %0d after deq", count); end
    squash_valid = 1; squash_tag = 4'd1; @(negedge clk); squash_valid = 0;
    expect_sel(1, 3);
    @(negedge clk); #1; checks++; if (!apf_valid || apf_task.tag != 3) begin failures++; $display("apf after squash %0d", apf_task.tag); end
    deq = 1; @(negedge clk); deq = 0;
    expect_sel(1, 4);
    deq = 1; @(negedge clk); deq = 0;
    expect_sel(0, 0);
    checks++; if (count != 0 || !in_ready) begin failures++; $display("not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
