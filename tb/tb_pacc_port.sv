// tb_pacc_port: test of a PAcc port with its Task Status.
//
// Walks a port through whole tasks: allocation with a set of Stream Units,
// Common Bus beats (only beats of its own Stream Units, and no prefetch beats,
// may be written to its input buffer), waiting until all its Stream Units are
// done, the NCA run handshake, the result going out with the task's tag, and
// the release of port and Stream Units with the number of input bytes. Then a
// squash by tag during the load and during the NCA run (which must kill the NCA
// and flush the Stream Units), and a squash for another tag that must be
// ignored.
module tb_pacc_port;
  import atx_pkg::*;
  localparam int NS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc = 0, squash_valid = 0, cb_valid = 0, buf_wr, run_req, run_ack = 0, kill, nca_done = 0;
  logic out_valid, out_ready = 0, release_port, sz_valid, busy;
  logic [TAG_W-1:0] alloc_tag = '0, squash_tag = '0, out_tag;
  consts_t alloc_c, run_c;
  logic [NS-1:0] alloc_sus = '0, su_done = '0, release_sus, flush_sus, task_status;
  logic [$clog2(NS)-1:0] cb_su = '0;
  access_t cb_acc;
  logic [VREG_W-1:0] nca_out = '0, out_data;
  logic [31:0] sz_bytes;
  int checks = 0, failures = 0;

  pacc_port #(.N_SU(NS)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("%0t failed: %s", $time, what); end
  endtask

  task automatic start(int tag, logic [NS-1:0] sus);
    alloc_tag = TAG_W'(tag); alloc_sus = sus; alloc_c = '0; alloc_c[0] = 64'(tag * 7);
    alloc = 1; @(negedge clk); alloc = 0;
  endtask

  // one beat: cnt elements of 4 bytes for SU su; returns whether it was written
  task automatic beat(int su, int cnt, logic pf, output logic wr);
    cb_valid = 1; cb_su = $clog2(NS)'(su); cb_acc = '0; cb_acc.cnt = 8'(cnt); cb_acc.esize = 4'd4;
    cb_acc.pf = pf;
    #1; wr = buf_wr;
    @(negedge clk); cb_valid = 0;
  endtask

  initial begin
    logic wr;
    cb_acc = '0; alloc_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a complete task on SUs 2 and 5
    start(3, 8'b0010_0100);
    chk("busy", busy && !run_req);
    beat(2, 4, 0, wr); chk("own beat written", wr);
    beat(5, 3, 0, wr); chk("own beat written", wr);
    beat(1, 5, 0, wr); chk("foreign beat ignored", !wr);
    beat(5, 2, 1, wr); chk("prefetch beat ignored", !wr);
    su_done = 8'b0000_0100; repeat (3) @(negedge clk);
    chk("waits for all streams", !run_req && task_status == 8'b0000_0100);
    su_done = 8'b0010_0110; @(negedge clk);
    chk("run request", run_req && run_c[0] == 64'd21);
    run_ack = 1; @(negedge clk); run_ack = 0;
    chk("running", !run_req && !out_valid);
    nca_out = {16{32'h1234_5678}}; nca_done = 1; @(negedge clk); nca_done = 0; nca_out = '0;
    chk("result", out_valid && out_tag == 3 && out_data == {16{32'h1234_5678}});
    repeat (2) @(negedge clk);
    chk("result held", out_valid);
    out_ready = 1; #1;
    @(posedge clk); #1;
    chk("released", release_port && release_sus == 8'b0010_0100 && sz_valid && sz_bytes == 28);
    @(negedge clk); out_ready = 0; su_done = '0;
    chk("free", !busy && !out_valid);
    // squash during the load
    start(4, 8'b0000_0011);
    squash_tag = 4'd9; squash_valid = 1; @(negedge clk); squash_valid = 0;
    chk("other tag ignored", busy);
    squash_tag = 4'd4; squash_valid = 1; @(posedge clk); #1; squash_valid = 0;
    chk("squash in load", flush_sus == 8'b0000_0011 && release_sus == 8'b0000_0011 && release_port && !kill);
    @(negedge clk);
    chk("free after squash", !busy);
    // squash during the run
    start(6, 8'b1000_0000);
    su_done = 8'b1000_0000; @(negedge clk);
    run_ack = 1; @(negedge clk); run_ack = 0;
    squash_tag = 4'd6; squash_valid = 1; @(posedge clk); #1; squash_valid = 0;
    chk("squash in run kills the NCA", kill && flush_sus == 8'b1000_0000 && release_port);
    @(negedge clk);
    chk("no result after squash", !busy && !out_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
