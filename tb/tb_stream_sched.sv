// tb_stream_sched: random test of the Stream Scheduler.
//
// Random request sets with random task ages (kept inside a window so the
// wrap-around comparison is ordinary). The grant must go to a requester with the
// oldest age; among several of that age, to the first one at or after the unit
// after the previous grant (round robin). out_ready low must hold the pointer
// and drive no grant bit. Also checks that a lone old requester always wins.
module tb_stream_sched;
  import atx_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, grant;
  logic [N-1:0][AGE_W-1:0] age;
  logic out_ready = 1, grant_valid;
  logic [$clog2(N)-1:0] grant_idx;
  int checks = 0, failures = 0, rr = 0, n_ties = 0;

  stream_sched #(.N_SU(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, oldest, exp, nold;
    age = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      base = $urandom % 256;
      req  = N'($urandom);
      for (int i = 0; i < N; i++) age[i] = AGE_W'(base + $urandom % 3);
      out_ready = ($urandom % 5) != 0;
      #1;
      oldest = 1000; exp = -1; nold = 0;
      for (int i = 0; i < N; i++) if (req[i] && int'(AGE_W'(age[i] - AGE_W'(base))) < oldest)
        oldest = int'(AGE_W'(age[i] - AGE_W'(base)));
      for (int k = 0; k < N; k++) begin
        int j;
        j = (rr + k) % N;
        if (req[j] && int'(AGE_W'(age[j] - AGE_W'(base))) == oldest) begin
          nold++;
          if (exp < 0) exp = j;
        end
      end
      if (nold > 1) n_ties++;
      checks++;
      if (grant_valid !== (exp >= 0) || (exp >= 0 && 32'(grant_idx) != exp) ||
          grant !== ((exp >= 0 && out_ready) ? N'(1) << exp : '0)) begin
        failures++;
        $display("req %b ages %h rr %0d: grant %b idx %0d expected %0d", req, age, rr, grant_valid,
                 grant_idx, exp);
      end
      @(posedge clk);
      if (exp >= 0 && out_ready) rr = (exp + 1) % N;
    end
    checks++; if (n_ties == 0) begin failures++; $display("no age ties"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
