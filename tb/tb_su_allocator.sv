// tb_su_allocator: random test of the Stream Unit Allocator and SU Status.
//
// A model keeps its own busy bit per Stream Unit. Each cycle a task needing
// 1..MAX_STREAMS Stream Units is offered: the grant must be given exactly when
// that many are free, the chosen units must be the lowest free ones in order,
// the free count must match, and allocation/release must update the status.
module tb_su_allocator;
  import atx_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [SID_W:0] need = '0;
  logic gnt_valid, alloc = 0;
  logic [MAX_STREAMS-1:0][$clog2(N)-1:0] su_idx;
  logic [N-1:0] release_sus = '0, free_mask, busy = '0;
  logic [$clog2(N):0] free_cnt;
  int checks = 0, failures = 0, n_refused = 0;

  su_allocator #(.N_SU(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nfree, k;
    int exp_idx [MAX_STREAMS];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      need        = (SID_W+1)'(1 + $urandom % MAX_STREAMS);
      release_sus = ($urandom % 4 == 0) ? N'($urandom) & busy : '0;
      alloc       = $urandom % 2;
      #1;
      nfree = 0; k = 0;
      for (int i = 0; i < N; i++) if (!busy[i]) begin
        nfree++;
        if (k < 32'(need)) begin exp_idx[k] = i; k++; end
      end
      checks++;
      if (free_mask !== ~busy || 32'(free_cnt) != nfree || gnt_valid !== (nfree >= 32'(need))) begin
        failures++;
        $display("busy %b need %0d: gnt %b free %0d", busy, need, gnt_valid, free_cnt);
      end
      if (nfree < 32'(need)) n_refused++;
      if (gnt_valid) for (int j = 0; j < 32'(need); j++) begin
        checks++;
        if (32'(su_idx[j]) != exp_idx[j]) begin
          failures++;
          $display("stream %0d got SU %0d expected %0d", j, su_idx[j], exp_idx[j]);
        end
      end
      @(posedge clk);
      busy = busy & ~release_sus;
      if (alloc && nfree >= 32'(need)) for (int j = 0; j < 32'(need); j++) busy[exp_idx[j]] = 1'b1;
    end
    checks++; if (n_refused == 0) begin failures++; $display("never ran out of Stream Units"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
