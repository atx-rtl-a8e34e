// tb_pacc_allocator: random test of the PAcc Allocator and PAcc Status.
//
// A model keeps its own busy bit per port. Each cycle a random capable-port
// mask is offered; the grant must be the lowest free port in the mask (or none),
// allocation must mark it busy and release must free ports.
module tb_pacc_allocator;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req_mask = '0, release_ports = '0, free_ports;
  logic gnt_valid, alloc = 0;
  logic [$clog2(N)-1:0] gnt_idx;
  logic [N-1:0] busy = '0;
  int checks = 0, failures = 0;

  pacc_allocator #(.N_PORTS(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req_mask      = N'($urandom);
      release_ports = ($urandom % 3 == 0) ? N'($urandom) & busy : '0;
      alloc         = $urandom % 2;
      #1;
      exp_idx = -1;
      for (int p = N - 1; p >= 0; p--) if (req_mask[p] && !busy[p]) exp_idx = p;
      checks++;
      if (free_ports !== ~busy || gnt_valid !== (exp_idx >= 0) ||
          (exp_idx >= 0 && 32'(gnt_idx) != exp_idx)) begin
        failures++;
        $display("mask %b busy %b: gnt %b %0d expected %0d free %b", req_mask, busy, gnt_valid,
                 gnt_idx, exp_idx, free_ports);
      end
      @(posedge clk);
      busy = busy & ~release_ports;
      if (alloc && exp_idx >= 0) busy[exp_idx] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
