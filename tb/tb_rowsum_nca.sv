// tb_rowsum_nca: test of the example row-sum NCA.
//
// The two input buffers are modelled here as byte arrays holding a block of
// CSR rows each (row pointers at byte 0, values at VAL_BASE), with random row
// lengths including empty rows and blocks of fewer than 16 rows. Both ports
// request at once; the NCA must serve them alternately and return, for each,
// the 16 row sums in the 32-bit lanes of its 512-bit result. A kill during a
// run must drop that run without a done.
module tb_rowsum_nca;
  import atx_pkg::*;
  localparam int BB = 4096, VB = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] run_req = '0, run_ack, kill = '0, done;
  consts_t [1:0] run_c;
  logic [VREG_W-1:0] out_data;
  logic rd_sel;
  logic [$clog2(BB)-1:0] rd_addr;
  logic [1:0][63:0] rd_data;
  logic [7:0] mem [2][BB];
  logic [VREG_W-1:0] exp [2];
  int checks = 0, failures = 0;

  rowsum_nca #(.BUF_BYTES(BB), .VAL_BASE(VB)) dut (.*);

  always_comb
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 8; i++) rd_data[b][8*i +: 8] = mem[b][(32'(rd_addr) + i) % BB];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fill buffer b with nrows rows; row pointers start at base
  task automatic fill(int b, int nrows, longint base);
    longint p;
    p = base;
    exp[b] = '0;
    for (int i = 0; i < BB; i++) mem[b][i] = 8'($urandom);
    for (int r = 0; r <= nrows; r++) begin
      for (int i = 0; i < 8; i++) mem[b][r * 8 + i] = 8'(p >> (8 * i));
      if (r < nrows) begin
        int len;
        len = ($urandom % 4 == 0) ? 0 : $urandom % 30;
        for (int e = 0; e < len; e++) begin
          logic [31:0] v;
          v = $urandom;
          for (int i = 0; i < 4; i++) mem[b][VB + (p - base + e) * 4 + i] = v[8*i +: 8];
          exp[b][32*r +: 32] += v;
        end
        p += len;
      end
    end
    run_c[b] = '0;
    run_c[b][0] = 64'h1_0000 + base * 8;
    run_c[b][1] = 64'h1_0000 + base * 8 + 64'(nrows) * 8;
  endtask

  initial begin
    int got [2];
    run_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      fill(0, 16, $urandom % 1000);
      fill(1, (n % 4 == 3) ? 5 + n % 7 : 16, $urandom % 1000);
      @(negedge clk);
      run_req = 2'b11;
      got = '{0, 0};
      while (got[0] + got[1] < 2) begin
        @(posedge clk);
        #1;
        for (int b = 0; b < 2; b++) begin
          if (run_ack[b]) run_req[b] = 1'b0;
          if (done[b]) begin
            got[b]++;
            checks++;
            if (out_data !== exp[b]) begin
              failures++;
              for (int r = 0; r < 16; r++) if (out_data[32*r +: 32] !== exp[b][32*r +: 32])
                $display("run %0d port %0d row %0d: %h expected %h", n, b, r, out_data[32*r +: 32], exp[b][32*r +: 32]);
            end
          end
        end
      end
    end
    // kill port 0 while it runs: no done, then port 1 still completes
    fill(0, 16, 0); fill(1, 16, 100);
    @(negedge clk); run_req = 2'b01;
    @(negedge clk); run_req = 2'b10; repeat (5) @(negedge clk);
    kill = 2'b01; @(negedge clk); kill = 2'b00;
    got = '{0, 0};
    repeat (3000) begin
      @(posedge clk); #1;
      if (run_ack[1]) run_req[1] = 1'b0;
      for (int b = 0; b < 2; b++) if (done[b]) begin
        got[b]++;
        if (b == 1) begin checks++; if (out_data !== exp[1]) begin failures++; $display("after kill: wrong sum"); end end
      end
    end
    checks++; if (got[0] != 0 || got[1] != 1) begin failures++; $display("kill: done %0d %0d", got[0], got[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
