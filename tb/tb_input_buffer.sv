// tb_input_buffer: test of an NCA input buffer (scratchpad).
//
// Writes random Common Bus beats (random element size, count, source offset,
// source and scratchpad steps) into the buffer and into a byte model, then
// reads random 8-byte words and compares them with the model.
module tb_input_buffer;
  import atx_pkg::*;
  localparam int BYTES = 4096, LB = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_valid = 0;
  access_t wr_acc;
  logic [LB*8-1:0] wr_data;
  logic [$clog2(BYTES)-1:0] rd_addr = '0;
  logic [63:0] rd_data;
  logic [7:0] model [BYTES];
  int checks = 0, failures = 0;

  input_buffer #(.BYTES(BYTES), .LINE_BYTES(LB)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_acc = '0; wr_data = '0;
    // fill both with a known pattern
    for (int a = 0; a < BYTES; a += 128) begin
      @(negedge clk);
      wr_valid = 1; wr_acc = '0; wr_acc.esize = 4'd8; wr_acc.cnt = 8'd16; wr_acc.mstep = 8'd8;
      wr_acc.nca = 16'(a); wr_acc.nstep = 16'd8;
      for (int b = 0; b < LB; b++) begin wr_data[8*b +: 8] = 8'(a + b * 7); model[a + b] = 8'(a + b * 7); end
    end
    for (int n = 0; n < 500; n++) begin
      int es, cnt, mstep, off, nstep, nca;
      @(negedge clk);
      es    = 1 << ($urandom % 4);
      mstep = es * (1 + $urandom % 3);
      cnt   = 1 + $urandom % (LB / mstep);
      off   = es * ($urandom % ((LB - (cnt - 1) * mstep) / es));
      nstep = es * (1 + $urandom % 2);
      nca   = $urandom % (BYTES - cnt * nstep);
      for (int b = 0; b < LB; b++) wr_data[8*b +: 8] = 8'($urandom);
      wr_valid = 1;
      wr_acc = '0; wr_acc.esize = 4'(es); wr_acc.cnt = 8'(cnt); wr_acc.mstep = 8'(mstep);
      wr_acc.off = 8'(off); wr_acc.nca = 16'(nca); wr_acc.nstep = 16'(nstep);
      for (int e = 0; e < cnt; e++)
        for (int b = 0; b < es; b++) model[nca + e * nstep + b] = wr_data[8 * (off + e * mstep + b) +: 8];
    end
    @(negedge clk);
    wr_valid = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [63:0] exp;
      rd_addr = $urandom % (BYTES - 8);
      #1;
      for (int b = 0; b < 8; b++) exp[8*b +: 8] = model[rd_addr + b];
      checks++;
      if (rd_data !== exp) begin
        failures++;
        if (failures < 10) $display("addr %0d: %h expected %h", rd_addr, rd_data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
