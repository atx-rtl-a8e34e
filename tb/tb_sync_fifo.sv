// tb_sync_fifo: random test of the FIFO used as the UTE's OutQ.
//
// Random pushes and pops against a queue model in the testbench: every popped
// word must be the oldest pushed one, in_ready must be low exactly when the
// FIFO holds DEPTH words, out_valid exactly when it holds any, and count must
// match the model.
module tb_sync_fifo;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] model [$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (count !== ($clog2(D)+1)'(model.size()) || in_ready !== (model.size() < D) ||
        out_valid !== (model.size() > 0)) begin
      failures++;
      $display("status: count %0d model %0d ready %b valid %b", count, model.size(), in_ready, out_valid);
    end
    if (!in_ready) n_full++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data !== model[0]) begin
        failures++;
        $display("popped %h expected %h", out_data, model[0]);
      end
      void'(model.pop_front());
    end
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom % 4) != 0;
      in_data   = W'($urandom);
      out_ready = (n < 1500) ? ($urandom % 3 == 0) : ($urandom % 3 != 0);
    end
    in_valid = 0;
    checks++; if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
