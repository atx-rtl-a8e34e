// tb_task_predictor: test of the Task Predictor/Prefetcher.
//
// Feeds tasks of two types with constant strides and checks the predicted
// constants: last + stride * distance, where the distance follows the average
// completed-task input size (starting above 32 KB: distance 1; after many
// small tasks: the maximum). Also checks that a first task of a type, or a
// repeat with unchanged constants, predicts nothing, and that disable stops it.
module tb_task_predictor;
  import atx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic enable = 1, obs_valid = 0, sz_valid = 0, pf_valid, pf_ready = 0;
  task_t obs_task, pf_task;
  logic [31:0] sz_bytes = '0;
  logic [5:0] distance;
  int checks = 0, failures = 0;

  task_predictor #(.N_ENTRIES(4), .MAX_DIST(16)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic observe(int vacc, longint c0, longint c1);
    obs_task = '0; obs_task.vacc = VACC_W'(vacc); obs_task.c[0] = c0; obs_task.c[1] = c1;
    obs_task.c[2] = 64'h20_0000;
    obs_valid = 1; @(negedge clk); obs_valid = 0;
  endtask

  task automatic expect_pf(logic v, int vacc, longint c0, longint c1);
    checks++;
    if (pf_valid !== v || (v && (pf_task.vacc != VACC_W'(vacc) || pf_task.c[0] != c0 ||
                                 pf_task.c[1] != c1 || pf_task.c[2] != 64'h20_0000))) begin
      failures++;
      $display("prediction %b vacc %0d c0 %0d c1 %0d, expected %b %0d %0d %0d", pf_valid, pf_task.vacc,
               pf_task.c[0], pf_task.c[1], v, vacc, c0, c1);
    end
    pf_ready = 1; @(negedge clk); pf_ready = 0;
  endtask

  initial begin
    obs_task = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (distance != 1) begin failures++; $display("initial distance %0d", distance); end
    observe(1, 1000, 1128);               expect_pf(0, 0, 0, 0);
    observe(1, 1128, 1256);               expect_pf(1, 1, 1256, 1384);
    observe(2, 50, 60);                   expect_pf(0, 0, 0, 0);
    observe(2, 50, 60);                   expect_pf(0, 0, 0, 0);
    observe(2, 70, 90);                   expect_pf(1, 2, 90, 120);
    // small tasks: the distance grows
    for (int n = 0; n < 40; n++) begin
      sz_valid = 1; sz_bytes = 32'd1024; @(negedge clk);
    end
    sz_valid = 0;
    checks++; if (distance != 16) begin failures++; $display("small-task distance %0d", distance); end
    observe(1, 1256, 1384);               expect_pf(1, 1, 1256 + 16 * 128, 1384 + 16 * 128);
    enable = 0;
    observe(1, 1384, 1512);               expect_pf(0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
