// task_predictor: Task Predictor/Prefetcher of the UTE frontend (predicted task
// prefetching).
//
// Tasks of one type differ only in their runtime constants, so the predictor
// forecasts constants. For each task type (VAcc id) it remembers the constants
// of the last task and, when the next task of that type arrives, the
// per-constant difference (stride). Each real task then yields one predicted
// task whose constants are the real task's plus N times the strides, N being
// the prefetch distance. The distance follows the average input size of
// completed tasks: 1 above 32 KB, 2 above 16 KB, 4 above 8 KB, 8 above 4 KB and
// MAX_DIST below. The predicted task is offered to the frontend, which
// dispatches it to Stream Units in prefetch mode (no NCA): it warms the L2.
//
// Following the design: the stride algorithm, the distance N and its dependence
// on the average input size. This implementation's choices: a direct-mapped
// table indexed by the low VAcc bits, a running average avg += (bytes-avg)/4,
// no prediction when all strides are zero, and a one-entry output that a newer
// prediction replaces. Timing: one cycle from an observed task to pf_valid.
module task_predictor
  import atx_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 4,
  parameter int unsigned MAX_DIST  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              obs_valid,
  input  task_t             obs_task,
  input  logic              sz_valid,
  input  logic [31:0]       sz_bytes,
  output logic              pf_valid,
  output task_t             pf_task,
  input  logic              pf_ready,
  output logic [5:0]        distance
);

  localparam int unsigned EW = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1;

  logic [N_ENTRIES-1:0] valid;
  logic [VACC_W-1:0]    vacc  [N_ENTRIES];
  consts_t              last  [N_ENTRIES];
  logic [31:0]          avg;

  logic [EW-1:0] idx;
  logic          hit;
  consts_t       stride, pred;
  logic          nonzero;

  assign idx = EW'(obs_task.vacc);
  assign hit = valid[idx] && vacc[idx] == obs_task.vacc;

  always_comb begin
    if      (avg >= 32'd32768) distance = 6'd1;
    else if (avg >= 32'd16384) distance = 6'd2;
    else if (avg >= 32'd8192)  distance = 6'd4;
    else if (avg >= 32'd4096)  distance = 6'd8;
    else                       distance = 6'(MAX_DIST);
    nonzero = 1'b0;
    for (int k = 0; k < NCONST; k++) begin
      stride[k] = obs_task.c[k] - last[idx][k];
      pred[k]   = obs_task.c[k] + stride[k] * WORD_W'(distance);
      nonzero   = nonzero | (stride[k] != '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      avg      <= 32'd32768;
      pf_valid <= 1'b0;
      pf_task  <= '0;
      for (int i = 0; i < N_ENTRIES; i++) begin
        vacc[i] <= '0;
        last[i] <= '0;
      end
    end else begin
      if (pf_valid && pf_ready) pf_valid <= 1'b0;
      if (sz_valid) avg <= avg + (sz_bytes >> 2) - (avg >> 2);
      if (obs_valid) begin
        valid[idx] <= 1'b1;
        vacc[idx]  <= obs_task.vacc;
        last[idx]  <= obs_task.c;
        if (enable && hit && nonzero) begin
          pf_valid      <= 1'b1;
          pf_task.tag   <= obs_task.tag;
          pf_task.vacc  <= obs_task.vacc;
          pf_task.c     <= pred;
        end
      end
    end
  end

endmodule
