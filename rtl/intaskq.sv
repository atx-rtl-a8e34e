// intaskq: InTaskQ, the UTE's queue of tasks received from the core's ATX port.
//
// Tasks enter in program order (as the core issues them) together with what the
// frontend looked up for their VAcc id: the mask of PAcc ports able to run them,
// the VAcc-to-Streams entry and the number of streams. Tasks leave out of order:
// each cycle the oldest task whose resources are free (a capable PAcc port that
// is free, and as many free Stream Units as it has streams) is offered for
// dispatch; a task whose resources are busy does not block younger ones.
// For assisted task prefetching the queue also offers its oldest task that has
// not been prefetched yet (apf_*); apf_mark records that it has been sent to
// the backend in prefetch mode, so each queued task is prefetched at most once.
// A squash from the core removes the task with that tag if it is still queued.
// The queue collapses on removal, so entry 0 is always the oldest.
// Timing: in_ready = not full; sel_* is combinational; the selected entry leaves
// in the cycle deq is high. Depth is this implementation's choice.
module intaskq
  import atx_pkg::*;
#(
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned N_PORTS = 6,
  parameter int unsigned N_SU    = 32,
  parameter int unsigned MAP_W   = 4     // width of a VAcc-to-Streams entry index
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  task_t                in_task,
  input  logic [N_PORTS-1:0]   in_mask,
  input  logic [MAP_W-1:0]     in_sidx,
  input  logic [SID_W:0]       in_nstreams,
  input  logic                 squash_valid,
  input  logic [TAG_W-1:0]     squash_tag,
  input  logic [N_PORTS-1:0]   free_ports,
  input  logic [$clog2(N_SU):0] free_sus,
  output logic                 sel_valid,
  output task_t                sel_task,
  output logic [N_PORTS-1:0]   sel_mask,
  output logic [MAP_W-1:0]     sel_sidx,
  output logic [SID_W:0]       sel_nstreams,
  input  logic                 deq,
  output logic                 apf_valid,
  output task_t                apf_task,
  output logic [MAP_W-1:0]     apf_sidx,
  output logic [SID_W:0]       apf_nstreams,
  input  logic                 apf_mark,
  output logic [$clog2(DEPTH):0] count
);

  typedef struct packed {
    task_t              t;
    logic [N_PORTS-1:0] mask;
    logic [MAP_W-1:0]   sidx;
    logic [SID_W:0]     ns;
    logic               pfd;      // already sent in prefetch mode
  } ent_t;

  ent_t              q [DEPTH];
  logic [DEPTH-1:0]  v;
  logic [$clog2(DEPTH)-1:0] sel_idx, apf_idx;

  assign in_ready = !v[DEPTH-1];

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count += ($clog2(DEPTH)+1)'(v[i]);
    sel_valid = 1'b0;
    sel_idx   = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!sel_valid && v[i] && (q[i].mask & free_ports) != '0 &&
          32'(q[i].ns) <= 32'(free_sus)) begin
        sel_valid = 1'b1;
        sel_idx   = i[$clog2(DEPTH)-1:0];
      end
    end
    apf_valid = 1'b0;
    apf_idx   = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (!apf_valid && v[i] && !q[i].pfd) begin
        apf_valid = 1'b1;
        apf_idx   = i[$clog2(DEPTH)-1:0];
      end
    end
    apf_task     = q[apf_idx].t;
    apf_sidx     = q[apf_idx].sidx;
    apf_nstreams = q[apf_idx].ns;
    sel_task     = q[sel_idx].t;
    sel_mask     = q[sel_idx].mask;
    sel_sidx     = q[sel_idx].sidx;
    sel_nstreams = q[sel_idx].ns;
  end

  // next queue contents: survivors moved down in order, then the new task
  ent_t             q_n [DEPTH];
  logic [DEPTH-1:0] v_n;

  always_comb begin
    int   k;
    ent_t e;
    k   = 0;
    e   = '0;
    v_n = '0;
    for (int i = 0; i < DEPTH; i++) q_n[i] = q[i];
    for (int i = 0; i < DEPTH; i++) begin
      if (v[i] && !(deq && sel_valid && i == 32'(sel_idx)) &&
          !(squash_valid && q[i].t.tag == squash_tag)) begin
        e        = q[i];
        e.pfd    = q[i].pfd || (apf_mark && apf_valid && i == 32'(apf_idx));
        q_n[k]   = e;
        k++;
      end
    end
    if (in_valid && in_ready) begin
      q_n[k] = '{t: in_task, mask: in_mask, sidx: in_sidx, ns: in_nstreams, pfd: 1'b0};
      k++;
    end
    for (int i = 0; i < DEPTH; i++) v_n[i] = (i < k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      v <= v_n;
      for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
    end
  end

endmodule
