// ute: the ATX Unified Transfer Engine, one per CPU core, placed next to the L2.
//
// Frontend. A task (ATX instruction) from the core's ATX port is looked up in
// the VAcc-to-PAcc and VAcc-to-Streams Mappings; an unknown VAcc raises
// exc_valid instead. Known tasks wait in the InTaskQ until the PAcc Allocator
// finds a free capable PAcc port and the Stream Unit Allocator finds one free
// Stream Unit per stream; then the task is dispatched, out of order if an older
// task is still waiting. The Task Predictor watches the incoming tasks and
// proposes predicted tasks. When no real task can dispatch and a prefetch slot
// is free, a task is dispatched to Stream Units only, in prefetch mode: first
// the oldest queued task not prefetched yet (assisted prefetching), otherwise
// the predicted task (predicted prefetching).
//
// Backend. Stream Units generate accesses; the Stream Scheduler sends one per
// cycle (oldest task first) to the LDQ, which reads the L2. Answers go on the
// Common Bus: to the PAcc port whose task owns the Stream Unit (and from there
// into the NCA input buffer), and, by inter-stream forwarding, into the Parent
// Data Queues of the Stream Units that run the children streams. A PAcc port
// whose streams are all complete starts its NCA; the NCA result goes through
// the OutQ back to the core, tagged with the instruction's tag. A squash from
// the core removes the task wherever it is.
//
// The structure and the numbers (32 Stream Units, 128-entry LDQ, 128-byte
// Common Bus, 1 KB PDQ, two input buffers per NCA, predicted task prefetching
// on) follow the design. Queue depths, the prefetch slots, the configuration
// and memory handshakes, and the VAcc-table sizes are this implementation's.
// Timing: one task can enter and one can be dispatched per cycle; one memory
// access issues and one Common Bus beat is delivered per cycle.
module ute
  import atx_pkg::*;
#(
  parameter int unsigned N_NCA      = 3,
  parameter int unsigned N_PORTS    = 2 * N_NCA,
  parameter int unsigned N_SU       = 32,
  parameter int unsigned LDQ_N      = 128,
  parameter int unsigned LINE_BYTES = 128,
  parameter int unsigned PDQ_BYTES  = 1024,
  parameter int unsigned INTQ_DEPTH = 8,
  parameter int unsigned OUTQ_DEPTH = 8,
  parameter int unsigned MAP_N      = 16,
  parameter int unsigned PF_SLOTS   = 2,
  parameter logic [N_PORTS*TYPE_W-1:0] PORT_TYPES = {N_PORTS{8'd1}}
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // core: ATX port
  input  logic                          task_valid,
  output logic                          task_ready,
  input  task_t                         task_in,
  input  logic                          squash_valid,
  input  logic [TAG_W-1:0]              squash_tag,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [TAG_W-1:0]              out_tag,
  output logic [VREG_W-1:0]             out_data,
  output logic                          exc_valid,
  output logic [TAG_W-1:0]              exc_tag,
  // core: configuration registers
  input  logic                          cfg_valid,
  input  cfg_req_t                      cfg,
  output logic [WORD_W-1:0]             cfg_rdata,
  output logic                          cfg_err,
  input  logic                          pf_enable,
  // L2
  output logic                          mem_req_valid,
  output logic [ADDR_W-1:0]             mem_req_addr,
  output logic [$clog2(LDQ_N)-1:0]      mem_req_tag,
  output logic                          mem_req_pf,
  input  logic                          mem_req_ready,
  input  logic                          mem_rsp_valid,
  input  logic [$clog2(LDQ_N)-1:0]      mem_rsp_tag,
  input  logic [LINE_BYTES*8-1:0]       mem_rsp_data,
  // NCAs, one PAcc port each
  output logic [N_PORTS-1:0]            buf_wr,
  output access_t                       cb_acc,
  output logic [LINE_BYTES*8-1:0]       cb_data,
  output logic [N_PORTS-1:0]            run_req,
  output consts_t [N_PORTS-1:0]         run_c,
  input  logic [N_PORTS-1:0]            run_ack,
  output logic [N_PORTS-1:0]            kill,
  input  logic [N_PORTS-1:0]            nca_done,
  input  logic [N_PORTS-1:0][VREG_W-1:0] nca_out,
  // activity, for monitoring
  output logic                          dispatch_real,
  output logic                          dispatch_pf
);

  localparam int unsigned SW  = $clog2(N_SU);
  localparam int unsigned MW  = $clog2(MAP_N);
  localparam int unsigned PFW = $clog2(PDQ_BYTES / 8) + 1;

  // ---------------- configuration ----------------
  logic lk_phit, lk_shit, err_p, err_s;
  logic [N_PORTS-1:0] lk_mask;
  logic [MW-1:0]      lk_sidx, lk2_sidx, rd_sidx;
  logic [SID_W:0]     lk_ns, lk2_ns;
  logic               lk2_hit;
  stream_cfg_t [MAX_STREAMS-1:0] rd_cfg;
  task_t              pf_task;
  logic               pf_valid, pf_ready;

  assign cfg_err = err_p | err_s;

  vacc_pacc_map #(.N_ENTRIES(MAP_N), .N_PORTS(N_PORTS), .PORT_TYPES(PORT_TYPES)) u_pmap (
    .clk, .rst_n, .cfg_valid, .cfg, .cfg_rdata, .cfg_err(err_p),
    .lk_vacc(task_in.vacc), .lk_hit(lk_phit), .lk_mask);

  vacc_stream_map #(.N_ENTRIES(MAP_N)) u_smap (
    .clk, .rst_n, .cfg_valid, .cfg, .cfg_err(err_s),
    .lk_vacc(task_in.vacc), .lk_hit(lk_shit), .lk_idx(lk_sidx), .lk_nstreams(lk_ns),
    .lk2_vacc(pf_task.vacc), .lk2_hit(lk2_hit), .lk2_idx(lk2_sidx), .lk2_nstreams(lk2_ns),
    .rd_idx(rd_sidx), .rd_cfg);

  // ---------------- InTaskQ ----------------
  logic known, q_in_ready, sel_valid;
  task_t sel_task;
  logic [N_PORTS-1:0] sel_mask, free_ports;
  logic [MW-1:0]      sel_sidx;
  logic [SID_W:0]     sel_ns;
  logic [$clog2(N_SU):0] free_sus;
  logic [$clog2(INTQ_DEPTH):0] q_count;
  logic               apf_valid, dispatch_apf;
  task_t              apf_task;
  logic [MW-1:0]      apf_sidx;
  logic [SID_W:0]     apf_ns;

  assign known      = lk_phit && lk_shit && lk_mask != '0 && lk_ns != '0;
  assign task_ready = q_in_ready || !known;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exc_valid <= 1'b0;
      exc_tag   <= '0;
    end else begin
      exc_valid <= task_valid && !known;
      exc_tag   <= task_in.tag;
    end
  end

  intaskq #(.DEPTH(INTQ_DEPTH), .N_PORTS(N_PORTS), .N_SU(N_SU), .MAP_W(MW)) u_inq (
    .clk, .rst_n, .in_valid(task_valid && known), .in_ready(q_in_ready), .in_task(task_in),
    .in_mask(lk_mask), .in_sidx(lk_sidx), .in_nstreams(lk_ns),
    .squash_valid, .squash_tag, .free_ports, .free_sus,
    .sel_valid, .sel_task, .sel_mask, .sel_sidx, .sel_nstreams(sel_ns),
    .deq(dispatch_real), .apf_valid, .apf_task, .apf_sidx, .apf_nstreams(apf_ns),
    .apf_mark(dispatch_apf), .count(q_count));

  // ---------------- Task Predictor ----------------
  logic [N_PORTS-1:0] p_sz_valid;
  logic [N_PORTS-1:0][31:0] p_sz_bytes;
  logic        sz_valid;
  logic [31:0] sz_bytes;
  logic [5:0]  pf_dist;

  always_comb begin
    sz_valid = 1'b0;
    sz_bytes = '0;
    for (int p = 0; p < N_PORTS; p++) if (p_sz_valid[p]) begin
      sz_valid = 1'b1;
      sz_bytes = p_sz_bytes[p];
    end
  end

  task_predictor u_pred (
    .clk, .rst_n, .enable(pf_enable), .obs_valid(task_valid && known && q_in_ready),
    .obs_task(task_in), .sz_valid, .sz_bytes, .pf_valid, .pf_task, .pf_ready,
    .distance(pf_dist));

  // ---------------- allocation and dispatch ----------------
  logic pa_gnt;
  logic [$clog2(N_PORTS)-1:0] pa_idx;
  logic [N_PORTS-1:0] rel_ports;
  logic su_gnt;
  logic [MAX_STREAMS-1:0][SW-1:0] su_idx;
  logic [N_SU-1:0] rel_sus, flush_sus, su_free_mask;
  logic [SID_W:0]  need;
  logic [PF_SLOTS-1:0] pf_busy;
  logic            pf_slot_free;
  logic [$clog2(PF_SLOTS)-1:0] pf_slot;
  logic [AGE_W-1:0] seq;
  consts_t          d_c;
  logic [SID_W:0]   d_ns;
  logic             d_pf, dispatch, dispatch_ppf;

  pacc_allocator #(.N_PORTS(N_PORTS)) u_palloc (
    .clk, .rst_n, .req_mask(sel_mask), .gnt_valid(pa_gnt), .gnt_idx(pa_idx),
    .alloc(dispatch_real), .release_ports(rel_ports), .free_ports);

  always_comb begin
    pf_slot_free = 1'b0;
    pf_slot      = '0;
    for (int j = PF_SLOTS - 1; j >= 0; j--) if (!pf_busy[j]) begin
      pf_slot_free = 1'b1;
      pf_slot      = ($clog2(PF_SLOTS))'(j);
    end
  end

  // resources are looked up for, in priority order: the oldest dispatchable
  // task, else the oldest queued task not prefetched yet (assisted prefetch),
  // else the predicted task
  logic use_apf;
  assign use_apf = !sel_valid && apf_valid && pf_enable;
  assign need    = sel_valid ? sel_ns : use_apf ? apf_ns : lk2_ns;
  assign rd_sidx = sel_valid ? sel_sidx : use_apf ? apf_sidx : lk2_sidx;

  su_allocator #(.N_SU(N_SU)) u_salloc (
    .clk, .rst_n, .need, .gnt_valid(su_gnt), .su_idx, .alloc(dispatch),
    .release_sus(rel_sus), .free_mask(su_free_mask), .free_cnt(free_sus));

  assign dispatch_real = sel_valid && pa_gnt && su_gnt;
  assign dispatch_apf  = use_apf && pf_slot_free && su_gnt;
  assign dispatch_ppf  = !sel_valid && !use_apf && pf_valid && lk2_hit && lk2_ns != '0 &&
                         pf_slot_free && su_gnt;
  assign dispatch_pf   = dispatch_apf || dispatch_ppf;
  assign dispatch      = dispatch_real || dispatch_pf;
  assign pf_ready      = dispatch_ppf || !pf_enable;
  assign d_c           = dispatch_real ? sel_task.c : use_apf ? apf_task.c : pf_task.c;
  assign d_ns          = need;
  assign d_pf          = !dispatch_real;

  // per Stream Unit start values
  logic [N_SU-1:0]   su_start, su_leaf_s;
  stream_cfg_t [N_SU-1:0] su_cfg_s;
  logic [N_SU-1:0]   task_sus;
  logic [MAX_STREAMS-1:0] is_leaf;
  logic [N_SU-1:0]   has_par;
  logic [SW-1:0]     par_su [N_SU];

  always_comb begin
    for (int k = 0; k < MAX_STREAMS; k++) begin
      is_leaf[k] = 1'b1;
      for (int j = 0; j < MAX_STREAMS; j++)
        if (j < 32'(d_ns) && rd_cfg[j].has_parent && 32'(rd_cfg[j].parent) == k) is_leaf[k] = 1'b0;
    end
    su_start  = '0;
    su_leaf_s = '0;
    su_cfg_s  = '0;
    task_sus  = '0;
    for (int s = 0; s < N_SU; s++) begin
      for (int k = 0; k < MAX_STREAMS; k++) begin
        if (dispatch && k < 32'(d_ns) && 32'(su_idx[k]) == s) begin
          su_start[s]  = 1'b1;
          su_cfg_s[s]  = rd_cfg[k];
          su_leaf_s[s] = is_leaf[k];
          task_sus[s]  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq     <= '0;
      has_par <= '0;
      for (int s = 0; s < N_SU; s++) par_su[s] <= '0;
    end else begin
      if (dispatch) seq <= seq + 1'b1;
      for (int s = 0; s < N_SU; s++) if (su_start[s]) begin
        has_par[s] <= su_cfg_s[s].has_parent;
        par_su[s]  <= su_idx[su_cfg_s[s].parent];
      end
    end
  end

  // prefetch slots: free their Stream Units when every stream is done
  logic [PF_SLOTS-1:0][N_SU-1:0] pf_sus;
  logic [N_SU-1:0] su_done, su_busy, pf_rel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_busy <= '0;
      pf_sus  <= '0;
      pf_rel  <= '0;
    end else begin
      pf_rel <= '0;
      for (int j = 0; j < PF_SLOTS; j++) begin
        if (pf_busy[j] && (su_done & pf_sus[j]) == pf_sus[j]) begin
          pf_busy[j] <= 1'b0;
          pf_rel     <= pf_rel | pf_sus[j];
        end
      end
      if (dispatch_pf) begin
        pf_busy[pf_slot] <= 1'b1;
        pf_sus[pf_slot]  <= task_sus;
      end
    end
  end

  // ---------------- Stream Units, Scheduler, LDQ, Common Bus ----------------
  logic [N_SU-1:0]            su_req, su_grant;
  access_t [N_SU-1:0]         su_acc;
  logic [N_SU-1:0][AGE_W-1:0] su_age;
  logic [N_SU-1:0][PFW-1:0]   su_pdq_free;
  logic [N_SU-1:0][PFW-1:0]   child_free;
  logic                       cb_valid;
  logic [SW-1:0]              cb_su;
  logic                       g_valid, ldq_ready;
  logic [SW-1:0]              g_idx;
  logic [$clog2(LDQ_N):0]     ldq_busy;

  always_comb begin
    for (int s = 0; s < N_SU; s++) begin
      child_free[s] = PFW'(PDQ_BYTES / 8);
      for (int t = 0; t < N_SU; t++)
        if (su_busy[t] && has_par[t] && 32'(par_su[t]) == s && su_pdq_free[t] < child_free[s])
          child_free[s] = su_pdq_free[t];
    end
  end

  for (genvar s = 0; s < N_SU; s++) begin : g_su
    stream_unit #(.LINE_BYTES(LINE_BYTES), .PDQ_BYTES(PDQ_BYTES)) u_su (
      .clk, .rst_n,
      .start(su_start[s]), .start_cfg(su_cfg_s[s]), .start_c(d_c), .start_pf(d_pf),
      .start_leaf(su_leaf_s[s]), .start_age(seq),
      .flush(flush_sus[s]), .release_su(rel_sus[s]),
      .pin_valid(cb_valid && has_par[s] && su_busy[s] && cb_su == par_su[s]),
      .pin_acc(cb_acc), .pin_data(cb_data),
      .parent_done(su_done[par_su[s]]), .child_free(child_free[s]),
      .req_valid(su_req[s]), .req(su_acc[s]), .age(su_age[s]), .req_grant(su_grant[s]),
      .ret_valid(cb_valid && cb_su == SW'(s)), .ret_cnt(cb_acc.cnt),
      .pdq_free(su_pdq_free[s]), .busy(su_busy[s]), .done(su_done[s]));
  end

  stream_sched #(.N_SU(N_SU)) u_sched (
    .clk, .rst_n, .req(su_req), .age(su_age), .out_ready(ldq_ready),
    .grant_valid(g_valid), .grant_idx(g_idx), .grant(su_grant));

  ldq #(.N_ENTRIES(LDQ_N), .N_SU(N_SU), .LINE_BYTES(LINE_BYTES)) u_ldq (
    .clk, .rst_n, .in_valid(g_valid), .in_acc(su_acc[g_idx]), .in_su(g_idx), .in_ready(ldq_ready),
    .flush_su(flush_sus),
    .mem_req_valid, .mem_req_addr, .mem_req_tag, .mem_req_pf, .mem_req_ready,
    .mem_rsp_valid, .mem_rsp_tag, .mem_rsp_data,
    .cb_valid, .cb_su, .cb_acc, .cb_data, .n_busy(ldq_busy));

  // ---------------- PAcc ports and OutQ ----------------
  logic [N_PORTS-1:0] p_out_valid, p_out_ready, p_rel;
  logic [N_PORTS-1:0][TAG_W-1:0]  p_out_tag;
  logic [N_PORTS-1:0][VREG_W-1:0] p_out_data;
  logic [N_PORTS-1:0][N_SU-1:0]   p_rel_sus, p_flush_sus, p_status;
  logic [N_PORTS-1:0]             p_busy;
  logic oq_in_ready, oq_push;
  logic [$clog2(N_PORTS)-1:0] oq_sel;
  logic [$clog2(OUTQ_DEPTH):0] oq_count;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    pacc_port #(.N_SU(N_SU)) u_port (
      .clk, .rst_n,
      .alloc(dispatch_real && pa_idx == ($clog2(N_PORTS))'(p)), .alloc_tag(sel_task.tag),
      .alloc_c(sel_task.c), .alloc_sus(task_sus),
      .squash_valid, .squash_tag,
      .cb_valid, .cb_su, .cb_acc, .buf_wr(buf_wr[p]),
      .su_done,
      .run_req(run_req[p]), .run_c(run_c[p]), .run_ack(run_ack[p]), .kill(kill[p]),
      .nca_done(nca_done[p]), .nca_out(nca_out[p]),
      .out_valid(p_out_valid[p]), .out_tag(p_out_tag[p]), .out_data(p_out_data[p]),
      .out_ready(p_out_ready[p]),
      .release_port(p_rel[p]), .release_sus(p_rel_sus[p]), .flush_sus(p_flush_sus[p]),
      .sz_valid(p_sz_valid[p]), .sz_bytes(p_sz_bytes[p]), .busy(p_busy[p]),
      .task_status(p_status[p]));
  end

  always_comb begin
    oq_push = 1'b0;
    oq_sel  = '0;
    for (int p = N_PORTS - 1; p >= 0; p--) if (p_out_valid[p]) begin
      oq_push = 1'b1;
      oq_sel  = ($clog2(N_PORTS))'(p);
    end
    p_out_ready = '0;
    if (oq_push && oq_in_ready) p_out_ready[oq_sel] = 1'b1;
    rel_ports = p_rel;
    rel_sus   = pf_rel;
    flush_sus = '0;
    for (int p = 0; p < N_PORTS; p++) begin
      rel_sus   = rel_sus | p_rel_sus[p];
      flush_sus = flush_sus | p_flush_sus[p];
    end
  end

  sync_fifo #(.WIDTH(TAG_W + VREG_W), .DEPTH(OUTQ_DEPTH)) u_outq (
    .clk, .rst_n, .in_valid(oq_push), .in_ready(oq_in_ready),
    .in_data({p_out_tag[oq_sel], p_out_data[oq_sel]}),
    .out_valid, .out_ready, .out_data({out_tag, out_data}), .count(oq_count));

  // A task is only dispatched to resources that are free.
  a_port_free: assert property (@(posedge clk) disable iff (!rst_n)
    dispatch_real |-> !p_busy[pa_idx]);
  a_su_free: assert property (@(posedge clk) disable iff (!rst_n)
    (su_start & su_busy) == '0);

endmodule
