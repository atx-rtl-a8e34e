// vacc_stream_map: VAcc-to-Streams Mapping of the UTE frontend.
//
// A content-addressable table, keyed by VAcc id, that holds for each task type
// the number of streams its tasks read and, per stream, the element size, the
// parent stream (or none for a root stream), the begin and end bound
// expressions, the memory stride and the scratchpad placement (base and
// stride). The core fills it with configuration writes; the first write for an
// unknown VAcc takes a free entry, and a write when the table is full raises
// cfg_err for one cycle. CFG_REMOVE frees the entry.
// Three combinational read ports: two lookups by VAcc id (hit, entry index,
// stream count), used when a task enters the InTaskQ and for a predicted task, and read by entry index (all
// stream configurations), used when the task is dispatched to Stream Units.
// A freshly allocated stream defaults to unit stride, unit scratchpad stride and
// no parent. The content follows the design; encodings and the entry count are
// this implementation's choices.
module vacc_stream_map
  import atx_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_valid,
  input  cfg_req_t                  cfg,
  output logic                      cfg_err,
  input  logic [VACC_W-1:0]         lk_vacc,
  output logic                      lk_hit,
  output logic [$clog2(N_ENTRIES)-1:0] lk_idx,
  output logic [SID_W:0]            lk_nstreams,
  input  logic [VACC_W-1:0]         lk2_vacc,
  output logic                      lk2_hit,
  output logic [$clog2(N_ENTRIES)-1:0] lk2_idx,
  output logic [SID_W:0]            lk2_nstreams,
  input  logic [$clog2(N_ENTRIES)-1:0] rd_idx,
  output stream_cfg_t [MAX_STREAMS-1:0] rd_cfg
);

  localparam int unsigned EW = $clog2(N_ENTRIES);

  logic [N_ENTRIES-1:0] ent_valid;
  logic [VACC_W-1:0]    ent_vacc [N_ENTRIES];
  logic [SID_W:0]       ent_n    [N_ENTRIES];
  stream_cfg_t [MAX_STREAMS-1:0] ent_cfg [N_ENTRIES];

  function automatic logic [EW:0] find(logic [VACC_W-1:0] v, logic [N_ENTRIES-1:0] vld,
                                       logic [VACC_W-1:0] ids [N_ENTRIES]);
    for (int i = 0; i < N_ENTRIES; i++) if (vld[i] && ids[i] == v) return {1'b1, EW'(i)};
    return '0;
  endfunction

  logic [EW:0]   lk, lk2, cf;
  logic          have_free;
  logic [EW-1:0] free_idx, widx;
  stream_cfg_t   dflt;

  always_comb begin
    lk          = find(lk_vacc, ent_valid, ent_vacc);
    lk_hit      = lk[EW];
    lk_idx      = lk[EW-1:0];
    lk_nstreams = ent_n[lk[EW-1:0]];
    lk2          = find(lk2_vacc, ent_valid, ent_vacc);
    lk2_hit      = lk2[EW];
    lk2_idx      = lk2[EW-1:0];
    lk2_nstreams = ent_n[lk2[EW-1:0]];
    rd_cfg      = ent_cfg[rd_idx];
    cf          = find(cfg.vacc, ent_valid, ent_vacc);
    have_free   = 1'b0;
    free_idx    = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) if (!ent_valid[i]) begin
      have_free = 1'b1;
      free_idx  = EW'(i);
    end
    widx = cf[EW] ? cf[EW-1:0] : free_idx;
    dflt = '0;
    dflt.esize      = 4'd8;
    dflt.stride     = 16'd1;
    dflt.nca_stride = 8'd1;
  end

  wire is_write = cfg_valid && cfg.op inside {CFG_NUM_STREAMS, CFG_SIZE, CFG_PARENT, CFG_BEXP_BEG,
                                              CFG_BEXP_END, CFG_STRIDE, CFG_NCA_BASE, CFG_NCA_STRIDE};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      cfg_err   <= 1'b0;
      for (int i = 0; i < N_ENTRIES; i++) begin
        ent_vacc[i] <= '0;
        ent_n[i]    <= '0;
        ent_cfg[i]  <= '0;
      end
    end else begin
      cfg_err <= 1'b0;
      if (cfg_valid && cfg.op == CFG_REMOVE && cf[EW]) ent_valid[cf[EW-1:0]] <= 1'b0;
      if (is_write && !cf[EW] && !have_free) cfg_err <= 1'b1;
      else if (is_write) begin
        if (!cf[EW]) begin
          ent_valid[widx] <= 1'b1;
          ent_vacc[widx]  <= cfg.vacc;
          ent_n[widx]     <= '0;
          for (int s = 0; s < MAX_STREAMS; s++) ent_cfg[widx][s] <= dflt;
        end
        unique case (cfg.op)
          CFG_NUM_STREAMS: ent_n[widx] <= (SID_W+1)'(cfg.data);
          CFG_SIZE:        ent_cfg[widx][cfg.stream].esize <= cfg.data[3:0];
          CFG_PARENT: begin
            ent_cfg[widx][cfg.stream].has_parent <= !cfg.data[WORD_W-1];
            ent_cfg[widx][cfg.stream].parent     <= cfg.data[SID_W-1:0];
          end
          CFG_BEXP_BEG:    ent_cfg[widx][cfg.stream].beg <= cfg.data[15:0];
          CFG_BEXP_END:    ent_cfg[widx][cfg.stream].fin <= cfg.data[15:0];
          CFG_STRIDE:      ent_cfg[widx][cfg.stream].stride <= cfg.data[15:0];
          CFG_NCA_BASE:    ent_cfg[widx][cfg.stream].nca_base <= cfg.data[NCAADDR_W-1:0];
          CFG_NCA_STRIDE:  ent_cfg[widx][cfg.stream].nca_stride <= cfg.data[7:0];
          default: ;
        endcase
      end
    end
  end

endmodule
