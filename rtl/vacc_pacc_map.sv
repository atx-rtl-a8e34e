// vacc_pacc_map: VAcc-to-PAcc Mapping of the UTE frontend, with the read-only
// NCA type table.
//
// The type table (parameter PORT_TYPES) holds the type identifier of the NCA
// behind each PAcc port. Software first asks whether a type is present
// (CFG_CHECK_TYPE, answer in cfg_rdata the next cycle), then maps a task type
// (VAcc id) to an NCA type (CFG_MAP_TYPE): the hardware fills a CAM entry for the
// VAcc with the mask of every PAcc port whose NCA has that type. CFG_REMOVE frees
// the entry. Mapping a new VAcc when the CAM is full raises cfg_err for one cycle
// (the core turns it into an exception). The lookup port is combinational: it
// returns hit and the capable-PAcc mask for a VAcc id.
// The behaviour follows the design; the entry count and the configuration
// encoding are this implementation's choices.
module vacc_pacc_map
  import atx_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 16,
  parameter int unsigned N_PORTS   = 6,
  parameter logic [N_PORTS*TYPE_W-1:0] PORT_TYPES = {N_PORTS{8'd1}}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_valid,
  input  cfg_req_t             cfg,
  output logic [WORD_W-1:0]    cfg_rdata,
  output logic                 cfg_err,
  input  logic [VACC_W-1:0]    lk_vacc,
  output logic                 lk_hit,
  output logic [N_PORTS-1:0]   lk_mask
);

  localparam int unsigned EW = $clog2(N_ENTRIES);

  logic [N_ENTRIES-1:0]  ent_valid;
  logic [VACC_W-1:0]     ent_vacc [N_ENTRIES];
  logic [N_PORTS-1:0]    ent_mask [N_ENTRIES];

  function automatic logic [N_PORTS-1:0] type_mask(logic [TYPE_W-1:0] t);
    logic [N_PORTS-1:0] m;
    for (int p = 0; p < N_PORTS; p++) m[p] = (PORT_TYPES[p*TYPE_W +: TYPE_W] == t);
    return m;
  endfunction

  // lookup (also used for configuration writes)
  function automatic logic [EW:0] find(logic [VACC_W-1:0] v, logic [N_ENTRIES-1:0] vld,
                                       logic [VACC_W-1:0] ids [N_ENTRIES]);
    for (int i = 0; i < N_ENTRIES; i++) if (vld[i] && ids[i] == v) return {1'b1, EW'(i)};
    return '0;
  endfunction

  logic [EW:0] lk, cf;
  logic        have_free;
  logic [EW-1:0] free_idx;

  always_comb begin
    lk      = find(lk_vacc, ent_valid, ent_vacc);
    lk_hit  = lk[EW];
    lk_mask = lk_hit ? ent_mask[lk[EW-1:0]] : '0;
    cf      = find(cfg.vacc, ent_valid, ent_vacc);
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) if (!ent_valid[i]) begin
      have_free = 1'b1;
      free_idx  = EW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      cfg_rdata <= '0;
      cfg_err   <= 1'b0;
      for (int i = 0; i < N_ENTRIES; i++) begin
        ent_vacc[i] <= '0;
        ent_mask[i] <= '0;
      end
    end else begin
      cfg_err <= 1'b0;
      if (cfg_valid) begin
        unique case (cfg.op)
          CFG_CHECK_TYPE: cfg_rdata <= WORD_W'(|type_mask(cfg.data[TYPE_W-1:0]));
          CFG_MAP_TYPE: begin
            if (cf[EW]) ent_mask[cf[EW-1:0]] <= type_mask(cfg.data[TYPE_W-1:0]);
            else if (have_free) begin
              ent_valid[free_idx] <= 1'b1;
              ent_vacc[free_idx]  <= cfg.vacc;
              ent_mask[free_idx]  <= type_mask(cfg.data[TYPE_W-1:0]);
            end else cfg_err <= 1'b1;
          end
          CFG_REMOVE: if (cf[EW]) ent_valid[cf[EW-1:0]] <= 1'b0;
          default: ;
        endcase
      end
    end
  end

endmodule
