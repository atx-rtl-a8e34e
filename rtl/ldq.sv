// ldq: UTE Load Queue (LDQ), the UTE's read interface to the core's L2 cache.
//
// The Stream Scheduler hands it one access per cycle. A data access takes a free
// entry, which records the access (which Stream Unit it belongs to and how to
// unpack the line) and whose index is the tag of the read sent to the L2. The
// number of entries bounds the UTE's outstanding reads. When the L2 answers,
// in any order, the line and the recorded access are placed on the Common Bus
// and the entry is freed. A prefetch access (prefetch-mode leaf stream) is sent
// to the L2 as a prefetch hint, takes no entry and gets no answer (it is still only accepted while an entry is
// free, which keeps in_ready independent of the access).
// When a task is squashed, the entries of its Stream Units are marked so their
// answers are dropped instead of reaching the Common Bus.
// Timing: in_ready is combinational (free entry and L2 ready);
// the Common Bus beat is driven combinationally in the cycle of the L2 answer.
// The handshakes and the drop mechanism are this implementation's choices.
module ldq
  import atx_pkg::*;
#(
  parameter int unsigned N_ENTRIES  = 128,
  parameter int unsigned N_SU       = 32,
  parameter int unsigned LINE_BYTES = 128
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // from the Stream Scheduler
  input  logic                         in_valid,
  input  access_t                      in_acc,
  input  logic [$clog2(N_SU)-1:0]      in_su,
  output logic                         in_ready,
  // squash: drop answers for these Stream Units
  input  logic [N_SU-1:0]              flush_su,
  // L2 read port
  output logic                         mem_req_valid,
  output logic [ADDR_W-1:0]            mem_req_addr,
  output logic [$clog2(N_ENTRIES)-1:0] mem_req_tag,
  output logic                         mem_req_pf,
  input  logic                         mem_req_ready,
  input  logic                         mem_rsp_valid,
  input  logic [$clog2(N_ENTRIES)-1:0] mem_rsp_tag,
  input  logic [LINE_BYTES*8-1:0]      mem_rsp_data,
  // Common Bus
  output logic                         cb_valid,
  output logic [$clog2(N_SU)-1:0]      cb_su,
  output access_t                      cb_acc,
  output logic [LINE_BYTES*8-1:0]      cb_data,
  output logic [$clog2(N_ENTRIES):0]   n_busy
);

  localparam int unsigned TW = $clog2(N_ENTRIES);
  localparam int unsigned SW = $clog2(N_SU);

  logic [N_ENTRIES-1:0] valid, drop;
  access_t              acc [N_ENTRIES];
  logic [SW-1:0]        su  [N_ENTRIES];

  logic          have_free;
  logic [TW-1:0] free_idx;

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int i = N_ENTRIES - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        have_free = 1'b1;
        free_idx  = TW'(i);
      end
    end
  end

  assign in_ready      = mem_req_ready && have_free;
  assign mem_req_valid = in_valid && have_free;
  assign mem_req_addr  = in_acc.line;
  assign mem_req_tag   = free_idx;
  assign mem_req_pf    = in_acc.pf;

  assign cb_valid = mem_rsp_valid && valid[mem_rsp_tag] && !drop[mem_rsp_tag] &&
                    !flush_su[su[mem_rsp_tag]];
  assign cb_su    = su[mem_rsp_tag];
  assign cb_acc   = acc[mem_rsp_tag];
  assign cb_data  = mem_rsp_data;

  always_comb begin
    n_busy = '0;
    for (int i = 0; i < N_ENTRIES; i++) n_busy += (TW+1)'(valid[i]);
  end

  wire alloc = in_valid && in_ready && !in_acc.pf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      drop  <= '0;
    end else begin
      for (int i = 0; i < N_ENTRIES; i++) begin
        if (valid[i] && flush_su[su[i]]) drop[i] <= 1'b1;
      end
      if (mem_rsp_valid) begin
        valid[mem_rsp_tag] <= 1'b0;
        drop[mem_rsp_tag]  <= 1'b0;
      end
      if (alloc) begin
        valid[free_idx] <= 1'b1;
        drop[free_idx]  <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      acc[free_idx] <= in_acc;
      su[free_idx]  <= in_su;
    end
  end

  // An answer must match an outstanding read.
  a_rsp_known: assert property (@(posedge clk) disable iff (!rst_n) mem_rsp_valid |-> valid[mem_rsp_tag]);

endmodule
