// stream_unit: one UTE Stream Unit (SU), which walks one memory stream of a task.
//
// A stream is a sequence of repetitions; each repetition loads elements of esize
// bytes from address beg up to (not including) end, advancing by esize*stride.
// A root stream has a single repetition whose bounds come from the task's
// runtime constants. A child stream starts one repetition per element its parent
// delivers: the parent's data arrives over the Common Bus into the Parent Data
// Queue (PDQ), and the Bounds ALU turns parent[i], parent[i+1], the repetition
// index i and the constants into that repetition's bounds (the bound
// expressions). The stream ends after a repetition once it has no parent, or
// once the parent is done and the PDQ holds too few entries for another one.
//
// Three parts, as in the design: the Repetition Initializer (PDQ + Bounds ALU),
// the Mem Address Generator and the NCA (scratchpad) Address Generator, which
// both add a fixed step per element. Each element's (memory, scratchpad) address
// pair enters the Access Queue, which merges consecutive elements that fall into
// the same memory line into one access. The Stream Scheduler pops the queue head.
//
// Parent lines return in any order, so each access carries the stream index of
// its first element and the PDQ is written by position, with a valid bit per
// entry; a repetition starts once the entries it needs at the head are valid.
//
// Choices of this implementation: one element is generated per cycle; a child
// stream consumes one PDQ entry per repetition and needs two entries when a bound
// uses parent[i+1]; scratchpad addresses continue across repetitions; a parent
// may only issue an access when every child's PDQ has room for its elements
// (child_free, supplied by the UTE, counts room left after accesses in flight).
// In prefetch mode a leaf stream issues line prefetches that return no data.
//
// Timing: start/flush/release are single-cycle pulses; req is valid while the
// queue head may issue and is removed in the cycle req_grant is high; done is
// held from the cycle all data of the stream has returned until release/flush.
module stream_unit
  import atx_pkg::*;
#(
  parameter int unsigned LINE_BYTES = 128,   // Common Bus data width = access granule
  parameter int unsigned PDQ_BYTES  = 1024,  // Parent Data Queue size
  parameter int unsigned AQ_DEPTH   = 4      // Access Queue entries
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // allocation at task dispatch
  input  logic                 start,
  input  stream_cfg_t          start_cfg,
  input  consts_t              start_c,
  input  logic                 start_pf,     // task dispatched in prefetch mode
  input  logic                 start_leaf,   // stream has no children
  input  logic [AGE_W-1:0]     start_age,
  input  logic                 flush,        // task squashed
  input  logic                 release_su,   // task completed
  // parent data from the Common Bus
  input  logic                 pin_valid,
  input  access_t              pin_acc,
  input  logic [LINE_BYTES*8-1:0] pin_data,
  input  logic                 parent_done,
  input  logic [$clog2(PDQ_BYTES/8):0] child_free,
  // accesses towards the Stream Scheduler
  output logic                 req_valid,
  output access_t              req,
  output logic [AGE_W-1:0]     age,
  input  logic                 req_grant,
  // own data returned from memory
  input  logic                 ret_valid,
  input  logic [CNT_W-1:0]     ret_cnt,
  // status
  output logic [$clog2(PDQ_BYTES/8):0] pdq_free,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned PDQ_N = PDQ_BYTES / 8;
  localparam int unsigned PW    = $clog2(PDQ_N);
  localparam int unsigned LW    = $clog2(LINE_BYTES);
  localparam int unsigned QW    = $clog2(AQ_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_WAITP, S_INIT, S_GEN, S_FIN, S_DONE} state_e;
  state_e state;

  stream_cfg_t cfg;
  consts_t     c;
  logic        pf, leaf;
  logic [WORD_W-1:0]    rep;
  logic [ADDR_W-1:0]    addr, fin;
  logic [NCAADDR_W-1:0] nca;
  logic [15:0]          outstanding;
  logic [15:0]          inflight;

  // ---------------- Parent Data Queue ----------------
  logic [WORD_W-1:0] pdq [PDQ_N];
  logic [PW-1:0]     pdq_rd;
  logic [PDQ_N-1:0]  pdq_vld;
  logic [15:0]       eidx;      // index of the next element this stream generates
  logic [PW:0]       pdq_cnt;
  logic              pdq_pop;

  assign pdq_free = (PW+1)'(PDQ_N) - pdq_cnt;

  function automatic logic [WORD_W-1:0] extract(logic [LINE_BYTES*8-1:0] d, int unsigned byte_idx,
                                                logic [3:0] es);
    logic [WORD_W-1:0] w;
    w = WORD_W'(d >> (byte_idx * 8));
    unique case (es)
      4'd1:    return {56'd0, w[7:0]};
      4'd2:    return {48'd0, w[15:0]};
      4'd4:    return {32'd0, w[31:0]};
      default: return w;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (pin_valid && !pin_acc.pf) begin
      for (int unsigned e = 0; e < LINE_BYTES; e++) begin
        if (e < 32'(pin_acc.cnt))
          pdq[PW'(32'(pin_acc.seq) + e)] <= extract(pin_data, 32'(pin_acc.off) + e * 32'(pin_acc.mstep),
                                               pin_acc.esize);
      end
    end
  end

  // ---------------- Repetition Initializer ----------------
  logic uses_p1;
  logic       head_ok;
  logic [WORD_W-1:0] b_beg, b_end;

  always_comb begin
    uses_p1 = (cfg.beg.i1 == SPEC_P1) || (cfg.beg.i2 == SPEC_P1) || (cfg.beg.i3 == SPEC_P1) ||
              (cfg.fin.i1 == SPEC_P1) || (cfg.fin.i2 == SPEC_P1) || (cfg.fin.i3 == SPEC_P1);
    head_ok = pdq_vld[pdq_rd] && (!uses_p1 || pdq_vld[PW'(pdq_rd + 1'b1)]);
  end

  bounds_alu u_beg (.bexp(cfg.beg), .c(c), .p0(pdq[pdq_rd]), .p1(pdq[PW'(pdq_rd + 1'b1)]),
                    .rep(rep), .esize(cfg.esize), .result(b_beg));
  bounds_alu u_end (.bexp(cfg.fin), .c(c), .p0(pdq[pdq_rd]), .p1(pdq[PW'(pdq_rd + 1'b1)]),
                    .rep(rep), .esize(cfg.esize), .result(b_end));

  // ---------------- Access Queue ----------------
  access_t       aq [AQ_DEPTH];
  logic [QW-1:0] aq_head, aq_tail_n;   // aq_tail_n = next free slot
  logic [QW:0]   aq_cnt;
  logic [QW-1:0] aq_last;
  logic [7:0]    mstep;
  logic [NCAADDR_W-1:0] nstep;
  logic          coalesce_ok, gen_fire, push_new, do_coalesce, last_elem;
  logic [ADDR_W-1:0] line_of, next_addr;
  logic [7:0]    off_of;
  access_t       tail;

  assign aq_last  = aq_tail_n - 1'b1;
  assign tail     = aq[aq_last];
  assign line_of  = {addr[ADDR_W-1:LW], {LW{1'b0}}};
  assign off_of   = 8'(addr[LW-1:0]);
  assign next_addr = addr + ADDR_W'(cfg.esize) * ADDR_W'(cfg.stride);
  assign last_elem = next_addr >= fin;

  always_comb begin
    mstep = 8'(cfg.esize * cfg.stride);
    nstep = NCAADDR_W'(cfg.esize) * NCAADDR_W'(cfg.nca_stride);
    // merge into the tail entry when it is not being issued this cycle
    coalesce_ok = (aq_cnt > (QW+1)'(1) || (aq_cnt == (QW+1)'(1) && !req_grant)) &&
                  (32'(cfg.esize) * 32'(cfg.stride) < LINE_BYTES) &&
                  tail.line == line_of &&
                  32'(tail.off) + 32'(tail.cnt) * 32'(tail.mstep) == 32'(off_of) &&
                  tail.nca + NCAADDR_W'(tail.cnt) * tail.nstep == nca &&
                  32'(tail.cnt) < LINE_BYTES;
    gen_fire    = (state == S_GEN) && (coalesce_ok || aq_cnt < (QW+1)'(AQ_DEPTH));
    do_coalesce = gen_fire && coalesce_ok;
    push_new    = gen_fire && !coalesce_ok;
  end

  // ---------------- issue ----------------
  logic [AGE_W-1:0] age_q;
  assign req      = aq[aq_head];
  assign age      = age_q;
  assign req_valid = (aq_cnt != '0) &&
                     (req.pf || leaf || (32'(inflight) + 32'(req.cnt) <= 32'(child_free)));

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  assign pdq_pop = (state == S_GEN) && gen_fire && last_elem && cfg.has_parent ||
                   (state == S_INIT) && (b_beg >= b_end) && cfg.has_parent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cfg         <= '0;
      c           <= '0;
      pf          <= 1'b0;
      leaf        <= 1'b0;
      rep         <= '0;
      addr        <= '0;
      fin         <= '0;
      nca         <= '0;
      outstanding <= '0;
      inflight    <= '0;
      pdq_rd      <= '0;
      pdq_vld     <= '0;
      eidx        <= '0;
      pdq_cnt     <= '0;
      aq_head     <= '0;
      aq_tail_n   <= '0;
      aq_cnt      <= '0;
      age_q       <= '0;
      for (int i = 0; i < AQ_DEPTH; i++) aq[i] <= '0;
    end else if (flush || release_su) begin
      state       <= S_IDLE;
      outstanding <= '0;
      inflight    <= '0;
      pdq_rd      <= '0;
      pdq_vld     <= '0;
      eidx        <= '0;
      pdq_cnt     <= '0;
      aq_head     <= '0;
      aq_tail_n   <= '0;
      aq_cnt      <= '0;
    end else begin
      // PDQ pointers
      if (pin_valid && !pin_acc.pf)
        for (int unsigned e = 0; e < LINE_BYTES; e++)
          if (e < 32'(pin_acc.cnt)) pdq_vld[PW'(32'(pin_acc.seq) + e)] <= 1'b1;
      if (pdq_pop) begin
        pdq_rd          <= pdq_rd + 1'b1;
        pdq_vld[pdq_rd] <= 1'b0;
      end
      pdq_cnt <= pdq_cnt + ((pin_valid && !pin_acc.pf) ? (PW+1)'(pin_acc.cnt) : '0) - (PW+1)'(pdq_pop);

      // access queue
      if (req_grant && req_valid) aq_head <= aq_head + 1'b1;
      if (push_new) begin
        aq[aq_tail_n] <= '{line: line_of, off: off_of, cnt: CNT_W'(1), mstep: mstep, nca: nca,
                           nstep: nstep, esize: cfg.esize, seq: eidx, pf: pf && leaf};
        aq_tail_n <= aq_tail_n + 1'b1;
      end
      if (do_coalesce) aq[aq_last].cnt <= tail.cnt + 1'b1;
      aq_cnt <= aq_cnt + (QW+1)'(push_new) - (QW+1)'(req_grant && req_valid);

      // outstanding data
      outstanding <= outstanding + 16'(req_grant && req_valid && !req.pf) - 16'(ret_valid);
      inflight    <= inflight + ((req_grant && req_valid && !req.pf) ? 16'(req.cnt) : 16'd0)
                              - (ret_valid ? 16'(ret_cnt) : 16'd0);

      unique case (state)
        S_IDLE: if (start) begin
          cfg   <= start_cfg;
          c     <= start_c;
          pf    <= start_pf;
          leaf  <= start_leaf;
          age_q <= start_age;
          rep   <= '0;
          eidx  <= '0;
          nca   <= start_cfg.nca_base;
          state <= start_cfg.has_parent ? S_WAITP : S_INIT;
        end
        S_WAITP: begin
          if (head_ok) state <= S_INIT;
          else if (parent_done) state <= S_FIN;
        end
        S_INIT: begin
          addr <= b_beg[ADDR_W-1:0];
          fin  <= b_end[ADDR_W-1:0];
          if (b_beg < b_end) state <= S_GEN;
          else begin
            rep   <= rep + 1'b1;
            state <= cfg.has_parent ? S_WAITP : S_FIN;
          end
        end
        S_GEN: if (gen_fire) begin
          addr <= next_addr;
          eidx <= eidx + 1'b1;
          nca  <= nca + nstep;
          if (last_elem) begin
            rep   <= rep + 1'b1;
            state <= cfg.has_parent ? S_WAITP : S_FIN;
          end
        end
        S_FIN: if (aq_cnt == '0 && outstanding == '0 && !push_new) state <= S_DONE;
        default: ;
      endcase
    end
  end

endmodule
