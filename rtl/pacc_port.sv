// pacc_port: one PAcc port of the UTE backend, with its Task Status.
//
// A port serves one task at a time on one NCA input buffer. When the frontend
// dispatches a task to it (alloc), it records the task's tag, constants and the
// Stream Units serving it. While loading, it forwards every Common Bus beat that
// belongs to one of those Stream Units to its input buffer and counts the bytes.
// The Task Status is the set of streams whose data has fully arrived; when it is
// complete the port asks its NCA to run (run_req). When the NCA finishes, the
// port offers tag and result to the OutQ; once accepted, the task is complete:
// the port frees itself and its Stream Units (release pulses) and reports the
// task's input size to the task predictor.
// A squash naming the port's tag stops the task at any stage: the port kills the
// NCA if it runs, flushes its Stream Units (so memory answers in flight are
// dropped) and frees itself.
// Timing: alloc, squash, run_ack and nca_done are one-cycle inputs; run_req and
// out_valid are levels; release/flush/size outputs are one-cycle pulses.
// The states and handshakes are this implementation's choices.
module pacc_port
  import atx_pkg::*;
#(
  parameter int unsigned N_SU = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               alloc,
  input  logic [TAG_W-1:0]   alloc_tag,
  input  consts_t            alloc_c,
  input  logic [N_SU-1:0]    alloc_sus,
  input  logic               squash_valid,
  input  logic [TAG_W-1:0]   squash_tag,
  // Common Bus
  input  logic               cb_valid,
  input  logic [$clog2(N_SU)-1:0] cb_su,
  input  access_t            cb_acc,
  output logic               buf_wr,
  // Stream Unit status
  input  logic [N_SU-1:0]    su_done,
  // NCA
  output logic               run_req,
  output consts_t            run_c,
  input  logic               run_ack,
  output logic               kill,
  input  logic               nca_done,
  input  logic [VREG_W-1:0]  nca_out,
  // OutQ
  output logic               out_valid,
  output logic [TAG_W-1:0]   out_tag,
  output logic [VREG_W-1:0]  out_data,
  input  logic               out_ready,
  // frees
  output logic               release_port,
  output logic [N_SU-1:0]    release_sus,
  output logic [N_SU-1:0]    flush_sus,
  output logic               sz_valid,
  output logic [31:0]        sz_bytes,
  output logic               busy,
  output logic [N_SU-1:0]    task_status
);

  typedef enum logic [2:0] {P_FREE, P_LOAD, P_READY, P_RUN, P_OUT} st_e;
  st_e st;

  logic [TAG_W-1:0] tag;
  logic [N_SU-1:0]  sus;
  logic [31:0]      bytes;
  logic             hit_squash;
  consts_t          run_c_q;

  assign busy        = (st != P_FREE);
  assign run_c       = run_c_q;
  assign buf_wr      = cb_valid && (st == P_LOAD) && sus[cb_su] && !cb_acc.pf;
  assign run_req     = (st == P_READY);
  assign out_valid   = (st == P_OUT);
  assign out_tag     = tag;
  assign hit_squash  = squash_valid && busy && squash_tag == tag;
  assign task_status = su_done & sus;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= P_FREE;
      tag          <= '0;
      sus          <= '0;
      bytes        <= '0;
      run_c_q      <= '0;
      out_data     <= '0;
      kill         <= 1'b0;
      release_port <= 1'b0;
      release_sus  <= '0;
      flush_sus    <= '0;
      sz_valid     <= 1'b0;
      sz_bytes     <= '0;
    end else begin
      kill         <= 1'b0;
      release_port <= 1'b0;
      release_sus  <= '0;
      flush_sus    <= '0;
      sz_valid     <= 1'b0;
      if (buf_wr) bytes <= bytes + 32'(cb_acc.cnt) * 32'(cb_acc.esize);
      if (hit_squash) begin
        kill         <= (st == P_RUN);
        flush_sus    <= sus;
        release_sus  <= sus;
        release_port <= 1'b1;
        sus          <= '0;
        st           <= P_FREE;
      end else begin
        unique case (st)
          P_FREE: if (alloc) begin
            tag     <= alloc_tag;
            sus     <= alloc_sus;
            run_c_q <= alloc_c;
            bytes   <= '0;
            st      <= P_LOAD;
          end
          P_LOAD:  if ((su_done & sus) == sus) st <= P_READY;
          P_READY: if (run_ack) st <= P_RUN;
          P_RUN: if (nca_done) begin
            out_data <= nca_out;
            st       <= P_OUT;
          end
          P_OUT: if (out_ready) begin
            release_port <= 1'b1;
            release_sus  <= sus;
            sz_valid     <= 1'b1;
            sz_bytes     <= bytes;
            sus          <= '0;
            st           <= P_FREE;
          end
          default: st <= P_FREE;
        endcase
      end
    end
  end

endmodule
