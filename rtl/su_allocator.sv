// su_allocator: Stream Unit Allocator with the Stream Unit Status register.
//
// Keeps one busy bit per Stream Unit (the Stream Unit Status) and the count of
// free units. For a task with n streams it names the n lowest-numbered free
// Stream Units, stream k going to su_idx[k]; they become busy on the cycle
// alloc is high, and free again on the cycle their bit in release is high
// (task completed or squashed). Combinational choice, lowest index first: the
// order is this implementation's own.
module su_allocator
  import atx_pkg::*;
#(
  parameter int unsigned N_SU = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [SID_W:0]                need,
  output logic                          gnt_valid,
  output logic [MAX_STREAMS-1:0][$clog2(N_SU)-1:0] su_idx,
  input  logic                          alloc,
  input  logic [N_SU-1:0]               release_sus,
  output logic [N_SU-1:0]               free_mask,
  output logic [$clog2(N_SU):0]         free_cnt
);

  logic [N_SU-1:0] busy;
  logic [N_SU-1:0] take;

  assign free_mask = ~busy;

  always_comb begin
    int k;
    k        = 0;
    su_idx   = '0;
    take     = '0;
    free_cnt = '0;
    for (int i = 0; i < N_SU; i++) begin
      if (!busy[i]) begin
        free_cnt += 1'b1;
        if (k < 32'(need) && k < MAX_STREAMS) begin
          su_idx[k[SID_W-1:0]] = ($clog2(N_SU))'(i);
          take[i] = 1'b1;
          k++;
        end
      end
    end
    gnt_valid = (k == 32'(need)) && (need != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else busy <= (busy & ~release_sus) | ((alloc && gnt_valid) ? take : '0);
  end

endmodule
