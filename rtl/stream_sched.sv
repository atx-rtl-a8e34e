// stream_sched: Stream Scheduler of the UTE backend.
//
// Each cycle it picks one Stream Unit, among those with an access ready, to send
// one access to memory. The policy follows the design: the oldest stream issues
// first (age is the sequence number of the task the stream belongs to, so all
// streams of the oldest task are preferred), and ties between equally old streams
// are broken round-robin. Ages are compared modulo 2^AGE_W, which is safe while
// fewer than 2^(AGE_W-1) tasks are in flight.
// Combinational grant; the round-robin pointer moves past the winner on a
// cycle where the grant is accepted (out_ready high).
module stream_sched
  import atx_pkg::*;
#(
  parameter int unsigned N_SU = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_SU-1:0]           req,
  input  logic [N_SU-1:0][AGE_W-1:0] age,
  input  logic                      out_ready,
  output logic                      grant_valid,
  output logic [$clog2(N_SU)-1:0]   grant_idx,
  output logic [N_SU-1:0]           grant
);

  localparam int unsigned IW = $clog2(N_SU);

  logic [IW-1:0]    rr;
  logic [AGE_W-1:0] oldest;
  logic             any;

  // a is older than b
  function automatic logic older(logic [AGE_W-1:0] a, logic [AGE_W-1:0] b);
    logic [AGE_W-1:0] d;
    d = a - b;
    return d[AGE_W-1];
  endfunction

  always_comb begin
    any    = 1'b0;
    oldest = '0;
    for (int i = 0; i < N_SU; i++) begin
      if (req[i] && (!any || older(age[i], oldest))) begin
        oldest = age[i];
        any    = 1'b1;
      end
    end
    grant_valid = 1'b0;
    grant_idx   = '0;
    for (int k = 0; k < N_SU; k++) begin
      logic [IW-1:0] j;
      j = IW'(32'(rr) + k);
      if (!grant_valid && req[j] && age[j] == oldest) begin
        grant_valid = 1'b1;
        grant_idx   = j;
      end
    end
    grant = '0;
    if (grant_valid && out_ready) grant[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (grant_valid && out_ready) rr <= grant_idx + 1'b1;
  end

endmodule
