// pacc_allocator: PAcc Allocator with the PAcc Status register.
//
// Keeps one busy bit per PAcc port (the PAcc Status). For the task offered by
// the InTaskQ it picks, among the ports whose NCA can run the task (mask from
// the VAcc-to-PAcc Mapping), the lowest-numbered free one. The choice is
// combinational; the port becomes busy on the cycle alloc is high, and free
// again on the cycle its bit in release is high (task completed or squashed).
// The lowest-index-first choice is this implementation's own.
module pacc_allocator #(
  parameter int unsigned N_PORTS = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_PORTS-1:0]         req_mask,
  output logic                       gnt_valid,
  output logic [$clog2(N_PORTS)-1:0] gnt_idx,
  input  logic                       alloc,
  input  logic [N_PORTS-1:0]         release_ports,
  output logic [N_PORTS-1:0]         free_ports
);

  logic [N_PORTS-1:0] busy;

  assign free_ports = ~busy;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int p = N_PORTS - 1; p >= 0; p--) begin
      if (req_mask[p] && !busy[p]) begin
        gnt_valid = 1'b1;
        gnt_idx   = ($clog2(N_PORTS))'(p);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else begin
      busy <= busy & ~release_ports;
      if (alloc && gnt_valid) busy[gnt_idx] <= 1'b1;
    end
  end

endmodule
