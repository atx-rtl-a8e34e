// input_buffer: one NCA Input Buffer (scratchpad), attached to one PAcc port.
//
// A byte-addressed memory of BYTES bytes. The write side takes one Common Bus
// beat per cycle: the cnt elements of esize bytes that sit mstep bytes apart in
// the memory line, starting at byte off, are written nstep bytes apart starting
// at scratchpad byte nca. The read side is the NCA's: eight little-endian bytes
// at rd_addr, returned combinationally.
// Capacity (32 KB, two per NCA for double buffering) follows the design; the
// port shapes and the combinational read are this implementation's choices.
// Squashing a task does not clear the array: the port's Task Status is reset, so
// the NCA never starts on a partly filled buffer.
module input_buffer
  import atx_pkg::*;
#(
  parameter int unsigned BYTES      = 32768,
  parameter int unsigned LINE_BYTES = 128
) (
  input  logic                      clk,
  input  logic                      wr_valid,
  input  access_t                   wr_acc,
  input  logic [LINE_BYTES*8-1:0]   wr_data,
  input  logic [$clog2(BYTES)-1:0]  rd_addr,
  output logic [63:0]               rd_data
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  logic [2:0] sh;
  always_comb begin
    unique case (wr_acc.esize)
      4'd1:    sh = 3'd0;
      4'd2:    sh = 3'd1;
      4'd4:    sh = 3'd2;
      default: sh = 3'd3;
    endcase
  end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      for (int unsigned b = 0; b < LINE_BYTES; b++) begin
        int unsigned e, bb;
        e  = b >> sh;
        bb = b & ((32'd1 << sh) - 1);
        if (e < 32'(wr_acc.cnt))
          mem[AW'(32'(wr_acc.nca) + e * 32'(wr_acc.nstep) + bb)] <=
            wr_data[8 * ((32'(wr_acc.off) + e * 32'(wr_acc.mstep) + bb) % LINE_BYTES) +: 8];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) rd_data[8*i +: 8] = mem[AW'(32'(rd_addr) + i)];
  end

endmodule
