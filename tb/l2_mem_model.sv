// l2_mem_model: behavioural stand-in for the core's L2 cache as seen by the UTE
// (simulation only). Byte-addressed sparse memory that the testbench fills with
// poke tasks. Read requests are accepted when ready (randomly withheld 1 cycle
// in 8 when STALLS=1), answered after MIN_LAT..MAX_LAT cycles, in any order, one
// answer per cycle with the whole LINE_BYTES line. Prefetch requests are
// accepted and counted, and get no answer.
module l2_mem_model #(
  parameter int unsigned LINE_BYTES = 128,
  parameter int unsigned TAG_BITS   = 7,
  parameter int unsigned MIN_LAT    = 4,
  parameter int unsigned MAX_LAT    = 30,
  parameter bit          STALLS     = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  input  logic [47:0]             req_addr,
  input  logic [TAG_BITS-1:0]     req_tag,
  input  logic                    req_pf,
  output logic                    req_ready,
  output logic                    rsp_valid,
  output logic [TAG_BITS-1:0]     rsp_tag,
  output logic [LINE_BYTES*8-1:0] rsp_data
);

  logic [7:0] mem [longint unsigned];

  typedef struct {
    logic [TAG_BITS-1:0] tag;
    logic [47:0]         addr;
    longint unsigned     due;
  } pend_t;

  pend_t           pend [$];
  longint unsigned now;
  int unsigned     n_reads, n_prefetches, n_stall_cycles;

  task automatic poke8(longint unsigned a, logic [7:0] v);
    mem[a] = v;
  endtask
  task automatic poke32(longint unsigned a, logic [31:0] v);
    for (int i = 0; i < 4; i++) mem[a + i] = v[8*i +: 8];
  endtask
  task automatic poke64(longint unsigned a, logic [63:0] v);
    for (int i = 0; i < 8; i++) mem[a + i] = v[8*i +: 8];
  endtask

  function automatic logic [LINE_BYTES*8-1:0] line_of(logic [47:0] a);
    logic [LINE_BYTES*8-1:0] d;
    for (int i = 0; i < LINE_BYTES; i++) begin
      longint unsigned ad;
      ad = longint'(a) + i;
      d[8*i +: 8] = mem.exists(ad) ? mem[ad] : 8'h00;
    end
    return d;
  endfunction

  initial begin
    now = 0;
    n_reads = 0;
    n_prefetches = 0;
    n_stall_cycles = 0;
    req_ready = 1'b1;
    rsp_valid = 1'b0;
    rsp_tag   = '0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    now++;
    rsp_valid <= 1'b0;
    if (rst_n) begin
      if (req_valid && req_ready) begin
        if (req_pf) n_prefetches++;
        else begin
          pend_t p;
          p.tag  = req_tag;
          p.addr = req_addr;
          p.due  = now + MIN_LAT + ($urandom % (MAX_LAT - MIN_LAT + 1));
          pend.push_back(p);
          n_reads++;
        end
      end
      begin
        int pick;
        pick = -1;
        for (int i = 0; i < pend.size(); i++) begin
          if (pend[i].due <= now && (pick < 0 || ($urandom % 2) == 0)) pick = i;
        end
        if (pick >= 0) begin
          rsp_valid <= 1'b1;
          rsp_tag   <= pend[pick].tag;
          rsp_data  <= line_of(pend[pick].addr);
          pend.delete(pick);
        end
      end
      req_ready <= STALLS ? (($urandom % 8) != 0) : 1'b1;
      if (!req_ready) n_stall_cycles++;
    end
  end

endmodule
