// rowsum_nca: the example near-core accelerator (NCA): per-row sums of a block
// of CSR sparse-matrix rows.
//
// A task covers rows r_start..r_end-1. Its row pointers row_ptrs[r_start..r_end]
// (8-byte elements, stream S1) sit at scratchpad byte 0 and the non-zero values
// of those rows (4-byte elements, stream S2) sit, packed, from byte VAL_BASE.
// The NCA sums the values of each row into a per-row buffer and returns the
// sums as sixteen 32-bit lanes of one 512-bit vector register (lane r = row
// r_start+r, unused lanes zero). The row count comes from the task's control
// data: (c1 - c0) / 8, where c0 and c1 are the addresses of row_ptrs[r_start]
// and row_ptrs[r_end].
//
// The NCA has two input buffers, one per PAcc port, for double buffering: while
// it works on one, the UTE fills the other. When both ports request, it
// alternates between them. It reads one 8-byte word per cycle and adds one
// value per cycle. Abort (task squashed) returns it to idle; it keeps no state
// between tasks.
// The task (Fig. 9-style row sums, 16 rows per 512-bit output) follows the
// design; integer values, the buffer layout and the one-value-per-cycle rate are
// this implementation's choices.
module rowsum_nca
  import atx_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 32768,
  parameter int unsigned VAL_BASE  = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [1:0]                    run_req,
  input  consts_t [1:0]                 run_c,
  output logic [1:0]                    run_ack,
  input  logic [1:0]                    kill,
  output logic [1:0]                    done,
  output logic [VREG_W-1:0]             out_data,
  output logic                          rd_sel,
  output logic [$clog2(BUF_BYTES)-1:0]  rd_addr,
  input  logic [1:0][63:0]              rd_data
);

  localparam int unsigned AW    = $clog2(BUF_BYTES);
  localparam int unsigned LANES = VREG_W / 32;

  typedef enum logic [2:0] {N_IDLE, N_P0, N_PTR, N_ACC, N_DONE} st_e;
  st_e st;

  logic        cur, last;
  logic [4:0]  rows, r;
  logic [63:0] ptr0, e, e_end;
  logic [31:0] sum;
  logic [LANES-1:0][31:0] acc;
  logic [63:0] word;
  logic        pick;
  logic [63:0] nrows;

  assign word   = rd_data[cur];
  assign rd_sel = cur;

  always_comb begin
    // alternate when both ports have a full buffer
    pick  = (run_req == 2'b11) ? !last : run_req[1];
    nrows = (run_c[pick][1] - run_c[pick][0]) >> 3;
    unique case (st)
      N_PTR:   rd_addr = AW'(32'(r) * 8 + 8);
      N_ACC:   rd_addr = AW'(VAL_BASE + 32'((e - ptr0) << 2));
      default: rd_addr = '0;
    endcase
  end

  assign out_data = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= N_IDLE;
      cur     <= 1'b0;
      last    <= 1'b1;
      rows    <= '0;
      r       <= '0;
      ptr0    <= '0;
      e       <= '0;
      e_end   <= '0;
      sum     <= '0;
      acc     <= '0;
      run_ack <= '0;
      done    <= '0;
    end else begin
      run_ack <= '0;
      done    <= '0;
      if (st != N_IDLE && kill[cur]) st <= N_IDLE;
      else begin
        unique case (st)
          N_IDLE: if (run_req != 2'b00) begin
            cur          <= pick;
            last         <= pick;
            run_ack[pick] <= 1'b1;
            rows         <= (nrows > 64'(LANES)) ? 5'(LANES) : 5'(nrows);
            r            <= '0;
            acc          <= '0;
            st           <= N_P0;
          end
          N_P0: begin
            // first row pointer: origin of the packed values
            ptr0 <= word;
            e    <= word;
            st   <= N_PTR;
          end
          N_PTR: begin
            // rd_addr = pointer r+1, the end of row r
            if (r == rows) st <= N_DONE;
            else begin
              e_end <= word;
              sum   <= '0;
              st    <= N_ACC;
            end
          end
          N_ACC: begin
            if (e < e_end) begin
              sum <= sum + word[31:0];
              e   <= e + 1'b1;
            end else begin
              acc[r] <= sum;
              r      <= r + 1'b1;
              st     <= N_PTR;
            end
          end
          N_DONE: begin
            done[cur] <= 1'b1;
            st        <= N_IDLE;
          end
          default: st <= N_IDLE;
        endcase
      end
    end
  end

endmodule
