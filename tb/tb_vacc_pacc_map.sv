// tb_vacc_pacc_map: test of the VAcc-to-PAcc Mapping and the NCA type table.
//
// Four ports with NCA types 1,1,2,3. Checks the type query for present and
// absent types, mapping task types (VAcc ids) to NCA types and looking up the
// capable-port mask, remapping, removal, a miss for an unmapped VAcc, and the
// error raised when a new VAcc is mapped into a full table.
module tb_vacc_pacc_map;
  import atx_pkg::*;
  localparam int NP = 4, NE = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_valid = 0, cfg_err, lk_hit;
  cfg_req_t cfg;
  logic [WORD_W-1:0] cfg_rdata;
  logic [VACC_W-1:0] lk_vacc = '0;
  logic [NP-1:0] lk_mask;
  int checks = 0, failures = 0, n_err = 0;

  vacc_pacc_map #(.N_ENTRIES(NE), .N_PORTS(NP), .PORT_TYPES({8'd3, 8'd2, 8'd1, 8'd1})) dut (.*);

  always @(posedge clk) if (cfg_err) n_err++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(cfg_op_e op, int vacc, int data);
    cfg = '0; cfg.op = op; cfg.vacc = VACC_W'(vacc); cfg.data = WORD_W'(data);
    cfg_valid = 1; @(negedge clk); cfg_valid = 0;
  endtask

  task automatic look(int vacc, logic hit, logic [NP-1:0] mask);
    lk_vacc = VACC_W'(vacc); #1;
    checks++;
    if (lk_hit !== hit || (hit && lk_mask !== mask)) begin
      failures++;
      $display("vacc %0d: hit %b mask %b expected %b %b", vacc, lk_hit, lk_mask, hit, mask);
    end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      wr(CFG_CHECK_TYPE, 0, t);
      checks++;
      if (cfg_rdata !== WORD_W'(t >= 1 && t <= 3)) begin failures++; $display("type %0d: %0d", t, cfg_rdata); end
    end
    look(5, 0, '0);
    wr(CFG_MAP_TYPE, 5, 1);  look(5, 1, 4'b0011);
    wr(CFG_MAP_TYPE, 7, 3);  look(7, 1, 4'b1000);  look(5, 1, 4'b0011);
    wr(CFG_MAP_TYPE, 5, 2);  look(5, 1, 4'b0100);
    wr(CFG_MAP_TYPE, 9, 4);  look(9, 1, 4'b0000);   // mapped to an absent type: no port
    wr(CFG_REMOVE, 7, 0);    look(7, 0, '0);         look(5, 1, 4'b0100);
    wr(CFG_MAP_TYPE, 11, 1); wr(CFG_MAP_TYPE, 12, 1);
    checks++; if (n_err != 0) begin failures++; $display("early error"); end
    wr(CFG_MAP_TYPE, 13, 1); @(negedge clk);
    checks++; if (n_err != 1) begin failures++; $display("no error on a full table"); end
    look(13, 0, '0); look(12, 1, 4'b0011);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
