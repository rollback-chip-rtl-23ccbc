// End-to-end test of the rollback-chip node at reduced sizes: 2 processes,
// 64 lines, 16 frames in 4 working areas of 4, 16-entry rollback history,
// 8-entry cache, 64 physical pages of 8 lines, so that every mechanism
// (stack full, history full, page exhaustion, archive copies, ...) happens
// within a short random run.  Stimulus and checks: rbc_node_tb_core.
module tb_rbc_node;
  localparam int unsigned PID_BITS = 1, LINE_BITS = 6, WOFF_BITS = 2, WORD_W = 32;
  localparam int unsigned FRAME_BITS = 4, WAF_BITS = 2, FX_BITS = 6, TAG_BITS = 4;
  localparam int unsigned PAGE_BITS = 3, PPN_BITS = 6, CACHE_ENTRIES = 8, RBH_BUF = 4;
  localparam int unsigned LINE_W = WORD_W * 4;
  localparam int unsigned PA_BITS = 1 + ((PID_BITS + LINE_BITS > PPN_BITS + PAGE_BITS) ?
                                         PID_BITS + LINE_BITS : PPN_BITS + PAGE_BITS);

  logic clk, rst_n;
  logic vcm_valid, vcm_we, vcm_done, vcm_err;
  logic [LINE_BITS+WOFF_BITS-1:0] vcm_addr;
  logic [WORD_W-1:0] vcm_wdata, vcm_rdata;
  logic cmd_valid, cmd_done, cmd_err;
  rbc_pkg::rbc_cmd_e cmd_op;
  logic [FRAME_BITS-1:0] cmd_arg;
  logic cpu_req, cpu_we, cpu_ack;
  logic [PA_BITS+WOFF_BITS-1:0] cpu_addr;
  logic [WORD_W-1:0] cpu_wdata, cpu_rdata;
  logic mem_req, mem_we, mem_ack;
  logic [PA_BITS:0] mem_addr;
  logic [LINE_W-1:0] mem_wdata, mem_rdata;
  logic [3:0] mem_wstrb;
  logic ready, advance_busy, rbh_walking;
  logic [PID_BITS-1:0] cur_pid;
  logic [FRAME_BITS-1:0] cur_cmf, cur_omf;
  logic [TAG_BITS-1:0] cur_crbi;
  rbc_pkg::rbc_events_t events;
  logic [PPN_BITS:0] pages_used;
  logic [$clog2(CACHE_ENTRIES+1)-1:0] last_invalidated;
  logic [$clog2(RBH_BUF+1)-1:0] last_rbh_updates;

  rbc_node #(
    .PID_BITS(PID_BITS), .LINE_BITS(LINE_BITS), .WOFF_BITS(WOFF_BITS), .WORD_W(WORD_W),
    .FRAME_BITS(FRAME_BITS), .WAF_BITS(WAF_BITS), .FX_BITS(FX_BITS), .TAG_BITS(TAG_BITS),
    .PAGE_BITS(PAGE_BITS), .PPN_BITS(PPN_BITS), .CACHE_ENTRIES(CACHE_ENTRIES),
    .CACHE_WAYS(2), .RBH_BUF(RBH_BUF)
  ) dut (.*);

  rbc_node_tb_core #(
    .PID_BITS(PID_BITS), .LINE_BITS(LINE_BITS), .WOFF_BITS(WOFF_BITS), .WORD_W(WORD_W),
    .FRAME_BITS(FRAME_BITS), .WAF_BITS(WAF_BITS), .TAG_BITS(TAG_BITS),
    .PAGE_BITS(PAGE_BITS), .PPN_BITS(PPN_BITS), .CACHE_ENTRIES(CACHE_ENTRIES),
    .RBH_BUF(RBH_BUF), .NOPS(20000), .LINES_USED(64), .PIDS_USED(2), .ADV_SLACK(6),
    .REQUIRE_ALL(1'b1), .WATCHDOG(64'd3_000_000)
  ) core (.*);
endmodule
