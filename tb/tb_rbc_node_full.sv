// Full-size run of the rollback-chip node: every parameter of the node at
// its default (64 processes, 4096 lines of 4 words, 256 frames in 16
// working areas, 8-bit rollback history tags, 256-entry two-way cache,
// 4096 pages of 64 lines).  After the reset walk over the written-bit
// memory and page table, two processes run a random Time Warp-like stream
// over 256 lines, checked against the reference model of
// rbc_node_tb_core.  The limits (full stack, full history, no free page)
// are not reached at this size; the reduced-size test covers them.
module tb_rbc_node_full;
  localparam int unsigned PID_BITS = 6, LINE_BITS = 12, WOFF_BITS = 2, WORD_W = 32;
  localparam int unsigned FRAME_BITS = 8, TAG_BITS = 8, PAGE_BITS = 6, PPN_BITS = 12;
  localparam int unsigned CACHE_ENTRIES = 256, RBH_BUF = 16;
  localparam int unsigned LINE_W = WORD_W * 4;
  localparam int unsigned PA_BITS = 1 + PID_BITS + LINE_BITS;

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

  rbc_node dut (.*);

  rbc_node_tb_core #(
    .NOPS(20000), .LINES_USED(256), .PIDS_USED(2), .ADV_SLACK(20),
    .REQUIRE_ALL(1'b0), .WATCHDOG(64'd40_000_000)
  ) core (.*);
endmodule
