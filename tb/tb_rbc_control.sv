// Directed test of the rollback-chip control unit, run inside a small node
// (2 processes, 16 lines, 64 frames in 4 working areas of 16 frames,
// 8-entry cache) so that every sequence can be worked out by hand:
//   - READ hit answers in 2 cycles, MARK and ROLLBACK in 1;
//   - a miss on a line last written 3 working areas back reads exactly 3
//     blocks of written bits and returns the old version;
//   - a write that was rolled back is invisible afterwards: its cache entry
//     is invalidated and its written bit is dropped on read (lazy clear);
//   - MARK is refused when CMF would lap the oldest working area;
//   - ROLLBACK beyond OMF is refused;
//   - ADVANCE copies the newest version of a line in the collected area to
//     the archive frame, skips the copy when a newer version lies at or
//     below the new OMF, and reads then find the archive;
//   - another process's lines and cache entries are untouched by a rollback.
module tb_rbc_control;
  import rbc_pkg::*;
  localparam int unsigned PID_BITS = 1, LINE_BITS = 4, WOFF_BITS = 2, WORD_W = 32;
  localparam int unsigned FRAME_BITS = 6, WAF_BITS = 4, FX_BITS = 8, TAG_BITS = 5;
  localparam int unsigned PAGE_BITS = 2, PPN_BITS = 6, CACHE_ENTRIES = 8, RBH_BUF = 16;
  localparam int unsigned LINE_W = 128;
  localparam int unsigned PA_BITS = 1 + PPN_BITS + PAGE_BITS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic vcm_valid = 0, vcm_we = 0, vcm_done, vcm_err;
  logic [LINE_BITS+WOFF_BITS-1:0] vcm_addr = '0;
  logic [WORD_W-1:0] vcm_wdata = '0, vcm_rdata;
  logic cmd_valid = 0, cmd_done, cmd_err;
  rbc_cmd_e cmd_op = CMD_MARK;
  logic [FRAME_BITS-1:0] cmd_arg = '0;
  logic cpu_req = 0, cpu_we = 0, cpu_ack;
  logic [PA_BITS+WOFF_BITS-1:0] cpu_addr = '0;
  logic [WORD_W-1:0] cpu_wdata = '0, cpu_rdata;
  logic mem_req, mem_we, mem_ack;
  logic [PA_BITS:0] mem_addr;
  logic [LINE_W-1:0] mem_wdata, mem_rdata;
  logic [3:0] mem_wstrb;
  logic ready, advance_busy, rbh_walking;
  logic [PID_BITS-1:0] cur_pid;
  logic [FRAME_BITS-1:0] cur_cmf, cur_omf;
  logic [TAG_BITS-1:0] cur_crbi;
  rbc_events_t events;
  logic [PPN_BITS:0] pages_used;
  logic [$clog2(CACHE_ENTRIES+1)-1:0] last_invalidated;
  logic [$clog2(RBH_BUF+1)-1:0] last_rbh_updates;
  int checks = 0, failures = 0;
  int n_search = 0, n_lazy = 0, n_arch_rd = 0, n_arch_cp = 0, n_skip = 0, n_coll = 0, n_miss = 0;

  rbc_node #(
    .PID_BITS(PID_BITS), .LINE_BITS(LINE_BITS), .WOFF_BITS(WOFF_BITS), .WORD_W(WORD_W),
    .FRAME_BITS(FRAME_BITS), .WAF_BITS(WAF_BITS), .FX_BITS(FX_BITS), .TAG_BITS(TAG_BITS),
    .PAGE_BITS(PAGE_BITS), .PPN_BITS(PPN_BITS), .CACHE_ENTRIES(CACHE_ENTRIES),
    .CACHE_WAYS(2), .RBH_BUF(RBH_BUF)
  ) dut (.*);
  rbc_bulk_mem_model #(.AW(PA_BITS+1), .WORD_W(WORD_W), .NW(4), .LAT_MAX(2)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .wstrb(mem_wstrb),
    .ack(mem_ack), .rdata(mem_rdata));

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (events.search_step)  n_search++;
    if (events.lazy_clear)   n_lazy++;
    if (events.archive_read) n_arch_rd++;
    if (events.archive_copy) n_arch_cp++;
    if (events.copy_skipped) n_skip++;
    if (events.wa_collected) n_coll++;
    if (events.miss)         n_miss++;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic acc(input bit we, input int l, input logic [WORD_W-1:0] d,
                     output logic [WORD_W-1:0] q, output int cyc);
    @(negedge clk); vcm_we = we; vcm_addr = (LINE_BITS+WOFF_BITS)'(l << WOFF_BITS); vcm_wdata = d;
    vcm_valid = 1; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!vcm_done);
    vcm_valid = 0; q = vcm_rdata;
  endtask

  task automatic cmd(input rbc_cmd_e op, input int arg, output bit err, output int cyc);
    @(negedge clk); cmd_op = op; cmd_arg = FRAME_BITS'(arg); cmd_valid = 1; cyc = 0;
    do begin @(negedge clk); cyc++; end while (!cmd_done);
    cmd_valid = 0; err = cmd_err;
  endtask

  task automatic wr(input int l, input logic [WORD_W-1:0] d);
    logic [WORD_W-1:0] q; int c; acc(1, l, d, q, c);
    chk(!vcm_err, $sformatf("write line %0d accepted", l));
  endtask
  task automatic rd(input int l, input logic [WORD_W-1:0] exp, input string s);
    logic [WORD_W-1:0] q; int c; acc(0, l, 0, q, c);
    chk(q == exp, $sformatf("%s: line %0d read %h want %h", s, l, q, exp));
  endtask
  task automatic marks(input int n);
    bit e; int c;
    repeat (n) begin cmd(CMD_MARK, 0, e, c); chk(!e && c == 1, "MARK accepted in 1 cycle"); end
  endtask
  // lines l, l+4, l+8 share a cache set (4 sets of 2 ways): touch two others
  task automatic evict(input int l);
    logic [WORD_W-1:0] q; int c;
    acc(0, (l + 4) % 16, 0, q, c);
    acc(0, (l + 8) % 16, 0, q, c);
  endtask

  initial begin
    logic [WORD_W-1:0] q; int c, s0; bit e;
    @(negedge clk); rst_n = 1;
    wait (ready); @(negedge clk);

    // frame 0: line 3 = A; read hit latency
    wr(3, 32'hA);
    acc(0, 3, 0, q, c);
    chk(q == 32'hA && c == 2, $sformatf("read hit %h in %0d cycles", q, c));
    // 40 marks: CMF 40 is in working area 2
    marks(40);
    chk(cur_cmf == 40, "CMF after 40 MARKs");
    evict(3);
    s0 = n_search;
    rd(3, 32'hA, "MRV three working areas back");
    chk(n_search - s0 == 3, $sformatf("search read %0d blocks, want 3", n_search - s0));

    // frame 40 write B to line 5, frame 41 write C; rollback 1 -> B
    wr(5, 32'hB);
    marks(1);
    wr(5, 32'hC);
    rd(5, 32'hC, "newest write");
    cmd(CMD_ROLLBACK, 1, e, c);
    chk(!e && c == 1 && cur_cmf == 40, "ROLLBACK(1) in 1 cycle");
    chk(last_invalidated == 1, $sformatf("rollback invalidated %0d entries, want 1", last_invalidated));
    // frame 41 is entered again: the stale written bit of the old frame 41
    // is now below CMF and only the rollback history tells it apart
    marks(1);
    s0 = n_lazy;
    rd(5, 32'hB, "rolled-back write is gone");
    chk(n_lazy - s0 == 1, "rolled-back written bit dropped on read");

    // the other process is independent
    cmd(CMD_SETPID, 1, e, c);
    chk(cur_pid == 1 && cur_cmf == 0, "process 1 has its own CMF");
    rd(5, 32'h0, "process 1 never wrote line 5");
    wr(5, 32'hD);
    cmd(CMD_SETPID, 0, e, c);
    rd(5, 32'hB, "process 0 unaffected by process 1");
    cmd(CMD_SETPID, 1, e, c);
    marks(1);
    cmd(CMD_ROLLBACK, 1, e, c);
    chk(!e, "process 1 rollback");
    rd(5, 32'hD, "write in frame 0 of process 1 survives rollback to frame 0");
    cmd(CMD_SETPID, 0, e, c);
    rd(5, 32'hB, "process 0 entry not invalidated by process 1 rollback");

    // rollback beyond OMF is refused
    cmd(CMD_ROLLBACK, 42, e, c);
    chk(e && cur_cmf == 41, "ROLLBACK past OMF refused");

    // stack of 64 frames: MARK up to 63, the next is refused
    marks(22);
    chk(cur_cmf == 63, "CMF 63");
    cmd(CMD_MARK, 0, e, c);
    chk(e && cur_cmf == 63, "MARK refused when the stack is full");

    // ADVANCE by 20 collects area 0 only: line 3 (frame 0) has no newer
    // version at or below frame 20, so it is copied to the archive frame
    s0 = n_arch_cp;
    cmd(CMD_ADVANCE, 20, e, c);
    chk(!e, "ADVANCE accepted");
    while (advance_busy) @(negedge clk);
    chk(cur_omf == 20, "OMF moved to 20");
    chk(n_coll == 1 && n_arch_cp - s0 == 1 && n_skip == 0, $sformatf("one area collected (%0d), one line archived (%0d)", n_coll, n_arch_cp - s0));
    evict(3);
    s0 = n_arch_rd;
    rd(3, 32'hA, "line 3 read from the archive frame");
    chk(n_arch_rd - s0 == 1, "search ended in the archive");
    // now a MARK fits again
    cmd(CMD_MARK, 0, e, c);
    chk(!e && cur_cmf == 0, "MARK after ADVANCE wraps CMF to frame 0");

    // copy skipping: line 7 written in frame 60 (area 3) and frame 66 (area 4
    // of the next lap). Advancing OMF to 66 collects areas 1, 2 and 3: line 5
    // (frame 40, area 2) is copied to the archive, line 7's frame-60 copy is
    // skipped because frame 66 already holds a newer version at or below OMF.
    cmd(CMD_ROLLBACK, 4, e, c);
    chk(!e && cur_cmf == 60, "rollback to 60");
    wr(7, 32'h70);
    marks(6);
    chk(cur_cmf == 2, "CMF 66 shown as frame 2");
    wr(7, 32'h76);
    s0 = n_arch_cp;
    cmd(CMD_ADVANCE, 46, e, c);
    chk(!e, "ADVANCE 46 accepted");
    while (advance_busy) @(negedge clk);
    chk(cur_omf == 2, "OMF 66 shown as frame 2");
    chk(n_coll == 4, $sformatf("%0d areas collected, want 4", n_coll));
    chk(n_arch_cp - s0 == 1 && n_skip == 1, $sformatf("copies %0d skipped %0d, want 1 and 1", n_arch_cp - s0, n_skip));
    evict(7); evict(5);
    rd(7, 32'h76, "line 7 newest version");
    rd(5, 32'hB, "line 5 from the archive");
    rd(3, 32'hA, "line 3 still in the archive");
    cmd(CMD_ROLLBACK, 1, e, c);
    chk(e, "ROLLBACK below the new OMF refused");
    $display("searches %0d lazy %0d archive reads %0d copies %0d skipped %0d areas %0d",
             n_search, n_lazy, n_arch_rd, n_arch_cp, n_skip, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
