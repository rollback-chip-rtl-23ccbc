// Stimulus, reference model and checks for the rollback-chip node.
//
// Drives the node's CPU ports with a random Time Warp-like stream (reads,
// writes with moving locality, MARK, ROLLBACK, ADVANCE, process switches),
// runs CPU references that bypass the rollback chip at the same time, and
// serves bulk memory with a behavioural DRAM model.  The reference model is
// the plain semantics of version controlled memory: a snapshot of each
// process's memory is taken at every MARK and a ROLLBACK(k) restores the
// snapshot of the frame it returns to.  Every READ is compared with it and
// at the end every used line of every process is read back.  Each mechanism
// of the chip (hits, misses, multi-block searches, lazy clearing, archive
// reads and copies, skipped copies, collected working areas, page
// exhaustion, stack-full and history-full refusals, history walks, cache
// invalidations, blocked MARKs, bus contention) is counted and must occur
// when REQUIRE_ALL is set.
module rbc_node_tb_core #(
  parameter int unsigned PID_BITS   = 6,
  parameter int unsigned LINE_BITS  = 12,
  parameter int unsigned WOFF_BITS  = 2,
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned FRAME_BITS = 8,
  parameter int unsigned WAF_BITS   = 4,
  parameter int unsigned TAG_BITS   = 8,
  parameter int unsigned PAGE_BITS  = 6,
  parameter int unsigned PPN_BITS   = 12,
  parameter int unsigned CACHE_ENTRIES = 256,
  parameter int unsigned RBH_BUF    = 16,
  parameter int unsigned NOPS       = 4000,
  parameter int unsigned LINES_USED = 64,
  parameter int unsigned PIDS_USED  = 2,
  parameter int unsigned ADV_SLACK  = 6,     // keep about this many frames active
  parameter bit          REQUIRE_ALL = 1'b1,
  parameter longint unsigned WATCHDOG = 64'd20_000_000,
  localparam int unsigned LINE_W  = WORD_W * (2**WOFF_BITS),
  localparam int unsigned NW      = 2**WOFF_BITS,
  localparam int unsigned PA_BITS = 1 + ((PID_BITS + LINE_BITS > PPN_BITS + PAGE_BITS) ?
                                         PID_BITS + LINE_BITS : PPN_BITS + PAGE_BITS)
) (
  output logic                           clk,
  output logic                           rst_n,
  output logic                           vcm_valid,
  output logic                           vcm_we,
  output logic [LINE_BITS+WOFF_BITS-1:0] vcm_addr,
  output logic [WORD_W-1:0]              vcm_wdata,
  input  logic                           vcm_done,
  input  logic                           vcm_err,
  input  logic [WORD_W-1:0]              vcm_rdata,
  output logic                           cmd_valid,
  output rbc_pkg::rbc_cmd_e              cmd_op,
  output logic [FRAME_BITS-1:0]          cmd_arg,
  input  logic                           cmd_done,
  input  logic                           cmd_err,
  output logic                           cpu_req,
  output logic                           cpu_we,
  output logic [PA_BITS+WOFF_BITS-1:0]   cpu_addr,
  output logic [WORD_W-1:0]              cpu_wdata,
  input  logic                           cpu_ack,
  input  logic [WORD_W-1:0]              cpu_rdata,
  input  logic                           mem_req,
  input  logic                           mem_we,
  input  logic [PA_BITS:0]               mem_addr,
  input  logic [LINE_W-1:0]              mem_wdata,
  input  logic [NW-1:0]                  mem_wstrb,
  output logic                           mem_ack,
  output logic [LINE_W-1:0]              mem_rdata,
  input  logic                           ready,
  input  logic [PID_BITS-1:0]            cur_pid,
  input  logic [FRAME_BITS-1:0]          cur_cmf,
  input  logic [FRAME_BITS-1:0]          cur_omf,
  input  logic [TAG_BITS-1:0]            cur_crbi,
  input  logic                           advance_busy,
  input  rbc_pkg::rbc_events_t           events,
  input  logic [PPN_BITS:0]              pages_used,
  input  logic [$clog2(CACHE_ENTRIES+1)-1:0] last_invalidated,
  input  logic [$clog2(RBH_BUF+1)-1:0]   last_rbh_updates,
  input  logic                           rbh_walking
);
  import rbc_pkg::*;

  localparam int unsigned NFR   = 2**FRAME_BITS;
  localparam int unsigned WAF   = 2**WAF_BITS;
  localparam int unsigned NSNAP = 4 * NFR;

  typedef logic [LINE_W-1:0] img_t [int];

  int checks = 0, failures = 0;
  longint unsigned cycles = 0;

  // reference model
  img_t cur  [PIDS_USED];
  img_t snap [PIDS_USED][NSNAP];
  int   gcmf [PIDS_USED];
  int   gomf [PIDS_USED];        // OMF after every ADVANCE issued so far
  int   pid  = 0;
  int   centre = 0;

  // mechanism counters
  int n_hit, n_miss, n_search, n_multi, n_lazy, n_arch_rd, n_arch_cp, n_skip, n_coll;
  int n_afault, n_mkref, n_rbref, n_walk, n_inv, n_mkblock, n_contend, n_switch, n_bypass;
  int search_run;

  rbc_bulk_mem_model #(.AW(PA_BITS+1), .WORD_W(WORD_W), .NW(NW), .LAT_MAX(3)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .wstrb(mem_wstrb),
    .ack(mem_ack), .rdata(mem_rdata));

  initial begin clk = 1'b0; forever #5 clk = ~clk; end
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    #1;
    wait (cycles >= WATCHDOG);
    failures++;
    $display("watchdog expired after %0d cycles: cmd_valid %0d op %s vcm_valid %0d advance_busy %0d walk %0d cmf %0d omf %0d pid %0d",
             cycles, cmd_valid, cmd_op.name(), vcm_valid, advance_busy, rbh_walking, cur_cmf, cur_omf, cur_pid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counting
  always @(posedge clk) if (rst_n) begin
    if (events.hit)  n_hit++;
    if (events.miss) begin n_miss++; search_run = 0; end
    if (events.search_step) begin n_search++; search_run++; if (search_run == 2) n_multi++; end
    if (events.lazy_clear)   n_lazy++;
    if (events.archive_read) n_arch_rd++;
    if (events.archive_copy) n_arch_cp++;
    if (events.copy_skipped) n_skip++;
    if (events.wa_collected) n_coll++;
    if (events.alloc_fault)  n_afault++;
    if (events.mark_refused) n_mkref++;
    if (events.rollback_refused) n_rbref++;
    if (rbh_walking)         n_walk++;
    if (mem_req && cpu_req && vcm_valid) n_contend++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  function automatic logic [LINE_W-1:0] gline(input int p, input int l);
    return cur[p].exists(l) ? cur[p][l] : '0;
  endfunction

  task automatic vcm(input bit we, input int l, input int w, input logic [WORD_W-1:0] d,
                     output logic [WORD_W-1:0] q, output bit err);
    @(negedge clk);
    vcm_we    = we;
    vcm_addr  = (LINE_BITS+WOFF_BITS)'((l << WOFF_BITS) | w);
    vcm_wdata = d;
    vcm_valid = 1'b1;
    do @(negedge clk); while (!vcm_done);
    vcm_valid = 1'b0;
    q   = vcm_rdata;
    err = vcm_err;
  endtask

  task automatic command(input rbc_cmd_e op, input int arg, output bit err);
    int t0 = int'(cycles);
    @(negedge clk);
    cmd_op    = op;
    cmd_arg   = FRAME_BITS'(arg);
    cmd_valid = 1'b1;
    do @(negedge clk); while (!cmd_done);
    cmd_valid = 1'b0;
    err = cmd_err;
    if (op == CMD_MARK && int'(cycles) - t0 > 3) n_mkblock++;
  endtask

  function automatic int wabase(input int f);
    return (f / WAF) * WAF;
  endfunction

  // CPU references that bypass the rollback chip, checked on their own
  logic [WORD_W-1:0] byp [int];
  bit stop_bypass = 1'b0;
  initial begin
    cpu_req = 1'b0; cpu_we = 1'b0; cpu_addr = '0; cpu_wdata = '0;
    @(posedge rst_n);
    while (!stop_bypass) begin
      automatic int a = int'($urandom_range(63, 0));
      automatic bit we = $urandom_range(1, 0) == 1;
      automatic logic [WORD_W-1:0] d = WORD_W'($urandom);
      repeat ($urandom_range(40, 5)) @(negedge clk);
      cpu_we = we; cpu_addr = (PA_BITS+WOFF_BITS)'(a); cpu_wdata = d; cpu_req = 1'b1;
      do @(negedge clk); while (!cpu_ack);
      cpu_req = 1'b0;
      if (we) byp[a] = d;
      else check(cpu_rdata == (byp.exists(a) ? byp[a] : '0), "bypass read");
      n_bypass++;
    end
  end

  initial begin
    logic [WORD_W-1:0] q;
    bit err;
    vcm_valid = 1'b0; vcm_we = 1'b0; vcm_addr = '0; vcm_wdata = '0;
    cmd_valid = 1'b0; cmd_op = CMD_MARK; cmd_arg = '0;
    for (int p = 0; p < PIDS_USED; p++) begin gcmf[p] = 0; gomf[p] = 0; end
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ready);
    @(negedge clk);
    $display("reset walk done after %0d cycles", cycles);
    check(cur_cmf == 0 && cur_omf == 0 && cur_crbi == 0, "state after reset");

    for (int n = 0; n < NOPS; n++) begin
      automatic int r = int'($urandom_range(99, 0));
      automatic int active = gcmf[pid] - gomf[pid];
      // one stretch without ADVANCE and with scattered writes drives the
      // stack and the physical pages to their limits
      automatic bit starve = (n >= int'(NOPS) / 2) && (n < int'(NOPS) / 2 + int'(NOPS) / 8);
      if (r < 50 || (r < 72)) begin
        // READ or WRITE near the current centre of locality
        automatic int off = int'($urandom_range(6, 0)) + int'($urandom_range(6, 0)) - 6;
        automatic int l = (centre + off + int'(LINES_USED)) % int'(LINES_USED);
        automatic int w = int'($urandom_range(NW - 1, 0));
        if (starve || $urandom_range(99, 0) < 3) l = int'($urandom_range(LINES_USED - 1, 0));
        if (r < 50) begin
          vcm(1'b0, l, w, '0, q, err);
          check(!err && q == gline(pid, l)[w*WORD_W +: WORD_W],
                $sformatf("read pid %0d line %0d word %0d: got %h want %h", pid, l, w, q,
                          gline(pid, l)[w*WORD_W +: WORD_W]));
        end else begin
          automatic logic [WORD_W-1:0] d = WORD_W'($urandom);
          vcm(1'b1, l, w, d, q, err);
          if (err) begin
            check(pages_used == (PPN_BITS+1)'(2**PPN_BITS), "write refused only when pages run out");
          end else begin
            automatic logic [LINE_W-1:0] x = gline(pid, l);
            x[w*WORD_W +: WORD_W] = d;
            cur[pid][l] = x;
          end
        end
      end else if (r < 84) begin
        automatic bit full = (gcmf[pid] + 1 - wabase(gomf[pid])) >= int'(NFR);
        command(CMD_MARK, 0, err);
        check(err == full, $sformatf("MARK refusal %0d expected %0d", err, full));
        if (!err) begin
          snap[pid][gcmf[pid] % NSNAP] = cur[pid];
          gcmf[pid]++;
        end
        if ($urandom_range(14, 0) < 2) centre = int'($urandom_range(LINES_USED - 1, 0));
      end else if (r < 90) begin
        if (active > 0) begin
          automatic int k = ($urandom_range(4, 0) == 0) ? int'($urandom_range(active, 1))
                                                        : int'($urandom_range((active < 3) ? active : 3, 1));
          command(CMD_ROLLBACK, k, err);
          if (err) begin
            n_rbref++;
            check(cur_cmf == FRAME_BITS'(gcmf[pid]), "refused rollback leaves CMF");
          end else begin
            gcmf[pid] -= k;
            cur[pid] = snap[pid][gcmf[pid] % NSNAP];
            if (last_invalidated != 0) n_inv++;
          end
        end
      end else if (r < 97) begin
        if (!starve && (active > int'(ADV_SLACK) || ($urandom_range(3, 0) == 0 && active > 0))) begin
          automatic int k = int'($urandom_range(active, 1));
          command(CMD_ADVANCE, k, err);
          check(!err, "legal ADVANCE accepted");
          if (!err) gomf[pid] += k;
        end
      end else if (PIDS_USED > 1) begin
        pid = int'($urandom_range(PIDS_USED - 1, 0));
        command(CMD_SETPID, pid, err);
        n_switch++;
      end
      check(cur_cmf == FRAME_BITS'(gcmf[pid]), $sformatf("CMF %0d want %0d", cur_cmf, gcmf[pid] % NFR));
    end

    // let background fossil collection finish, then read everything back
    while (advance_busy) @(negedge clk);
    for (int p = 0; p < PIDS_USED; p++) begin
      command(CMD_SETPID, p, err);
      check(cur_omf == FRAME_BITS'(gomf[p]), "OMF after all ADVANCEs");
      for (int l = 0; l < int'(LINES_USED); l++)
        for (int w = 0; w < int'(NW); w++) begin
          vcm(1'b0, l, w, '0, q, err);
          check(q == gline(p, l)[w*WORD_W +: WORD_W], $sformatf("final pid %0d line %0d", p, l));
        end
    end
    stop_bypass = 1'b1;
    repeat (60) @(posedge clk);

    $display("hits %0d misses %0d search blocks %0d multi-block searches %0d lazy clears %0d",
             n_hit, n_miss, n_search, n_multi, n_lazy);
    $display("archive reads %0d archive copies %0d skipped copies %0d areas collected %0d",
             n_arch_rd, n_arch_cp, n_skip, n_coll);
    $display("page faults %0d mark refused %0d mark blocked %0d rollback refused %0d history walk cycles %0d",
             n_afault, n_mkref, n_mkblock, n_rbref, n_walk);
    $display("rollbacks invalidating entries %0d switches %0d bypass refs %0d contention cycles %0d",
             n_inv, n_switch, n_bypass, n_contend);
    if (REQUIRE_ALL) begin
      check(n_hit > 0, "hits occur");            check(n_miss > 0, "misses occur");
      check(n_multi > 0, "multi-block search");  check(n_lazy > 0, "lazy clearing");
      check(n_arch_rd > 0, "archive read");      check(n_arch_cp > 0, "archive copy");
      check(n_skip > 0, "copy skipped");         check(n_coll > 0, "working area collected");
      check(n_afault > 0, "page exhaustion");    check(n_mkref > 0, "stack full");
      check(n_rbref > 0, "history full");        check(n_walk > 0, "history walk");
      check(n_inv > 0, "rollback invalidation"); check(n_bypass > 0, "bypass traffic");
      check(n_switch > 0, "context switch");     check(n_contend > 0, "memory contention");
      check(n_mkblock > 0, "MARK waits for ADVANCE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
