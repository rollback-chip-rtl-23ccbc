// Unit test of rbc_rb_cache against a reference model of a two-way
// set-associative cache with LRU replacement and selective rollback
// invalidation (valid, PID equal and MRV newer than the destination).
// Random lookups, fills, LRU touches and invalidations; hit, data, MRV and
// the invalidation count are compared every time.
module tb_rbc_rb_cache;
  localparam int unsigned ENTRIES = 8, WAYS = 2, LINE_BITS = 5, PID_BITS = 1, LINE_W = 16, FX_BITS = 6;
  localparam int unsigned SETS = ENTRIES / WAYS;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic [PID_BITS-1:0] pid = '0, inv_pid = '0;
  logic [LINE_BITS-1:0] line = '0;
  logic hit, touch = 1'b0, upd = 1'b0, inv = 1'b0;
  logic [LINE_W-1:0] hit_data, upd_data = '0;
  logic [FX_BITS-1:0] hit_mrv, upd_mrv = '0, inv_dst = '0;
  logic [$clog2(ENTRIES+1)-1:0] inv_count;
  int checks = 0, failures = 0, hits = 0, invs = 0;

  bit rv [SETS][WAYS]; int rl [SETS][WAYS]; int rp [SETS][WAYS];
  int rd [SETS][WAYS]; int rm [SETS][WAYS]; int rlru [SETS];

  rbc_rb_cache #(.ENTRIES(ENTRIES), .WAYS(WAYS), .LINE_BITS(LINE_BITS), .PID_BITS(PID_BITS),
                 .LINE_W(LINE_W), .FX_BITS(FX_BITS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int find(input int p, input int l);
    automatic int s = l % SETS;
    for (int w = 0; w < int'(WAYS); w++) if (rv[s][w] && rl[s][w] == l && rp[s][w] == p) return w;
    return -1;
  endfunction

  initial begin
    for (int s = 0; s < int'(SETS); s++) begin rlru[s] = 0; for (int w = 0; w < 2; w++) rv[s][w] = 0; end
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      automatic int p = int'($urandom_range(1, 0));
      automatic int l = int'($urandom_range(2**LINE_BITS - 1, 0));
      automatic int s = l % SETS;
      automatic int w = find(p, l);
      automatic int r = int'($urandom_range(9, 0));
      @(negedge clk);
      pid = PID_BITS'(p); line = LINE_BITS'(l);
      #1;
      chk(hit == (w >= 0), $sformatf("hit pid %0d line %0d", p, l));
      if (w >= 0) begin
        hits++;
        chk(hit_data == LINE_W'(rd[s][w]) && hit_mrv == FX_BITS'(rm[s][w]), "hit data/mrv");
      end
      if (r < 5) begin            // fill or write
        automatic int d = int'($urandom_range(65535, 0));
        automatic int m = int'($urandom_range(31, 0));
        automatic int u = w;
        if (u < 0) begin
          u = -1;
          for (int x = int'(WAYS) - 1; x >= 0; x--) if (!rv[s][x]) u = x;
          if (u < 0) u = rlru[s];
        end
        upd = 1; upd_data = LINE_W'(d); upd_mrv = FX_BITS'(m);
        rv[s][u] = 1; rl[s][u] = l; rp[s][u] = p; rd[s][u] = d; rm[s][u] = m; rlru[s] = 1 - u;
      end else if (r < 8) begin   // read hit refreshes LRU
        touch = 1;
        if (w >= 0) rlru[s] = 1 - w;
      end else if (r < 9) begin   // rollback of process p to frame dst
        automatic int dst = int'($urandom_range(31, 0));
        automatic int cnt = 0;
        inv = 1; inv_pid = PID_BITS'(p); inv_dst = FX_BITS'(dst);
        for (int a = 0; a < int'(SETS); a++)
          for (int b = 0; b < int'(WAYS); b++)
            if (rv[a][b] && rp[a][b] == p && rm[a][b] > dst) begin rv[a][b] = 0; cnt++; end
        @(negedge clk); inv = 0;
        chk(inv_count == ($clog2(ENTRIES+1))'(cnt), $sformatf("invalidated %0d want %0d", inv_count, cnt));
        if (cnt > 0) invs++;
        continue;
      end else if (n % 500 == 0) begin
        flush = 1;
        for (int a = 0; a < int'(SETS); a++) for (int b = 0; b < int'(WAYS); b++) rv[a][b] = 0;
      end
      @(negedge clk); upd = 0; touch = 0; flush = 0;
    end
    chk(hits > 100 && invs > 10, "hits and invalidations exercised");
    $display("hits %0d invalidating rollbacks %0d", hits, invs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
