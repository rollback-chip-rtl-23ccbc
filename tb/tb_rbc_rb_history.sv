// Unit test of rbc_rb_history against the sequential update procedure:
// after a rollback to dst, walk from the top entry downward and replace every
// entry deeper than dst until one is met that is as deep or the floor is
// reached, then push INFINITY.  Random rollbacks for two processes; after
// each one every live entry and CRBI are compared, the number of entries
// updated in parallel is checked, an update confined to the window must
// finish in the cycle of the request, and a longer one must take one cycle
// per entry below the window.
module tb_rbc_rb_history;
  localparam int unsigned NPROC = 2, TAG_BITS = 5, FX_BITS = 10, BUF = 4;
  localparam int unsigned DEPTH = 2**TAG_BITS;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, rb = 1'b0, busy;
  logic [0:0] rb_pid = '0, lk_pid = '0, q_pid = '0;
  logic [FX_BITS-1:0] rb_dst = '0, lk_frame;
  logic [TAG_BITS-1:0] rb_floor = '0, lk_ts = '0, crbi;
  logic [$clog2(BUF+1)-1:0] par_updates;
  logic lk_inf;
  int checks = 0, failures = 0, walks = 0, longest = 0;

  // reference: {inf, frame}, frame values stay small, no wrap needed
  bit ref_inf [NPROC][DEPTH];
  int ref_fr  [NPROC][DEPTH];
  int ref_top [NPROC];
  int cmf     [NPROC];
  int floor_  [NPROC];

  rbc_rb_history #(.NPROC(NPROC), .TAG_BITS(TAG_BITS), .FX_BITS(FX_BITS), .BUF(BUF)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    for (int p = 0; p < NPROC; p++) begin
      ref_top[p] = 0; ref_inf[p][0] = 1; cmf[p] = 40; floor_[p] = 0;
    end
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int p = int'($urandom_range(NPROC - 1, 0));
      automatic int k;
      automatic int i, upd = 0, par = 0, below = 0, cyc = 0;
      automatic bit at_floor = 0;
      // the process runs forward, then rolls back a mostly short distance
      cmf[p] += int'($urandom_range(4, 0));
      k = ($urandom_range(5, 0) == 0) ? int'($urandom_range(30, 1)) : int'($urandom_range(2, 1));
      if (k > cmf[p]) k = cmf[p];
      if (k == 0) continue;
      cmf[p] -= k;
      // keep at most 28 live entries: advance the floor now and then
      while (((ref_top[p] - floor_[p]) % DEPTH) >= 28) floor_[p] = (floor_[p] + 1) % DEPTH;
      // reference update
      i = ref_top[p];
      while (1) begin
        if (ref_inf[p][i] || cmf[p] < ref_fr[p][i]) begin
          ref_inf[p][i] = 0; ref_fr[p][i] = cmf[p]; upd++;
          if (upd <= int'(BUF)) par++; else below++;
          if (i == floor_[p]) begin at_floor = 1; break; end
          i = (i + DEPTH - 1) % DEPTH;
        end else break;
      end
      cyc = (upd <= int'(BUF)) ? 0 : (at_floor ? below : below + 1);
      ref_top[p] = (ref_top[p] + 1) % DEPTH;
      ref_inf[p][ref_top[p]] = 1;
      // drive
      @(negedge clk);
      rb = 1; rb_pid = 1'(p); rb_dst = FX_BITS'(cmf[p]); rb_floor = TAG_BITS'(floor_[p]);
      @(negedge clk); rb = 0;
      chk(par_updates == ($clog2(BUF+1))'(par), $sformatf("parallel updates %0d want %0d", par_updates, par));
      begin
        automatic int c = 0;
        while (busy) begin @(negedge clk); c++; end
        chk(c == cyc, $sformatf("walk %0d cycles want %0d (upd %0d)", c, cyc, upd));
        if (c > 0) walks++;
        if (upd > longest) longest = upd;
      end
      // compare every live entry and CRBI of both processes
      for (int q = 0; q < int'(NPROC); q++) begin
        q_pid = 1'(q); lk_pid = 1'(q);
        #1;
        chk(crbi == TAG_BITS'(ref_top[q]), "CRBI");
        for (int d = 0; d < int'(DEPTH); d++) begin
          automatic int e = (ref_top[q] + DEPTH - d) % DEPTH;
          if (d > (ref_top[q] - floor_[q] + DEPTH) % DEPTH) break;
          lk_ts = TAG_BITS'(e);
          #1;
          chk(lk_inf == ref_inf[q][e] && (ref_inf[q][e] || lk_frame == FX_BITS'(ref_fr[q][e])),
              $sformatf("pid %0d entry %0d: %0d/%0d want %0d/%0d", q, e, lk_inf, lk_frame,
                        ref_inf[q][e], ref_fr[q][e]));
        end
      end
    end
    chk(walks > 0, "some rollbacks needed the walk below the window");
    $display("walks %0d longest update %0d entries", walks, longest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
