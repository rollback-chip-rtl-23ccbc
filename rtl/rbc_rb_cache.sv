// Rollback (RB) cache: caches the most recent version (MRV) of lines.
//
// Set-associative (default 256 entries, 2 ways, LRU replacement), write
// through.  Each entry holds Valid, Line (tag part), PID, Data (one line) and
// MRV, the extended number of the frame holding the most recent version.
// A lookup searches the set of (pid, line) in both ways; hit data is
// combinational.  A fill/update (upd) writes data and MRV into the hitting
// way, or on a miss into an invalid way, else the least recently used way;
// a read hit (touch) only refreshes LRU.  A rollback to frame dst (inv)
// clears, in one cycle and in every set, the valid bit of each entry whose
// PID equals the rolled-back process and whose MRV is newer than dst.  The
// whole cache is flushed by flush.  inv_count reports how many entries the
// last invalidation cleared.
//
// Entry fields, write-through policy, selective invalidation by PID and MRV
// follow the original rollback-chip design, as do the 256 entries, two ways and LRU used in
// its evaluation.  Index = low line bits, tag = high line bits, PID kept as
// a separate field.
module rbc_rb_cache #(
  parameter int unsigned ENTRIES   = 256,
  parameter int unsigned WAYS      = 2,
  parameter int unsigned LINE_BITS = rbc_pkg::LINE_BITS_D,
  parameter int unsigned PID_BITS  = rbc_pkg::PID_BITS_D,
  parameter int unsigned LINE_W    = rbc_pkg::WORD_W_D * (2**rbc_pkg::WOFF_BITS_D),
  parameter int unsigned FX_BITS   = rbc_pkg::FX_BITS_D
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  // lookup
  input  logic [PID_BITS-1:0]   pid,
  input  logic [LINE_BITS-1:0]  line,
  output logic                  hit,
  output logic [LINE_W-1:0]     hit_data,
  output logic [FX_BITS-1:0]    hit_mrv,
  input  logic                  touch,     // read hit: update LRU
  // fill / write
  input  logic                  upd,
  input  logic [LINE_W-1:0]     upd_data,
  input  logic [FX_BITS-1:0]    upd_mrv,
  // rollback invalidation
  input  logic                  inv,
  input  logic [PID_BITS-1:0]   inv_pid,
  input  logic [FX_BITS-1:0]    inv_dst,
  output logic [$clog2(ENTRIES+1)-1:0] inv_count
);
  localparam int unsigned SETS = ENTRIES / WAYS;
  localparam int unsigned IB   = $clog2(SETS);
  localparam int unsigned TB   = LINE_BITS - IB;
  localparam int unsigned WB   = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic               v    [SETS][WAYS];
  logic [TB-1:0]      tg   [SETS][WAYS];
  logic [PID_BITS-1:0] pd  [SETS][WAYS];
  logic [LINE_W-1:0]  dat  [SETS][WAYS];
  logic [FX_BITS-1:0] mrv  [SETS][WAYS];
  logic [WB-1:0]      lru  [SETS];     // way to replace next (2 ways: true LRU)

  logic [IB-1:0] idx;
  logic [TB-1:0] ltag;
  logic [WB-1:0] hway, vway;
  logic          has_inv;

  assign idx  = line[IB-1:0];
  assign ltag = line[LINE_BITS-1:IB];

  always_comb begin
    hit      = 1'b0;
    hway     = '0;
    has_inv  = 1'b0;
    vway     = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (v[idx][w] && tg[idx][w] == ltag && pd[idx][w] == pid) begin
        hit  = 1'b1;
        hway = WB'(w);
      end
      if (!v[idx][w]) begin
        has_inv = 1'b1;
        vway    = WB'(w);
      end
    end
    hit_data = dat[idx][hway];
    hit_mrv  = mrv[idx][hway];
  end

  logic [WB-1:0] uway;
  assign uway = hit ? hway : (has_inv ? vway : lru[idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        lru[s] <= '0;
        for (int w = 0; w < WAYS; w++) v[s][w] <= 1'b0;
      end
      inv_count <= '0;
    end else if (flush) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) v[s][w] <= 1'b0;
    end else if (inv) begin
      automatic int n = 0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          if (v[s][w] && pd[s][w] == inv_pid &&
              rbc_pkg::fx_gt(16'(mrv[s][w]), 16'(inv_dst), FX_BITS)) begin
            v[s][w] <= 1'b0;
            n++;
          end
      inv_count <= ($clog2(ENTRIES+1))'(n);
    end else if (upd) begin
      v[idx][uway]   <= 1'b1;
      tg[idx][uway]  <= ltag;
      pd[idx][uway]  <= pid;
      dat[idx][uway] <= upd_data;
      mrv[idx][uway] <= upd_mrv;
      lru[idx]       <= (WAYS == 2) ? WB'(~uway) : WB'(uway + 1'b1);
    end else if (touch && hit) begin
      lru[idx] <= (WAYS == 2) ? WB'(~hway) : lru[idx];
    end
  end
endmodule
