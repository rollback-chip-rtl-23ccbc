// Rollback-history (RBH) unit.
//
// For each process it keeps the rollback-history stack RBH[0..255] and its
// top index CRBI (current rollback index).  RBH[i] is the destination frame
// of the deepest rollback made after the i-th rollback; the top entry is
// INFINITY.  A block of written bits stamped with tag ts is corrected on
// read by dropping the bits of frames newer than RBH[ts].  The stack is
// circular; entries older than the caller's floor tag (TAGBOUND of the
// oldest working area) are dead and never touched.
//
// Rollback to frame dst (rb pulse): every live entry with dst < RBH[i] takes
// dst.  Entries never decrease toward the top, so the updated entries are a
// contiguous run from the top down.  The top BUF entries are compared and
// updated in parallel in the cycle of the pulse; if the entry just below
// the window (checked by one more comparator) must change too, busy goes high and the update walks down one entry
// per cycle until an entry as deep as dst, or the floor, is met.  In the same
// cycle as the pulse CRBI is incremented and the new top is set to INFINITY.
// The parallel window of 16 entries, updating from newest to oldest and
// stopping at the first entry as deep as dst follow the original rollback-chip design; the
// per-cycle walk below the window and storing all entries in registers
// (rather than a separate RAM) are this design's choices.
//
// Lookup (lk_pid, lk_ts -> lk_inf, lk_frame) and CRBI read (q_pid -> crbi)
// are combinational.  Frames are extended frame numbers (see rbc_pkg).
module rbc_rb_history #(
  parameter int unsigned NPROC    = 2**rbc_pkg::PID_BITS_D,
  parameter int unsigned TAG_BITS = rbc_pkg::TAG_BITS_D,
  parameter int unsigned FX_BITS  = rbc_pkg::FX_BITS_D,
  parameter int unsigned BUF      = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,     // every process: CRBI=0, RBH[0]=INF
  // rollback update
  input  logic                         rb,
  input  logic [$clog2(NPROC)-1:0]     rb_pid,
  input  logic [FX_BITS-1:0]           rb_dst,
  input  logic [TAG_BITS-1:0]          rb_floor,  // oldest live tag
  output logic                         busy,
  output logic [$clog2(BUF+1)-1:0]     par_updates, // entries updated in the window (last rb)
  // lookups
  input  logic [$clog2(NPROC)-1:0]     lk_pid,
  input  logic [TAG_BITS-1:0]          lk_ts,
  output logic                         lk_inf,
  output logic [FX_BITS-1:0]           lk_frame,
  input  logic [$clog2(NPROC)-1:0]     q_pid,
  output logic [TAG_BITS-1:0]          crbi
);
  localparam int unsigned PB    = $clog2(NPROC);
  localparam int unsigned DEPTH = 2**TAG_BITS;

  typedef logic [TAG_BITS-1:0] tag_t;

  logic [FX_BITS:0]  stk   [NPROC][DEPTH];   // {inf, frame}
  tag_t              top   [NPROC];
  // sequential walk below the window
  logic              walk;
  logic [PB-1:0]     w_pid;
  tag_t              w_idx;
  tag_t              w_floor;
  logic [FX_BITS-1:0] w_dst;

  function automatic logic deeper(input logic [FX_BITS:0] e, input logic [FX_BITS-1:0] d);
    // d is a deeper (older) rollback destination than the entry e
    return e[FX_BITS] || rbc_pkg::fx_gt(16'(e[FX_BITS-1:0]), 16'(d), FX_BITS);
  endfunction

  assign busy = walk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPROC; p++) begin
        top[p]    <= '0;
        stk[p][0] <= {1'b1, {FX_BITS{1'b0}}};
      end
      walk        <= 1'b0;
      w_pid       <= '0;
      w_idx       <= '0;
      w_floor     <= '0;
      w_dst       <= '0;
      par_updates <= '0;
    end else if (clear) begin
      for (int p = 0; p < NPROC; p++) begin
        top[p]    <= '0;
        stk[p][0] <= {1'b1, {FX_BITS{1'b0}}};
      end
      walk <= 1'b0;
    end else if (rb) begin
      // live entries: top[rb_pid] down to rb_floor
      automatic tag_t t    = top[rb_pid];
      automatic tag_t live = t - rb_floor;        // index distance to the floor
      automatic logic run  = 1'b1;
      automatic int   n    = 0;
      for (int j = 0; j < BUF; j++) begin
        automatic tag_t i = t - tag_t'(j);
        if (run && (tag_t'(j) <= live) && deeper(stk[rb_pid][i], rb_dst)) begin
          stk[rb_pid][i] <= {1'b0, rb_dst};
          n++;
        end else begin
          run = 1'b0;
        end
      end
      par_updates <= ($clog2(BUF+1))'(n);
      // continue below the window if the run did not stop inside it
      if (run && (live >= tag_t'(BUF)) && deeper(stk[rb_pid][t - tag_t'(BUF)], rb_dst)) begin
        walk    <= 1'b1;
        w_pid   <= rb_pid;
        w_idx   <= t - tag_t'(BUF);
        w_floor <= rb_floor;
        w_dst   <= rb_dst;
      end
      // push the new top
      top[rb_pid]                 <= t + 1'b1;
      stk[rb_pid][tag_t'(t + 1'b1)] <= {1'b1, {FX_BITS{1'b0}}};
    end else if (walk) begin
      if (deeper(stk[w_pid][w_idx], w_dst)) begin
        stk[w_pid][w_idx] <= {1'b0, w_dst};
        if (w_idx == w_floor) walk <= 1'b0;
        w_idx <= w_idx - 1'b1;
      end else begin
        walk <= 1'b0;
      end
    end
  end

  assign {lk_inf, lk_frame} = stk[lk_pid][lk_ts];
  assign crbi               = top[q_pid];

  a_no_rb_while_walking: assert property (@(posedge clk) disable iff (!rst_n)
    walk |-> !rb);
endmodule
