// Shared definitions of the rollback chip (RBC).
//
// The RBC gives each Time Warp process a version controlled memory (VCM):
// ordinary read/write memory whose state can be marked, rolled back to the
// k-th previous mark, and fossil collected.  Versions of each line live in
// a circular stack of mark frames; frames are grouped into working areas of
// 16 frames.  This package holds the command encoding and the arithmetic on
// frame numbers that several modules share.
//
// Frame numbers.  The stack has 256 frames, so a frame is addressed by 8
// bits (upper nibble = working area, lower nibble = frame within it).  To
// compare frame numbers across the wrap of the circular stack, the control
// logic carries every frame number with two extra high-order bits (an
// "extended" frame number, FX_BITS = 10 bits) and compares two of them by
// the sign of their 10-bit difference.  All frame numbers that are ever
// compared lie within 512 frames of each other, so this is exact.  Using two
// extra bits instead of a single wrap bit is a choice of this design.
package rbc_pkg;

  // Default sizes (the numbers the design is specified with).
  localparam int unsigned FRAME_BITS_D = 8;   // 256 mark frames per VCM
  localparam int unsigned WAF_BITS_D   = 4;   // 16 frames per working area
  localparam int unsigned FX_BITS_D    = 10;  // extended frame number
  localparam int unsigned TAG_BITS_D   = 8;   // rollback-history timestamps
  localparam int unsigned LINE_BITS_D  = 12;  // 4096 lines per VCM
  localparam int unsigned WORD_W_D     = 32;  // CPU data path
  localparam int unsigned WOFF_BITS_D  = 2;   // 4 words per line
  localparam int unsigned PID_BITS_D   = 6;   // 64 VCMs per processor
  localparam int unsigned PAGE_BITS_D  = 6;   // 64 lines per page
  localparam int unsigned PPN_BITS_D   = 12;  // 4096 physical pages

  // Operations the CPU starts by writing the RBC control registers.
  typedef enum logic [2:0] {
    CMD_RESET    = 3'd0,
    CMD_MARK     = 3'd1,
    CMD_ROLLBACK = 3'd2,
    CMD_ADVANCE  = 3'd3,
    CMD_SETPID   = 3'd4
  } rbc_cmd_e;

  // Operations of the memory management unit.
  typedef enum logic [1:0] {
    MMU_XLATE = 2'd0,   // translate, fault if the page is absent
    MMU_ALLOC = 2'd1,   // translate, allocate the page if absent
    MMU_FREE  = 2'd2    // free every page of one working area
  } mmu_op_e;

  // One-cycle event pulses of the control unit, for statistics and tests.
  typedef struct packed {
    logic hit;             // READ/WRITE hit in the RB cache
    logic miss;            // READ/WRITE miss
    logic search_step;     // one block of written bits scanned for an MRV
    logic lazy_clear;      // written bits dropped on read by the rollback history
    logic archive_read;    // MRV search ended in the archive frame
    logic archive_copy;    // ADVANCE copied a line to the archive frame
    logic copy_skipped;    // ADVANCE skipped a copy (newer version kept)
    logic wa_collected;    // ADVANCE fossil collected a working area
    logic alloc_fault;     // WRITE refused: no free physical page
    logic mark_refused;    // MARK refused: mark frame stack full
    logic rollback_refused;// ROLLBACK refused: illegal distance or history full
  } rbc_events_t;

  // a > b for extended frame numbers of width w (w <= 16).
  function automatic logic fx_gt(input logic [15:0] a, input logic [15:0] b,
                                 input int unsigned w);
    logic [15:0] d;
    d = (a - b) & ((16'd1 << w) - 16'd1);
    return (d != 16'd0) && !d[w-1];
  endfunction

endpackage
