// Written-bit (WB) memory of the rollback chip.
//
// For every (process, line, working area) it stores one block: the 16
// written bits of that line in the 16 mark frames of the working area, and
// the 8-bit rollback-history timestamp (tag) current when the block was last
// written.  A block and its tag are read in one access, so one reference
// scans 16 mark frames.  Address = {pid, line, working area}.
//
// Written bits are never cleared when a rollback happens; instead the bits
// of frames newer than the deepest rollback since the block's tag are
// dropped when the block is read (see rbc_rb_history).  This module only
// stores blocks.  On init it walks the whole array and writes zero blocks
// (the RESET operation clears all written bits); busy is high meanwhile,
// one block per cycle.  The walk on reset is this design's choice.
//
// Timing: rd/wr accepted when !busy, read data valid the cycle after rd.
module rbc_wb_mem #(
  parameter int unsigned PID_BITS  = rbc_pkg::PID_BITS_D,
  parameter int unsigned LINE_BITS = rbc_pkg::LINE_BITS_D,
  parameter int unsigned WA_BITS   = rbc_pkg::FRAME_BITS_D - rbc_pkg::WAF_BITS_D,
  parameter int unsigned NBITS     = 2**rbc_pkg::WAF_BITS_D,
  parameter int unsigned TAG_BITS  = rbc_pkg::TAG_BITS_D
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          init,     // start clearing every block
  output logic                          busy,
  input  logic                          rd,
  input  logic                          wr,
  input  logic [PID_BITS-1:0]           pid,
  input  logic [LINE_BITS-1:0]          line,
  input  logic [WA_BITS-1:0]            wa,
  input  logic [TAG_BITS-1:0]           wtag,
  input  logic [NBITS-1:0]              wbits,
  output logic [TAG_BITS-1:0]           rtag,
  output logic [NBITS-1:0]              rbits
);
  localparam int unsigned AW = PID_BITS + LINE_BITS + WA_BITS;
  localparam int unsigned DW = TAG_BITS + NBITS;

  logic [AW-1:0] sweep;
  logic          en, we;
  logic [AW-1:0] addr;
  logic [DW-1:0] wdata, rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b1;
      sweep <= '0;
    end else if (init) begin
      busy  <= 1'b1;
      sweep <= '0;
    end else if (busy) begin
      sweep <= sweep + 1'b1;
      if (sweep == AW'((64'd1 << AW) - 1)) busy <= 1'b0;
    end
  end

  always_comb begin
    if (busy) begin
      en    = 1'b1;
      we    = 1'b1;
      addr  = sweep;
      wdata = '0;
    end else begin
      en    = rd | wr;
      we    = wr;
      addr  = {pid, line, wa};
      wdata = {wtag, wbits};
    end
  end

  rbc_sram #(.AW(AW), .DW(DW)) u_ram (
    .clk, .en, .we, .addr, .wdata, .rdata
  );

  assign {rtag, rbits} = rdata;

  // A block access during the clearing walk would be lost.
  a_no_access_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(rd || wr));
endmodule
