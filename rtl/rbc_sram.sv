// Single-port synchronous static RAM.
//
// One access per cycle: when en is high, a write stores wdata at addr, a
// read returns mem[addr] on rdata in the next cycle (read latency 1; rdata
// holds its value otherwise).  This is the storage primitive of the
// rollback chip's off-datapath memories (written bits, page table, free
// page list).  The design asks only for fast static RAM; the single port and
// one-cycle latency are this design's choice.  Contents are not reset: the
// owners of each memory clear what they read before relying on it.
module rbc_sram #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
