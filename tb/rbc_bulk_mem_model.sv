// Behavioural model of bulk memory (conventional DRAM), for simulation only.
//
// Line-wide port: a held req is answered after 1..LAT_MAX cycles with a
// one-cycle ack; read data comes with ack; wstrb selects the words written.
// Locations never written read as zero.  Storage is an associative array so
// the full address space costs only what is touched.
module rbc_bulk_mem_model #(
  parameter int unsigned AW      = 20,
  parameter int unsigned WORD_W  = 32,
  parameter int unsigned NW      = 4,
  parameter int unsigned LAT_MAX = 3
) (
  input  logic                 clk,
  input  logic                 req,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic [WORD_W*NW-1:0] wdata,
  input  logic [NW-1:0]        wstrb,
  output logic                 ack,
  output logic [WORD_W*NW-1:0] rdata
);
  logic [WORD_W*NW-1:0] m [logic [AW-1:0]];
  logic busy = 1'b0;
  int   cnt  = 0;
  int unsigned accesses = 0;

  initial begin ack = 1'b0; rdata = '0; end

  always @(posedge clk) begin
    if (ack) begin
      ack <= 1'b0;
    end else if (!busy && req) begin
      busy <= 1'b1;
      cnt  <= int'($urandom_range(LAT_MAX - 1, 0));
    end else if (busy) begin
      if (cnt == 0) begin
        automatic logic [WORD_W*NW-1:0] old = m.exists(addr) ? m[addr] : '0;
        if (we) begin
          for (int w = 0; w < NW; w++)
            if (wstrb[w]) old[w*WORD_W +: WORD_W] = wdata[w*WORD_W +: WORD_W];
          m[addr] = old;
        end
        rdata    <= old;
        ack      <= 1'b1;
        busy     <= 1'b0;
        accesses <= accesses + 1;
      end else begin
        cnt <= cnt - 1;
      end
    end
  end
endmodule
