// Memory controller and address multiplexer of a node.
//
// Bulk memory (conventional DRAM, outside this design) is shared by two
// requesters: the rollback chip, which moves whole lines of mark frames and
// of the archive frame, and the CPU's ordinary references (instructions,
// local variables, I/O space) that bypass the rollback chip.  The address
// multiplexer puts the selected requester's address on the bulk-memory
// port: rollback-chip line addresses go to the lower half of the line
// address space, CPU word addresses to the upper half, with a write strobe
// for the one word written.
//
// Handshake on every port: a requester holds req (and its address/data)
// until a one-cycle ack; read data is valid with ack.  The controller
// alternates grants when both requesters wait, and leaves one idle cycle
// after each transfer.  Bulk memory answers a held mem_req with a one-cycle
// mem_ack after any latency.  The original node design names a memory
// controller and an address multiplexer between the CPU bus, the rollback
// chip and bulk memory; their behaviour here is this design's choice.
module rbc_mem_ctrl #(
  parameter int unsigned PA_BITS    = rbc_pkg::PID_BITS_D + rbc_pkg::LINE_BITS_D + 1,
  parameter int unsigned WORD_W     = rbc_pkg::WORD_W_D,
  parameter int unsigned WOFF_BITS  = rbc_pkg::WOFF_BITS_D
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // rollback chip: line port
  input  logic                          r_req,
  input  logic                          r_we,
  input  logic [PA_BITS-1:0]            r_addr,
  input  logic [WORD_W*(2**WOFF_BITS)-1:0] r_wdata,
  output logic                          r_ack,
  output logic [WORD_W*(2**WOFF_BITS)-1:0] r_rdata,
  // CPU bypass: word port
  input  logic                          c_req,
  input  logic                          c_we,
  input  logic [PA_BITS+WOFF_BITS-1:0]  c_addr,
  input  logic [WORD_W-1:0]             c_wdata,
  output logic                          c_ack,
  output logic [WORD_W-1:0]             c_rdata,
  // bulk memory: line port
  output logic                          mem_req,
  output logic                          mem_we,
  output logic [PA_BITS:0]              mem_addr,
  output logic [WORD_W*(2**WOFF_BITS)-1:0] mem_wdata,
  output logic [(2**WOFF_BITS)-1:0]     mem_wstrb,
  input  logic                          mem_ack,
  input  logic [WORD_W*(2**WOFF_BITS)-1:0] mem_rdata
);
  localparam int unsigned NW = 2**WOFF_BITS;

  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_GAP} cstate_e;
  cstate_e st;
  logic    sel;        // 0 rollback chip, 1 CPU
  logic    last;       // last granted requester
  logic [WOFF_BITS-1:0] woff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; sel <= 1'b0; last <= 1'b1; woff <= '0;
      mem_req <= 1'b0; mem_we <= 1'b0; mem_addr <= '0; mem_wdata <= '0; mem_wstrb <= '0;
      r_ack <= 1'b0; c_ack <= 1'b0; r_rdata <= '0; c_rdata <= '0;
    end else begin
      r_ack <= 1'b0;
      c_ack <= 1'b0;
      unique case (st)
        C_IDLE: begin
          if (r_req && (!c_req || last)) begin
            sel <= 1'b0; last <= 1'b0; st <= C_WAIT;
            mem_req <= 1'b1; mem_we <= r_we; mem_addr <= {1'b0, r_addr};
            mem_wdata <= r_wdata; mem_wstrb <= {NW{r_we}};
          end else if (c_req) begin
            sel <= 1'b1; last <= 1'b1; st <= C_WAIT;
            woff <= c_addr[WOFF_BITS-1:0];
            mem_req <= 1'b1; mem_we <= c_we; mem_addr <= {1'b1, c_addr[PA_BITS+WOFF_BITS-1:WOFF_BITS]};
            mem_wdata <= {NW{c_wdata}};
            mem_wstrb <= c_we ? NW'(1) << c_addr[WOFF_BITS-1:0] : '0;
          end
        end
        C_WAIT: if (mem_ack) begin
          mem_req <= 1'b0;
          st      <= C_GAP;
          if (sel) begin
            c_ack   <= 1'b1;
            c_rdata <= mem_rdata[woff*WORD_W +: WORD_W];
          end else begin
            r_ack   <= 1'b1;
            r_rdata <= mem_rdata;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
