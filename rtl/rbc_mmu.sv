// Memory management unit of the rollback chip.
//
// Mark-frame addresses {pid, frame, line} are virtual; physical memory is
// given to a page only on the first write into it (demand allocation), and
// pages are reclaimed when the ADVANCE operation fossil collects a working
// area.  The page table has one entry {present, ppn} per (pid, frame,
// virtual page).  Free physical pages are kept on a free-page stack in RAM;
// pages never handed out yet come from a counter, so no list has to be
// built at reset.
//
// Operations (start pulse with op, then a done pulse some cycles later):
//   MMU_XLATE  read the entry for (pid, frame, line); fault if absent.
//   MMU_ALLOC  as XLATE, but an absent page is allocated and entered;
//              fault only when no physical page is free.
//   MMU_FREE   walk every page of the 16 frames of working area
//              frame[FRAME_BITS-1:WAF_BITS] of pid, return present pages to
//              the free stack and clear their entries.
// paddr is the physical line address {ppn, line within page}.  init clears
// every page-table entry (one per cycle, busy meanwhile).
//
// The presence bit, page pointer, free list, allocation on first write and
// reclamation by ADVANCE follow the original rollback-chip design.  Page size (64 lines),
// the number of physical pages (4096), the single-level table and the free
// stack organisation are this design's choices.
module rbc_mmu #(
  parameter int unsigned PID_BITS   = rbc_pkg::PID_BITS_D,
  parameter int unsigned FRAME_BITS = rbc_pkg::FRAME_BITS_D,
  parameter int unsigned WAF_BITS   = rbc_pkg::WAF_BITS_D,
  parameter int unsigned LINE_BITS  = rbc_pkg::LINE_BITS_D,
  parameter int unsigned PAGE_BITS  = rbc_pkg::PAGE_BITS_D,
  parameter int unsigned PPN_BITS   = rbc_pkg::PPN_BITS_D
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        init,
  output logic                        busy,
  input  logic                        start,
  input  rbc_pkg::mmu_op_e            op,
  input  logic [PID_BITS-1:0]         pid,
  input  logic [FRAME_BITS-1:0]       frame,
  input  logic [LINE_BITS-1:0]        line,
  output logic                        done,
  output logic                        fault,
  output logic [PPN_BITS+PAGE_BITS-1:0] paddr,
  output logic [PPN_BITS:0]           pages_used
);
  import rbc_pkg::*;

  localparam int unsigned VP_BITS = LINE_BITS - PAGE_BITS;
  localparam int unsigned PT_AW   = PID_BITS + FRAME_BITS + VP_BITS;
  localparam int unsigned FW_BITS = WAF_BITS + VP_BITS;   // pages of one working area
  localparam int unsigned NPAGES  = 2**PPN_BITS;

  typedef enum logic [3:0] {
    M_INIT, M_IDLE, M_PT_RD, M_CHK, M_FL_RD, M_FL_GET, M_FR_RD, M_FR_CHK, M_DONE
  } mstate_e;
  mstate_e st;

  mmu_op_e                r_op;
  logic [PID_BITS-1:0]    r_pid;
  logic [FRAME_BITS-1:0]  r_frame;
  logic [LINE_BITS-1:0]   r_line;
  logic [PT_AW-1:0]       sweep;
  logic [FW_BITS-1:0]     fw;       // frame-in-WA and virtual page during FREE
  logic [PPN_BITS:0]      fl_cnt;   // entries on the free stack
  logic [PPN_BITS:0]      fresh;    // pages never allocated yet start here
  logic [PPN_BITS-1:0]    r_ppn;

  // page table RAM
  logic               pt_en, pt_we;
  logic [PT_AW-1:0]   pt_addr;
  logic [PPN_BITS:0]  pt_wdata, pt_rdata;
  // free stack RAM
  logic               fl_en, fl_we;
  logic [PPN_BITS-1:0] fl_addr, fl_wdata, fl_rdata;

  rbc_sram #(.AW(PT_AW), .DW(PPN_BITS+1)) u_pt (
    .clk, .en(pt_en), .we(pt_we), .addr(pt_addr), .wdata(pt_wdata), .rdata(pt_rdata));
  rbc_sram #(.AW(PPN_BITS), .DW(PPN_BITS)) u_fl (
    .clk, .en(fl_en), .we(fl_we), .addr(fl_addr), .wdata(fl_wdata), .rdata(fl_rdata));

  logic [FRAME_BITS-1:0] fr_frame;
  assign fr_frame = {r_frame[FRAME_BITS-1:WAF_BITS], fw[FW_BITS-1:VP_BITS]};

  always_comb begin
    pt_en = 1'b0; pt_we = 1'b0; pt_addr = {r_pid, r_frame, r_line[LINE_BITS-1:PAGE_BITS]};
    pt_wdata = '0;
    fl_en = 1'b0; fl_we = 1'b0; fl_addr = '0; fl_wdata = '0;
    unique case (st)
      M_INIT: begin pt_en = 1'b1; pt_we = 1'b1; pt_addr = sweep; end
      M_PT_RD: pt_en = 1'b1;
      M_CHK: begin
        if (r_op == MMU_ALLOC && !pt_rdata[PPN_BITS]) begin
          if (fl_cnt != 0) begin
            fl_en = 1'b1; fl_addr = PPN_BITS'(fl_cnt - 1'b1);
          end else if (fresh < (PPN_BITS+1)'(NPAGES)) begin
            pt_en = 1'b1; pt_we = 1'b1; pt_wdata = {1'b1, fresh[PPN_BITS-1:0]};
          end
        end
      end
      M_FL_GET: begin pt_en = 1'b1; pt_we = 1'b1; pt_wdata = {1'b1, fl_rdata}; end
      M_FR_RD: begin pt_en = 1'b1; pt_addr = {r_pid, fr_frame, fw[VP_BITS-1:0]}; end
      M_FR_CHK: begin
        pt_addr = {r_pid, fr_frame, fw[VP_BITS-1:0]};
        if (pt_rdata[PPN_BITS]) begin
          pt_en = 1'b1; pt_we = 1'b1; pt_wdata = '0;
          fl_en = 1'b1; fl_we = 1'b1; fl_addr = PPN_BITS'(fl_cnt); fl_wdata = pt_rdata[PPN_BITS-1:0];
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_INIT; sweep <= '0; fw <= '0; fl_cnt <= '0; fresh <= '0;
      r_op <= MMU_XLATE; r_pid <= '0; r_frame <= '0; r_line <= '0; r_ppn <= '0;
      done <= 1'b0; fault <= 1'b0;
    end else begin
      done <= 1'b0;
      if (init) begin
        st <= M_INIT; sweep <= '0; fl_cnt <= '0; fresh <= '0;
      end else begin
        unique case (st)
          M_INIT: begin
            sweep <= sweep + 1'b1;
            if (sweep == PT_AW'((64'd1 << PT_AW) - 1)) st <= M_IDLE;
          end
          M_IDLE: if (start) begin
            r_op <= op; r_pid <= pid; r_frame <= frame; r_line <= line;
            fw <= '0;
            st <= (op == MMU_FREE) ? M_FR_RD : M_PT_RD;
          end
          M_PT_RD: st <= M_CHK;
          M_CHK: begin
            if (pt_rdata[PPN_BITS]) begin
              r_ppn <= pt_rdata[PPN_BITS-1:0]; fault <= 1'b0; st <= M_DONE;
            end else if (r_op != MMU_ALLOC) begin
              fault <= 1'b1; st <= M_DONE;
            end else if (fl_cnt != 0) begin
              st <= M_FL_RD;
            end else if (fresh < (PPN_BITS+1)'(NPAGES)) begin
              r_ppn <= fresh[PPN_BITS-1:0]; fresh <= fresh + 1'b1; fault <= 1'b0; st <= M_DONE;
            end else begin
              fault <= 1'b1; st <= M_DONE;
            end
          end
          M_FL_RD: st <= M_FL_GET;
          M_FL_GET: begin
            r_ppn <= fl_rdata; fl_cnt <= fl_cnt - 1'b1; fault <= 1'b0; st <= M_DONE;
          end
          M_FR_RD: st <= M_FR_CHK;
          M_FR_CHK: begin
            if (pt_rdata[PPN_BITS]) fl_cnt <= fl_cnt + 1'b1;
            fw <= fw + 1'b1;
            if (fw == FW_BITS'((64'd1 << FW_BITS) - 1)) begin
              fault <= 1'b0; st <= M_DONE;
            end else begin
              st <= M_FR_RD;
            end
          end
          M_DONE: begin done <= 1'b1; st <= M_IDLE; end
          default: st <= M_IDLE;
        endcase
      end
    end
  end

  // The free-stack read is issued in M_CHK; its data is used in M_FL_GET.
  assign busy       = (st == M_INIT);
  assign paddr      = {r_ppn, r_line[PAGE_BITS-1:0]};
  assign pages_used = fresh - fl_cnt;
endmodule
