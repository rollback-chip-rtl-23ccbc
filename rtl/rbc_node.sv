// One node of a Time Warp simulation engine, built around the rollback chip.
//
// The rollback chip (control unit, RB cache, rollback-history unit,
// written-bit memory, MMU) serves the CPU's references to version
// controlled memory and its MARK / ROLLBACK / ADVANCE / RESET / SETPID
// commands; the memory controller shares bulk memory between the rollback
// chip and the CPU's ordinary references that bypass it.  The CPU (with its
// conventional cache) and the bulk DRAM are outside this module: their
// buses are the ports.
//
// Ports:
//   vcm_*   CPU reference to the VCM of the current process: word address
//           {line, word}, held with vcm_valid until the one-cycle vcm_done;
//           vcm_err = write refused, no free physical page.
//   cmd_*   control-register write: op and argument (k, or process id),
//           held until cmd_done; cmd_err = command refused.
//   cpu_*   CPU reference outside version controlled memory (word address).
//   mem_*   bulk memory, line wide; mem_req held until a one-cycle mem_ack.
//   status  ready (reset walk finished), pid, CMF, OMF, CRBI of the current
//           process, advance_busy, event pulses and pages in use.
// The block structure follows the original node design; the
// interfaces between the blocks are this design's.
module rbc_node #(
  parameter int unsigned PID_BITS      = rbc_pkg::PID_BITS_D,
  parameter int unsigned LINE_BITS     = rbc_pkg::LINE_BITS_D,
  parameter int unsigned WOFF_BITS     = rbc_pkg::WOFF_BITS_D,
  parameter int unsigned WORD_W        = rbc_pkg::WORD_W_D,
  parameter int unsigned FRAME_BITS    = rbc_pkg::FRAME_BITS_D,
  parameter int unsigned WAF_BITS      = rbc_pkg::WAF_BITS_D,
  parameter int unsigned FX_BITS       = rbc_pkg::FX_BITS_D,
  parameter int unsigned TAG_BITS      = rbc_pkg::TAG_BITS_D,
  parameter int unsigned PAGE_BITS     = rbc_pkg::PAGE_BITS_D,
  parameter int unsigned PPN_BITS      = rbc_pkg::PPN_BITS_D,
  parameter int unsigned CACHE_ENTRIES = 256,
  parameter int unsigned CACHE_WAYS    = 2,
  parameter int unsigned RBH_BUF       = 16,
  localparam int unsigned LINE_W  = WORD_W * (2**WOFF_BITS),
  localparam int unsigned PA_BITS = 1 + ((PID_BITS + LINE_BITS > PPN_BITS + PAGE_BITS) ?
                                         PID_BITS + LINE_BITS : PPN_BITS + PAGE_BITS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // CPU: version controlled memory
  input  logic                           vcm_valid,
  input  logic                           vcm_we,
  input  logic [LINE_BITS+WOFF_BITS-1:0] vcm_addr,
  input  logic [WORD_W-1:0]              vcm_wdata,
  output logic                           vcm_done,
  output logic                           vcm_err,
  output logic [WORD_W-1:0]              vcm_rdata,
  // CPU: RBC control registers
  input  logic                           cmd_valid,
  input  rbc_pkg::rbc_cmd_e              cmd_op,
  input  logic [FRAME_BITS-1:0]          cmd_arg,
  output logic                           cmd_done,
  output logic                           cmd_err,
  // CPU: ordinary memory (bypasses the rollback chip)
  input  logic                           cpu_req,
  input  logic                           cpu_we,
  input  logic [PA_BITS+WOFF_BITS-1:0]   cpu_addr,
  input  logic [WORD_W-1:0]              cpu_wdata,
  output logic                           cpu_ack,
  output logic [WORD_W-1:0]              cpu_rdata,
  // bulk memory
  output logic                           mem_req,
  output logic                           mem_we,
  output logic [PA_BITS:0]               mem_addr,
  output logic [LINE_W-1:0]              mem_wdata,
  output logic [(2**WOFF_BITS)-1:0]      mem_wstrb,
  input  logic                           mem_ack,
  input  logic [LINE_W-1:0]              mem_rdata,
  // status
  output logic                           ready,
  output logic [PID_BITS-1:0]            cur_pid,
  output logic [FRAME_BITS-1:0]          cur_cmf,
  output logic [FRAME_BITS-1:0]          cur_omf,
  output logic [TAG_BITS-1:0]            cur_crbi,
  output logic                           advance_busy,
  output rbc_pkg::rbc_events_t           events,
  output logic [PPN_BITS:0]              pages_used,
  output logic [$clog2(CACHE_ENTRIES+1)-1:0] last_invalidated,
  output logic [$clog2(RBH_BUF+1)-1:0]   last_rbh_updates,
  output logic                           rbh_walking
);
  localparam int unsigned NB      = 2**WAF_BITS;
  localparam int unsigned WA_BITS = FRAME_BITS - WAF_BITS;

  // cache
  logic              c_flush, c_hit, c_touch, c_upd, c_inv;
  logic [LINE_BITS-1:0] c_line;
  logic [LINE_W-1:0] c_hit_data, c_upd_data;
  logic [FX_BITS-1:0] c_hit_mrv, c_upd_mrv, c_inv_dst;
  // history
  logic              h_clear, h_rb, h_busy, h_lk_inf;
  logic [PID_BITS-1:0] h_pid, h_lk_pid;
  logic [FX_BITS-1:0] h_dst, h_lk_frame;
  logic [TAG_BITS-1:0] h_floor, h_crbi;
  // written bits
  logic              w_init, w_busy, w_rd, w_wr;
  logic [PID_BITS-1:0] w_pid;
  logic [LINE_BITS-1:0] w_line;
  logic [WA_BITS-1:0] w_wa;
  logic [TAG_BITS-1:0] w_wtag, w_rtag;
  logic [NB-1:0]     w_wbits, w_rbits;
  // MMU
  logic              m_init, m_busy, m_start, m_done, m_fault;
  rbc_pkg::mmu_op_e  m_op;
  logic [PID_BITS-1:0] m_pid;
  logic [FRAME_BITS-1:0] m_frame;
  logic [LINE_BITS-1:0] m_line;
  logic [PPN_BITS+PAGE_BITS-1:0] m_paddr;
  // rollback chip line port
  logic              b_req, b_we, b_ack;
  logic [PA_BITS-1:0] b_addr;
  logic [LINE_W-1:0] b_wdata, b_rdata;

  rbc_control #(
    .PID_BITS(PID_BITS), .LINE_BITS(LINE_BITS), .WOFF_BITS(WOFF_BITS), .WORD_W(WORD_W),
    .FRAME_BITS(FRAME_BITS), .WAF_BITS(WAF_BITS), .FX_BITS(FX_BITS), .TAG_BITS(TAG_BITS),
    .PAGE_BITS(PAGE_BITS), .PPN_BITS(PPN_BITS), .PA_BITS(PA_BITS)
  ) u_ctrl (
    .clk, .rst_n,
    .acc_valid(vcm_valid), .acc_we(vcm_we), .acc_addr(vcm_addr), .acc_wdata(vcm_wdata),
    .acc_done(vcm_done), .acc_err(vcm_err), .acc_rdata(vcm_rdata),
    .cmd_valid, .cmd_op, .cmd_arg, .cmd_done, .cmd_err,
    .ready, .cur_pid, .cur_cmf, .cur_omf, .cur_crbi, .adv_busy(advance_busy), .ev(events),
    .c_flush, .c_line, .c_hit, .c_hit_data, .c_touch, .c_upd, .c_upd_data, .c_upd_mrv,
    .c_inv, .c_inv_dst,
    .h_clear, .h_rb, .h_pid, .h_dst, .h_floor, .h_busy, .h_lk_pid, .h_lk_inf, .h_lk_frame,
    .h_crbi,
    .w_init, .w_busy, .w_rd, .w_wr, .w_pid, .w_line, .w_wa, .w_wtag, .w_wbits, .w_rbits,
    .m_init, .m_busy, .m_start, .m_op, .m_pid, .m_frame, .m_line, .m_done, .m_fault, .m_paddr,
    .b_req, .b_we, .b_addr, .b_wdata, .b_ack, .b_rdata
  );

  rbc_rb_cache #(
    .ENTRIES(CACHE_ENTRIES), .WAYS(CACHE_WAYS), .LINE_BITS(LINE_BITS), .PID_BITS(PID_BITS),
    .LINE_W(LINE_W), .FX_BITS(FX_BITS)
  ) u_cache (
    .clk, .rst_n, .flush(c_flush), .pid(cur_pid), .line(c_line), .hit(c_hit),
    .hit_data(c_hit_data), .hit_mrv(c_hit_mrv), .touch(c_touch), .upd(c_upd),
    .upd_data(c_upd_data), .upd_mrv(c_upd_mrv), .inv(c_inv), .inv_pid(cur_pid),
    .inv_dst(c_inv_dst), .inv_count(last_invalidated)
  );

  rbc_rb_history #(
    .NPROC(2**PID_BITS), .TAG_BITS(TAG_BITS), .FX_BITS(FX_BITS), .BUF(RBH_BUF)
  ) u_rbh (
    .clk, .rst_n, .clear(h_clear), .rb(h_rb), .rb_pid(h_pid), .rb_dst(h_dst),
    .rb_floor(h_floor), .busy(h_busy), .par_updates(last_rbh_updates),
    .lk_pid(h_lk_pid), .lk_ts(w_rtag), .lk_inf(h_lk_inf), .lk_frame(h_lk_frame),
    .q_pid(cur_pid), .crbi(h_crbi)
  );

  rbc_wb_mem #(
    .PID_BITS(PID_BITS), .LINE_BITS(LINE_BITS), .WA_BITS(WA_BITS), .NBITS(NB),
    .TAG_BITS(TAG_BITS)
  ) u_wb (
    .clk, .rst_n, .init(w_init), .busy(w_busy), .rd(w_rd), .wr(w_wr), .pid(w_pid),
    .line(w_line), .wa(w_wa), .wtag(w_wtag), .wbits(w_wbits), .rtag(w_rtag), .rbits(w_rbits)
  );

  rbc_mmu #(
    .PID_BITS(PID_BITS), .FRAME_BITS(FRAME_BITS), .WAF_BITS(WAF_BITS), .LINE_BITS(LINE_BITS),
    .PAGE_BITS(PAGE_BITS), .PPN_BITS(PPN_BITS)
  ) u_mmu (
    .clk, .rst_n, .init(m_init), .busy(m_busy), .start(m_start), .op(m_op), .pid(m_pid),
    .frame(m_frame), .line(m_line), .done(m_done), .fault(m_fault), .paddr(m_paddr),
    .pages_used
  );

  rbc_mem_ctrl #(
    .PA_BITS(PA_BITS), .WORD_W(WORD_W), .WOFF_BITS(WOFF_BITS)
  ) u_memc (
    .clk, .rst_n,
    .r_req(b_req), .r_we(b_we), .r_addr(b_addr), .r_wdata(b_wdata), .r_ack(b_ack),
    .r_rdata(b_rdata),
    .c_req(cpu_req), .c_we(cpu_we), .c_addr(cpu_addr), .c_wdata(cpu_wdata), .c_ack(cpu_ack),
    .c_rdata(cpu_rdata),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_wstrb, .mem_ack, .mem_rdata
  );

  assign rbh_walking = h_busy;
endmodule
