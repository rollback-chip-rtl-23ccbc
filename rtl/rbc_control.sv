// Control unit of the rollback chip.
//
// Sequences every RBC operation on the RB cache, the written-bit memory,
// the rollback-history unit, the MMU and bulk memory, and keeps the
// per-process registers: CMF (current mark frame), OMF (oldest mark frame),
// the highest frame ever created, and TAGBOUND (rollback index at the first
// creation of each working area).  One copy of these registers is kept per
// process, so a context switch is only a SETPID command.
//
// READ/WRITE (acc port, word address within the VCM of the current process):
//   hit:   a read returns the cached word; a write merges the word into the
//          cached line.
//   miss:  the written-bit blocks of the line are read from the working area
//          of CMF downwards to that of OMF, 16 frames per read, each block
//          corrected by the rollback history; the newest set bit gives the
//          MRV frame, none gives the archive frame.  The line is read from
//          bulk memory and put in the cache.
//   write: (write through) the page of (CMF, line) is translated, allocated
//          on first use, the cache entry takes the line and MRV=CMF, the
//          written bit of CMF is set in its block (stamped with the current
//          rollback index) and the whole line is written to CMF in memory.
// MARK pushes a frame (refused if the stack is full), ROLLBACK(k) pops k
// frames in a few cycles (cache invalidation and rollback-history update in
// parallel), ADVANCE(k) records a new OMF and returns; a background engine
// then fossil collects whole working areas between CPU operations: for each
// line it copies the newest version in the area to the archive frame unless
// a newer version at or below the new OMF exists, clears the area's block,
// and at the end frees the area's pages and moves OMF.
//
// Handshakes: acc_valid / cmd_valid are held until the one-cycle acc_done /
// cmd_done; acc_err flags a write refused for lack of physical pages,
// cmd_err a refused command.  One idle cycle follows every done.
// The algorithm, write-through cache, lazy clearing, archive frame, copy
// optimisation and demand paging follow the original rollback-chip design; the state
// sequence, the per-process register copies, the refusal of operations that
// cannot proceed (instead of blocking) and the CPU waiting for write-through
// completion (no write buffer) are this design's choices.
module rbc_control #(
  parameter int unsigned PID_BITS   = rbc_pkg::PID_BITS_D,
  parameter int unsigned LINE_BITS  = rbc_pkg::LINE_BITS_D,
  parameter int unsigned WOFF_BITS  = rbc_pkg::WOFF_BITS_D,
  parameter int unsigned WORD_W     = rbc_pkg::WORD_W_D,
  parameter int unsigned FRAME_BITS = rbc_pkg::FRAME_BITS_D,
  parameter int unsigned WAF_BITS   = rbc_pkg::WAF_BITS_D,
  parameter int unsigned FX_BITS    = rbc_pkg::FX_BITS_D,
  parameter int unsigned TAG_BITS   = rbc_pkg::TAG_BITS_D,
  parameter int unsigned PAGE_BITS  = rbc_pkg::PAGE_BITS_D,
  parameter int unsigned PPN_BITS   = rbc_pkg::PPN_BITS_D,
  parameter int unsigned PA_BITS    = 1 + ((PID_BITS + LINE_BITS > PPN_BITS + PAGE_BITS) ?
                                           PID_BITS + LINE_BITS : PPN_BITS + PAGE_BITS),
  localparam int unsigned LINE_W    = WORD_W * (2**WOFF_BITS),
  localparam int unsigned NB        = 2**WAF_BITS,
  localparam int unsigned WA_BITS   = FRAME_BITS - WAF_BITS,
  localparam int unsigned NPROC     = 2**PID_BITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // CPU: VCM references
  input  logic                         acc_valid,
  input  logic                         acc_we,
  input  logic [LINE_BITS+WOFF_BITS-1:0] acc_addr,
  input  logic [WORD_W-1:0]            acc_wdata,
  output logic                         acc_done,
  output logic                         acc_err,
  output logic [WORD_W-1:0]            acc_rdata,
  // CPU: control registers
  input  logic                         cmd_valid,
  input  rbc_pkg::rbc_cmd_e            cmd_op,
  input  logic [FRAME_BITS-1:0]        cmd_arg,
  output logic                         cmd_done,
  output logic                         cmd_err,
  // CPU-visible state of the current process
  output logic                         ready,
  output logic [PID_BITS-1:0]          cur_pid,
  output logic [FRAME_BITS-1:0]        cur_cmf,
  output logic [FRAME_BITS-1:0]        cur_omf,
  output logic [TAG_BITS-1:0]          cur_crbi,
  output logic                         adv_busy,
  output rbc_pkg::rbc_events_t         ev,
  // RB cache
  output logic                         c_flush,
  output logic [LINE_BITS-1:0]         c_line,
  input  logic                         c_hit,
  input  logic [LINE_W-1:0]            c_hit_data,
  output logic                         c_touch,
  output logic                         c_upd,
  output logic [LINE_W-1:0]            c_upd_data,
  output logic [FX_BITS-1:0]           c_upd_mrv,
  output logic                         c_inv,
  output logic [FX_BITS-1:0]           c_inv_dst,
  // rollback history
  output logic                         h_clear,
  output logic                         h_rb,
  output logic [PID_BITS-1:0]          h_pid,
  output logic [FX_BITS-1:0]           h_dst,
  output logic [TAG_BITS-1:0]          h_floor,
  input  logic                         h_busy,
  output logic [PID_BITS-1:0]          h_lk_pid,
  input  logic                         h_lk_inf,
  input  logic [FX_BITS-1:0]           h_lk_frame,
  input  logic [TAG_BITS-1:0]          h_crbi,
  // written-bit memory
  output logic                         w_init,
  input  logic                         w_busy,
  output logic                         w_rd,
  output logic                         w_wr,
  output logic [PID_BITS-1:0]          w_pid,
  output logic [LINE_BITS-1:0]         w_line,
  output logic [WA_BITS-1:0]           w_wa,
  output logic [TAG_BITS-1:0]          w_wtag,
  output logic [NB-1:0]                w_wbits,
  input  logic [NB-1:0]                w_rbits,
  // MMU
  output logic                         m_init,
  input  logic                         m_busy,
  output logic                         m_start,
  output rbc_pkg::mmu_op_e             m_op,
  output logic [PID_BITS-1:0]          m_pid,
  output logic [FRAME_BITS-1:0]        m_frame,
  output logic [LINE_BITS-1:0]         m_line,
  input  logic                         m_done,
  input  logic                         m_fault,
  input  logic [PPN_BITS+PAGE_BITS-1:0] m_paddr,
  // bulk memory (line port through the memory controller)
  output logic                         b_req,
  output logic                         b_we,
  output logic [PA_BITS-1:0]           b_addr,
  output logic [LINE_W-1:0]            b_wdata,
  input  logic                         b_ack,
  input  logic [LINE_W-1:0]            b_rdata
);
  import rbc_pkg::*;

  localparam int unsigned WX = FX_BITS - WAF_BITS;   // extended working-area number
  typedef logic [FX_BITS-1:0] fx_t;
  typedef logic [WX-1:0]      wx_t;

  typedef enum logic [4:0] {
    S_RESET, S_INITW, S_IDLE, S_GAP,
    S_LOOK, S_SR_RD, S_SR_CHK, S_XLR, S_XLR_W, S_MRD,
    S_XLW, S_XLW_W, S_WB_RD, S_WB_WR, S_MWR,
    S_A_BEGIN, S_A_RD, S_A_CHK, S_A_RD2, S_A_CHK2, S_A_XL, S_A_XLW,
    S_A_MRD, S_A_MWR, S_A_CLR, S_A_FREE, S_A_FREEW
  } state_e;
  state_e st;

  // per-process registers
  fx_t          cmf      [NPROC];
  fx_t          omf      [NPROC];
  fx_t          hwm      [NPROC];
  logic [TAG_BITS-1:0] tagbound [NPROC][2**WA_BITS];
  logic [PID_BITS-1:0] pid;

  // current foreground operation
  logic                  op_we;
  logic [LINE_BITS-1:0]  op_line;
  logic [WOFF_BITS-1:0]  op_woff;
  logic [WORD_W-1:0]     op_wdata;
  wx_t                   s_wa;      // working area being searched
  fx_t                   s_mrv;     // MRV frame found
  logic [LINE_W-1:0]     lbuf;
  logic [PA_BITS-1:0]    paddr;

  // ADVANCE engine
  logic                  a_coll;    // collecting a working area
  logic [PID_BITS-1:0]   a_pid;
  fx_t                   a_tgt;
  fx_t                   a_new;     // OMF after this working area
  wx_t                   a_wa;
  logic [LINE_BITS-1:0]  a_line;
  logic [FRAME_BITS-1:0] a_mrv;      // frame of the version to archive

  // ---------------------------------------------------------------- helpers
  // Written bits of a block of extended working area wax that are still
  // valid: frames not newer than limit and not rolled back since the tag.
  function automatic logic [NB-1:0] live_bits(input logic [NB-1:0] bits, input wx_t wax,
                                              input fx_t limit, input logic inf, input fx_t rbf);
    logic [NB-1:0] k;
    for (int j = 0; j < NB; j++) begin
      automatic fx_t f = {wax, WAF_BITS'(j)};
      k[j] = bits[j] && !fx_gt(16'(f), 16'(limit), FX_BITS) &&
             (inf || !fx_gt(16'(f), 16'(rbf), FX_BITS));
    end
    return k;
  endfunction

  function automatic logic [WAF_BITS-1:0] newest(input logic [NB-1:0] bits);
    logic [WAF_BITS-1:0] r = '0;
    for (int j = 0; j < NB; j++) if (bits[j]) r = WAF_BITS'(j);
    return r;
  endfunction

  function automatic logic [PA_BITS-1:0] arch_addr(input logic [PID_BITS-1:0] p,
                                                   input logic [LINE_BITS-1:0] l);
    return {1'b1, (PA_BITS-1)'({p, l})};
  endfunction

  // --------------------------------------------------------- derived values
  fx_t           cmf_c, omf_c, obase_c;
  logic [TAG_BITS-1:0] floor_c;
  logic [NB-1:0] fg_bits, a_bits, a_bits2, wb_new;
  fx_t           mk_next, rb_dst, adv_tgt_c, rb_floor_fx;
  logic          mk_full, rb_bad, rb_hist_full, adv_bad;
  logic          cmd_blocked;
  logic [LINE_W-1:0] merged_hit;

  assign cmf_c   = cmf[pid];
  assign omf_c   = omf[pid];
  assign obase_c = {omf_c[FX_BITS-1:WAF_BITS], {WAF_BITS{1'b0}}};
  assign floor_c = tagbound[pid][omf_c[FRAME_BITS-1:WAF_BITS]];

  assign fg_bits = live_bits(w_rbits, s_wa, cmf_c, h_lk_inf, h_lk_frame);
  assign wb_new  = live_bits(w_rbits, cmf_c[FX_BITS-1:WAF_BITS], cmf_c, h_lk_inf, h_lk_frame)
                   | (NB'(1) << cmf_c[WAF_BITS-1:0]);
  assign a_bits  = live_bits(w_rbits, a_wa, cmf[a_pid], h_lk_inf, h_lk_frame);
  assign a_bits2 = live_bits(w_rbits, a_wa + 1'b1, a_new, h_lk_inf, h_lk_frame);

  assign mk_next = cmf_c + 1'b1;
  assign mk_full = (mk_next - obase_c) >= fx_t'(2**FRAME_BITS);
  assign rb_dst  = cmf_c - fx_t'(cmd_arg);
  assign rb_floor_fx = (adv_busy && a_pid == pid) ? a_tgt : omf_c;
  assign rb_hist_full = (h_crbi + 1'b1) == floor_c;
  assign rb_bad  = (cmd_arg == '0) || fx_gt(16'(rb_floor_fx), 16'(rb_dst), FX_BITS) || rb_hist_full;
  assign adv_tgt_c = omf_c + fx_t'(cmd_arg);
  assign adv_bad = fx_gt(16'(adv_tgt_c), 16'(cmf_c), FX_BITS);
  assign cmd_blocked = h_busy ||
                       (cmd_op == CMD_ADVANCE && adv_busy) ||
                       (cmd_op == CMD_MARK && mk_full && adv_busy && a_pid == pid);

  always_comb begin
    merged_hit = c_hit_data;
    merged_hit[op_woff*WORD_W +: WORD_W] = op_wdata;
  end

  // ------------------------------------------------- combinational outputs
  always_comb begin
    c_flush = 1'b0; c_touch = 1'b0; c_upd = 1'b0; c_upd_data = lbuf; c_upd_mrv = cmf_c;
    c_inv = 1'b0; c_inv_dst = rb_dst; c_line = op_line;
    h_clear = 1'b0; h_rb = 1'b0; h_pid = pid; h_dst = rb_dst; h_floor = floor_c;
    h_lk_pid = pid;
    w_init = 1'b0; w_rd = 1'b0; w_wr = 1'b0; w_pid = pid; w_line = op_line;
    w_wa = s_wa[WA_BITS-1:0]; w_wtag = h_crbi; w_wbits = wb_new;
    m_init = 1'b0; m_start = 1'b0; m_op = MMU_XLATE; m_pid = pid;
    m_frame = s_mrv[FRAME_BITS-1:0]; m_line = op_line;
    b_req = 1'b0; b_we = 1'b0; b_addr = paddr; b_wdata = lbuf;
    unique case (st)
      S_RESET: begin c_flush = 1'b1; h_clear = 1'b1; w_init = 1'b1; m_init = 1'b1; end
      S_IDLE: begin
        if (ready && !h_busy && cmd_valid && !cmd_blocked && cmd_op == CMD_ROLLBACK && !rb_bad) begin
          c_inv = 1'b1; h_rb = 1'b1;
        end
      end
      S_LOOK: c_touch = !op_we;
      S_SR_RD: w_rd = 1'b1;
      S_XLR: m_start = 1'b1;
      S_MRD: begin
        b_req = 1'b1;
        if (b_ack && !op_we) begin c_upd = 1'b1; c_upd_data = b_rdata; c_upd_mrv = s_mrv; end
      end
      S_XLW: begin m_start = 1'b1; m_op = MMU_ALLOC; m_frame = cmf_c[FRAME_BITS-1:0]; end
      S_XLW_W: if (m_done && !m_fault) c_upd = 1'b1;
      S_WB_RD: begin w_rd = 1'b1; w_wa = cmf_c[FRAME_BITS-1:WAF_BITS]; end
      S_WB_WR: begin w_wr = 1'b1; w_wa = cmf_c[FRAME_BITS-1:WAF_BITS]; end
      S_MWR: begin b_req = 1'b1; b_we = 1'b1; end
      // ADVANCE engine
      S_A_RD, S_A_CHK, S_A_RD2, S_A_CHK2, S_A_CLR: begin
        h_lk_pid = a_pid; w_pid = a_pid; w_line = a_line;
        w_wa = (st == S_A_RD2 || st == S_A_CHK2) ? WA_BITS'(a_wa + 1'b1) : a_wa[WA_BITS-1:0];
        w_rd = (st == S_A_RD || st == S_A_RD2);
        w_wr = (st == S_A_CLR); w_wbits = '0; w_wtag = '0;
      end
      S_A_XL: begin
        m_start = 1'b1; m_pid = a_pid; m_frame = a_mrv[FRAME_BITS-1:0]; m_line = a_line;
      end
      S_A_MRD: b_req = 1'b1;
      S_A_MWR: begin b_req = 1'b1; b_we = 1'b1; b_addr = arch_addr(a_pid, a_line); end
      S_A_FREE: begin
        m_start = 1'b1; m_op = MMU_FREE; m_pid = a_pid; m_frame = {a_wa[WA_BITS-1:0], {WAF_BITS{1'b0}}};
      end
      default: ;
    endcase
  end

  // --------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_RESET;
      ready <= 1'b0;
      pid <= '0;
      for (int p = 0; p < NPROC; p++) begin
        cmf[p] <= '0; omf[p] <= '0; hwm[p] <= '0;
        for (int w = 0; w < 2**WA_BITS; w++) tagbound[p][w] <= '0;
      end
      op_we <= 1'b0; op_line <= '0; op_woff <= '0; op_wdata <= '0;
      s_wa <= '0; s_mrv <= '0; lbuf <= '0; paddr <= '0;
      adv_busy <= 1'b0; a_coll <= 1'b0; a_pid <= '0; a_tgt <= '0; a_new <= '0;
      a_wa <= '0; a_line <= '0; a_mrv <= '0;
      acc_done <= 1'b0; acc_err <= 1'b0; acc_rdata <= '0;
      cmd_done <= 1'b0; cmd_err <= 1'b0;
      ev <= '0;
    end else begin
      acc_done <= 1'b0;
      cmd_done <= 1'b0;
      ev <= '0;
      unique case (st)
        S_RESET: begin
          ready <= 1'b0;
          for (int p = 0; p < NPROC; p++) begin
            cmf[p] <= '0; omf[p] <= '0; hwm[p] <= '0;
            for (int w = 0; w < 2**WA_BITS; w++) tagbound[p][w] <= '0;
          end
          adv_busy <= 1'b0; a_coll <= 1'b0; a_line <= '0;
          st <= S_INITW;
        end
        S_INITW: if (!w_busy && !m_busy) begin ready <= 1'b1; st <= S_IDLE; end
        S_GAP: st <= S_IDLE;
        S_IDLE: begin
          if (h_busy) begin
            // rollback-history walk in progress: wait
          end else if (cmd_valid && !cmd_blocked) begin
            cmd_done <= (cmd_op != CMD_RESET);
            cmd_err  <= 1'b0;
            st       <= S_GAP;
            unique case (cmd_op)
              CMD_RESET: begin pid <= '0; st <= S_RESET; cmd_done <= 1'b1; end
              CMD_SETPID: pid <= PID_BITS'(cmd_arg);
              CMD_MARK: begin
                if (mk_full) begin
                  cmd_err <= 1'b1; ev.mark_refused <= 1'b1;
                end else begin
                  cmf[pid] <= mk_next;
                  if (fx_gt(16'(mk_next), 16'(hwm[pid]), FX_BITS)) begin
                    hwm[pid] <= mk_next;
                    if (mk_next[WAF_BITS-1:0] == '0)
                      tagbound[pid][mk_next[FRAME_BITS-1:WAF_BITS]] <= h_crbi;
                  end
                end
              end
              CMD_ROLLBACK: begin
                if (rb_bad) begin
                  cmd_err <= 1'b1; ev.rollback_refused <= 1'b1;
                end else begin
                  cmf[pid] <= rb_dst;
                end
              end
              CMD_ADVANCE: begin
                if (adv_bad) begin
                  cmd_err <= 1'b1;
                end else begin
                  adv_busy <= 1'b1; a_pid <= pid; a_tgt <= adv_tgt_c; a_coll <= 1'b0;
                end
              end
              default: cmd_err <= 1'b1;
            endcase
          end else if (acc_valid && ready) begin
            op_we    <= acc_we;
            op_line  <= acc_addr[LINE_BITS+WOFF_BITS-1:WOFF_BITS];
            op_woff  <= acc_addr[WOFF_BITS-1:0];
            op_wdata <= acc_wdata;
            st       <= S_LOOK;
          end else if (adv_busy && ready) begin
            st <= a_coll ? S_A_RD : S_A_BEGIN;
          end
        end
        // ------------------------------------------------ READ / WRITE
        S_LOOK: begin
          s_wa   <= cmf_c[FX_BITS-1:WAF_BITS];
          s_mrv  <= cmf_c;
          if (c_hit) begin
            ev.hit <= 1'b1;
            if (!op_we) begin
              acc_rdata <= c_hit_data[op_woff*WORD_W +: WORD_W];
              acc_err   <= 1'b0;
              acc_done  <= 1'b1;
              st        <= S_GAP;
            end else begin
              lbuf <= merged_hit;
              st   <= S_XLW;
            end
          end else begin
            ev.miss <= 1'b1;
            st      <= S_SR_RD;
          end
        end
        S_SR_RD: st <= S_SR_CHK;
        S_SR_CHK: begin
          ev.search_step <= 1'b1;
          ev.lazy_clear  <= (live_bits(w_rbits, s_wa, cmf_c, 1'b1, '0) != fg_bits);
          if (fg_bits != '0) begin
            s_mrv <= {s_wa, newest(fg_bits)};
            st    <= S_XLR;
          end else if (s_wa == omf_c[FX_BITS-1:WAF_BITS]) begin
            s_mrv  <= obase_c - 1'b1;   // older than every live frame
            paddr  <= arch_addr(pid, op_line);
            ev.archive_read <= 1'b1;
            st     <= S_MRD;
          end else begin
            s_wa <= s_wa - 1'b1;
            st   <= S_SR_RD;
          end
        end
        S_XLR: st <= S_XLR_W;
        S_XLR_W: if (m_done) begin
          paddr <= m_fault ? arch_addr(pid, op_line) : PA_BITS'(m_paddr);
          st    <= S_MRD;
        end
        S_MRD: if (b_ack) begin
          if (!op_we) begin
            acc_rdata <= b_rdata[op_woff*WORD_W +: WORD_W];
            acc_err   <= 1'b0;
            acc_done  <= 1'b1;
            st        <= S_GAP;
          end else begin
            lbuf <= b_rdata;
            lbuf[op_woff*WORD_W +: WORD_W] <= op_wdata;
            st   <= S_XLW;
          end
        end
        S_XLW: st <= S_XLW_W;
        S_XLW_W: if (m_done) begin
          if (m_fault) begin
            ev.alloc_fault <= 1'b1;
            acc_err  <= 1'b1;
            acc_done <= 1'b1;
            st       <= S_GAP;
          end else begin
            paddr <= PA_BITS'(m_paddr);
            st    <= S_WB_RD;
          end
        end
        S_WB_RD: st <= S_WB_WR;
        S_WB_WR: st <= S_MWR;
        S_MWR: if (b_ack) begin
          acc_err  <= 1'b0;
          acc_done <= 1'b1;
          st       <= S_GAP;
        end
        // ------------------------------------------------ ADVANCE engine
        S_A_BEGIN: begin
          if (omf[a_pid][FX_BITS-1:WAF_BITS] == a_tgt[FX_BITS-1:WAF_BITS]) begin
            omf[a_pid] <= a_tgt;
            adv_busy   <= 1'b0;
          end else begin
            a_wa   <= omf[a_pid][FX_BITS-1:WAF_BITS];
            a_new  <= (a_tgt[FX_BITS-1:WAF_BITS] == omf[a_pid][FX_BITS-1:WAF_BITS] + 1'b1) ?
                      a_tgt : {omf[a_pid][FX_BITS-1:WAF_BITS] + 1'b1, {WAF_BITS{1'b0}}};
            a_line <= '0;
            a_coll <= 1'b1;
          end
          st <= S_IDLE;
        end
        S_A_RD: st <= S_A_CHK;
        S_A_CHK: begin
          if (a_bits != '0) begin
            a_mrv <= {a_wa[WA_BITS-1:0], newest(a_bits)};
            st    <= S_A_RD2;
          end else begin
            st <= S_A_CLR;
          end
        end
        S_A_RD2: st <= S_A_CHK2;
        S_A_CHK2: begin
          if (a_bits2 != '0) begin
            ev.copy_skipped <= 1'b1;
            st <= S_A_CLR;
          end else begin
            st <= S_A_XL;
          end
        end
        S_A_XL: st <= S_A_XLW;
        S_A_XLW: if (m_done) begin
          paddr <= PA_BITS'(m_paddr);
          st    <= m_fault ? S_A_CLR : S_A_MRD;
        end
        S_A_MRD: if (b_ack) begin lbuf <= b_rdata; st <= S_A_MWR; end
        S_A_MWR: if (b_ack) begin ev.archive_copy <= 1'b1; st <= S_A_CLR; end
        S_A_CLR: begin
          a_line <= a_line + 1'b1;
          st     <= (a_line == '1) ? S_A_FREE : S_GAP;
        end
        S_A_FREE: st <= S_A_FREEW;
        S_A_FREEW: if (m_done) begin
          omf[a_pid] <= a_new;
          a_coll     <= 1'b0;
          ev.wa_collected <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign cur_pid  = pid;
  assign cur_cmf  = cmf_c[FRAME_BITS-1:0];
  assign cur_omf  = omf_c[FRAME_BITS-1:0];
  assign cur_crbi = h_crbi;

  // A reference and a command are never answered in the same cycle, and a
  // rollback is never started while the history unit is still walking.
  a_one_done: assert property (@(posedge clk) disable iff (!rst_n) !(acc_done && cmd_done));
  a_rb_idle:  assert property (@(posedge clk) disable iff (!rst_n) h_rb |-> !h_busy);
endmodule
