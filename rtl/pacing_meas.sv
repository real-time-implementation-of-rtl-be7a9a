// pacing_meas: pacing measurement unit (cell count and burst count).
//
// Watches the transmit cell bus and, for up to MEAS_N-1 selected VCs, counts
// the cells sent and the bursts the VC took part in. The adaptive shaper
// software turns these into an average rate (cells / interval) and an
// average burst size (cells / bursts) at the end of every measurement
// interval and derives new i and m values from them.
//
// Structure:
//   translation table  NUM_VC entries of MIDX_W bits, indexed by VCI; entry 0
//                      means "not measured", so index 0 of the measurement
//                      table is never used and MEAS_N-1 VCs can be measured
//   measurement table  two banks of MEAS_N meas_entry_t {cells, bursts}; the
//                      hardware counts into bank bank_sel, the LCP reads and
//                      clears the other one, and flips bank_sel at the end of
//                      a measurement interval
//   per measured VC    time stamp of its previous cell and a stopped flag
//
// Burst rule: a slot counter stamps every slot. Two idle slots in a row mark
// the line idle and record the idle time stamp. A cell starts a new burst for
// its VC when the VC's previous cell is older than the last idle time stamp,
// i.e. (now - prev) > (now - idle), computed modulo 2**CNT_W. A new burst is
// not counted while the VC's stopped flag is set: the flag is set when the
// i-out-of-m controller stops the VC and cleared by the VC's next cell, so a
// burst broken only by lack of credits is counted once.
//
// Timing (sub-slots from slot_timer): T0 sample cell and idle state, T1 read
// translation, T2 read counts, T3 write counts. A Stop pulse (stop_valid) is
// looked up in T5 and sets the flag in T6. One LCP request is served per slot
// from T8; lcp_done pulses in T11 with the read data. After reset the unit
// clears both tables; ready rises after NUM_VC clocks.
//
// From the document: table sizes and widths, the two banks, translation with
// zero meaning unmeasured, the time stamp rule, two idle cells as line idle,
// the stopped flag. This design's own choices: the sub-slot schedule, the
// LCP operations (pm_op_e), that clearing touches only the counts, and the
// 24-bit width of the time stamps.
module pacing_meas
  import shaper_pkg::*;
#(
  parameter int unsigned NUM_VC = 4096,
  parameter int unsigned MEAS_N = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  input  phase_t      phase,
  // transmit cell bus
  input  logic        cell_valid,
  input  vci_t        cell_vci,
  // Stop signal from the i-out-of-m controller
  input  logic        stop_valid,
  input  vci_t        stop_vci,
  // bank the hardware counts into
  input  logic        bank_sel,
  // LCP access
  input  logic        lcp_req,
  input  pm_op_e      lcp_op,
  input  vci_t        lcp_addr,     // VCI for translation ops, index for counts
  input  logic [MIDX_W-1:0] lcp_wdata,
  output logic        lcp_done,
  output logic [MIDX_W-1:0] lcp_rd_idx,
  output meas_entry_t lcp_rd_meas,
  output logic        lcp_rd_stopped,
  // status and event pulses
  output logic        ready,
  output logic        ev_cell,      // a measured cell was counted
  output logic        ev_burst,     // a burst was counted
  output logic        ev_held,      // a new burst not counted: VC was stopped
  output logic        ev_idle       // line became idle
);

  localparam int unsigned XL_AW = $clog2(NUM_VC);
  localparam int unsigned MI_AW = $clog2(MEAS_N);
  localparam int unsigned MT_AW = MI_AW + 1;

  logic              xl_en, xl_we;
  logic [XL_AW-1:0]  xl_addr;
  logic [MIDX_W-1:0] xl_wdata, xl_rdata;
  logic              mt_en, mt_we;
  logic [MT_AW-1:0]  mt_addr;
  meas_entry_t       mt_wdata, mt_rdata;

  sram_sp #(.DEPTH(NUM_VC),     .WIDTH(MIDX_W))               u_xlat (
    .clk, .en(xl_en), .we(xl_we), .addr(xl_addr), .wdata(xl_wdata), .rdata(xl_rdata));
  sram_sp #(.DEPTH(2 * MEAS_N), .WIDTH($bits(meas_entry_t)))  u_meas (
    .clk, .en(mt_en), .we(mt_we), .addr(mt_addr), .wdata(mt_wdata), .rdata(mt_rdata));

  logic [CNT_W-1:0]  prev_ts [MEAS_N];
  logic [MEAS_N-1:0] stopped;
  logic [CNT_W-1:0]  now, idle_ts;
  logic              prev_idle;

  logic [XL_AW:0]    init_cnt;
  logic              init_busy, run;
  logic              pm_act, pm_hit, pm_bank;
  vci_t              pm_vci;
  logic [MI_AW-1:0]  pm_idx;
  logic              st_pend;
  vci_t              st_vci;
  logic              lc_act, lc_clr;
  pm_op_e            lc_op;
  logic [MI_AW-1:0]  lc_idx;

  // burst decision for the cell in T3
  logic [CNT_W-1:0]  since_prev, since_idle;
  logic              new_burst, count_burst;
  meas_entry_t       upd;

  always_comb begin
    since_prev  = now - prev_ts[pm_idx];
    since_idle  = now - idle_ts;
    new_burst   = since_prev > since_idle;
    count_burst = new_burst && !stopped[pm_idx];
    upd         = mt_rdata;
    upd.cells   = mt_rdata.cells + 1'b1;
    if (count_burst) upd.bursts = mt_rdata.bursts + 1'b1;
  end

  always_comb begin
    xl_en = 1'b0; xl_we = 1'b0; xl_addr = '0; xl_wdata = '0;
    mt_en = 1'b0; mt_we = 1'b0; mt_addr = '0; mt_wdata = '0;
    if (init_busy) begin
      xl_en   = 1'b1; xl_we = 1'b1; xl_addr = XL_AW'(init_cnt);
      mt_en   = (int'(init_cnt) < 2 * MEAS_N); mt_we = 1'b1;
      mt_addr = MT_AW'(init_cnt);
    end else if (run) begin
      unique case (phase)
        T1: begin xl_en = pm_act; xl_addr = XL_AW'(pm_vci); end
        T2: begin
          mt_en = pm_act && (xl_rdata != '0);
          mt_addr = {pm_bank, MI_AW'(xl_rdata)};
        end
        T3: begin
          mt_en = pm_hit; mt_we = 1'b1; mt_addr = {pm_bank, pm_idx};
          mt_wdata = upd;
        end
        T5: begin xl_en = st_pend; xl_addr = XL_AW'(st_vci); end
        T8: begin
          if (lcp_req && !lc_act) begin
            if (lcp_op == PM_XLAT_WR || lcp_op == PM_XLAT_RD) begin
              xl_en = 1'b1; xl_we = (lcp_op == PM_XLAT_WR);
              xl_addr = XL_AW'(lcp_addr); xl_wdata = lcp_wdata;
            end else begin
              mt_en = 1'b1; mt_addr = {!pm_bank, MI_AW'(lcp_addr)};
            end
          end
        end
        T10: begin
          mt_en = lc_act && lc_clr; mt_we = 1'b1; mt_addr = {!pm_bank, lc_idx};
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt  <= '0;
      init_busy <= 1'b1;
      run       <= 1'b0;
      now       <= '0;
      idle_ts   <= '0;
      prev_idle <= 1'b0;
      stopped   <= '0;
      for (int k = 0; k < MEAS_N; k++) prev_ts[k] <= '0;
      pm_act    <= 1'b0;
      pm_hit    <= 1'b0;
      pm_bank   <= 1'b0;
      pm_vci    <= '0;
      pm_idx    <= '0;
      st_pend   <= 1'b0;
      st_vci    <= '0;
      lc_act    <= 1'b0;
      lc_clr    <= 1'b0;
      lc_op     <= PM_XLAT_RD;
      lc_idx    <= '0;
      lcp_done  <= 1'b0;
      lcp_rd_idx     <= '0;
      lcp_rd_meas    <= '0;
      lcp_rd_stopped <= 1'b0;
      ev_cell   <= 1'b0;
      ev_burst  <= 1'b0;
      ev_held   <= 1'b0;
      ev_idle   <= 1'b0;
    end else begin
      lcp_done <= 1'b0;
      ev_cell  <= 1'b0;
      ev_burst <= 1'b0;
      ev_held  <= 1'b0;
      ev_idle  <= 1'b0;
      if (stop_valid) begin
        st_pend <= 1'b1;
        st_vci  <= stop_vci;
      end

      if (init_busy) begin
        if (int'(init_cnt) == NUM_VC - 1) init_busy <= 1'b0;
        init_cnt <= init_cnt + 1'b1;
      end else if (!run) begin
        if (phase == T12) run <= 1'b1;
      end else begin
        unique case (phase)
          T0: begin
            now       <= now + 1'b1;
            pm_act    <= cell_valid;
            pm_vci    <= cell_vci;
            pm_bank   <= bank_sel;
            prev_idle <= !cell_valid;
            if (!cell_valid && prev_idle) begin
              idle_ts <= now + 1'b1;
              ev_idle <= 1'b1;
            end
          end
          T2: begin
            pm_hit <= pm_act && (xl_rdata != '0);
            pm_idx <= MI_AW'(xl_rdata);
          end
          T3: begin
            if (pm_hit) begin
              prev_ts[pm_idx] <= now;
              stopped[pm_idx] <= 1'b0;
              ev_cell  <= 1'b1;
              ev_burst <= count_burst;
              ev_held  <= new_burst && stopped[pm_idx];
            end
          end
          T6: begin
            if (st_pend && !stop_valid) begin
              st_pend <= 1'b0;
              if (xl_rdata != '0) stopped[MI_AW'(xl_rdata)] <= 1'b1;
            end
          end
          T8: begin
            if (lcp_req && !lc_act) begin
              lc_act <= 1'b1;
              lc_op  <= lcp_op;
              lc_clr <= (lcp_op == PM_MEAS_CLR);
              lc_idx <= MI_AW'(lcp_addr);
            end
          end
          T9: begin
            if (lc_act) begin
              if (lc_op == PM_XLAT_WR || lc_op == PM_XLAT_RD) begin
                lcp_rd_idx <= xl_rdata;
              end else begin
                lcp_rd_meas    <= mt_rdata;
                lcp_rd_stopped <= stopped[lc_idx];
              end
            end
          end
          T10: begin
            if (lc_act) begin
              lc_act   <= 1'b0;
              lcp_done <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign ready = run;

endmodule
