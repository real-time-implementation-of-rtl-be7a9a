// im_controller: i-out-of-m rate controller (flow control + credit return).
//
// Every VC under pacing holds an account of i credits. When a cell of the VC
// crosses the transmit cell bus the flow control part takes one credit and
// books its return m cell slots later; when the account runs dry it issues a
// Stop for the VC to the cell source. The credit return part walks a
// circular slot counter C and hands back the booked credits, issuing a Start
// once a stopped VC again holds credits. A VC can thus send at most i cells
// in any window of m slots: a sustained rate of i/m of the line and bursts of
// at most i back-to-back cells.
//
// Tables (all single-port synchronous SRAMs, see sram_sp):
//   pacing table      NUM_VC entries in two memories: the i table
//                     pace_i_t {enb, stopped, i} and the m table
//                     pace_m_t {sem, m}
//   schedule pointers 2**M_W entries, sched_ptr_t {head, tail}, one queue per
//                     cell slot of the window
//   schedule list     LIST_DEPTH elements {vci} / {next}: the queues as
//                     linked lists, unused elements on a free list
//
// Timing: a cell slot is 13 clocks (T0..T12, from slot_timer). One cell may be
// reported per slot on cell_valid/cell_vci, sampled in T0.
//   T1  read i and m entries     T2  i := i-1, write back, Stop if i <= STOP_LEVEL
//   T3  read queue C+m and the free list head
//   T4  append element to queue C+m, pop free list   T5  link old tail
//   T6  read queue C   T7  if empty: C := C+1 and read that queue instead
//   T8  read head element   T9  read its i and m entries
//   T10 unless sem: i := i+1, write back, Start if stopped and i > START_LEVEL
//   T11 unlink head, return it to the free list, C := C+1 if the queue emptied
//       and C did not already move in T7
//   T12 one LCP access to the i or m table (lcp_tbl); lcp_done pulses two
//       clocks later. The controller itself never writes the m table, so an
//       LCP write there (setting or clearing sem, changing m) cannot collide
//       with a credit update.
// At most one credit is returned per slot, so a queue holding several credits
// delays the queues behind it (credit return skew). C moves at most one
// queue per slot, so it never runs ahead of time and a credit taken in slot s
// is usable again in slot s+m at the earliest: no VC ever sends more than i
// cells in m consecutive slots. C may fall further and further behind the
// wall clock; that is harmless because bookings are made relative to C, so
// only the growth of the lag while a credit waits delays that credit.
// While the head VC's sem bit is set the credit return stands still.
// After reset the controller clears the pacing table, empties all queues and
// threads the free list; ready rises when that is done (LIST_DEPTH clocks).
//
// From the document: table sizes and field widths, decrement/schedule/return
// as described, Stop/Start, the semaphore freeze, one return per slot, nil
// flags. This design's own choices: the exact sub-slot schedule above, the
// hardware clearing after reset, the skip of one empty queue per slot, the
// Start threshold (the document's timing table prints 03hex; 0 is used so a
// VC with i <= 3 is not left stopped forever), and dropping a credit booking
// (ev_drop) when the free list is exhausted.
module im_controller
  import shaper_pkg::*;
#(
  parameter int unsigned NUM_VC      = 4096,
  parameter int unsigned LIST_DEPTH  = 16384,
  parameter int          STOP_LEVEL  = 0,
  parameter int          START_LEVEL = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  phase_t      phase,
  // transmit cell bus: the cell sent in this slot
  input  logic        cell_valid,
  input  vci_t        cell_vci,
  // flow control signals back to the cell source
  output logic        stop_valid,
  output vci_t        stop_vci,
  output logic        start_valid,
  output vci_t        start_vci,
  // LCP access to the pacing table
  input  logic        lcp_req,
  input  logic        lcp_tbl,     // 0: i table, 1: m table
  input  logic        lcp_we,
  input  vci_t        lcp_addr,
  input  logic [PT_W-1:0] lcp_wdata,
  output logic [PT_W-1:0] lcp_rdata,
  output logic        lcp_done,
  // status and event pulses
  output logic        ready,
  output logic [M_W-1:0] c_ptr,
  output logic        ev_dec,      // a credit was taken
  output logic        ev_ret,      // a credit was returned
  output logic        ev_skip,     // C skipped an empty queue
  output logic        ev_freeze,   // credit return held by a semaphore
  output logic        ev_drop      // free list empty, booking lost
);

  localparam int unsigned WIN    = 1 << M_W;
  localparam int unsigned PT_AW  = $clog2(NUM_VC);
  localparam int unsigned LS_AW  = $clog2(LIST_DEPTH);
  localparam int unsigned INIT_N = (LIST_DEPTH > NUM_VC) ?
                                   ((LIST_DEPTH > WIN) ? LIST_DEPTH : WIN) :
                                   ((NUM_VC > WIN) ? NUM_VC : WIN);

  // ---------------------------------------------------------------- memories
  logic              pt_en, pt_we;
  logic [PT_AW-1:0]  pt_addr;
  pace_i_t           pt_wdata, pt_rdata;
  logic              mt_en, mt_we;
  logic [PT_AW-1:0]  mt_addr;
  pace_m_t           mt_wdata, mt_rdata;
  logic              sp_en, sp_we;
  logic [M_W-1:0]    sp_addr;
  sched_ptr_t        sp_wdata, sp_rdata;
  logic              lv_en, lv_we;
  logic [LS_AW-1:0]  lv_addr;
  list_vci_t         lv_wdata, lv_rdata;
  logic              ln_en, ln_we;
  logic [LS_AW-1:0]  ln_addr;
  list_next_t        ln_wdata, ln_rdata;

  sram_sp #(.DEPTH(NUM_VC),     .WIDTH($bits(pace_i_t)))     u_i_table (
    .clk, .en(pt_en), .we(pt_we), .addr(pt_addr), .wdata(pt_wdata), .rdata(pt_rdata));
  sram_sp #(.DEPTH(NUM_VC),     .WIDTH($bits(pace_m_t)))     u_m_table (
    .clk, .en(mt_en), .we(mt_we), .addr(mt_addr), .wdata(mt_wdata), .rdata(mt_rdata));
  sram_sp #(.DEPTH(WIN),        .WIDTH($bits(sched_ptr_t)))  u_sched_ptrs (
    .clk, .en(sp_en), .we(sp_we), .addr(sp_addr), .wdata(sp_wdata), .rdata(sp_rdata));
  sram_sp #(.DEPTH(LIST_DEPTH), .WIDTH($bits(list_vci_t)))   u_list_vci (
    .clk, .en(lv_en), .we(lv_we), .addr(lv_addr), .wdata(lv_wdata), .rdata(lv_rdata));
  sram_sp #(.DEPTH(LIST_DEPTH), .WIDTH($bits(list_next_t)))  u_list_next (
    .clk, .en(ln_en), .we(ln_we), .addr(ln_addr), .wdata(ln_wdata), .rdata(ln_rdata));

  // ---------------------------------------------------------------- state
  logic [$clog2(INIT_N+1)-1:0] init_cnt;
  logic              init_busy, run;
  logic [PTR_W-1:0]  free_ptr;
  logic              free_nil;
  // flow control
  logic              fc_act, fc_sched, fc_link;
  vci_t              fc_vci;
  logic [M_W-1:0]    fc_curm;
  logic [PTR_W-1:0]  fc_new, fc_oldtail;
  // credit return
  logic              cr_act, cr_pop, cr_skipped;
  logic [PTR_W-1:0]  cr_head;
  list_next_t        cr_next;
  vci_t              cr_vci;
  // LCP
  logic              lcp_serv, lcp_serv_rd, lcp_serv_tbl;

  // combinational results of the two read-modify-write steps
  pace_i_t           fc_upd, cr_upd;
  logic signed [I_W-1:0] fc_i_new, cr_i_new;
  logic              fc_stop_now, cr_start_now;

  always_comb begin
    fc_i_new     = pt_rdata.i - 1'b1;
    fc_stop_now  = (int'(fc_i_new) <= STOP_LEVEL) && !pt_rdata.stopped;
    fc_upd       = pt_rdata;
    fc_upd.i     = fc_i_new;
    if (fc_stop_now) fc_upd.stopped = 1'b1;

    cr_i_new     = pt_rdata.i + 1'b1;
    cr_start_now = (int'(cr_i_new) > START_LEVEL) && pt_rdata.stopped;
    cr_upd       = pt_rdata;
    cr_upd.i     = cr_i_new;
    if (cr_start_now) cr_upd.stopped = 1'b0;
  end

  // ---------------------------------------------------------------- ports
  always_comb begin
    pt_en = 1'b0; pt_we = 1'b0; pt_addr = '0; pt_wdata = '0;
    mt_en = 1'b0; mt_we = 1'b0; mt_addr = '0; mt_wdata = '0;
    sp_en = 1'b0; sp_we = 1'b0; sp_addr = '0; sp_wdata = '0;
    lv_en = 1'b0; lv_we = 1'b0; lv_addr = '0; lv_wdata = '0;
    ln_en = 1'b0; ln_we = 1'b0; ln_addr = '0; ln_wdata = '0;

    if (init_busy) begin
      pt_en   = (int'(init_cnt) < NUM_VC);
      pt_we   = 1'b1;
      pt_addr = PT_AW'(init_cnt);
      mt_en   = (int'(init_cnt) < NUM_VC);
      mt_we   = 1'b1;
      mt_addr = PT_AW'(init_cnt);
      sp_en   = (int'(init_cnt) < WIN);
      sp_we   = 1'b1;
      sp_addr = M_W'(init_cnt);
      sp_wdata = '{head_nil: 1'b1, head: '0, tail_nil: 1'b1, tail: '0};
      ln_en   = (int'(init_cnt) < LIST_DEPTH);
      ln_we   = 1'b1;
      ln_addr = LS_AW'(init_cnt);
      ln_wdata.nil  = (int'(init_cnt) == LIST_DEPTH - 1);
      ln_wdata.next = PTR_W'(init_cnt + 1);
    end else if (run) begin
      unique case (phase)
        T1: begin                                   // flow control: read entry
          pt_en = fc_act; pt_addr = PT_AW'(fc_vci);
          mt_en = fc_act; mt_addr = PT_AW'(fc_vci);
        end
        T2: begin                                   // flow control: decrement
          pt_en = fc_act && pt_rdata.enb; pt_we = 1'b1;
          pt_addr = PT_AW'(fc_vci); pt_wdata = fc_upd;
        end
        T3: begin                                   // read queue C+m, free head
          sp_en = fc_sched; sp_addr = fc_curm;
          ln_en = fc_sched && !free_nil; ln_addr = LS_AW'(free_ptr);
        end
        T4: begin                                   // append to queue C+m
          if (fc_sched && !free_nil) begin
            lv_en = 1'b1; lv_we = 1'b1; lv_addr = LS_AW'(free_ptr);
            lv_wdata = '{nil: 1'b0, vci: fc_vci};
            ln_en = 1'b1; ln_we = 1'b1; ln_addr = LS_AW'(free_ptr);
            ln_wdata = '{nil: 1'b1, next: '0};
            sp_en = 1'b1; sp_we = 1'b1; sp_addr = fc_curm;
            sp_wdata = sp_rdata.tail_nil ?
                       '{head_nil: 1'b0, head: free_ptr, tail_nil: 1'b0, tail: free_ptr} :
                       '{head_nil: sp_rdata.head_nil, head: sp_rdata.head,
                         tail_nil: 1'b0, tail: free_ptr};
          end
        end
        T5: begin                                   // link the old tail
          ln_en = fc_link; ln_we = 1'b1; ln_addr = LS_AW'(fc_oldtail);
          ln_wdata = '{nil: 1'b0, next: fc_new};
        end
        T6: begin                                   // credit return: queue C
          sp_en = 1'b1; sp_addr = c_ptr;
        end
        T7: begin                                   // empty: look at C+1
          sp_en = sp_rdata.head_nil; sp_addr = c_ptr + 1'b1;
        end
        T8: begin                                   // read head element
          lv_en = !sp_rdata.head_nil; lv_addr = LS_AW'(sp_rdata.head);
          ln_en = !sp_rdata.head_nil; ln_addr = LS_AW'(sp_rdata.head);
        end
        T9: begin                                   // read its pacing entry
          pt_en = cr_act; pt_addr = PT_AW'(lv_rdata.vci);
          mt_en = cr_act; mt_addr = PT_AW'(lv_rdata.vci);
        end
        T10: begin                                  // return the credit
          pt_en = cr_act && !mt_rdata.sem; pt_we = 1'b1;
          pt_addr = PT_AW'(cr_vci); pt_wdata = cr_upd;
        end
        T11: begin                                  // unlink head, free it
          if (cr_pop) begin
            sp_en = 1'b1; sp_we = 1'b1; sp_addr = c_ptr;
            sp_wdata = cr_next.nil ?
                       '{head_nil: 1'b1, head: '0, tail_nil: 1'b1, tail: '0} :
                       '{head_nil: 1'b0, head: cr_next.next,
                         tail_nil: sp_rdata.tail_nil, tail: sp_rdata.tail};
            ln_en = 1'b1; ln_we = 1'b1; ln_addr = LS_AW'(cr_head);
            ln_wdata = '{nil: free_nil, next: free_ptr};
          end
        end
        T12: begin                                  // LCP slot
          if (!lcp_tbl) begin
            pt_en = lcp_req && !lcp_serv; pt_we = lcp_we;
            pt_addr = PT_AW'(lcp_addr); pt_wdata = pace_i_t'(lcp_wdata);
          end else begin
            mt_en = lcp_req && !lcp_serv; mt_we = lcp_we;
            mt_addr = PT_AW'(lcp_addr); mt_wdata = pace_m_t'(lcp_wdata);
          end
        end
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt    <= '0;
      init_busy   <= 1'b1;
      run         <= 1'b0;
      free_ptr    <= '0;
      free_nil    <= 1'b0;
      c_ptr       <= '0;
      fc_act      <= 1'b0;
      fc_sched    <= 1'b0;
      fc_link     <= 1'b0;
      fc_vci      <= '0;
      fc_curm     <= '0;
      fc_new      <= '0;
      fc_oldtail  <= '0;
      cr_act      <= 1'b0;
      cr_pop      <= 1'b0;
      cr_skipped  <= 1'b0;
      cr_head     <= '0;
      cr_next     <= '0;
      cr_vci      <= '0;
      lcp_serv    <= 1'b0;
      lcp_serv_rd <= 1'b0;
      lcp_serv_tbl <= 1'b0;
      lcp_done    <= 1'b0;
      lcp_rdata   <= '0;
      stop_valid  <= 1'b0;
      stop_vci    <= '0;
      start_valid <= 1'b0;
      start_vci   <= '0;
      ev_dec      <= 1'b0;
      ev_ret      <= 1'b0;
      ev_skip     <= 1'b0;
      ev_freeze   <= 1'b0;
      ev_drop     <= 1'b0;
    end else begin
      stop_valid  <= 1'b0;
      start_valid <= 1'b0;
      ev_dec      <= 1'b0;
      ev_ret      <= 1'b0;
      ev_skip     <= 1'b0;
      ev_freeze   <= 1'b0;
      ev_drop     <= 1'b0;
      lcp_done    <= 1'b0;

      if (init_busy) begin
        if (int'(init_cnt) == INIT_N - 1) init_busy <= 1'b0;
        init_cnt <= init_cnt + 1'b1;
      end else if (!run) begin
        if (phase == T12) run <= 1'b1;
      end else begin
        unique case (phase)
          T0: begin
            fc_act <= cell_valid;
            fc_vci <= cell_vci;
            if (lcp_serv) begin
              lcp_serv  <= 1'b0;
              lcp_done  <= 1'b1;
              if (lcp_serv_rd) lcp_rdata <= lcp_serv_tbl ? PT_W'(mt_rdata) : PT_W'(pt_rdata);
            end
          end
          T2: begin
            fc_sched <= fc_act && pt_rdata.enb;
            fc_curm  <= c_ptr + mt_rdata.m;
            if (fc_act && pt_rdata.enb) begin
              ev_dec <= 1'b1;
              if (fc_stop_now) begin
                stop_valid <= 1'b1;
                stop_vci   <= fc_vci;
              end
            end
          end
          T4: begin
            fc_link <= 1'b0;
            if (fc_sched) begin
              if (free_nil) begin
                ev_drop <= 1'b1;
              end else begin
                fc_new     <= free_ptr;
                fc_oldtail <= sp_rdata.tail;
                fc_link    <= !sp_rdata.tail_nil;
                free_ptr   <= ln_rdata.next;
                free_nil   <= ln_rdata.nil;
              end
            end
          end
          T7: begin
            cr_skipped <= sp_rdata.head_nil;
            if (sp_rdata.head_nil) begin
              c_ptr   <= c_ptr + 1'b1;
              ev_skip <= 1'b1;
            end
          end
          T8: begin
            cr_act  <= !sp_rdata.head_nil;
            cr_head <= sp_rdata.head;
          end
          T9: begin
            cr_vci  <= lv_rdata.vci;
            cr_next <= ln_rdata;
          end
          T10: begin
            cr_pop <= cr_act && !mt_rdata.sem;
            if (cr_act) begin
              if (mt_rdata.sem) begin
                ev_freeze <= 1'b1;
              end else begin
                ev_ret <= 1'b1;
                if (cr_start_now) begin
                  start_valid <= 1'b1;
                  start_vci   <= cr_vci;
                end
              end
            end
          end
          T11: begin
            if (cr_pop) begin
              free_ptr <= cr_head;
              free_nil <= 1'b0;
              if (cr_next.nil && !cr_skipped) c_ptr <= c_ptr + 1'b1;
            end
          end
          T12: begin
            if (lcp_req && !lcp_serv) begin
              lcp_serv    <= 1'b1;
              lcp_serv_rd <= !lcp_we;
              lcp_serv_tbl <= lcp_tbl;
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign ready = run;

  // A queue that is being served must have a head element.
  always_ff @(posedge clk) begin
    if (run && phase == T9 && cr_act)
      assert (!lv_rdata.nil) else $error("schedule list element without VCI");
  end

endmodule
