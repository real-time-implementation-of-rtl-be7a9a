// tb_workload_bump: the rate-bump experiment, static against adaptive.
//
// One ON-OFF source (exponential ON and OFF periods of mean 100 slots; while
// ON it offers a cell per slot with probability 0.2, so 0.1 of the line on
// average) has its rate raised to about 0.33 for 50,000 slots, from slot
// 50,000 to 100,000. Each run lasts 1,000,000 slots. The same run is
// repeated, on the full-size design and with the same pseudo-random traffic:
//   run 0   static contract i = 10, m = 100, never adapted;
//   run 1.. adaptive, measurement interval 1,000 / 5,000 / 12,500 / 20,000 /
//           25,000 / 50,000 / 100,000 slots.
// Each run uses a VC of its own (VCI 200 + run, measurement index run + 1),
// so runs do not disturb each other's credits. The LCP model is the one of
// tb_shaper_top: at every interval it flips the measurement bank, reads and
// clears the counts, adapts i to the burst size (grow below 1.1 beta, shrink
// above 1.3 beta, by 25 %) and the rate toward a target utilisation of 0.85
// (attack 0.32, decay 0.15), and installs i and m with the semaphore
// protocol. The testbench records the queueing delay of every delivered cell.
// Checked:
//  * every interval's measured cell count equals the cells sent;
//  * every adaptive run has a lower average delay than the static one;
//  * the shortest interval gives a lower average delay than the longest;
//  * each adaptive run raised its assigned rate in response to the bump;
//  * after all runs every VC holds exactly the credits last assigned.
// It prints one line per run: average and maximum delay in slots, cells
// delivered and cells still queued when the run ended.
`timescale 1ns/1ps
module tb_workload_bump;
  import shaper_pkg::*;

  localparam int N_RUN     = 8;
  localparam int RUN_SLOTS = 1000000;
  localparam int BUMP_FROM = 50000, BUMP_TO = 100000;
  localparam int STATIC_IV = 50000;          // static run: measured, not adapted
  static int iv_of [N_RUN] = '{STATIC_IV, 1000, 5000, 12500, 20000, 25000, 50000, 100000};

  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [PT_W-1:0] mk_i(input logic enb, input logic stp,
                                            input logic signed [I_W-1:0] i);
    pace_i_t e;
    e.enb = enb; e.stopped = stp; e.i = i;
    return PT_W'(e);
  endfunction

  function automatic logic [PT_W-1:0] mk_m(input logic sem, input logic [M_W-1:0] m);
    pace_m_t e;
    e.sem = sem; e.m = m;
    return PT_W'(e);
  endfunction

  // ------------------------------------------------------------ DUT
  phase_t phase;
  logic ready, cell_valid = 1'b0, stop_valid, start_valid;
  vci_t cell_vci = '0, stop_vci, start_vci;
  logic pt_req = 1'b0, pt_tbl = 1'b0, pt_we = 1'b0, pt_done;
  vci_t pt_addr = '0;
  logic [PT_W-1:0] pt_wdata = '0, pt_rdata;
  logic bank_sel = 1'b0, pm_req = 1'b0, pm_done, pm_rd_stopped;
  pm_op_e pm_op = PM_XLAT_RD;
  vci_t pm_addr = '0;
  logic [MIDX_W-1:0] pm_wdata = '0, pm_rd_idx;
  meas_entry_t pm_rd_meas;
  logic [M_W-1:0] c_ptr;
  logic ev_dec, ev_ret, ev_skip, ev_freeze, ev_drop, ev_cell, ev_burst, ev_held, ev_idle;

  shaper_top dut (
    .clk, .rst_n, .phase, .ready, .cell_valid, .cell_vci,
    .stop_valid, .stop_vci, .start_valid, .start_vci,
    .pt_req, .pt_tbl, .pt_we, .pt_addr, .pt_wdata, .pt_rdata, .pt_done,
    .bank_sel, .pm_req, .pm_op, .pm_addr, .pm_wdata, .pm_done,
    .pm_rd_idx, .pm_rd_meas, .pm_rd_stopped,
    .c_ptr, .ev_dec, .ev_ret, .ev_skip, .ev_freeze, .ev_drop,
    .ev_cell, .ev_burst, .ev_held, .ev_idle);

  // ------------------------------------------------------------ bookkeeping
  int  run = 0;                  // current run; its VC is 200 + run
  bit  active = 1'b0;            // source of the current run is on
  int  rslot = 0;                // slot within the current run
  bit  hw_blocked [N_RUN], lcp_blocked [N_RUN];
  int  sent_cnt [2];             // cells per bank for the current VC
  int  n_drop = 0;
  int  q [$];                    // arrival slots of queued cells
  longint dly_sum [N_RUN];
  int  dly_max [N_RUN], n_sent [N_RUN], n_left [N_RUN];
  real peak_rate [N_RUN];
  int  cur_i [N_RUN], cur_m [N_RUN];

  function automatic vci_t vci_of(input int r);
    return vci_t'(200 + r);
  endfunction

  always @(posedge clk iff rst_n) begin
    if (stop_valid  && int'(stop_vci)  >= 200 && int'(stop_vci)  < 200 + N_RUN) hw_blocked[int'(stop_vci) - 200]  = 1'b1;
    if (start_valid && int'(start_vci) >= 200 && int'(start_vci) < 200 + N_RUN) hw_blocked[int'(start_vci) - 200] = 1'b0;
    if (ev_drop) n_drop++;
    if (ready && phase == T0 && cell_valid) sent_cnt[bank_sel]++;
  end

  // ------------------------------------------------------------ source + server
  // xorshift32, restarted with the same seed at the start of every run
  int unsigned rng;
  function automatic int unsigned next_rand();
    rng ^= rng << 13; rng ^= rng >> 17; rng ^= rng << 5;
    return rng;
  endfunction

  bit on_state;

  initial begin : driver
    @(posedge clk iff ready);
    forever begin
      @(posedge clk iff phase == T12);
      cell_valid <= 1'b0;
      if (active) begin
        automatic int p_on = (rslot >= BUMP_FROM && rslot < BUMP_TO) ? 6600 : 2000;
        if (next_rand() % 100 == 0) on_state = !on_state;
        if (on_state && (next_rand() % 10000) < p_on) q.push_back(rslot);
        if (q.size() > 0 && !hw_blocked[run] && !lcp_blocked[run]) begin
          automatic int d = rslot - q.pop_front();
          cell_valid <= 1'b1; cell_vci <= vci_of(run);
          dly_sum[run] += longint'(d);
          if (d > dly_max[run]) dly_max[run] = d;
          n_sent[run]++;
        end
        rslot++;
      end
    end
  end

  // ------------------------------------------------------------ LCP model
  task automatic pt_access(input bit tbl, input bit we, input vci_t a,
                           input logic [PT_W-1:0] w, output logic [PT_W-1:0] r);
    @(posedge clk);
    pt_req <= 1'b1; pt_tbl <= tbl; pt_we <= we; pt_addr <= a; pt_wdata <= w;
    @(posedge clk iff pt_done);
    r = pt_rdata;
    pt_req <= 1'b0;
  endtask

  task automatic pm_access(input pm_op_e op, input int a, input int w);
    @(posedge clk);
    pm_req <= 1'b1; pm_op <= op; pm_addr <= vci_t'(a); pm_wdata <= MIDX_W'(w);
    @(posedge clk iff pm_done);
    pm_req <= 1'b0;
  endtask

  task automatic wait_slots(input int n);
    repeat (n) @(posedge clk iff phase == T12);
  endtask

  // install new i and m without gaining or losing credits
  task automatic install(input int r, input int i_new, input int m_new);
    logic [PT_W-1:0] rd;
    pace_i_t e;
    lcp_blocked[r] = 1'b1;
    pt_access(1'b1, 1'b1, vci_of(r), mk_m(1'b1, M_W'(cur_m[r])), rd);
    wait_slots(2);
    pt_access(1'b0, 1'b0, vci_of(r), '0, rd);
    e = pace_i_t'(rd);
    e.i = I_W'(int'(e.i) + i_new - cur_i[r]);
    e.stopped = (int'(e.i) <= 0);
    pt_access(1'b0, 1'b1, vci_of(r), PT_W'(e), rd);
    if (int'(e.i) > 0) hw_blocked[r] = 1'b0;
    pt_access(1'b1, 1'b1, vci_of(r), mk_m(1'b0, M_W'(m_new)), rd);
    cur_i[r] = i_new; cur_m[r] = m_new;
    lcp_blocked[r] = 1'b0;
  endtask

  initial begin : lcp
    logic [PT_W-1:0] rd;
    pace_i_t e;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff ready);

    for (int r = 0; r < N_RUN; r++) begin
      run = r;
      pm_access(PM_XLAT_WR, int'(vci_of(r)), r + 1);
      cur_i[r] = 10; cur_m[r] = 100;
      pt_access(1'b0, 1'b1, vci_of(r), mk_i(1'b1, 1'b0, I_W'(10)), rd);
      pt_access(1'b1, 1'b1, vci_of(r), mk_m(1'b0, M_W'(100)), rd);
      peak_rate[r] = 0.1;
      rng = 32'h1234_5678; on_state = 1'b0; q.delete();
      wait_slots(1);
      sent_cnt[0] = 0; sent_cnt[1] = 0;
      rslot = 0; active = 1'b1;

      while (rslot < RUN_SLOTS) begin
        int cells, bursts, i_new;
        real lambda, beta, util, mi;
        wait_slots(iv_of[r]);
        bank_sel <= ~bank_sel;
        wait_slots(1);
        pm_access(PM_MEAS_CLR, r + 1, 0);
        cells  = int'(pm_rd_meas.cells);
        bursts = int'(pm_rd_meas.bursts);
        check(cells == sent_cnt[!bank_sel],
              $sformatf("run %0d slot %0d: %0d cells measured, %0d sent",
                        r, rslot, cells, sent_cnt[!bank_sel]));
        sent_cnt[!bank_sel] = 0;
        if (r == 0) continue;                        // static contract
        lambda = real'(cells) / iv_of[r];
        i_new  = cur_i[r];
        if (bursts > 0) begin
          beta = real'(cells) / bursts;
          if (cur_i[r] < 1.1 * beta)      i_new = cur_i[r] + int'($ceil(cur_i[r] * 0.25));
          else if (cur_i[r] > 1.3 * beta) i_new = cur_i[r] - int'($ceil(cur_i[r] * 0.25));
        end
        if (i_new < 1)   i_new = 1;
        if (i_new > 255) i_new = 255;
        util = lambda / (real'(cur_i[r]) / cur_m[r]);
        mi   = real'(cur_m[r]) / cur_i[r];
        if (util > 0.85) mi = mi * (1.0 - 0.32);
        else             mi = mi * (1.0 + 0.15);
        begin
          automatic int m_new = int'(mi * i_new);
          if (m_new < i_new) m_new = i_new;
          if (m_new > 2047)  m_new = 2047;
          install(r, i_new, m_new);
        end
        if (real'(cur_i[r]) / cur_m[r] > peak_rate[r]) peak_rate[r] = real'(cur_i[r]) / cur_m[r];
      end

      // end of run: the source goes away with whatever it still had queued
      active = 1'b0;
      lcp_blocked[r] = 1'b1;
      n_left[r] = q.size();
      $display("run %0d interval %0s: average delay %0d slots, max %0d, %0d cells sent, %0d left queued, peak assigned rate %0.3f",
               r, (r == 0) ? "static i=10 m=100" : $sformatf("%0d", iv_of[r]),
               (n_sent[r] > 0) ? int'(dly_sum[r] / longint'(n_sent[r])) : 0, dly_max[r], n_sent[r],
               n_left[r], peak_rate[r]);
    end

    // every credit back home
    wait_slots(2 * 2048 + 100);
    for (int r = 0; r < N_RUN; r++) begin
      pt_access(1'b0, 1'b0, vci_of(r), '0, rd);
      e = pace_i_t'(rd);
      check(int'(e.i) == cur_i[r], $sformatf("run %0d: %0d credits, %0d assigned", r, int'(e.i), cur_i[r]));
    end

    begin
      real d [N_RUN];
      for (int r = 0; r < N_RUN; r++) d[r] = (n_sent[r] > 0) ? real'(dly_sum[r]) / n_sent[r] : 1.0e9;
      for (int r = 1; r < N_RUN; r++) begin
        check(d[r] < d[0], $sformatf("interval %0d: adaptive delay below static", iv_of[r]));
        check(peak_rate[r] > 0.14, $sformatf("interval %0d: assigned rate followed the bump", iv_of[r]));
      end
      check(d[1] < d[N_RUN - 1], "shortest interval gives the lowest delay of the two extremes");
    end
    check(n_drop == 0, "no credit booking lost");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (N_RUN * (RUN_SLOTS + 120000) * SLOT_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
