// tb_shaper_top: end-to-end run of the adaptive i-out-of-m shaper.
//
// The design runs at its default sizes. Around it this testbench models:
//  * four cell sources with queues and a round-robin server that puts at most
//    one cell per slot on the transmit bus and honours Stop/Start from the
//    controller and from the LCP. VC 100 is an ON-OFF source whose rate is
//    raised for a stretch of the run (a "rate bump"); VCs 101..103 are
//    Bernoulli sources of fixed rate.
//  * the line card processor (LCP) running the adaptation algorithm: at the
//    end of each measurement interval it swaps the measurement banks, reads
//    and clears cell and burst counts, computes average rate and burst size,
//    adapts i to the burst size (grow below 1.1x, shrink above 1.3x) and the
//    rate i/m toward a target utilisation of 0.85 (attack 0.32, decay 0.15),
//    and installs the new values with the data-consistent read-modify-write:
//    stop the VC, set the semaphore in the m table, wait two slots, read i,
//    add the change in i, write it back, restart the VC if it holds credits,
//    write the new m with the semaphore cleared.
// Checked against the testbench's own bookkeeping:
//  * measured cell counts equal the cells the server sent in each interval;
//  * bursts never exceed cells;
//  * the assigned rate of VC 100 rises during the bump and falls after it;
//  * after the traffic ends and all credits are back, every pacing entry
//    holds exactly the i the LCP assigned (no credit gained or lost);
//  * every mechanism happened: Stop, Start, credit return, credit return
//    skew, semaphore freeze, burst count, burst held by the stopped flag,
//    idle line, bank swap, i increase/decrease, rate increase/decrease.
`timescale 1ns/1ps
module tb_shaper_top;
  import shaper_pkg::*;

  localparam int NV        = 4;
  localparam int INTERVAL  = 5000;     // measurement interval in cell slots
  localparam int N_IV      = 20;       // intervals of traffic
  localparam int BUMP_FROM = 4, BUMP_TO = 8;   // intervals with the rate bump

  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;

  int checks = 0, failures = 0;
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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
  static int vci_of[NV] = '{100, 101, 102, 103};
  int   slot = 0;
  bit   traffic_on = 1'b0, bump = 1'b0;
  bit   hw_blocked [NV], lcp_blocked [NV];
  int   backlog [NV];
  bit   on_state;
  int   sent_cnt [2][NV];          // cells per bank, as the unit should see them
  int   n_stop = 0, n_start = 0, n_ret = 0, n_skip = 0, n_freeze = 0;
  int   n_burst = 0, n_held = 0, n_idle = 0, n_drop = 0, n_skew = 0;
  int   n_swap = 0, n_rmw = 0, n_i_up = 0, n_i_dn = 0, n_r_up = 0, n_r_dn = 0;
  int   lag_prev = -1, lag_max = 0, wall = 0;   // wall: slot count seen by the monitor

  function automatic int vidx(input vci_t v);
    for (int k = 0; k < NV; k++) if (vci_of[k] == int'(v)) return k;
    return -1;
  endfunction

  // (outputs are counted only once reset is released: before that they hold
  // whatever the flip-flops powered up with)
  always @(posedge clk iff rst_n) begin
    if (stop_valid  && vidx(stop_vci)  >= 0) begin hw_blocked[vidx(stop_vci)]  = 1'b1; n_stop++;  end
    if (start_valid && vidx(start_vci) >= 0) begin hw_blocked[vidx(start_vci)] = 1'b0; n_start++; end
    if (ev_ret)    n_ret++;
    if (ev_skip)   n_skip++;
    if (ev_freeze) n_freeze++;
    if (ev_burst)  n_burst++;
    if (ev_held)   n_held++;
    if (ev_idle)   n_idle++;
    if (ev_drop)   n_drop++;
    if (ready && phase == T0) begin
      if (cell_valid && vidx(cell_vci) >= 0) sent_cnt[bank_sel][vidx(cell_vci)]++;
    end
    // credit return skew: slots in which the slot counter C stood still
    // because its queue held more than one credit (C falls one more slot
    // behind the wall clock; credits are booked relative to C, so every
    // credit behind it comes back one slot later than m)
    if (ready && phase == T12) begin
      automatic int lag = (wall - int'(c_ptr)) & 2047;
      wall++;
      if (lag_prev >= 0 && lag != lag_prev) begin
        n_skew++;
        if (lag > lag_max) lag_max = lag;
      end
      lag_prev = lag;
    end
  end

  // ------------------------------------------------------------ sources + server
  real p_base[NV] = '{0.06, 0.10, 0.08, 0.03};
  int  rr = 0;

  initial begin : driver
    @(posedge clk iff ready);
    forever begin
      @(posedge clk iff phase == T12);
      slot++;
      if (traffic_on) begin
        // VC 100: ON-OFF source, mean ON/OFF lengths of 200/200 slots
        if ($urandom_range(0, 199) == 0) on_state = !on_state;
        if (on_state && ($urandom_range(0, 9999) < int'((bump ? 0.60 : 0.12) * 10000))) backlog[0]++;
        for (int k = 1; k < NV; k++)
          if ($urandom_range(0, 9999) < int'(p_base[k] * 10000)) backlog[k]++;
      end
      begin
        automatic int pick = -1;
        for (int n = 1; n <= NV; n++) begin
          automatic int k = (rr + n) % NV;
          if (pick < 0 && backlog[k] > 0 && !hw_blocked[k] && !lcp_blocked[k]) pick = k;
        end
        if (pick >= 0) begin
          cell_valid <= 1'b1; cell_vci <= vci_t'(vci_of[pick]);
          backlog[pick]--; rr = pick;
        end else begin
          cell_valid <= 1'b0;
        end
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

  int  cur_i [NV], cur_m [NV];
  real rate_hist [NV][$];

  // install new i and m without gaining or losing credits
  task automatic install(input int k, input int i_new, input int m_new);
    logic [PT_W-1:0] r;
    pace_i_t e;
    automatic vci_t v = vci_t'(vci_of[k]);
    lcp_blocked[k] = 1'b1;                         // stop the VC at the source
    pt_access(1'b1, 1'b1, v, mk_m(1'b1, M_W'(cur_m[k])), r);
    wait_slots(2);                                 // let i settle
    pt_access(1'b0, 1'b0, v, '0, r);               // read
    e = pace_i_t'(r);
    e.i = I_W'(int'(e.i) + i_new - cur_i[k]);      // modify
    e.stopped = (int'(e.i) <= 0);
    pt_access(1'b0, 1'b1, v, PT_W'(e), r);         // write
    if (int'(e.i) > 0) hw_blocked[k] = 1'b0;
    pt_access(1'b1, 1'b1, v, mk_m(1'b0, M_W'(m_new)), r);
    lcp_blocked[k] = 1'b0;                         // restart at the source
    cur_i[k] = i_new; cur_m[k] = m_new;
    n_rmw++;
  endtask

  initial begin : lcp
    logic [PT_W-1:0] r;
    pace_i_t e;
    pace_m_t em;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff ready);
    for (int k = 0; k < NV; k++) begin
      pm_access(PM_XLAT_WR, vci_of[k], k + 1);
      cur_i[k] = 10; cur_m[k] = 100;               // initial static contract
      pt_access(1'b0, 1'b1, vci_t'(vci_of[k]),
                mk_i(1'b1, 1'b0, I_W'(10)), r);
      pt_access(1'b1, 1'b1, vci_t'(vci_of[k]),
                mk_m(1'b0, M_W'(100)), r);
    end
    pm_access(PM_XLAT_RD, vci_of[2], 0);
    check(pm_rd_idx == 3, "translation entry read back");
    wait_slots(20);
    for (int k = 0; k < NV; k++) sent_cnt[0][k] = 0;
    traffic_on = 1'b1;

    for (int iv = 0; iv < N_IV; iv++) begin
      bump = (iv >= BUMP_FROM && iv < BUMP_TO);
      wait_slots(INTERVAL);
      bank_sel <= ~bank_sel;                       // end of measurement interval
      n_swap++;
      wait_slots(1);
      for (int k = 0; k < NV; k++) begin
        int cells, bursts, i_new;
        real lambda, beta, r, mi;
        pm_access(PM_MEAS_CLR, k + 1, 0);
        cells  = int'(pm_rd_meas.cells);
        bursts = int'(pm_rd_meas.bursts);
        check(cells == sent_cnt[!bank_sel][k],
              $sformatf("interval %0d VC %0d: %0d cells measured, %0d sent",
                        iv, vci_of[k], cells, sent_cnt[!bank_sel][k]));
        sent_cnt[!bank_sel][k] = 0;
        check(bursts <= cells, "bursts <= cells");
        // adaptation (burst first, then rate)
        lambda = real'(cells) / INTERVAL;
        i_new  = cur_i[k];
        if (bursts > 0) begin
          beta = real'(cells) / bursts;
          if (cur_i[k] < 1.1 * beta) begin
            i_new = cur_i[k] + int'($ceil(cur_i[k] * 0.25)); n_i_up++;
          end else if (cur_i[k] > 1.3 * beta) begin
            i_new = cur_i[k] - int'($ceil(cur_i[k] * 0.25)); n_i_dn++;
          end
        end
        if (i_new < 1)   i_new = 1;
        if (i_new > 255) i_new = 255;
        r  = lambda / (real'(cur_i[k]) / cur_m[k]);
        mi = real'(cur_m[k]) / cur_i[k];
        if (r > 0.85) begin mi = mi - mi * 0.32; n_r_up++; end
        else          begin mi = mi + mi * 0.15; n_r_dn++; end
        begin
          automatic int m_new = int'(mi * i_new);
          if (m_new < i_new) m_new = i_new;
          if (m_new > 2047)  m_new = 2047;
          install(k, i_new, m_new);
        end
        rate_hist[k].push_back(real'(cur_i[k]) / cur_m[k]);
      end
    end

    // traffic ends; drain the queues, then wait for every credit to return
    traffic_on = 1'b0;
    begin
      int guard = 0;
      while ((backlog[0] + backlog[1] + backlog[2] + backlog[3]) > 0 && guard < 200000) begin
        wait_slots(100); guard += 100;
      end
      check(guard < 200000, "queues drained");
    end
    wait_slots(2 * 2048 + 100);
    for (int k = 0; k < NV; k++) begin
      pt_access(1'b0, 1'b0, vci_t'(vci_of[k]), '0, r);  e  = pace_i_t'(r);
      pt_access(1'b1, 1'b0, vci_t'(vci_of[k]), '0, r);  em = pace_m_t'(r);
      check(int'(e.i) == cur_i[k] && !e.stopped && !em.sem && int'(em.m) == cur_m[k],
            $sformatf("VC %0d: credits %0d, assigned %0d", vci_of[k], int'(e.i), cur_i[k]));
    end

    // adaptation followed the bump of VC 100
    begin
      real r_before, r_during, r_after;
      r_before = rate_hist[0][BUMP_FROM - 1];
      r_during = 0.0;                        // peak, reached while the backlog drains
      foreach (rate_hist[0][j]) if (rate_hist[0][j] > r_during) r_during = rate_hist[0][j];
      r_after  = rate_hist[0][N_IV - 1];
      $display("VC 100 assigned rate: r_before %f, peak %f, end %f", r_before, r_during, r_after);
      check(r_during > 1.5 * r_before, "assigned rate rose with the source rate");
      check(r_after < 0.7 * r_during, "assigned rate fell after the bump");
    end

    $display("mechanisms: stop %0d start %0d return %0d skip %0d skew %0d (C behind by %0d slots at most) freeze %0d burst %0d held %0d idle %0d swap %0d rmw %0d i+ %0d i- %0d r+ %0d r- %0d drop %0d",
             n_stop, n_start, n_ret, n_skip, n_skew, lag_max, n_freeze, n_burst, n_held, n_idle,
             n_swap, n_rmw, n_i_up, n_i_dn, n_r_up, n_r_dn, n_drop);
    check(n_stop > 0,   "Stop issued");
    check(n_start > 0,  "Start issued");
    check(n_ret > 0,    "credits returned");
    check(n_skew > 0,   "credit return skew");
    check(n_freeze > 0, "credit return held by semaphore");
    check(n_burst > 0,  "bursts counted");
    check(n_held > 0,   "burst held by stopped flag");
    check(n_idle > 0,   "idle line detected");
    check(n_swap == N_IV, "bank swaps");
    check(n_i_up > 0 && n_i_dn > 0, "i increased and decreased");
    check(n_r_up > 0 && n_r_dn > 0, "rate increased and decreased");
    check(n_drop == 0,  "no credit booking lost");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
