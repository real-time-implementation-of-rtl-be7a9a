// tb_im_controller: self-checking test of the i-out-of-m controller.
//
// A behavioural cell source sends at most one cell per slot and obeys the
// Stop/Start pulses. The test checks, against expectations computed here:
//  1. a lone backlogged VC (i=3, m=20) sends exactly in slots 0..2, 20..22,
//     40..42, ...: i cells per m slots, a Stop whenever the account runs
//     dry and a Start m-1 slots after each use;
//  2. the credit-return skew example: seven VCs with i=1 whose credits fall
//     due as {40,12} in queue K, {76,10,23} in K+2 and {88,99} in K+3 are
//     restarted one per slot in the order 40,12,76,10,23,88,99;
//  3. a random mix of paced VCs never exceeds i cells in any m consecutive
//     slots and all credits come back (LCP read-back of i afterwards);
//  4. a set semaphore holds the credit return (no Start, i unchanged) until
//     the LCP clears it;
//  5. a second instance with a 4-element schedule list reports lost
//     bookings once its free list is used up.
`timescale 1ns/1ps
module tb_im_controller;
  import shaper_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;                         // 40 ns backplane clock

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

  phase_t phase;
  logic   slot_start;
  slot_timer u_timer (.clk, .rst_n, .phase, .slot_start);

  logic        cell_valid = 1'b0;
  vci_t        cell_vci   = '0;
  logic        stop_valid, start_valid, ready;
  vci_t        stop_vci, start_vci;
  logic        lcp_req = 1'b0, lcp_tbl = 1'b0, lcp_we = 1'b0, lcp_done;
  vci_t        lcp_addr = '0;
  logic [PT_W-1:0] lcp_wdata = '0, lcp_rdata;
  logic [M_W-1:0] c_ptr;
  logic ev_dec, ev_ret, ev_skip, ev_freeze, ev_drop;

  im_controller dut (
    .clk, .rst_n, .phase, .cell_valid, .cell_vci,
    .stop_valid, .stop_vci, .start_valid, .start_vci,
    .lcp_req, .lcp_tbl, .lcp_we, .lcp_addr, .lcp_wdata, .lcp_rdata, .lcp_done,
    .ready, .c_ptr, .ev_dec, .ev_ret, .ev_skip, .ev_freeze, .ev_drop);

  // small instance for free-list exhaustion
  logic        s_cell_valid = 1'b0;
  logic        s_stop_valid, s_start_valid, s_ready, s_lcp_done;
  vci_t        s_stop_vci, s_start_vci;
  logic        s_lcp_req = 1'b0, s_lcp_tbl = 1'b0;
  logic [PT_W-1:0] s_lcp_wdata = '0, s_lcp_rdata;
  logic [M_W-1:0] s_c_ptr;
  logic s_dec, s_ret, s_skip, s_freeze, s_drop;
  im_controller #(.NUM_VC(16), .LIST_DEPTH(4)) dut_small (
    .clk, .rst_n, .phase, .cell_valid(s_cell_valid), .cell_vci(vci_t'(3)),
    .stop_valid(s_stop_valid), .stop_vci(s_stop_vci),
    .start_valid(s_start_valid), .start_vci(s_start_vci),
    .lcp_req(s_lcp_req), .lcp_tbl(s_lcp_tbl), .lcp_we(1'b1), .lcp_addr(vci_t'(3)),
    .lcp_wdata(s_lcp_wdata),
    .lcp_rdata(s_lcp_rdata), .lcp_done(s_lcp_done),
    .ready(s_ready), .c_ptr(s_c_ptr), .ev_dec(s_dec), .ev_ret(s_ret),
    .ev_skip(s_skip), .ev_freeze(s_freeze), .ev_drop(s_drop));

  // ------------------------------------------------------------ bookkeeping
  int slot = 0;
  bit blocked [4096];
  int n_stop = 0, n_start = 0, n_freeze = 0, n_drop = 0;
  int start_slot [4096];
  int start_order [$];

  // counted only once reset is released (outputs power up at random values)
  always @(posedge clk iff rst_n) begin
    if (stop_valid)  begin blocked[stop_vci] = 1'b1; n_stop++; end
    if (start_valid) begin
      blocked[start_vci] = 1'b0; n_start++;
      start_slot[start_vci] = slot; start_order.push_back(int'(start_vci));
    end
    if (ev_freeze) n_freeze++;
    if (s_drop)    n_drop++;
  end

  // next slot boundary: returns once cell inputs for the coming T0 may be set
  task automatic next_slot();
    @(posedge clk iff phase == T12);
    slot++;
  endtask

  task automatic drive(input logic v, input vci_t id);
    cell_valid <= v;
    cell_vci   <= id;
  endtask

  task automatic send(input logic v, input vci_t id);
    next_slot();
    drive(v, id);
  endtask

  task automatic lcp_acc(input bit tbl, input bit we, input vci_t a,
                         input logic [PT_W-1:0] w, output logic [PT_W-1:0] r);
    @(posedge clk);
    lcp_req <= 1'b1; lcp_tbl <= tbl; lcp_we <= we; lcp_addr <= a; lcp_wdata <= w;
    @(posedge clk iff lcp_done);
    r = lcp_rdata;
    lcp_req <= 1'b0;
  endtask

  // install a paced VC with i credits and window m
  task automatic pt_write(input vci_t a, input int i, input int m);
    logic [PT_W-1:0] r;
    lcp_acc(1'b0, 1'b1, a, mk_i(1'b1, 1'b0, I_W'(i)), r);
    lcp_acc(1'b1, 1'b1, a, mk_m(1'b0, M_W'(m)), r);
  endtask

  task automatic pt_read(input vci_t a, output pace_i_t ie, output pace_m_t me);
    logic [PT_W-1:0] r;
    lcp_acc(1'b0, 1'b0, a, '0, r); ie = pace_i_t'(r);
    lcp_acc(1'b1, 1'b0, a, '0, r); me = pace_m_t'(r);
  endtask

  task automatic set_sem(input vci_t a, input bit sem, input int m);
    logic [PT_W-1:0] r;
    lcp_acc(1'b1, 1'b1, a, mk_m(sem, M_W'(m)), r);
  endtask

  // ------------------------------------------------------------ test body
  int sends [4096][$];
  pace_i_t e;
  pace_m_t em;

  initial begin : main
    int base, s0, ok, cnt;
    static int vcs[7]  = '{40, 12, 76, 10, 23, 88, 99};
    static int ms[7]   = '{40, 39, 40, 39, 38, 37, 36};
    static int rvc[5]  = '{200, 201, 202, 203, 204};
    static int ri[5]   = '{1, 2, 3, 5, 8};
    static int rm[5]   = '{7, 11, 19, 30, 64};
    int backlog[5];

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff (ready && s_ready));

    // ---- LCP access
    pt_write(vci_t'(5), 3, 20);
    pt_read(vci_t'(5), e, em);
    check(e.enb && !e.stopped && e.i == 10'sd3 && !em.sem && em.m == 11'd20,
          "pacing table read-back");
    pt_read(vci_t'(6), e, em);
    check(e == '0 && em == '0, "pacing table cleared after reset");

    // ---- 1. lone backlogged VC: i = 3, m = 20
    base = slot + 1;
    cnt  = 0;
    while (slot < base + 99) begin
      next_slot();
      drive(!blocked[5], vci_t'(5));
      if (!blocked[5]) sends[5].push_back(slot - base);
    end
    send(1'b0, '0);
    ok = (sends[5].size() == 15);
    for (int k = 0; k < sends[5].size(); k++)
      if (sends[5][k] != (k / 3) * 20 + (k % 3)) ok = 0;
    if (!ok) foreach (sends[5][j]) $display("  VC 5 sent in slot %0d", sends[5][j]);
    check(ok, "i-out-of-m send pattern 0,1,2,20,21,22,...");
    // Stop after slot 2; after that each returned credit restarts the VC for
    // one cell: Stops in 20,21,22, 40,41,42, ... and Starts m-1 slots after
    // each use (19,20,21, ..., 99).
    check(n_stop == 13 && n_start == 13, $sformatf("stop/start counts %0d/%0d", n_stop, n_start));
    for (int k = 0; k < 5; k++)
      check(int'(start_order[k]) == 5, "start for VC 5");
    check(start_slot[5] - base == 80 + 19, "Start m-1 slots after last use");

    // let VC 5 refill, then check it holds i again
    repeat (30) send(1'b0, '0);
    pt_read(vci_t'(5), e, em);
    check(e.i == 10'sd3 && !e.stopped, "VC 5 credits all returned");

    // ---- 2. credit return skew example
    for (int k = 0; k < 7; k++) pt_write(vci_t'(vcs[k]), 1, ms[k]);
    start_order.delete();
    s0 = slot + 1;
    for (int k = 0; k < 7; k++) send(1'b1, vci_t'(vcs[k]));
    send(1'b0, '0);
    while (slot < s0 + 50) send(1'b0, '0);
    check(start_order.size() == 7, "seven credits returned");
    for (int k = 0; k < 7 && k < start_order.size(); k++) begin
      check(start_order[k] == vcs[k], $sformatf("return order pos %0d: VC %0d", k, start_order[k]));
      check(start_slot[vcs[k]] == s0 + 39 + k,
            $sformatf("VC %0d returned in slot +%0d", vcs[k], start_slot[vcs[k]] - s0));
    end

    // ---- 3. random mix
    for (int k = 0; k < 5; k++) begin
      pt_write(vci_t'(rvc[k]), ri[k], rm[k]);
      backlog[k] = 0;
      sends[rvc[k]].delete();
    end
    base = slot + 1;
    while (slot < base + 1500) begin
      int pick, n;
      next_slot();
      for (int k = 0; k < 5; k++) if ($urandom_range(0, 9) < 2) backlog[k]++;
      pick = -1; n = 0;
      for (int k = 0; k < 5; k++)
        if (backlog[k] > 0 && !blocked[rvc[k]]) begin
          n++;
          if ($urandom_range(1, n) == 1) pick = k;
        end
      if (pick >= 0 && $urandom_range(0, 9) != 0) begin
        drive(1'b1, vci_t'(rvc[pick]));
        backlog[pick]--;
        sends[rvc[pick]].push_back(slot);
      end else begin
        drive(1'b0, '0);
      end
    end
    send(1'b0, '0);
    for (int k = 0; k < 5; k++) begin
      ok = 1;
      for (int j = 0; j + ri[k] < sends[rvc[k]].size(); j++)
        if (sends[rvc[k]][j + ri[k]] - sends[rvc[k]][j] < rm[k]) ok = 0;
      if (!ok) foreach (sends[rvc[k]][j]) $display("  VC %0d sent in slot %0d", rvc[k], sends[rvc[k]][j]);
      check(ok, $sformatf("VC %0d never more than %0d cells in %0d slots", rvc[k], ri[k], rm[k]));
      check(sends[rvc[k]].size() > 1500 * ri[k] / rm[k] / 2,
            $sformatf("VC %0d got its share (%0d cells)", rvc[k], sends[rvc[k]].size()));
    end
    repeat (200) send(1'b0, '0);
    for (int k = 0; k < 5; k++) begin
      pt_read(vci_t'(rvc[k]), e, em);
      check(e.i == I_W'(ri[k]) && !e.stopped, $sformatf("VC %0d credits restored (%0d)", rvc[k], e.i));
    end

    // ---- 4. semaphore freezes the credit return
    pt_write(vci_t'(7), 1, 5);
    send(1'b1, vci_t'(7));
    send(1'b0, '0);
    pt_read(vci_t'(7), e, em);
    check(e.i == 0 && e.stopped, "VC 7 stopped after its only credit");
    set_sem(vci_t'(7), 1'b1, 5);
    start_slot[7] = -1;
    repeat (20) send(1'b0, '0);
    check(start_slot[7] == -1, "no Start while semaphore set");
    check(n_freeze > 5, $sformatf("credit return held (%0d)", n_freeze));
    pt_read(vci_t'(7), e, em);
    check(e.i == 0 && em.sem, "credit not returned under semaphore");
    set_sem(vci_t'(7), 1'b0, 5);
    repeat (3) send(1'b0, '0);
    check(start_slot[7] != -1, "Start after semaphore cleared");
    pt_read(vci_t'(7), e, em);
    check(e.i == 1 && !e.stopped, "credit returned after semaphore cleared");

    // ---- 5. free list exhaustion on the small instance
    @(posedge clk);
    s_lcp_req <= 1'b1; s_lcp_tbl <= 1'b0;
    s_lcp_wdata <= mk_i(1'b1, 1'b0, 10'sd8);
    @(posedge clk iff s_lcp_done);
    s_lcp_req <= 1'b0;
    @(posedge clk);
    s_lcp_req <= 1'b1; s_lcp_tbl <= 1'b1;
    s_lcp_wdata <= mk_m(1'b0, 11'd100);
    @(posedge clk iff s_lcp_done);
    s_lcp_req <= 1'b0;
    for (int k = 0; k < 8; k++) begin
      next_slot(); slot--;           // keep the main slot count unchanged
      s_cell_valid <= 1'b1;
    end
    next_slot(); slot--;
    s_cell_valid <= 1'b0;
    repeat (2) begin next_slot(); slot--; end
    check(n_drop == 4, $sformatf("bookings lost with 4 list elements: %0d", n_drop));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
