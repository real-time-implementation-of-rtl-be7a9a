// tb_pacing_meas: self-checking test of the pacing measurement unit.
//
// VCs 10, 11 and 12 are mapped to measurement entries 1, 2 and 3; VC 20 is
// sent too but not measured. Random traffic with idle gaps and occasional
// Stop pulses runs for several measurement intervals. At the end of each
// interval the test flips bank_sel, reads and clears the idle bank, and
// compares cell and burst counts with a reference model kept here in plain
// slot numbers: a burst starts for a VC at its first cell after a run of two
// idle slots, unless the VC was stopped and has sent nothing since.
`timescale 1ns/1ps
module tb_pacing_meas;
  import shaper_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  phase_t phase;
  logic   slot_start;
  slot_timer u_timer (.clk, .rst_n, .phase, .slot_start);

  logic        cell_valid = 1'b0, stop_valid = 1'b0, bank_sel = 1'b0;
  vci_t        cell_vci = '0, stop_vci = '0;
  logic        lcp_req = 1'b0, lcp_done, lcp_rd_stopped, ready;
  pm_op_e      lcp_op = PM_XLAT_RD;
  vci_t        lcp_addr = '0;
  logic [MIDX_W-1:0] lcp_wdata = '0, lcp_rd_idx;
  meas_entry_t lcp_rd_meas;
  logic ev_cell, ev_burst, ev_held, ev_idle;

  pacing_meas dut (
    .clk, .rst_n, .phase, .cell_valid, .cell_vci, .stop_valid, .stop_vci,
    .bank_sel, .lcp_req, .lcp_op, .lcp_addr, .lcp_wdata, .lcp_done,
    .lcp_rd_idx, .lcp_rd_meas, .lcp_rd_stopped, .ready,
    .ev_cell, .ev_burst, .ev_held, .ev_idle);

  // ------------------------------------------------------------ reference
  int idx_of [4096];
  int m_cells [4], m_bursts [4];
  int prev_slot [4];
  bit m_stopped [4];
  int last_idle = 0, slot = 0;
  bit prev_was_idle = 1'b1;
  int n_burst = 0, n_held = 0, n_idle = 0;

  // the unit samples the bus at the end of T0
  always @(posedge clk) begin
    if (ready && phase == T0) begin
      slot++;
      if (!cell_valid) begin
        if (prev_was_idle) last_idle = slot;
        prev_was_idle = 1'b1;
      end else begin
        prev_was_idle = 1'b0;
        if (idx_of[cell_vci] != 0) begin
          automatic int x = idx_of[cell_vci];
          m_cells[x]++;
          if (last_idle > prev_slot[x] && !m_stopped[x]) m_bursts[x]++;
          prev_slot[x] = slot;
          m_stopped[x] = 1'b0;
        end
      end
    end
    if (stop_valid && idx_of[stop_vci] != 0) m_stopped[idx_of[stop_vci]] = 1'b1;
    if (ev_burst) n_burst++;
    if (ev_held)  n_held++;
    if (ev_idle)  n_idle++;
  end

  task automatic lcp(input pm_op_e op, input int addr, input int wdata);
    @(posedge clk);
    lcp_req <= 1'b1; lcp_op <= op; lcp_addr <= vci_t'(addr);
    lcp_wdata <= MIDX_W'(wdata);
    @(posedge clk iff lcp_done);
    lcp_req <= 1'b0;
  endtask

  task automatic next_slot();
    @(posedge clk iff phase == T12);
  endtask

  static int vcs[4] = '{10, 11, 12, 20};

  initial begin : main
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk iff ready);

    lcp(PM_XLAT_RD, 10, 0);
    check(lcp_rd_idx == 0, "translation table cleared after reset");
    for (int k = 0; k < 3; k++) begin
      lcp(PM_XLAT_WR, vcs[k], k + 1);
      idx_of[vcs[k]] = k + 1;
      prev_slot[k + 1] = -1;
    end
    lcp(PM_XLAT_RD, 11, 0);
    check(lcp_rd_idx == 2, "translation table read-back");
    // clear the idle bank (bank 1) once
    for (int k = 1; k <= 3; k++) lcp(PM_MEAS_CLR, k, 0);

    for (int iv = 0; iv < 6; iv++) begin
      // one measurement interval of random traffic
      for (int s = 0; s < 300; s++) begin
        automatic int r = $urandom_range(0, 99);
        automatic int v = vcs[$urandom_range(0, 3)];
        next_slot();
        // bursty: long idle gaps in some stretches
        if ((s / 40) % 2 == 1 && r < 70) begin
          cell_valid <= 1'b0;
        end else begin
          cell_valid <= (r < 80);
          cell_vci   <= vci_t'(v);
          if (r < 80 && r >= 72 && v != 20) begin
            // the controller stops this VC after its cell (Stop in T3)
            @(posedge clk iff phase == T2);
            stop_valid <= 1'b1; stop_vci <= vci_t'(v);
            @(posedge clk);
            stop_valid <= 1'b0;
          end
        end
      end
      next_slot();
      cell_valid <= 1'b0;
      bank_sel   <= ~bank_sel;       // end of interval: swap banks
      next_slot();
      begin
        int ec[4], eb[4];
        for (int k = 1; k <= 3; k++) begin ec[k] = m_cells[k]; eb[k] = m_bursts[k];
          m_cells[k] = 0; m_bursts[k] = 0; end
        for (int k = 1; k <= 3; k++) begin
          lcp(PM_MEAS_CLR, k, 0);
          check(lcp_rd_meas.cells == CNT_W'(ec[k]),
                $sformatf("interval %0d entry %0d cells %0d, expected %0d", iv, k, lcp_rd_meas.cells, ec[k]));
          check(lcp_rd_meas.bursts == CNT_W'(eb[k]),
                $sformatf("interval %0d entry %0d bursts %0d, expected %0d", iv, k, lcp_rd_meas.bursts, eb[k]));
          check(lcp_rd_stopped == m_stopped[k], $sformatf("entry %0d stopped flag", k));
        end
      end
    end
    // cleared entries read back as zero
    lcp(PM_MEAS_RD, 1, 0);
    check(lcp_rd_meas == '0, "entry cleared by the LCP");
    check(n_burst > 20, $sformatf("bursts counted: %0d", n_burst));
    check(n_held > 0,   $sformatf("bursts held by the stopped flag: %0d", n_held));
    check(n_idle > 20,  $sformatf("idle line detected: %0d", n_idle));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
