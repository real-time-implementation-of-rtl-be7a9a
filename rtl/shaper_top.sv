// shaper_top: gateway-card hardware of the adaptive i-out-of-m shaper.
//
// The transmit cell bus (one cell, or none, per 13-clock cell slot) feeds two
// units side by side:
//   im_controller  enforces i cells per m slots per paced VC and sends Stop /
//                  Start back to the cell source;
//   pacing_meas    counts cells and bursts of up to 127 measured VCs into the
//                  bank selected by bank_sel.
// The controller's Stop pulses also go to the measurement unit, which keeps a
// stopped flag per measured VC for its burst rule. A slot_timer gives both the
// sub-slot phase. The line card processor (LCP), which runs the adaptation
// algorithm in software, sits outside: it reaches the pacing table through
// the pt_* port (i table or m table) and the measurement unit through the pm_* port, and it
// drives bank_sel. At the end of each measurement interval it flips bank_sel,
// reads and clears the idle bank, computes new i and m per VC, and rewrites
// the pacing entries under the semaphore protocol (stop the VC, set sem, wait,
// read-modify-write, restart if needed, clear sem).
//
// Timing: cell_valid/cell_vci are sampled in T0 of every slot; ready rises
// about LIST_DEPTH clocks after reset, when both units have cleared their
// tables. Sizes default to the document's: 4096 VCs, 2048-slot window,
// 16384 schedule list elements, 128 measurement entries.
//
// The split into controller and measurement unit, the LCP's role and the
// Stop path into the stopped flags follow the document. The request/done
// handshake of the two LCP ports, the event outputs (for observation) and
// the bank select input are this design's own.
module shaper_top
  import shaper_pkg::*;
#(
  parameter int unsigned NUM_VC      = 4096,
  parameter int unsigned LIST_DEPTH  = 16384,
  parameter int unsigned MEAS_N      = 128,
  parameter int          STOP_LEVEL  = 0,
  parameter int          START_LEVEL = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  output phase_t      phase,
  output logic        ready,
  // transmit cell bus
  input  logic        cell_valid,
  input  vci_t        cell_vci,
  // flow control to the cell source
  output logic        stop_valid,
  output vci_t        stop_vci,
  output logic        start_valid,
  output vci_t        start_vci,
  // LCP: pacing table
  input  logic        pt_req,
  input  logic        pt_tbl,       // 0: i table, 1: m table
  input  logic        pt_we,
  input  vci_t        pt_addr,
  input  logic [PT_W-1:0] pt_wdata,
  output logic [PT_W-1:0] pt_rdata,
  output logic        pt_done,
  // LCP: pacing measurement
  input  logic        bank_sel,
  input  logic        pm_req,
  input  pm_op_e      pm_op,
  input  vci_t        pm_addr,
  input  logic [MIDX_W-1:0] pm_wdata,
  output logic        pm_done,
  output logic [MIDX_W-1:0] pm_rd_idx,
  output meas_entry_t pm_rd_meas,
  output logic        pm_rd_stopped,
  // observation
  output logic [M_W-1:0] c_ptr,
  output logic        ev_dec,
  output logic        ev_ret,
  output logic        ev_skip,
  output logic        ev_freeze,
  output logic        ev_drop,
  output logic        ev_cell,
  output logic        ev_burst,
  output logic        ev_held,
  output logic        ev_idle
);

  logic slot_start;
  logic im_ready, pm_ready;

  slot_timer u_timer (.clk, .rst_n, .phase, .slot_start);

  im_controller #(
    .NUM_VC(NUM_VC), .LIST_DEPTH(LIST_DEPTH),
    .STOP_LEVEL(STOP_LEVEL), .START_LEVEL(START_LEVEL)
  ) u_im (
    .clk, .rst_n, .phase,
    .cell_valid, .cell_vci,
    .stop_valid, .stop_vci, .start_valid, .start_vci,
    .lcp_req(pt_req), .lcp_tbl(pt_tbl), .lcp_we(pt_we), .lcp_addr(pt_addr),
    .lcp_wdata(pt_wdata), .lcp_rdata(pt_rdata), .lcp_done(pt_done),
    .ready(im_ready), .c_ptr,
    .ev_dec, .ev_ret, .ev_skip, .ev_freeze, .ev_drop
  );

  pacing_meas #(.NUM_VC(NUM_VC), .MEAS_N(MEAS_N)) u_pm (
    .clk, .rst_n, .phase,
    .cell_valid, .cell_vci,
    .stop_valid, .stop_vci,
    .bank_sel,
    .lcp_req(pm_req), .lcp_op(pm_op), .lcp_addr(pm_addr), .lcp_wdata(pm_wdata),
    .lcp_done(pm_done), .lcp_rd_idx(pm_rd_idx), .lcp_rd_meas(pm_rd_meas),
    .lcp_rd_stopped(pm_rd_stopped),
    .ready(pm_ready),
    .ev_cell, .ev_burst, .ev_held, .ev_idle
  );

  assign ready = im_ready && pm_ready;

endmodule
