// shaper_pkg: widths, table entry types and sub-slot numbers shared by the
// gateway-side hardware of the adaptive i-out-of-m traffic shaper.
//
// A cell slot on the switch backplane lasts 13 clock cycles (520 ns at a
// 40 ns clock), numbered T0..T12. Every table access of the i-out-of-m
// controller and of the pacing measurement unit is tied to one of these
// sub-slots, so that the units never contend for a memory port.
//
// Field widths follow the document: 12-bit VCI (4096 VCs), 10-bit signed
// credit count i, 11-bit unsigned window m (2048 slots), 15-bit list
// pointers with a separate nil bit, 24-bit cell and burst counts and a
// 128-entry measurement table. The bit order inside each packed struct is
// this design's own choice.
package shaper_pkg;

  localparam int unsigned VCI_W       = 12;   // 4096 VCs
  localparam int unsigned I_W         = 10;   // signed credit count
  localparam int unsigned M_W         = 11;   // window size in cell slots
  localparam int unsigned PTR_W       = 15;   // schedule list pointer
  localparam int unsigned CNT_W       = 24;   // cell / burst counters
  localparam int unsigned MIDX_W      = 7;    // measurement table index
  localparam int unsigned SLOT_CYCLES = 13;   // sub-slots per cell slot

  typedef logic [VCI_W-1:0]  vci_t;
  typedef logic [3:0]        phase_t;         // 0..12

  // Sub-slot assignment (this design's schedule; the document places the
  // credit decrement at T2 and the credit increment at T4 of its own table).
  localparam phase_t T0  = 4'd0,  T1  = 4'd1,  T2  = 4'd2,  T3  = 4'd3;
  localparam phase_t T4  = 4'd4,  T5  = 4'd5,  T6  = 4'd6,  T7  = 4'd7;
  localparam phase_t T8  = 4'd8,  T9  = 4'd9,  T10 = 4'd10, T11 = 4'd11;
  localparam phase_t T12 = 4'd12;

  // The pacing table is two memories indexed by VCI, the i table and the m
  // table, 12 bits each. Keeping them apart lets the LCP set the semaphore
  // (m table) without rewriting the credit count (i table).
  localparam int unsigned PT_W = 12;

  typedef struct packed {
    logic                  enb;      // bit 11: VC is bandwidth controlled
    logic                  stopped;  // a Stop has been issued and no Start yet
    logic signed [I_W-1:0] i;        // credits left in the account
  } pace_i_t;

  typedef struct packed {
    logic                  sem;      // LCP is updating i/m: freeze credit return
    logic [M_W-1:0]        m;        // window in cell slots
  } pace_m_t;

  // One schedule pointers table entry, indexed by cell slot (mod 2048).
  typedef struct packed {
    logic             head_nil;
    logic [PTR_W-1:0] head;
    logic             tail_nil;
    logic [PTR_W-1:0] tail;
  } sched_ptr_t;

  // Schedule list element, kept as two memories so that the link of the
  // old tail can be written without disturbing its VCI.
  typedef struct packed {
    logic             nil;
    logic [VCI_W-1:0] vci;
  } list_vci_t;

  typedef struct packed {
    logic             nil;
    logic [PTR_W-1:0] next;
  } list_next_t;

  // Pacing measurement table entry (one bank).
  typedef struct packed {
    logic [CNT_W-1:0] cells;
    logic [CNT_W-1:0] bursts;
  } meas_entry_t;

  // Operations the LCP may request from the pacing measurement unit.
  typedef enum logic [1:0] {
    PM_XLAT_WR = 2'd0,   // write translation table entry
    PM_XLAT_RD = 2'd1,   // read translation table entry
    PM_MEAS_RD = 2'd2,   // read the idle bank's counts and the stopped flag
    PM_MEAS_CLR = 2'd3   // read and clear the idle bank's counts
  } pm_op_e;

endpackage
