// axi_pkg: shared types and constants of the shared-bus AXI interconnect.
//
// The interconnect joins 5 masters and 11 slaves over one shared bus per AXI
// channel (AR, AW, R, W, B), with 32-bit address and data. Each master may keep
// BUF_SIZE transactions outstanding; its ID is log2(BUF_SIZE) bits wide and the
// interconnect prepends the master index, so slaves see log2(N_MASTER) more ID
// bits. These sizes are the platform configuration the design was evaluated in.
// The channel payloads follow AXI3 (WID present, 4-bit burst length); cache,
// protection and QoS fields are left out because nothing in the interconnect
// uses them, which is this design's own simplification.
package axi_pkg;

  localparam int unsigned N_MASTER = 5;
  localparam int unsigned N_SLAVE  = 11;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned STRB_W   = DATA_W / 8;
  localparam int unsigned BUF_SIZE = 8;                       // outstanding transactions per wrapper
  localparam int unsigned MID_W    = $clog2(BUF_SIZE);        // master-side ID width
  localparam int unsigned MIDX_W   = $clog2(N_MASTER);        // master index width
  localparam int unsigned SIDX_W   = $clog2(N_SLAVE);         // slave index width
  localparam int unsigned SID_W    = MIDX_W + MID_W;          // slave-side ID width

  // Arbitration policies selectable per channel.
  typedef enum logic [1:0] {
    ARB_FIXED   = 2'd0,
    ARB_TDMA    = 2'd1,
    ARB_RR      = 2'd2,
    ARB_LOTTERY = 2'd3
  } arb_policy_e;

  // AXI3 lock encoding; LOCKED on AxLOCK marks a data lock mode transaction.
  localparam logic [1:0] AXLOCK_LOCKED = 2'b10;

  // Address/control payload as seen by a master (master-side ID).
  typedef struct packed {
    logic [MID_W-1:0]  id;
    logic [ADDR_W-1:0] addr;
    logic [3:0]        len;
    logic [2:0]        size;
    logic [1:0]        burst;
    logic [1:0]        lock;
  } ax_m_t;

  // Address/control payload as seen by a slave (extended ID).
  typedef struct packed {
    logic [SID_W-1:0]  id;
    logic [ADDR_W-1:0] addr;
    logic [3:0]        len;
    logic [2:0]        size;
    logic [1:0]        burst;
    logic [1:0]        lock;
  } ax_s_t;

  typedef struct packed {
    logic [MID_W-1:0]  id;
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } w_m_t;

  typedef struct packed {
    logic [SID_W-1:0]  id;
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } w_s_t;

  typedef struct packed {
    logic [MID_W-1:0]  id;
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } r_m_t;

  typedef struct packed {
    logic [SID_W-1:0]  id;
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } r_s_t;

  typedef struct packed {
    logic [MID_W-1:0]  id;
    logic [1:0]        resp;
  } b_m_t;

  typedef struct packed {
    logic [SID_W-1:0]  id;
    logic [1:0]        resp;
  } b_s_t;

  // Address map: slave s answers to addr[31:28] == s. Addresses whose top
  // nibble names no slave alias to slave 0.
  function automatic logic [SIDX_W-1:0] decode_slave(input logic [ADDR_W-1:0] addr);
    logic [3:0] nib;
    nib = addr[ADDR_W-1 -: 4];
    if (int'(nib) < N_SLAVE) return SIDX_W'(nib);
    return '0;
  endfunction

endpackage
