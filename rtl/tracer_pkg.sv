// tracer_pkg: types and constants shared by the multi-resolution AHB bus tracer.
//
// The tracer watches an AMBA AHB bus and writes a compressed, variable-resolution
// trace into an on-chip circular memory. This package holds the monitored bus
// bundle, the five trace modes (signal abstraction x timing abstraction), the
// bus-state-machine encoding, the records passed between pipeline stages and the
// field codes of the packet format that the host decoder has to know.
//
// Trace modes, bus states and their numbers follow the design description. The
// record layout, the packet codes and all field widths not given there are this
// implementation's own choices and are documented next to each item.
package tracer_pkg;

  // ---------------------------------------------------------------- AHB constants
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_BUSY   = 2'b01;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [1:0] HTRANS_SEQ    = 2'b11;

  localparam logic [1:0] HRESP_OKAY  = 2'b00;
  localparam logic [1:0] HRESP_ERROR = 2'b01;
  localparam logic [1:0] HRESP_RETRY = 2'b10;
  localparam logic [1:0] HRESP_SPLIT = 2'b11;

  localparam int unsigned MAX_MASTERS = 16;   // maximum number of AHB masters
  localparam int unsigned CTRL_W      = 15;   // HWRITE, HBURST, HSIZE, HPROT, HMASTER
  localparam int unsigned PCS_W       = 5;    // HTRANS, HREADY, HRESP
  localparam int unsigned STATE_W     = 4;    // bus state machine state
  localparam int unsigned WORD_W      = 32;   // output trace word

  // Signals of the AHB bus as seen by the tracer (all inputs, never driven).
  typedef struct packed {
    logic [31:0]            haddr;
    logic [1:0]             htrans;
    logic                   hwrite;
    logic [2:0]             hsize;
    logic [2:0]             hburst;
    logic [3:0]             hprot;
    logic [3:0]             hmaster;
    logic [31:0]            hwdata;
    logic [31:0]            hrdata;
    logic                   hready;
    logic [1:0]             hresp;
    logic [MAX_MASTERS-1:0] hgrant;
  } ahb_mon_t;

  // ---------------------------------------------------------------- trace modes
  // Mode 1..5 from the most detailed to the most abstract.
  typedef enum logic [2:0] {
    MODE_END = 3'd0,  // not a trace mode: marks the end of a trace in the packet stream
    MODE_FC  = 3'd1,  // full signals, cycle level
    MODE_FT  = 3'd2,  // full signals, transaction level
    MODE_BC  = 3'd3,  // bus state, cycle level
    MODE_BT  = 3'd4,  // bus state, transaction level
    MODE_MT  = 3'd5   // master operation, transaction level
  } mode_e;

  function automatic logic mode_is_txn(mode_e m);
    return (m == MODE_FT) || (m == MODE_BT) || (m == MODE_MT);
  endfunction

  function automatic logic mode_has_ctrl(mode_e m);   // control signals recorded
    return (m == MODE_FC) || (m == MODE_FT);
  endfunction

  function automatic logic mode_has_pcs(mode_e m);    // HTRANS/HREADY/HRESP recorded
    return (m == MODE_FC) || (m == MODE_FT);
  endfunction

  function automatic logic mode_has_state(mode_e m);  // bus state recorded
    return (m == MODE_BC) || (m == MODE_BT);
  endfunction

  function automatic logic mode_valid(logic [2:0] m);
    return (m >= 3'd1) && (m <= 3'd5);
  endfunction

  // ---------------------------------------------------------------- bus states
  // States 0..7 carry the numbers printed in the bus state diagram; WAIT MASTER
  // has no printed number and is given 8 here.
  typedef enum logic [STATE_W-1:0] {
    BS_ORIGIN      = 4'd0,
    BS_START       = 4'd1,
    BS_NORMAL      = 4'd2,
    BS_WAIT_SLAVE  = 4'd3,
    BS_IDLE        = 4'd4,
    BS_ERROR       = 4'd5,
    BS_RETRY_SPLIT = 4'd6,
    BS_RESET       = 4'd7,
    BS_WAIT_MASTER = 4'd8
  } bstate_e;

  // ---------------------------------------------------------------- stage records
  // Stage 1 -> 2: registered bus sample plus trace control.
  typedef struct packed {
    ahb_mon_t bus;
    logic     active;   // this bus cycle is traced
    logic     sync;     // first traced cycle of a segment (start or mode change)
    logic     stop;     // tracing ends: emit the end marker
    mode_e    mode;
  } s1_t;

  localparam int unsigned DELTA_W = 6;  // cycle gap field of transaction-level records

  // Stage 2 -> 3: one abstracted record. Values are always carried; *_p says the
  // field changed and belongs in the record.
  typedef struct packed {
    logic                valid;
    logic                sync;
    logic                stop;
    mode_e               mode;
    logic [DELTA_W-1:0]  delta;   // traced cycles since the previous record
    logic                a_p;
    logic [31:0]         addr;
    logic                d_p;
    logic [31:0]         data;
    logic                c_p;
    logic [CTRL_W-1:0]   ctrl;
    logic                s_p;
    logic [PCS_W-1:0]    sval;    // PCS (full-signal modes) or bus state (bus-state modes)
  } rec_t;

  // ---------------------------------------------------------------- packet format
  // Packets are written into the trace stream least significant bit first.
  // Record packet : kind(1)=0, a_code(2), d_code(2), c_code(2), s_p(1),
  //                 [gap in transaction modes and behind a marker: 1 if delta
  //                  is 1, else 0 and delta(DELTA_W)],
  //                 addr payload,
  //                 data payload, ctrl payload, [sval (5 or 4 bits) if s_p].
  // Marker packet : kind(1)=1, mode(3) (0 = end of trace), overflow(1).
  localparam logic [1:0] A_NONE = 2'b00;  // address unchanged
  localparam logic [1:0] A_SEQ  = 2'b01;  // previous address + SEQ stride (filtered)
  localparam logic [1:0] A_HIT  = 2'b10;  // dictionary index follows
  localparam logic [1:0] A_MISS = 2'b11;  // slice count - 1 (2 bits) + low bytes follow

  localparam logic [1:0] D_NONE = 2'b00;  // data unchanged
  localparam logic [1:0] D_D8   = 2'b01;  // 8-bit signed difference follows
  localparam logic [1:0] D_D16  = 2'b10;  // 16-bit signed difference follows
  localparam logic [1:0] D_FULL = 2'b11;  // full 32-bit value follows

  localparam logic [1:0] C_NONE = 2'b00;  // control unchanged / not recorded
  localparam logic [1:0] C_HIT  = 2'b10;  // 3-bit dictionary index follows
  localparam logic [1:0] C_MISS = 2'b11;  // 15-bit control value follows

  localparam int unsigned MARKER_LEN = 5;
  localparam int unsigned PKT_W      = 128; // widest packet the packer can emit

  // Stage 3 -> 4: compressed record, still field by field.
  typedef struct packed {
    logic                valid;
    logic                sync;
    logic                stop;
    mode_e               mode;
    logic [DELTA_W-1:0]  delta;
    logic [1:0]          a_code;
    logic [33:0]         a_pay;     // index, or {bytes, slice count}
    logic [5:0]          a_len;
    logic [1:0]          d_code;
    logic [31:0]         d_pay;
    logic [5:0]          d_len;
    logic [1:0]          c_code;
    logic [CTRL_W-1:0]   c_pay;
    logic [4:0]          c_len;
    logic                s_p;
    logic [PCS_W-1:0]    sval;
  } crec_t;

endpackage
