// ahb_tracer: multi-resolution AMBA AHB bus tracer with real-time compression.
//
// The tracer sits on an AHB bus as a passive observer and stores a compressed
// trace of it in an on-chip circular trace memory, which the host reads back and
// decodes. Its resolution can be changed while a trace runs: five trace modes
// combine three signal abstraction levels (full signals, bus state, master
// operation) with two timing abstraction levels (every cycle, or only on a
// change), from mode FC (1, most detail) to mode MT (5, smallest trace).
//
// Pipeline, one bus cycle per clock, five stages:
//   1 event_gen     event registers, trigger, pre-/post-trigger control, mode
//   2 abstraction   data classification, bus state machine, signal/timing abstraction
//   3 compression   address filter + dictionary + slicing, data difference,
//                   control dictionary
//   4 packer+bit_fifo  header attachment, mode markers, 512-bit packing FIFO
//   5 circ_buf_mgr+trace_mem  32-bit words into the circular trace memory
//
// Interface: `bus` is the AHB bus as monitored (HRESETn is `rst_n`);
// `protocol_violation` comes from an external AHB protocol checker and can act
// as a trigger. The host programs the tracer through `cfg_*` (see event_gen)
// and reads the trace memory through `rd_addr`/`rd_data` (one cycle latency).
// Status: `tracing`, `triggered`, `done`, the memory write pointer `wptr`,
// `wrapped` and `full`, and the count of packets dropped on FIFO overflow.
//
// The block structure, trace modes, compression methods, the 32-bit trace word,
// the five stages, the 512-bit FIFO, up to 16 masters and the two event
// registers follow the design description; widths, packet format and the host
// interfaces are this design's own. The direction of a run is handed to the
// circular buffer manager from the arm write itself (`start` pulses during that
// write), so event_gen's registered `dir_post` and the FIFO's `flushing` status
// are left open here.
module ahb_tracer
  import tracer_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 4096,
  parameter int unsigned FIFO_BITS   = 512,
  parameter int unsigned N_EVENTS    = 2,
  parameter int unsigned ADDR_DICT_N = 16,
  parameter int unsigned CTRL_DICT_N = 8,
  parameter int unsigned DEPTH_W     = 16,
  localparam int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ahb_mon_t            bus,
  input  logic                protocol_violation,
  input  logic                cfg_we,
  input  logic [4:0]          cfg_addr,
  input  logic [31:0]         cfg_wdata,
  input  logic [AW-1:0]       rd_addr,
  output logic [WORD_W-1:0]   rd_data,
  output logic                tracing,
  output logic                triggered,
  output logic                done,
  output logic [AW-1:0]       wptr,
  output logic                wrapped,
  output logic                full,
  output logic [15:0]         drops,
  output logic [N_EVENTS-1:0] event_hit
);

  localparam int unsigned FW = $clog2(FIFO_BITS);
  localparam int unsigned LW = $clog2(PKT_W + 1);

  s1_t               s1;
  rec_t              rec;
  crec_t             crec;
  logic              start, word_wr, resync;
  logic              pk_we, pk_flush, f_rd, f_wvalid;
  logic [PKT_W-1:0]  pk_data;
  logic [LW-1:0]     pk_len;
  logic [FW:0]       f_free;
  logic [WORD_W-1:0] f_wdata, m_wdata;
  logic              m_we;
  logic [AW-1:0]     m_addr;

  event_gen #(.N_EVENTS(N_EVENTS), .DEPTH_W(DEPTH_W)) u_evgen (
    .clk (clk), .rst_n (rst_n),
    .cfg_we (cfg_we), .cfg_addr (cfg_addr), .cfg_wdata (cfg_wdata),
    .bus (bus), .protocol_violation (protocol_violation),
    .word_wr (word_wr), .mem_full (full),
    .s1 (s1), .tracing (tracing), .triggered (triggered), .done (done),
    .dir_post (), .start (start), .event_hit (event_hit)
  );

  abstraction u_abs (.clk (clk), .rst_n (rst_n), .s1 (s1), .rec (rec));

  compression #(.ADDR_DICT_N(ADDR_DICT_N), .CTRL_DICT_N(CTRL_DICT_N)) u_comp (
    .clk (clk), .rst_n (rst_n), .rec (rec), .resync (resync), .crec (crec)
  );

  packer #(.FIFO_BITS(FIFO_BITS)) u_pack (
    .clk (clk), .rst_n (rst_n), .crec (crec), .free (f_free),
    .we (pk_we), .pkt (pk_data), .len (pk_len), .flush (pk_flush),
    .resync (resync), .drops (drops)
  );

  bit_fifo #(.DEPTH_BITS(FIFO_BITS), .PKT_W(PKT_W), .WORD_W(WORD_W)) u_fifo (
    .clk (clk), .rst_n (rst_n), .we (pk_we), .din (pk_data), .len (pk_len),
    .flush (pk_flush), .rd (f_rd), .free (f_free), .wvalid (f_wvalid),
    .wdata (f_wdata), .flushing ()
  );

  circ_buf_mgr #(.MEM_WORDS(MEM_WORDS), .WORD_W(WORD_W)) u_cbm (
    .clk (clk), .rst_n (rst_n), .start (start), .dir_post (cfg_wdata[2]),
    .wvalid (f_wvalid), .wdata (f_wdata), .rd (f_rd),
    .mem_we (m_we), .mem_addr (m_addr), .mem_wdata (m_wdata),
    .wptr (wptr), .wrapped (wrapped), .full (full), .word_wr (word_wr)
  );

  trace_mem #(.MEM_WORDS(MEM_WORDS), .WORD_W(WORD_W)) u_mem (
    .clk (clk), .we (m_we), .waddr (m_addr), .wdata (m_wdata),
    .raddr (rd_addr), .rdata (rd_data)
  );

endmodule
