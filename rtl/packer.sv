// packer: packing module, fourth stage of the tracer pipeline (header attachment
// and mode change controller).
//
// Header attachment turns a compressed record into one variable-length packet,
// written least significant bit first:
//   kind=0 (1) | a_code (2) | d_code (2) | c_code (2) | s_p (1)
//   | gap (transaction-level modes and behind a marker) | address payload
//   | data payload | control payload | status (5 bits PCS or 4 bits state, if s_p)
// The mode change controller puts a 5-bit marker in front of the record,
//   kind=1 (1) | mode (3) | overflow (1)
// whenever a trace segment starts (trace start or mode change), so that one
// trace can hold segments of different modes. The record behind a marker always
// carries `delta`, so the decoder knows how many cycles passed across the mode
// change. The gap is the record's `delta`, the number of traced cycles since
// the previous record: a single 1 bit when it is 1 (the common case on a busy
// bus), otherwise a 0 bit followed by the DELTA_W-bit delta.
// A stop record becomes a marker
// with mode 0 (end of trace), after which the FIFO is flushed.
//
// If the FIFO has no room for a packet, the packet is dropped and counted. The
// packer then asks the compression stage to restart its history (`resync`)
// until a packet is written again; that packet gets a marker with the overflow
// bit set, and the decoder restarts its history there too. An end marker is
// never dropped: it waits for room.
//
// Timing: combinational from `crec` to the FIFO write in the same cycle.
// Packet layout, overflow handling and marker format are this design's own; the
// header attachment and mode change controller blocks are those of the design
// description.
module packer
  import tracer_pkg::*;
#(
  parameter int unsigned FIFO_BITS = 512,
  localparam int unsigned FW = $clog2(FIFO_BITS),
  localparam int unsigned LW = $clog2(PKT_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  crec_t            crec,
  input  logic [FW:0]      free,
  output logic             we,
  output logic [PKT_W-1:0] pkt,
  output logic [LW-1:0]    len,
  output logic             flush,
  output logic             resync,
  output logic [15:0]      drops
);

  logic             need_resync, stop_pend, marker, is_stop, fits, drop_now;
  logic [PKT_W-1:0] p;
  int unsigned      pos;
  mode_e            stop_mode;

  always_comb begin
    is_stop   = stop_pend || (crec.valid && crec.stop);
    stop_mode = MODE_END;
    marker    = is_stop || (crec.valid && (crec.sync || need_resync));
    p   = '0;
    pos = 0;
    if (marker) begin
      p   = PKT_W'({need_resync, is_stop ? stop_mode : crec.mode, 1'b1});
      pos = MARKER_LEN;
    end
    if (!is_stop && crec.valid) begin
      p   |= PKT_W'({crec.s_p, crec.c_code, crec.d_code, crec.a_code, 1'b0}) << pos;
      pos += 8;
      if (mode_is_txn(crec.mode) || crec.sync || need_resync) begin
        if (crec.delta == DELTA_W'(1)) begin
          p   |= PKT_W'(1) << pos;
          pos += 1;
        end else begin
          p   |= PKT_W'({crec.delta, 1'b0}) << pos;
          pos += 1 + DELTA_W;
        end
      end
      p   |= PKT_W'(crec.a_pay) << pos;
      pos += int'(crec.a_len);
      p   |= PKT_W'(crec.d_pay) << pos;
      pos += int'(crec.d_len);
      p   |= PKT_W'(crec.c_pay) << pos;
      pos += int'(crec.c_len);
      if (crec.s_p) begin
        p   |= PKT_W'(crec.sval) << pos;
        pos += mode_has_pcs(crec.mode) ? PCS_W : STATE_W;
      end
    end
    pkt      = p;
    len      = LW'(pos);
    fits     = 32'(free) >= pos;
    we       = (is_stop || crec.valid) && fits;
    drop_now = crec.valid && !is_stop && !fits;
    resync   = drop_now || (need_resync && !we);
    flush    = is_stop && fits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      need_resync <= 1'b0;
      stop_pend   <= 1'b0;
      drops       <= '0;
    end else begin
      if (drop_now) begin
        need_resync <= 1'b1;
        if (drops != '1) drops <= drops + 1'b1;
      end else if (we) begin
        need_resync <= 1'b0;
      end
      stop_pend <= is_stop && !fits;
    end
  end

endmodule
