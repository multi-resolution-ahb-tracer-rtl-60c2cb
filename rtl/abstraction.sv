// abstraction: abstraction module, second stage of the tracer pipeline.
//
// Data classification: each traced bus cycle is split into an address field
// (HADDR of an address phase, HTRANS NONSEQ or SEQ), a data field (HWDATA or
// HRDATA of a completed data phase, chosen by the HWRITE of the matching address
// phase, which this block remembers across the AHB pipeline), a control field
// (HWRITE, HBURST, HSIZE, HPROT, HMASTER: 15 bits, with the address phase) and a
// status field that is either the protocol signals HTRANS, HREADY, HRESP (5 bits)
// or the bus state of the `bsm` state machine (4 bits). The state of the
// cycle being recorded is its combinational `state_next`; its registered `state`
// output is not needed here and is left open.
//
// Signal abstraction picks the fields of the trace mode:
//   full signals (FC, FT) : address, data, control, protocol signals
//   bus state    (BC, BT) : address, data, bus state
//   master op.   (MT)     : address, data
// Timing abstraction: at cycle level (FC, BC) a record is produced for every
// traced cycle; at transaction level (FT, BT, MT) only when a field changed, with
// `delta` counting the traced cycles since the previous record (a record with no
// field is forced when the counter would overflow). In both, a field that keeps
// its value is not repeated (its *_p flag is low). The first record of a segment
// (`sync`: trace start or mode change) carries every field seen in that cycle.
// A one-cycle `stop` input produces an end record.
//
// Timing: one register stage; `rec` is the record of the bus cycle that was on
// `s1` in the cycle before. Which fields each mode records follows the design
// description; the delta counter and the forced keep-alive record are this
// design's own way of keeping time at transaction level.
module abstraction
  import tracer_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  s1_t  s1,
  output rec_t rec
);

  bstate_e            bs_next;
  logic               dph_act, dph_wr;
  logic               cand_a, cand_d, cand_c, cand_s;
  logic [31:0]        v_a, v_d;
  logic [CTRL_W-1:0]  v_c;
  logic [PCS_W-1:0]   v_s;
  logic [31:0]        last_a, last_d;
  logic [CTRL_W-1:0]  last_c;
  logic [PCS_W-1:0]   last_s;
  logic               kn_a, kn_d, kn_c, kn_s;
  logic               a_p, d_p, c_p, s_p, emit;
  logic [DELTA_W-1:0] dcnt;

  bsm u_bsm (
    .clk        (clk),
    .rst_n      (rst_n),
    .bus        (s1.bus),
    .state      (),
    .state_next (bs_next)
  );

  always_comb begin
    cand_a = s1.bus.htrans[1];
    v_a    = s1.bus.haddr;
    cand_d = s1.bus.hready && dph_act;
    v_d    = dph_wr ? s1.bus.hwdata : s1.bus.hrdata;
    cand_c = s1.bus.htrans[1] && mode_has_ctrl(s1.mode);
    v_c    = {s1.bus.hwrite, s1.bus.hburst, s1.bus.hsize, s1.bus.hprot, s1.bus.hmaster};
    cand_s = mode_has_pcs(s1.mode) || mode_has_state(s1.mode);
    v_s    = mode_has_pcs(s1.mode) ? {s1.bus.htrans, s1.bus.hready, s1.bus.hresp}
                                   : {1'b0, bs_next};

    a_p = cand_a && (s1.sync || !kn_a || v_a != last_a);
    d_p = cand_d && (s1.sync || !kn_d || v_d != last_d);
    c_p = cand_c && (s1.sync || !kn_c || v_c != last_c);
    s_p = cand_s && (s1.sync || !kn_s || v_s != last_s);

    emit = s1.active && (!mode_is_txn(s1.mode) || s1.sync || a_p || d_p || c_p || s_p
                         || dcnt == '1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dph_act <= 1'b0;
      dph_wr  <= 1'b0;
      last_a  <= '0;
      last_d  <= '0;
      last_c  <= '0;
      last_s  <= '0;
      kn_a    <= 1'b0;
      kn_d    <= 1'b0;
      kn_c    <= 1'b0;
      kn_s    <= 1'b0;
      dcnt    <= DELTA_W'(1);
      rec     <= '0;
    end else begin
      if (s1.bus.hready) begin
        dph_act <= s1.bus.htrans[1];
        dph_wr  <= s1.bus.hwrite;
      end

      if (s1.active) begin
        // history of recorded values; a sync starts a fresh segment
        if (a_p) begin last_a <= v_a; kn_a <= 1'b1; end else if (s1.sync) kn_a <= 1'b0;
        if (d_p) begin last_d <= v_d; kn_d <= 1'b1; end else if (s1.sync) kn_d <= 1'b0;
        if (c_p) begin last_c <= v_c; kn_c <= 1'b1; end else if (s1.sync) kn_c <= 1'b0;
        if (s_p) begin last_s <= v_s; kn_s <= 1'b1; end else if (s1.sync) kn_s <= 1'b0;
        dcnt <= emit ? DELTA_W'(1) : dcnt + 1'b1;
      end else begin
        dcnt <= DELTA_W'(1);
      end

      rec.valid <= emit || s1.stop;
      rec.stop  <= s1.stop;
      rec.sync  <= s1.sync && s1.active;
      rec.mode  <= s1.mode;
      rec.delta <= dcnt;
      rec.a_p   <= a_p && s1.active;
      rec.d_p   <= d_p && s1.active;
      rec.c_p   <= c_p && s1.active;
      rec.s_p   <= s_p && s1.active;
      rec.addr  <= a_p ? v_a : last_a;
      rec.data  <= d_p ? v_d : last_d;
      rec.ctrl  <= c_p ? v_c : last_c;
      rec.sval  <= s_p ? v_s : last_s;
    end
  end

endmodule
