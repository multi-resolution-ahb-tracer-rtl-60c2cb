// bsm: bus state machine that encodes AHB master behaviour as one state number.
//
// In the bus-state trace modes the tracer records this state instead of the
// protocol signals HTRANS, HREADY and HRESP. Each state stands for a combination
// of those signals: ORIGIN (0, master without the bus), START (1, first transfer
// after getting the bus), NORMAL (2, transfers with HREADY high and HTRANS NONSEQ
// or SEQ), WAIT SLAVE (3, slave inserts wait states), IDLE (4, IDLE or BUSY
// transfers), ERROR (5), RETRY/SPLIT (6), RESET (7) and WAIT MASTER (8, after an
// error/retry/split response until the master issues again or loses the bus).
//
// Inputs are the bus signals of one cycle; HGRANTx is the grant line of the
// master that currently owns the address bus (hgrant[hmaster]). `state` is the
// registered state; `state_next` is the state after the current cycle, used by
// the tracer to record the state that a bus cycle leads to. Reset (HRESETn low)
// puts the machine in RESET; it moves to ORIGIN once reset is released.
//
// State names, numbers and transition conditions are those of the bus state
// diagram; WAIT MASTER has no printed number and is numbered 8 here. Where two
// printed conditions could both hold, an HRESP condition takes priority over an
// HREADY/HTRANS one; in all other cases the state is held.
module bsm
  import tracer_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_mon_t bus,
  output bstate_e  state,
  output bstate_e  state_next
);

  logic grant, rdy, act, idl, r_ok, r_err, r_rs;

  always_comb begin
    grant = bus.hgrant[bus.hmaster];
    rdy   = bus.hready;
    act   = (bus.htrans == HTRANS_NONSEQ) || (bus.htrans == HTRANS_SEQ);
    idl   = (bus.htrans == HTRANS_IDLE) || (bus.htrans == HTRANS_BUSY);
    r_ok  = (bus.hresp == HRESP_OKAY);
    r_err = (bus.hresp == HRESP_ERROR);
    r_rs  = (bus.hresp == HRESP_RETRY) || (bus.hresp == HRESP_SPLIT);

    state_next = state;
    unique case (state)
      BS_RESET:  state_next = BS_ORIGIN;
      BS_ORIGIN: if (grant && rdy && bus.htrans == HTRANS_NONSEQ) state_next = BS_START;
      BS_START, BS_NORMAL, BS_WAIT_SLAVE: begin
        if (r_err)                state_next = BS_ERROR;
        else if (r_rs)            state_next = BS_RETRY_SPLIT;
        else if (!rdy && r_ok)    state_next = BS_WAIT_SLAVE;
        else if (rdy && act)      state_next = BS_NORMAL;
        else if (rdy && idl)      state_next = BS_IDLE;
      end
      BS_IDLE: begin
        if (!grant)               state_next = BS_ORIGIN;
        else if (rdy && act)      state_next = BS_START;
      end
      BS_ERROR:       if (rdy && r_err) state_next = BS_WAIT_MASTER;
      BS_RETRY_SPLIT: if (rdy && r_rs)  state_next = BS_WAIT_MASTER;
      BS_WAIT_MASTER: begin
        if (!grant)               state_next = BS_ORIGIN;
        else if (rdy && act)      state_next = BS_START;
      end
      default: state_next = BS_ORIGIN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= BS_RESET;
    else        state <= state_next;
  end

endmodule
