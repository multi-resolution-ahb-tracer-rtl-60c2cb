// event_gen: event generation module, first stage of the tracer pipeline.
//
// It decides, for every bus cycle, whether the cycle is traced and in which trace
// mode, and registers the bus sample together with that decision for the next
// stage. It holds the host-programmable configuration, N_EVENTS event registers,
// the event trigger (the OR of the events' trigger requests and, if enabled, the
// protocol-violation input from an external AHB protocol checker) and the
// pre-/post-trigger controller. A firing event with a mode-change action switches
// the trace mode in the same cycle (the lowest numbered event wins), so trace
// modes can change while a trace is running.
//
// Configuration port (cfg_we / cfg_addr / cfg_wdata, one write per cycle):
//   0 : control  [0] arm (pulse), [1] disarm (pulse), [2] post-trigger direction,
//                [5:3] trace mode at start, [6] protocol violation acts as trigger
//   1 : depth    trace words written after the trigger before tracing stops
//   4*(i+1)+r : register r (0..2) of event i, see event_register
// Timing: the outputs are the registered sample of the bus cycle before, with
// `active`, `sync` (first cycle of a trace segment: start or mode change), `stop`
// (one cycle after the last traced cycle) and `mode`. `start` pulses with the
// arm write, `event_hit` shows which events fire in the current cycle.
//
// The module's role (start/stop time, trace mode, trace depth) and the two event
// registers follow the design description; the register map is this design's own.
module event_gen
  import tracer_pkg::*;
#(
  parameter int unsigned N_EVENTS = 2,
  parameter int unsigned DEPTH_W  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [4:0]  cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  ahb_mon_t    bus,
  input  logic        protocol_violation,
  input  logic        word_wr,
  input  logic        mem_full,
  output s1_t         s1,
  output logic        tracing,
  output logic        triggered,
  output logic        done,
  output logic        dir_post,
  output logic        start,
  output logic [N_EVENTS-1:0] event_hit
);

  logic               arm, disarm, pv_trig;
  logic [DEPTH_W-1:0] depth;
  logic [N_EVENTS-1:0] hit, trig_req, mode_req;
  mode_e              ev_mode [N_EVENTS];
  mode_e              mode_q, mode_now;
  logic               trigger, stop, tracing_q;

  // control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dir_post   <= 1'b0;
      pv_trig    <= 1'b0;
      depth      <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == 5'd0) begin
        dir_post   <= cfg_wdata[2];
        pv_trig    <= cfg_wdata[6];
      end
      if (cfg_addr == 5'd1) depth <= cfg_wdata[DEPTH_W-1:0];
    end
  end

  assign arm    = cfg_we && (cfg_addr == 5'd0) && cfg_wdata[0];
  assign disarm = cfg_we && (cfg_addr == 5'd0) && cfg_wdata[1];

  for (genvar i = 0; i < N_EVENTS; i++) begin : g_ev
    event_register u_ev (
      .clk      (clk),
      .rst_n    (rst_n),
      .we       (cfg_we && (cfg_addr[4:2] == 3'(i + 1)) && (cfg_addr[1:0] != 2'd3)),
      .waddr    (cfg_addr[1:0]),
      .wdata    (cfg_wdata),
      .bus      (bus),
      .hit      (hit[i]),
      .trig_req (trig_req[i]),
      .mode_req (mode_req[i]),
      .new_mode (ev_mode[i])
    );
  end

  assign start     = arm;
  assign event_hit = hit;
  assign trigger = (|trig_req) || (pv_trig && protocol_violation);

  trigger_ctrl #(.DEPTH_W(DEPTH_W)) u_trig (
    .clk       (clk),
    .rst_n     (rst_n),
    .arm       (arm),
    .disarm    (disarm),
    .dir_post  (cfg_wdata[2]),
    .depth     (depth),
    .trigger   (trigger),
    .word_wr   (word_wr),
    .mem_full  (mem_full),
    .tracing   (tracing),
    .stop      (stop),
    .triggered (triggered),
    .done      (done)
  );

  // trace mode: set at arm, changed by events
  always_comb begin
    mode_now = arm && mode_valid(cfg_wdata[5:3]) ? mode_e'(cfg_wdata[5:3]) : mode_q;
    for (int i = N_EVENTS - 1; i >= 0; i--)
      if (mode_req[i]) mode_now = ev_mode[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= MODE_FC;
      tracing_q <= 1'b0;
      s1        <= '0;
    end else begin
      mode_q    <= mode_now;
      tracing_q <= tracing;
      s1.bus    <= bus;
      s1.active <= tracing;
      s1.sync   <= tracing && (!tracing_q || (mode_now != mode_q));
      s1.stop   <= stop;
      s1.mode   <= mode_now;
    end
  end

endmodule
