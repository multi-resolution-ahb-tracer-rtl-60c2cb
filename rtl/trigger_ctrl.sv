// trigger_ctrl: pre-trigger / post-trigger control of one trace run.
//
// Two trace directions are supported. Pre-T: tracing runs from the moment the
// tracer is armed, the circular trace memory keeps the most recent history, and
// after the trigger only `depth` more trace words are written before tracing
// stops, so the memory holds what led up to the trigger. Post-T: nothing is
// traced until the trigger; then tracing runs until `depth` trace words have been
// written (or the memory is full), so the memory holds what followed it.
//
// Interface: `arm` (pulse) starts a run with the direction `dir_post` and the
// depth `depth` sampled at that moment; `disarm` (pulse) aborts it. `trigger` is
// the event trigger; `word_wr` pulses for each word written to trace memory and
// `mem_full` says the post-trigger run filled the memory. Outputs: `tracing`
// (combinational: the current bus cycle is traced), `stop` (one-cycle pulse in
// the last traced cycle's successor, when tracing ends), `triggered`, `done`.
//
// The two directions and that they are supported by this small block come from
// the design description; the word-count depth and the arm/disarm protocol are
// this design's own choices.
module trigger_ctrl #(
  parameter int unsigned DEPTH_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               arm,
  input  logic               disarm,
  input  logic               dir_post,
  input  logic [DEPTH_W-1:0] depth,
  input  logic               trigger,
  input  logic               word_wr,
  input  logic               mem_full,
  output logic               tracing,
  output logic               stop,
  output logic               triggered,
  output logic               done
);

  typedef enum logic [2:0] {T_IDLE, T_PRE, T_WAIT, T_POST, T_DONE} tstate_e;

  tstate_e            st, st_n;
  logic [DEPTH_W-1:0] depth_q, cnt;
  logic               reached;

  assign reached = (cnt >= depth_q) || mem_full;

  always_comb begin
    st_n = st;
    stop = 1'b0;
    unique case (st)
      T_IDLE:  if (arm) st_n = dir_post ? T_WAIT : T_PRE;
      T_PRE:   if (trigger) st_n = T_POST;
      T_WAIT:  if (trigger) st_n = T_POST;
      T_POST:  if (reached) begin st_n = T_DONE; stop = 1'b1; end
      T_DONE:  if (arm) st_n = dir_post ? T_WAIT : T_PRE;
      default: st_n = T_IDLE;
    endcase
    if (disarm && (st == T_PRE || st == T_WAIT || st == T_POST)) begin
      st_n = T_DONE;
      stop = (st != T_WAIT);
    end
    tracing = (st_n == T_PRE) || (st_n == T_POST);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= T_IDLE;
      depth_q <= '0;
      cnt     <= '0;
    end else begin
      st <= st_n;
      if ((st == T_IDLE || st == T_DONE) && arm) begin
        depth_q <= depth;
      end
      if (st != T_POST) cnt <= '0;
      else if (word_wr && cnt != '1) cnt <= cnt + 1'b1;
    end
  end

  assign triggered = (st == T_POST) || (st == T_DONE);
  assign done      = (st == T_DONE);

endmodule
