// circ_buf_mgr: circular buffer management of the trace memory (fifth stage).
//
// Every trace word offered by the packing FIFO is written to the trace memory at
// the write pointer, which then advances and wraps from the last word to word 0.
// In the pre-trigger direction the memory is a true circular buffer: old words
// are overwritten, so it always holds the most recent MEM_WORDS words. In the
// post-trigger direction the first MEM_WORDS words are kept: once the memory is
// full, `full` is raised and further words are discarded.
//
// Interface: `start` (pulse, when a trace run is armed) clears the pointer and
// the flags, with `dir_post` giving the direction. `wvalid`/`wdata` offer a word;
// `rd` takes it (always, the memory never stalls). `mem_we/mem_addr/mem_wdata`
// drive the memory write port in the same cycle. `wptr`, `wrapped` (the memory
// has been written all the way round, so the oldest word is at `wptr`) and
// `word_wr` (a word was stored) tell the host and the trigger controller where
// the trace is.
//
// The circular trace memory follows the design description; the discard-when-
// full rule in the post-trigger direction is this design's choice.
module circ_buf_mgr #(
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned WORD_W    = 32,
  localparam int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              dir_post,
  input  logic              wvalid,
  input  logic [WORD_W-1:0] wdata,
  output logic              rd,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  output logic [AW-1:0]     wptr,
  output logic              wrapped,
  output logic              full,
  output logic              word_wr
);

  logic post_q;

  assign rd        = 1'b1;
  assign mem_we    = wvalid && !(post_q && full);
  assign mem_addr  = wptr;
  assign mem_wdata = wdata;
  assign word_wr   = mem_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr    <= '0;
      wrapped <= 1'b0;
      full    <= 1'b0;
      post_q  <= 1'b0;
    end else if (start) begin
      wptr    <= '0;
      wrapped <= 1'b0;
      full    <= 1'b0;
      post_q  <= dir_post;
    end else if (mem_we) begin
      wptr <= (wptr == AW'(MEM_WORDS - 1)) ? '0 : wptr + 1'b1;
      if (wptr == AW'(MEM_WORDS - 1)) begin
        wrapped <= 1'b1;
        full    <= post_q;
      end
    end
  end

endmodule
