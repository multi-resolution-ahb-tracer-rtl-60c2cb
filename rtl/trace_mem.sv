// trace_mem: on-chip trace memory, MEM_WORDS words of WORD_W bits.
//
// A simple two-port memory: the tracer writes one trace word per cycle through
// the write port, and the host reads the trace back through the read port with
// one cycle of latency (`rdata` holds the word at `raddr` of the cycle before).
// Written as an array, so a synthesis tool can map it to an SRAM macro.
//
// The default of 4096 words (16 KB) is the largest trace memory size for which
// the design description reports trace depths; the port structure is this
// design's choice.
module trace_mem #(
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned WORD_W    = 32,
  localparam int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [MEM_WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
