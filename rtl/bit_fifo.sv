// bit_fifo: FIFO buffer of the packing module, DEPTH_BITS bits deep.
//
// Packets of any length up to PKT_W bits enter at one end, least significant bit
// first, and leave at the other end as WORD_W-bit trace words, so packets are
// packed densely across word boundaries. The buffer is a circular bit array: a
// write rotates the packet to the bit write pointer and merges it under a mask;
// a read takes the aligned word at the word read pointer. One packet can be
// written and one word read in the same cycle. The buffer evens out bursts of
// long packets against the fixed rate of one trace word per cycle.
//
// Interface: `we`/`din`/`len` write a packet (the caller checks `free`, the
// number of empty bits at the start of the cycle). `wvalid`/`wdata` offer a full
// word, taken in the same cycle when `rd` is high. `flush` (pulse) requests that
// a final partial word is also offered, zero padded, once no full word is left;
// `flushing` stays high until the buffer is empty.
//
// The 512-bit size is the buffer size of the design description; the bit-level
// organisation is this design's choice.
module bit_fifo #(
  parameter int unsigned DEPTH_BITS = 512,
  parameter int unsigned PKT_W      = 128,
  parameter int unsigned WORD_W     = 32,
  localparam int unsigned PW = $clog2(DEPTH_BITS),
  localparam int unsigned NW = DEPTH_BITS / WORD_W,
  localparam int unsigned RW = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned LW = $clog2(PKT_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [PKT_W-1:0]  din,
  input  logic [LW-1:0]     len,
  input  logic              flush,
  input  logic              rd,
  output logic [PW:0]       free,
  output logic              wvalid,
  output logic [WORD_W-1:0] wdata,
  output logic              flushing
);

  logic [DEPTH_BITS-1:0] mem, dext, mext, drot, mrot;
  logic [PW-1:0]         wp;
  logic [RW-1:0]         rp;
  logic [PW:0]           count;
  logic                  full_word, part_word, take;

  function automatic logic [DEPTH_BITS-1:0] rotl(logic [DEPTH_BITS-1:0] x, logic [PW-1:0] n);
    logic [2*DEPTH_BITS-1:0] d;
    d = {x, x} << n;
    return d[2*DEPTH_BITS-1:DEPTH_BITS];
  endfunction

  always_comb begin
    dext = DEPTH_BITS'(din);
    mext = (DEPTH_BITS'(1) << len) - DEPTH_BITS'(1);
    drot = rotl(dext & mext, wp);
    mrot = rotl(mext, wp);

    free      = (PW+1)'(DEPTH_BITS) - count;
    full_word = count >= (PW+1)'(WORD_W);
    part_word = flushing && !we && count != '0 && !full_word;
    wvalid    = full_word || part_word;
    wdata     = mem[32'(rp) * WORD_W +: WORD_W];
    if (part_word)
      wdata = wdata & ((WORD_W'(1) << count) - WORD_W'(1));
    take = wvalid && rd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem      <= '0;
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      flushing <= 1'b0;
    end else begin
      if (we) begin
        mem <= (mem & ~mrot) | drot;
        wp  <= PW'((32'(wp) + 32'(len)) % DEPTH_BITS);
      end
      if (take) rp <= RW'((32'(rp) + 1) % NW);
      if (take && part_word) begin
        // the padded word ends at a word boundary: move the write pointer there
        wp    <= PW'(((32'(rp) + 1) % NW) * WORD_W);
        count <= '0;
      end else begin
        count <= count + (we ? (PW+1)'(len) : '0) - (take ? (PW+1)'(WORD_W) : '0);
      end
      if (flush)
        flushing <= 1'b1;
      else if (flushing && (count == '0 || (take && part_word)))
        flushing <= 1'b0;
    end
  end

endmodule
