// addr_compressor: two-phase address bus compression with slicing.
//
// Phase 1, branch/target filtering: an address equal to the previous address
// plus SEQ_STRIDE continues a run of linearly executed instructions and is
// recorded only as the 2-bit code A_SEQ. Phase 2, dictionary: every other
// (branch target) address is looked up in a CAM dictionary of DICT_N entries; a
// hit is recorded as A_HIT and the entry index, a miss as A_MISS and the address,
// which is also stored in the dictionary. Slicing: a missed address is cut into
// bytes and only the low bytes up to the highest byte that differs from the
// previous address are recorded, preceded by the byte count minus one (2 bits).
//
// Interface: `valid`/`addr` present a changed address; `code`, `pay` and `len`
// (payload bits, LSB first) answer combinationally. The previous address and the
// dictionary update at the clock edge. `clear` starts from empty history
// (previous address 0, empty dictionary) for the address presented in the same
// cycle.
//
// The filtering and dictionary phases, the FIFO replacement and the slicing
// stage follow the design description; the word stride used to detect sequential
// addresses, the dictionary size and the byte-wise slicing are this design's
// choices.
module addr_compressor
  import tracer_pkg::*;
#(
  parameter int unsigned DICT_N     = 16,
  parameter int unsigned SEQ_STRIDE = 4,
  localparam int unsigned IW = $clog2(DICT_N)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  logic [31:0] addr,
  output logic [1:0]  code,
  output logic [33:0] pay,
  output logic [5:0]  len
);

  logic [31:0]   prev, prev_eff;
  logic          seq, hit;
  logic [IW-1:0] idx;
  logic [1:0]    top_byte;

  assign prev_eff = clear ? '0 : prev;
  assign seq      = (addr == prev_eff + 32'(SEQ_STRIDE));

  cam_dict #(.W(32), .N(DICT_N)) u_dict (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (clear),
    .lookup (valid && !seq),
    .key    (addr),
    .hit    (hit),
    .idx    (idx)
  );

  always_comb begin
    top_byte = 2'd0;
    for (int b = 1; b < 4; b++)
      if (addr[8*b +: 8] != prev_eff[8*b +: 8]) top_byte = 2'(b);

    code = A_NONE;
    pay  = '0;
    len  = '0;
    if (valid) begin
      if (seq) begin
        code = A_SEQ;
      end else if (hit) begin
        code = A_HIT;
        pay  = 34'(idx);
        len  = 6'(IW);
      end else begin
        code = A_MISS;
        pay  = {addr, top_byte} & ((34'd1 << (2 + 8 * (int'(top_byte) + 1))) - 34'd1);
        len  = 6'(2 + 8 * (int'(top_byte) + 1));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      prev <= '0;
    else if (valid)  prev <= addr;
    else if (clear)  prev <= '0;
  end

endmodule
