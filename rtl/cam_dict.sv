// cam_dict: CAM-based dictionary table used by the address and control compressors.
//
// A lookup compares the key against all N valid entries at once. On a hit the
// entry's index is reported, so the trace can carry the short index instead of
// the value. On a miss the key is written into the table: entries are filled in
// order, and once the table is full the next miss overwrites entry 0, then 1, and
// so on (first-in first-out replacement). A decoder that replays the same
// sequence of misses rebuilds the same table.
//
// Interface: `lookup` with `key` asks; `hit`/`idx` answer combinationally in the
// same cycle, and a miss is stored at the clock edge. `clear` empties the table
// (it has priority over a lookup in the same cycle; the answer then is a miss).
//
// Dictionary lookup and first-in first-out replacement follow the design
// description; the table sizes are parameters of the instantiating compressor.
module cam_dict #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 16,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          lookup,
  input  logic [W-1:0]  key,
  output logic          hit,
  output logic [IW-1:0] idx
);

  logic [W-1:0]  tab [N];
  logic [N-1:0]  vld;
  logic [IW-1:0] ptr;

  always_comb begin
    hit = 1'b0;
    idx = '0;
    for (int i = 0; i < N; i++) begin
      if (vld[i] && tab[i] == key && !clear) begin
        hit = 1'b1;
        idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      ptr <= '0;
    end else if (clear) begin
      vld    <= '0;
      vld[0] <= lookup;
      ptr    <= lookup ? IW'(N > 1 ? 1 : 0) : '0;
    end else if (lookup && !hit) begin
      vld[ptr] <= 1'b1;
      ptr      <= (ptr == IW'(N - 1)) ? '0 : ptr + 1'b1;
    end
  end

  // table contents need no reset: an entry is only read while its valid bit is set
  always_ff @(posedge clk) begin
    if (lookup && !hit) tab[clear ? '0 : ptr] <= key;
  end

endmodule
