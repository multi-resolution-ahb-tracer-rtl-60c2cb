// compression: compression module, third stage of the tracer pipeline.
//
// Each field of an abstracted record is compressed by the method that suits its
// behaviour: the address by sequential filtering, a CAM dictionary and slicing
// (addr_compressor), the data by differencing (data_diff), and the 15 control
// bits (HWRITE, HBURST, HSIZE, HPROT, HMASTER) by a second CAM dictionary of
// CTRL_DICT_N entries, so that a known combination costs a 3-bit index. The
// status field (protocol signals or bus state) is passed on uncompressed.
//
// Compression history (previous values, dictionaries) restarts with every
// segment (a record with `sync`) and whenever the packing stage asks for it with
// `resync` after it had to drop records; a record compressed under `resync` also
// carries every field of its trace mode, so the decoder can pick up from it.
//
// Timing: one register stage; `crec` is the compressed form of the `rec` of
// the cycle before. The three compression methods and the 3-bit control index
// follow the design description; the restart rules are this design's own.
module compression
  import tracer_pkg::*;
#(
  parameter int unsigned ADDR_DICT_N = 16,
  parameter int unsigned CTRL_DICT_N = 8,
  parameter int unsigned SEQ_STRIDE  = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  rec_t  rec,
  input  logic  resync,
  output crec_t crec
);

  localparam int unsigned CIW = $clog2(CTRL_DICT_N);

  logic              clr, live, fa, fd, fc, fs;
  logic [1:0]        a_code, d_code;
  logic [33:0]       a_pay;
  logic [31:0]       d_pay;
  logic [5:0]        a_len, d_len;
  logic              c_hit;
  logic [CIW-1:0]    c_idx;

  always_comb begin
    live = rec.valid && !rec.stop;
    clr  = resync || (live && rec.sync);
    fa   = live && (rec.a_p || resync);
    fd   = live && (rec.d_p || resync);
    fc   = live && mode_has_ctrl(rec.mode) && (rec.c_p || resync);
    fs   = live && (mode_has_pcs(rec.mode) || mode_has_state(rec.mode)) && (rec.s_p || resync);
  end

  addr_compressor #(.DICT_N(ADDR_DICT_N), .SEQ_STRIDE(SEQ_STRIDE)) u_addr (
    .clk (clk), .rst_n (rst_n), .clear (clr), .valid (fa), .addr (rec.addr),
    .code (a_code), .pay (a_pay), .len (a_len)
  );

  data_diff u_data (
    .clk (clk), .rst_n (rst_n), .clear (clr), .valid (fd), .data (rec.data),
    .code (d_code), .pay (d_pay), .len (d_len)
  );

  cam_dict #(.W(CTRL_W), .N(CTRL_DICT_N)) u_ctrl (
    .clk (clk), .rst_n (rst_n), .clear (clr), .lookup (fc), .key (rec.ctrl),
    .hit (c_hit), .idx (c_idx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crec <= '0;
    end else begin
      crec.valid  <= rec.valid;
      crec.sync   <= rec.sync;
      crec.stop   <= rec.stop;
      crec.mode   <= rec.mode;
      crec.delta  <= rec.delta;
      crec.a_code <= a_code;
      crec.a_pay  <= a_pay;
      crec.a_len  <= a_len;
      crec.d_code <= d_code;
      crec.d_pay  <= d_pay;
      crec.d_len  <= d_len;
      crec.c_code <= !fc ? C_NONE : (c_hit ? C_HIT : C_MISS);
      crec.c_pay  <= !fc ? '0 : (c_hit ? CTRL_W'(c_idx) : rec.ctrl);
      crec.c_len  <= !fc ? 5'd0 : (c_hit ? 5'(CIW) : 5'(CTRL_W));
      crec.s_p    <= fs;
      crec.sval   <= rec.sval;
    end
  end

endmodule
