// event_register: one programmable trace event of the event generation module.
//
// An event compares every accepted AHB address phase (HTRANS NONSEQ or SEQ with
// HREADY high) against a programmed condition: an address value under a bit
// mask, and optionally the transfer direction and the bus master number. When the
// condition holds, the event fires for that cycle. What a firing event does is
// also programmed: it may request the trace trigger (start or stop, depending on
// the trace direction) and/or switch the tracer to another trace mode.
//
// Programming: three 32-bit registers written through we/waddr/wdata.
//   waddr 0 : address value
//   waddr 1 : address mask (1 = bit compared)
//   waddr 2 : [0] enable, [1] trigger action, [2] mode-change action,
//             [5:3] new trace mode, [6] compare HWRITE, [7] HWRITE value,
//             [8] compare HMASTER, [12:9] HMASTER value
// Timing: hit/trig_req/mode_req are combinational from the bus inputs of the
// same cycle; the registers take a write on the clock edge.
//
// The description gives event registers, their purpose (trigger points for the
// trace-mode changes, breakpoints/watchpoints) and their cost (about 1500 gates
// each); the match fields and register map are this design's own choice.
module event_register
  import tracer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [1:0]  waddr,
  input  logic [31:0] wdata,
  input  ahb_mon_t    bus,
  output logic        hit,
  output logic        trig_req,
  output logic        mode_req,
  output mode_e       new_mode
);

  logic [31:0] addr_val, addr_mask;
  logic        en, act_trig, act_mode, wr_care, wr_val, m_care;
  logic [2:0]  nmode;
  logic [3:0]  m_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_val  <= '0;
      addr_mask <= '0;
      en        <= 1'b0;
      act_trig  <= 1'b0;
      act_mode  <= 1'b0;
      nmode     <= 3'd1;
      wr_care   <= 1'b0;
      wr_val    <= 1'b0;
      m_care    <= 1'b0;
      m_val     <= '0;
    end else if (we) begin
      unique case (waddr)
        2'd0: addr_val  <= wdata;
        2'd1: addr_mask <= wdata;
        2'd2: begin
          en       <= wdata[0];
          act_trig <= wdata[1];
          act_mode <= wdata[2];
          nmode    <= wdata[5:3];
          wr_care  <= wdata[6];
          wr_val   <= wdata[7];
          m_care   <= wdata[8];
          m_val    <= wdata[12:9];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    hit = en && bus.htrans[1] && bus.hready
          && (((bus.haddr ^ addr_val) & addr_mask) == '0)
          && (!wr_care || (bus.hwrite == wr_val))
          && (!m_care  || (bus.hmaster == m_val));
    trig_req = hit && act_trig;
    mode_req = hit && act_mode && mode_valid(nmode);
    new_mode = mode_e'(nmode);
  end

endmodule
