// data_diff: differential compression of the data bus.
//
// Data values are irregular, so instead of a dictionary the compressor subtracts
// the previously recorded data value from the new one. A difference that fits a
// signed byte is recorded as D_D8 and 8 bits, one that fits a signed halfword as
// D_D16 and 16 bits; otherwise the full 32-bit value is recorded as D_FULL.
//
// Interface: `valid`/`data` present a changed data value; `code`, `pay` and
// `len` answer combinationally, the previous value updates at the clock edge.
// `clear` makes the previous value 0 for the value presented in the same cycle.
//
// Subtraction-based differencing follows the design description; the three
// payload sizes are this design's choice.
module data_diff
  import tracer_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  logic [31:0] data,
  output logic [1:0]  code,
  output logic [31:0] pay,
  output logic [5:0]  len
);

  logic [31:0] prev, diff;

  assign diff = data - (clear ? 32'd0 : prev);

  always_comb begin
    code = D_NONE;
    pay  = '0;
    len  = '0;
    if (valid) begin
      if (diff[31:7] == '0 || diff[31:7] == '1) begin
        code = D_D8;
        pay  = 32'(diff[7:0]);
        len  = 6'd8;
      end else if (diff[31:15] == '0 || diff[31:15] == '1) begin
        code = D_D16;
        pay  = 32'(diff[15:0]);
        len  = 6'd16;
      end else begin
        code = D_FULL;
        pay  = data;
        len  = 6'd32;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      prev <= '0;
    else if (valid)  prev <= data;
    else if (clear)  prev <= '0;
  end

endmodule
