// tb_data_diff: self-checking test of the differential data compressor.
// Random data values with small, medium and large steps; each code and payload
// is decoded here against the previous value and must give back the data.
module tb_data_diff;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, valid = 0;
  logic [31:0] data = 0, pay;
  logic [1:0] code;
  logic [5:0] len;
  logic [31:0] prev = 0, dec;
  int checks = 0, failures = 0;
  int cnt [4];

  data_diff dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int sel;
      @(negedge clk);
      valid = 1'($urandom % 4 != 0);
      clear = ($urandom % 100 == 0);
      sel = $urandom % 3;
      data = (sel == 0) ? prev + 32'($signed(8'($urandom))) :
             (sel == 1) ? prev + 32'($signed(16'($urandom))) : $urandom;
      #1;
      if (clear) prev = 0;
      if (valid) begin
        case (code)
          D_D8:   begin dec = prev + 32'($signed(pay[7:0]));  checks++; if (len != 8)  failures++; end
          D_D16:  begin dec = prev + 32'($signed(pay[15:0])); checks++; if (len != 16) failures++; end
          D_FULL: begin dec = pay;                            checks++; if (len != 32) failures++; end
          default: begin dec = ~data; end
        endcase
        cnt[code]++;
        checks++;
        if (dec !== data) begin failures++; if (failures < 10) $display("FAIL k=%0d", k); end
        // the shortest code must be used
        checks++;
        if ((code == D_D16 && (data - prev + 32'd128) < 32'd256) ||
            (code == D_FULL && (data - prev + 32'd32768) < 32'd65536)) failures++;
        prev = data;
      end else begin
        checks++; if (code != D_NONE || len != 0) failures++;
      end
    end
    checks++; if (cnt[1] < 100 || cnt[2] < 100 || cnt[3] < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
