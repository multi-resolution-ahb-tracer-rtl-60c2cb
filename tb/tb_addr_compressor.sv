// tb_addr_compressor: self-checking test of the address compressor.
// Generates instruction-fetch-like address streams (sequential runs of +4 with
// branches back to a small set of targets and occasional far jumps) and decodes
// every output here, with a decoder-side dictionary that replays the misses. The
// decoded address must equal the input; each mechanism (sequential filter,
// dictionary hit, miss with 1..4 slices, clear) must occur.
module tb_addr_compressor;
  import tracer_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 1, clear = 0, valid = 0;
  logic [31:0] addr = 0;
  logic [1:0] code;
  logic [33:0] pay;
  logic [5:0] len;
  logic [31:0] prev = 0, dec, cur = 32'h1000;
  logic [31:0] dt [N];
  int dp = 0, checks = 0, failures = 0;
  int cnt [4];
  int slices [5];
  logic [31:0] targets [24];

  addr_compressor #(.DICT_N(N), .SEQ_STRIDE(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 24; i++) targets[i] = {8'(i * 37), 8'($urandom), 12'($urandom), 4'(i * 4)};
    #1 rst_n = 0; #1 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      int r;
      @(negedge clk);
      valid = 1'($urandom % 5 != 0);
      clear = ($urandom % 300 == 0);
      r = $urandom % 10;
      if (r < 6) cur = cur + 4;
      else if (r < 9) cur = targets[$urandom % 24];
      else cur = cur ^ (32'd1 << ($urandom % 32));
      addr = cur;
      #1;
      if (clear) begin prev = 0; dp = 0; end
      if (valid) begin
        int ns;
        checks++;
        case (code)
          A_SEQ:  begin dec = prev + 4; if (len != 0) failures++; end
          A_HIT:  begin dec = dt[pay[3:0]]; if (len != 4) failures++; end
          A_MISS: begin
            ns = int'(pay[1:0]) + 1;
            slices[ns]++;
            dec = prev;
            for (int b = 0; b < ns; b++) dec[8*b +: 8] = pay[2 + 8*b +: 8];
            if (len != 6'(2 + 8 * ns)) failures++;
            dt[dp] = dec; dp = (dp + 1) % N;
          end
          default: dec = ~addr;
        endcase
        cnt[code]++;
        checks++;
        if (dec !== addr) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d code=%0d dec=%h addr=%h", k, code, dec, addr);
        end
        prev = addr;
      end else begin
        checks++; if (code != A_NONE) failures++;
      end
    end
    checks++; if (cnt[1] < 100 || cnt[2] < 100 || cnt[3] < 100) failures++;
    for (int s = 1; s <= 4; s++) begin checks++; if (slices[s] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
