// tb_bit_fifo: self-checking test of the packing FIFO.
// Writes random-length packets whenever they fit (checked against a bit queue
// kept here), reads words at random, and at the end flushes: every word read
// must equal the next 32 bits of the queue, the last one zero padded, and the
// buffer must reach the full state (free below the packet length) on the way.
module tb_bit_fifo;
  logic clk = 0, rst_n = 1, we = 0, flush = 0, rd = 0;
  logic [127:0] din = 0;
  logic [7:0] len = 0;
  logic [9:0] free;
  logic wvalid, flushing;
  logic [31:0] wdata;
  bit q[$];
  int checks = 0, failures = 0, nfull = 0, words = 0;

  bit_fifo #(.DEPTH_BITS(512), .PKT_W(128), .WORD_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic take_word();
    logic [31:0] e;
    e = '0;
    for (int i = 0; i < 32; i++) if (q.size() > 0) e[i] = q.pop_front();
    checks++;
    if (wdata !== e) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d: %h vs %h", words, wdata, e);
    end
    words++;
  endtask

  initial begin
    #1 rst_n = 0; #1 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int l;
      @(negedge clk);
      l = 1 + $urandom % 128;
      din = {$urandom, $urandom, $urandom, $urandom};
      len = 8'(l);
      rd = (k < 2500) ? 1'($urandom % 4 == 0) : 1'($urandom % 3 != 0);
      #1;
      checks++; if (int'(free) != 512 - q.size()) failures++;
      we = (l <= int'(free));
      if (!we) nfull++;
      #1;
      checks++; if (wvalid != (q.size() >= 32)) failures++;
      if (wvalid && rd) take_word();
      if (we) for (int i = 0; i < l; i++) q.push_back(din[i]);
    end
    @(negedge clk); we = 0; flush = 1; rd = 1;
    #1; if (wvalid) take_word();
    @(negedge clk); flush = 0;
    for (int k = 0; k < 40 && (q.size() > 0 || wvalid); k++) begin
      #1; if (wvalid) take_word();
      @(negedge clk);
    end
    @(negedge clk);
    checks++; if (q.size() != 0 || flushing || free != 512) begin failures++; $display("end q=%0d fl=%b free=%0d", q.size(), flushing, free); end
    checks++; if (nfull < 20) begin failures++; $display("nfull=%0d", nfull); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
