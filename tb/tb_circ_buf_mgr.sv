// tb_circ_buf_mgr: self-checking test of the circular buffer management.
// Pre-trigger direction: words wrap around the memory and `wrapped` is raised;
// post-trigger direction: writing stops with `full` after MEM_WORDS words. Every
// write address and data word is compared with a counter kept here.
module tb_circ_buf_mgr;
  localparam int MW = 16;
  logic clk = 0, rst_n = 1, start = 0, dir_post = 0, wvalid = 0;
  logic [31:0] wdata = 0, mem_wdata;
  logic rd, mem_we, wrapped, full, word_wr;
  logic [3:0] mem_addr, wptr;
  int checks = 0, failures = 0;

  circ_buf_mgr #(.MEM_WORDS(MW), .WORD_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic post, input int n, output int stored);
    int exp_addr;
    stored = 0; exp_addr = 0;
    @(negedge clk); start = 1; dir_post = post;
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      wvalid = 1'(i % 3 != 2); wdata = $urandom;
      #1;
      checks++;
      if (!rd) failures++;
      if (wvalid && !(post && stored >= MW)) begin
        checks++;
        if (!mem_we || !word_wr || int'(mem_addr) != exp_addr || mem_wdata != wdata) failures++;
        exp_addr = (exp_addr + 1) % MW;
        stored++;
      end else begin
        checks++; if (mem_we) failures++;
      end
      @(negedge clk);
    end
    wvalid = 0;
  endtask

  initial begin
    int s;
    #1 rst_n = 0; #1 rst_n = 1;
    run(1'b0, 40, s);
    checks++; if (!wrapped || full || int'(wptr) != s % MW) failures++;
    run(1'b1, 40, s);
    checks++; if (!wrapped || !full || s != MW) failures++;
    run(1'b1, 9, s);
    checks++; if (wrapped || full || int'(wptr) != s) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
