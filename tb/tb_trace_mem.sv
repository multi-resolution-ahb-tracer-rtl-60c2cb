// tb_trace_mem: self-checking test of the trace memory.
// Writes random words to random addresses, keeps a copy here, and reads back
// checking the one-cycle read latency.
module tb_trace_mem;
  localparam int MW = 256;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [MW];
  bit written [MW];
  int checks = 0, failures = 0;

  trace_mem #(.MEM_WORDS(MW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom); wdata = $urandom;
      raddr = 8'($urandom);
      @(posedge clk);
      #1;
      if (written[raddr] && !(we && waddr == raddr)) begin
        checks++;
        if (rdata !== model[raddr]) failures++;
      end
      if (we) begin model[waddr] = wdata; written[waddr] = 1; end
    end
    we = 0;
    for (int i = 0; i < MW; i++) begin
      @(negedge clk); raddr = 8'(i); @(posedge clk); #1;
      if (written[i]) begin checks++; if (rdata !== model[i]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
