// tb_event_register: self-checking test of one event register.
// Programs random address value/mask, direction and master conditions and
// actions, drives random bus cycles (with many near-matches), and compares
// hit, trigger request and mode request with a model computed here.
module tb_event_register;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 1, we = 0;
  logic [1:0] waddr = 0;
  logic [31:0] wdata = 0;
  ahb_mon_t bus;
  logic hit, trig_req, mode_req;
  mode_e new_mode;
  int checks = 0, failures = 0, nhit = 0;
  logic [31:0] av, am, fl;

  event_register dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk); we = 1; waddr = a; wdata = d; @(negedge clk); we = 0;
  endtask

  initial begin
    bus = '0;
    #1 rst_n = 0; repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      av = $urandom; am = (p % 4 == 0) ? 32'hFFFF_FFFF : $urandom;
      fl = $urandom & 32'h1FFF; fl[0] = (p % 8 != 7);
      wr(0, av); wr(1, am); wr(2, fl);
      for (int c = 0; c < 50; c++) begin
        logic exp_hit;
        @(negedge clk);
        bus.haddr   = ($urandom % 2 == 1) ? ((av & am) | ($urandom & ~am)) : $urandom;
        bus.htrans  = 2'($urandom);
        bus.hready  = 1'($urandom % 4 != 0);
        bus.hwrite  = 1'($urandom);
        bus.hmaster = 4'(($urandom % 3) == 0 ? fl[12:9] : $urandom);
        #1;
        exp_hit = fl[0] && (bus.htrans == 2'b10 || bus.htrans == 2'b11) && bus.hready
                  && ((bus.haddr & am) == (av & am))
                  && (!fl[6] || bus.hwrite == fl[7])
                  && (!fl[8] || bus.hmaster == fl[12:9]);
        checks++;
        if (hit !== exp_hit || trig_req !== (exp_hit & fl[1])
            || mode_req !== (exp_hit & fl[2] & (fl[5:3] >= 1) & (fl[5:3] <= 5))) begin
          failures++;
          if (failures < 10) $display("mismatch p=%0d hit=%b exp=%b", p, hit, exp_hit);
        end
        if (exp_hit) nhit++;
        if (mode_req) begin checks++; if (new_mode != mode_e'(fl[5:3])) failures++; end
      end
    end
    checks++; if (nhit < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
