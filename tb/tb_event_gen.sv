// tb_event_gen: self-checking test of the event generation module.
// Programs two events (one triggers on an address, one switches the trace mode
// on a write to another address, restricted to master 2), runs a post-trigger
// trace and a pre-trigger trace with a protocol-violation trigger, and checks the
// registered stage output: the bus sample, `active` from the trigger cycle,
// `sync` at trace start and at each mode change, the new `mode`, and `stop`
// after `depth` trace words.
module tb_event_gen;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 1, cfg_we = 0, protocol_violation = 0, word_wr = 0, mem_full = 0;
  logic [4:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  ahb_mon_t bus;
  s1_t s1;
  logic tracing, triggered, done, dir_post, start;
  logic [1:0] event_hit;
  int checks = 0, failures = 0;

  event_gen #(.N_EVENTS(2), .DEPTH_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  task automatic cfg(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d; bus.htrans = 2'b00;
    @(negedge clk); cfg_we = 0;
  endtask

  // one bus cycle; check the stage output of the previous cycle afterwards
  task automatic cyc(input logic [31:0] a, input logic w, input logic [3:0] mst,
                     input logic exp_act, input logic exp_sync, input mode_e exp_mode, input string what);
    @(negedge clk);
    bus.haddr = a; bus.hwrite = w; bus.hmaster = mst; bus.htrans = 2'b10; bus.hready = 1;
    @(posedge clk); #1;
    chk(s1.bus.haddr == a && s1.active == exp_act && s1.sync == exp_sync, what);
    if (exp_act) chk(s1.mode == exp_mode, {what, " mode"});
  endtask

  initial begin
    bus = '0; bus.hgrant = '1;
    #1 rst_n = 0; #1 rst_n = 1;
    cfg(5'd4, 32'h0000_8000); cfg(5'd5, 32'hFFFF_FF00); cfg(5'd6, 32'h3);         // ev0: trigger
    cfg(5'd8, 32'h0000_9000); cfg(5'd9, 32'hFFFF_FFFF);
    cfg(5'd10, 32'h1 | 32'h4 | (32'd5 << 3) | 32'h40 | 32'h80 | 32'h100 | (32'd2 << 9)); // ev1: mode MT
    cfg(5'd1, 32'd4);                                                              // depth
    cfg(5'd0, 32'h1 | 32'h4 | (32'd2 << 3));                                       // arm post-T, mode FT
    cyc(32'h100, 0, 0, 0, 0, MODE_FT, "idle before trigger");
    cyc(32'h9000, 1, 2, 0, 0, MODE_FT, "mode event before trigger");
    cyc(32'h8010, 0, 0, 1, 1, MODE_MT, "trigger cycle traced");
    chk(triggered, "triggered");
    cyc(32'h104, 0, 0, 1, 0, MODE_MT, "tracing");
    cyc(32'h9000, 1, 3, 1, 0, MODE_MT, "wrong master: no change");
    cyc(32'h9000, 0, 2, 1, 0, MODE_MT, "read: no change");
    cfg(5'd10, 32'h1 | 32'h4 | (32'd3 << 3));
    cyc(32'h9008, 0, 1, 1, 0, MODE_MT, "after reprogram");
    cyc(32'h9004, 0, 1, 1, 0, MODE_MT, "no hit");
    cyc(32'h9000, 0, 1, 1, 1, MODE_BC, "mode change gives sync");
    chk(event_hit == 2'b10, "event 1 hit");
    // four words end the trace
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); word_wr = 1; #1 chk(tracing, "tracing until depth");
    end
    @(negedge clk); word_wr = 0; #1 chk(!tracing, "stopped after depth");
    @(posedge clk); #1 chk(s1.stop && !s1.active, "stop flag");
    @(posedge clk); #1 chk(s1.stop == 0, "single stop");
    chk(done, "done");
    // pre-trigger run, protocol violation as trigger, depth 0
    cfg(5'd1, 32'd0);
    cfg(5'd0, 32'h1 | (32'd4 << 3) | 32'h40);
    chk(s1.active && s1.sync && s1.mode == MODE_BT, "pre-T traces from the arm cycle");
    cyc(32'h200, 0, 0, 1, 0, MODE_BT, "pre-T traces at once");
    cyc(32'h204, 0, 0, 1, 0, MODE_BT, "pre-T");
    @(negedge clk); protocol_violation = 1;
    @(posedge clk); #1 chk(s1.active, "violation cycle traced");
    @(negedge clk); protocol_violation = 0; #1 chk(!tracing, "stops at depth 0");
    @(posedge clk); #1 chk(s1.stop && !s1.active, "stop flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
