// tb_trigger_ctrl: self-checking test of the pre-/post-trigger controller.
// Runs a post-trigger trace (nothing traced before the trigger, tracing from the
// trigger cycle until `depth` words are written), a pre-trigger trace (tracing
// from arming, stop `depth` words after the trigger), a post-trigger run ended
// by a full memory and a disarm, checking `tracing`, `stop` and `done` cycle by
// cycle against the expected counts.
module tb_trigger_ctrl;
  logic clk = 0, rst_n = 1, arm = 0, disarm = 0, dir_post = 0, trigger = 0, word_wr = 0, mem_full = 0;
  logic [15:0] depth = 0;
  logic tracing, stop, triggered, done;
  int checks = 0, failures = 0;

  trigger_ctrl #(.DEPTH_W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // run: arm, wait `pre` cycles, trigger, then write one word every other cycle
  task automatic run(input logic post, input int pre, input int dep, output int traced_before,
                     output int words_after, output int stops);
    traced_before = 0; words_after = 0; stops = 0;
    @(negedge clk); arm = 1; dir_post = post; depth = 16'(dep);
    #1 chk(tracing == !post, "tracing at arm");
    @(negedge clk); arm = 0;
    for (int i = 0; i < pre; i++) begin
      #1 if (tracing) traced_before++;
      chk(!triggered, "not yet triggered");
      @(negedge clk);
    end
    trigger = 1; #1 chk(tracing, "tracing in trigger cycle");
    @(negedge clk); trigger = 0;
    for (int i = 0; i < 4 * dep + 20; i++) begin
      word_wr = (i % 2 == 0) && !done;
      #1;
      if (stop) stops++;
      if (word_wr && tracing) words_after++;
      @(negedge clk);
    end
    word_wr = 0;
  endtask

  initial begin
    int tb_, wa, st;
    #1 rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    run(1'b1, 10, 7, tb_, wa, st);
    chk(tb_ == 0, "post-T traces nothing before trigger");
    chk(wa == 7, "post-T depth"); chk(st == 1, "one stop pulse"); chk(done, "done");
    chk(!tracing, "stopped");
    run(1'b0, 10, 5, tb_, wa, st);
    chk(tb_ == 10, "pre-T traces before trigger");
    chk(wa == 5, "pre-T depth"); chk(st == 1, "one stop pulse"); chk(done, "done");
    // post-T ended by full memory
    @(negedge clk); arm = 1; dir_post = 1; depth = 16'd1000;
    @(negedge clk); arm = 0; trigger = 1;
    @(negedge clk); trigger = 0;
    repeat (3) @(negedge clk);
    chk(tracing, "tracing before full");
    mem_full = 1; #1 chk(stop, "stop on full");
    @(negedge clk); mem_full = 0; chk(!tracing && done, "done after full");
    // disarm during pre-T
    @(negedge clk); arm = 1; dir_post = 0; depth = 16'd3;
    @(negedge clk); arm = 0; #1 chk(tracing, "pre-T tracing");
    @(negedge clk); disarm = 1; #1 chk(stop && !tracing, "disarm stops");
    @(negedge clk); disarm = 0; chk(done, "done after disarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
