// tb_trace_depth: trace depth of the tracer for four trace memory sizes and all
// five trace modes.
//
// Trace depth is the number of bus cycles that fit in the trace memory. Four
// tracers with 512, 1024, 2048 and 4096 words (2, 4, 8 and 16 KB) watch the
// same bus. For each trace mode all four are armed in the post-trigger
// direction with a depth larger than any memory, and the protocol-violation
// input triggers them in the same cycle. Each then traces until its memory is
// full, and the cycles with `tracing` high are its depth.
//
// The bus runs a program-like traffic model. A single master fetches
// instructions in straight runs, with branches back to a small set of loop
// targets. Loads and stores go to a small data area with slowly changing
// values. Instruction words are fixed per address. Idle cycles follow about
// half of the instructions, as a processor's internal cycles would, and there
// are a few wait states.
//
// The comparison point is an uncompressed trace of 91 bits per cycle: the
// address, read data and write data buses plus the control and protocol
// signals. The testbench prints depth and improvement over that point for each
// mode and size. It checks that:
// - every run fills its memory and ends;
// - fewer than 1% of the cycles are lost to FIFO overflow (a segment starts
//   with empty dictionaries, so its first packets are long);
// - every depth beats the uncompressed depth;
// - doubling the memory roughly doubles the depth (ratio 1.6 to 2.4);
// - signal abstraction deepens the trace: FC < BC, FT < BT and BT < MT.
// Timing abstraction is only reported, not checked. On a bus with a transfer
// in most cycles, each transaction-level record pays for its 6-bit cycle gap
// and hardly any records are saved, so FT can come out shallower than FC.
// The traffic model is this testbench's own; it is not the programs of any
// published measurement.
module tb_trace_depth;
  import tracer_pkg::*;

  localparam int NS = 4;
  localparam int UNCOMP_BITS = 91;

  logic        clk = 0, rst_n = 1;
  ahb_mon_t    bus;
  logic        protocol_violation = 0;
  logic        cfg_we = 0;
  logic [4:0]  cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic [NS-1:0] tracing, done, full;
  logic [15:0]   drops [NS];

  always #5 clk = ~clk;

  // one tracer per memory size: 512 << s words
  for (genvar s = 0; s < NS; s++) begin : g_t
    localparam int unsigned MW = 512 << s;
    logic [$clog2(MW)-1:0] wptr;
    logic [31:0]           rd_data;
    logic                  triggered, wrapped;
    logic [1:0]            event_hit;
    ahb_tracer #(.MEM_WORDS(MW)) u_tr (
      .clk (clk), .rst_n (rst_n), .bus (bus), .protocol_violation (protocol_violation),
      .cfg_we (cfg_we), .cfg_addr (cfg_addr), .cfg_wdata (cfg_wdata),
      .rd_addr ('0), .rd_data (rd_data),
      .tracing (tracing[s]), .triggered (triggered), .done (done[s]),
      .wptr (wptr), .wrapped (wrapped), .full (full[s]), .drops (drops[s]),
      .event_hit (event_hit)
    );
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  // ------------------------------------------------------------ traffic model
  logic [31:0] pc = 32'h0000_8000, dval = 32'h0000_0100;
  logic [31:0] loops [8];
  int          run_left = 0, pend_idle = 0;

  // the instruction word at an address: fixed, so a loop fetches the same words
  function automatic logic [31:0] instr(input logic [31:0] a);
    return 32'hE590_0000 | 32'((a[11:2] * 10'd37) ^ 10'h155);
  endfunction

  task automatic gen();
    int r;
    bus.hresp  = HRESP_OKAY;
    bus.hgrant = 16'h0001;
    if (!bus.hready) begin
      bus.hready = 1'b1;                       // end of a wait state
      return;
    end
    bus.hready = ($urandom % 12 != 0);
    r = $urandom % 100;
    if (pend_idle > 0) begin
      pend_idle--;
      bus.htrans = HTRANS_IDLE;
    end else if (r < 20) begin                 // load or store
      bus.htrans = HTRANS_NONSEQ;
      bus.hwrite = 1'($urandom % 3 == 0);
      bus.haddr  = 32'h2000_0000 | (32'($urandom % 16) << 2);
      bus.hburst = 3'd0;
      bus.hprot  = 4'd3;
      if ($urandom % 2) dval = dval + 32'($urandom % 5);
      else if ($urandom % 8 == 0) dval = $urandom;
      if (bus.hwrite) bus.hwdata = dval; else bus.hrdata = dval;
    end else if (run_left == 0) begin          // branch to a loop head
      pc = loops[$urandom % 8];
      run_left = 4 + $urandom % 12;
      bus.htrans = HTRANS_NONSEQ;
      bus.haddr  = pc;
      bus.hwrite = 1'b0;
      bus.hburst = 3'd1;
      bus.hprot  = 4'd2;
      bus.hrdata = instr(pc);
      pend_idle  = 1 + $urandom % 3;
    end else begin                             // sequential fetch
      run_left--;
      pc += 4;
      bus.htrans = HTRANS_SEQ;
      bus.haddr  = pc;
      bus.hwrite = 1'b0;
      bus.hburst = 3'd1;
      bus.hprot  = 4'd2;
      bus.hrdata = instr(pc);
      if ($urandom % 5 < 2) pend_idle = 1 + $urandom % 3;
    end
  endtask

  task automatic cfg(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  int depth [6][NS];

  initial begin
    string mname [6] = '{"", "FC", "FT", "BC", "BT", "MT"};
    bus = '0;
    bus.hready = 1'b1;
    bus.hsize  = 3'd2;
    for (int i = 0; i < 8; i++) loops[i] = 32'h0000_8000 + 32'(i * 256 + ($urandom % 16) * 4);
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (3) @(negedge clk);
    cfg(5'd1, 32'hFFFF);

    for (int m = 1; m <= 5; m++) begin
      int cyc;
      logic [15:0] d0 [NS];
      cyc = 0;
      for (int s = 0; s < NS; s++) d0[s] = drops[s];
      for (int s = 0; s < NS; s++) depth[m][s] = 0;
      // arm: post-trigger, mode m, protocol violation triggers
      cfg(5'd0, 32'h1 | 32'h4 | (32'(m) << 3) | 32'h40);
      @(negedge clk); protocol_violation = 1;
      @(negedge clk); protocol_violation = 0;
      while (!(&done) && cyc < 500_000) begin
        @(negedge clk);
        gen();
        #1;
        for (int s = 0; s < NS; s++) if (tracing[s]) depth[m][s]++;
        cyc++;
      end
      chk(&done, "every run ends");
      chk(&full, "every run fills its memory");
      for (int s = 0; s < NS; s++) begin
        int unc;
        real imp;
        unc = (32 * (512 << s)) / UNCOMP_BITS;
        imp = real'(depth[m][s]) / real'(unc);
        $display("mode %s, %2d KB: depth %6d cycles, uncompressed %4d, improvement %4.1fx, drops %0d",
                 mname[m], 2 << s, depth[m][s], unc, imp, drops[s] - d0[s]);
        chk(int'(drops[s] - d0[s]) * 100 < depth[m][s], "drops below 1% of the traced cycles");
        chk(depth[m][s] > unc, "depth beats the uncompressed trace");
        if (s > 0) begin
          real ratio;
          ratio = real'(depth[m][s]) / real'(depth[m][s-1]);
          chk(ratio > 1.6 && ratio < 2.4, "doubling the memory doubles the depth");
        end
      end
      repeat (20) @(negedge clk);
    end

    for (int s = 0; s < NS; s++) begin
      chk(depth[1][s] < depth[3][s], "FC shallower than BC");
      chk(depth[2][s] < depth[4][s], "FT shallower than BT");
      chk(depth[4][s] < depth[5][s], "BT shallower than MT");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
