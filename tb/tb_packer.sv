// tb_packer: self-checking test of header attachment and the mode change controller.
// Drives compressed records directly and rebuilds each expected packet here bit
// by bit from the packet format: plain records in cycle and transaction modes,
// segment markers, every status-field width, the end marker with flush, a drop
// when the FIFO has no room (with `resync` until the next write and the overflow
// bit in the next marker) and an end marker waiting for room.
module tb_packer;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 1;
  crec_t crec;
  logic [9:0] free;
  logic we, flush, resync;
  logic [127:0] pkt;
  logic [7:0] len;
  logic [15:0] drops;
  int checks = 0, failures = 0;
  bit eb[$];

  packer #(.FIFO_BITS(512)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) eb.push_back(v[i]);
  endtask

  // expected packet of the current crec, optionally behind a marker
  task automatic build(input bit mk, input bit ovf);
    eb.delete();
    if (mk) begin put(1, 1); put(64'(crec.mode), 3); put(64'(ovf), 1); end
    put(0, 1); put(64'(crec.a_code), 2); put(64'(crec.d_code), 2); put(64'(crec.c_code), 2);
    put(64'(crec.s_p), 1);
    if (mk || (crec.mode inside {MODE_FT, MODE_BT, MODE_MT})) begin
      if (crec.delta == DELTA_W'(1)) put(64'(1), 1);
      else begin put(64'(0), 1); put(64'(crec.delta), DELTA_W); end
    end
    put(64'(crec.a_pay), int'(crec.a_len));
    put(64'(crec.d_pay), int'(crec.d_len));
    put(64'(crec.c_pay), int'(crec.c_len));
    if (crec.s_p) put(64'(crec.sval), (crec.mode inside {MODE_FC, MODE_FT}) ? 5 : 4);
  endtask

  task automatic expect_pkt(input bit exp_we, input string what);
    #1;
    checks++;
    if (we !== exp_we) begin failures++; $display("FAIL we %s", what); return; end
    if (!exp_we) return;
    checks++;
    if (int'(len) != eb.size()) begin
      failures++; $display("FAIL len %s: %0d vs %0d", what, len, eb.size()); return;
    end
    for (int i = 0; i < eb.size(); i++)
      if (pkt[i] !== eb[i]) begin failures++; $display("FAIL bit %0d %s", i, what); return; end
  endtask

  task automatic rand_rec(input mode_e m);
    int ac;
    crec = '0;
    crec.valid = 1; crec.mode = m; crec.delta = ($urandom % 2) ? DELTA_W'(1) : DELTA_W'($urandom);
    ac = $urandom % 4;
    crec.a_code = 2'(ac);
    crec.a_len  = (ac == 2) ? 6'd4 : (ac == 3) ? 6'(2 + 8 * (1 + $urandom % 4)) : 6'd0;
    crec.a_pay  = {$urandom, 2'($urandom)} & ((34'd1 << crec.a_len) - 1);
    crec.d_code = 2'($urandom);
    crec.d_len  = (crec.d_code == 1) ? 6'd8 : (crec.d_code == 2) ? 6'd16 : (crec.d_code == 3) ? 6'd32 : 6'd0;
    crec.d_pay  = $urandom & ((32'd1 << crec.d_len) - 1);
    if (crec.d_code == 3) crec.d_pay = $urandom;
    if (m inside {MODE_FC, MODE_FT}) begin
      crec.c_code = ($urandom % 2) ? C_HIT : C_MISS;
      crec.c_len  = (crec.c_code == C_HIT) ? 5'd3 : 5'd15;
      crec.c_pay  = 15'($urandom) & 15'((1 << crec.c_len) - 1);
    end
    crec.s_p  = !(m == MODE_MT) && 1'($urandom);
    crec.sval = (m inside {MODE_FC, MODE_FT}) ? 5'($urandom) : {1'b0, 4'($urandom)};
  endtask

  initial begin
    crec = '0; free = 10'd512;
    #1 rst_n = 0; #1 rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      rand_rec(mode_e'(1 + $urandom % 5));
      crec.sync = ($urandom % 5 == 0);
      build(crec.sync, 0);
      expect_pkt(1, "record");
      checks++; if (resync || flush) failures++;
    end
    // overflow: no room
    @(negedge clk); rand_rec(MODE_FT); free = 10'd10;
    #1 checks++; if (we || !resync) failures++;
    @(negedge clk); crec.valid = 0; free = 10'd512;
    #1 checks++; if (!resync || we) failures++;
    @(negedge clk); rand_rec(MODE_BT);
    build(1, 1); expect_pkt(1, "record after overflow");
    checks++; if (resync || drops != 1) failures++;
    @(negedge clk); rand_rec(MODE_BT);
    build(0, 0); expect_pkt(1, "next record");
    // end marker waits for room
    @(negedge clk); crec = '0; crec.valid = 1; crec.stop = 1; crec.mode = MODE_BT; free = 10'd2;
    #1 checks++; if (we || flush) failures++;
    @(negedge clk); crec = '0; free = 10'd3;
    #1 checks++; if (we || flush) failures++;
    @(negedge clk); free = 10'd100;
    eb.delete(); put(1, 1); put(0, 3); put(0, 1);
    expect_pkt(1, "end marker");
    checks++; if (!flush) failures++;
    @(negedge clk); #1 checks++; if (we || flush) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
