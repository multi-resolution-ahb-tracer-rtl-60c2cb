// tb_compression: self-checking test of the compression stage.
// Random abstracted records (instruction-like addresses, data with small and
// large steps, a few control combinations) in all trace modes, with segment
// starts and resync requests. Each compressed record, one cycle later, is
// decoded here with a decoder-side address dictionary, control dictionary and
// previous data value; every present field must decode to its input value, and
// fields must be forced present under resync.
module tb_compression;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 1, resync = 0;
  rec_t rec, rq;
  logic rs_q;
  crec_t crec;
  int checks = 0, failures = 0;
  logic [31:0] pa = 0, pd = 0, dt [16];
  logic [14:0] ct [8];
  int dp = 0, cp = 0;
  int nc [16];
  logic [31:0] cur = 32'h100;
  logic [14:0] cpool [12];

  compression #(.ADDR_DICT_N(16), .CTRL_DICT_N(8), .SEQ_STRIDE(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  task automatic decode();
    logic clr;
    clr = rs_q || (rq.valid && !rq.stop && rq.sync);
    if (clr) begin pa = 0; pd = 0; dp = 0; cp = 0; end
    chk(crec.valid == rq.valid && crec.mode == rq.mode && crec.delta == rq.delta, "pass-through");
    if (!rq.valid || rq.stop) return;
    if (rq.a_p || rs_q) begin
      logic [31:0] d;
      case (crec.a_code)
        A_SEQ: d = pa + 4;
        A_HIT: d = dt[crec.a_pay[3:0]];
        A_MISS: begin
          d = pa;
          for (int b = 0; b <= int'(crec.a_pay[1:0]); b++) d[8*b +: 8] = crec.a_pay[2 + 8*b +: 8];
          dt[dp] = d; dp = (dp + 1) % 16;
        end
        default: d = ~rq.addr;
      endcase
      nc[crec.a_code]++;
      chk(d == rq.addr, "address");
      pa = rq.addr;
    end else chk(crec.a_code == A_NONE, "address absent");
    if (rq.d_p || rs_q) begin
      logic [31:0] d;
      case (crec.d_code)
        D_D8:  d = pd + 32'($signed(crec.d_pay[7:0]));
        D_D16: d = pd + 32'($signed(crec.d_pay[15:0]));
        D_FULL: d = crec.d_pay;
        default: d = ~rq.data;
      endcase
      nc[4 + crec.d_code]++;
      chk(d == rq.data, "data");
      pd = rq.data;
    end else chk(crec.d_code == D_NONE, "data absent");
    if (mode_has_ctrl(rq.mode) && (rq.c_p || rs_q)) begin
      logic [14:0] c;
      if (crec.c_code == C_HIT) c = ct[crec.c_pay[2:0]];
      else begin c = crec.c_pay; ct[cp] = c; cp = (cp + 1) % 8; end
      nc[8 + crec.c_code]++;
      chk(c == rq.ctrl && (crec.c_code == C_HIT || crec.c_code == C_MISS), "control");
    end else chk(crec.c_code == C_NONE, "control absent");
    chk(crec.s_p == ((mode_has_pcs(rq.mode) || mode_has_state(rq.mode)) && (rq.s_p || rs_q)), "status flag");
    if (crec.s_p) chk(crec.sval == rq.sval, "status");
  endtask

  initial begin
    for (int i = 0; i < 12; i++) cpool[i] = 15'($urandom);
    rec = '0;
    #1 rst_n = 0; #1 rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      int r;
      @(negedge clk);
      rec.valid = 1'($urandom % 4 != 0);
      rec.stop  = 0;
      rec.sync  = rec.valid && ($urandom % 60 == 0);
      rec.mode  = mode_e'(1 + $urandom % 5);
      rec.delta = DELTA_W'($urandom);
      r = $urandom % 10;
      cur = (r < 6) ? cur + 4 : (r < 9) ? {20'h0, 4'($urandom), 8'h0} : $urandom;
      rec.a_p = rec.valid && 1'($urandom);
      rec.addr = cur;
      rec.d_p = rec.valid && 1'($urandom);
      rec.data = ($urandom % 2) ? rec.data + 32'($signed(8'($urandom))) : $urandom;
      rec.c_p = rec.valid && 1'($urandom);
      rec.ctrl = cpool[$urandom % 12];
      rec.s_p = rec.valid && 1'($urandom);
      rec.sval = 5'($urandom);
      resync = ($urandom % 80 == 0);
      @(posedge clk);
      rq = rec; rs_q = resync;
      #1 decode();
    end
    for (int i = 1; i < 4; i++) chk(nc[i] > 20, "address code used");
    for (int i = 5; i < 8; i++) chk(nc[4 + i - 4] > 20, "data code used");
    chk(nc[10] > 20 && nc[11] > 20, "control codes used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
