// tb_abstraction: self-checking test of the abstraction stage.
// Random AHB cycles in trace segments of random modes, with idle gaps and stop
// cycles. From the records alone the values of every field are rebuilt here and
// compared with the bus in every traced cycle, so nothing that changed is lost;
// the field set of each mode, one record per cycle at cycle level, the cycle
// gap at transaction level, the keep-alive record and the AHB data-phase
// direction (write data vs read data) are checked as well.
module tb_abstraction;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 1;
  s1_t s1;
  rec_t rec;
  int checks = 0, failures = 0;
  logic dph_act = 0, dph_wr = 0;
  logic [31:0] ra, rd;
  logic [14:0] rc;
  logic [4:0] rs;
  bit ka, kd, kc, ks;
  int gap = 0, n_keep = 0, n_rec_txn = 0, n_rec_cyc = 0, n_w = 0, n_r = 0;

  abstraction dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string w);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", w, $time); end
  endtask

  initial begin
    mode_e m = MODE_FC;
    int seg = 0;
    bit act_prev = 0;
    s1 = '0;
    #1 rst_n = 0; #1 rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      logic ca, cd, cc, cs;
      logic [31:0] va, vd;
      logic [14:0] vc;
      logic [4:0] vs;
      @(negedge clk);
      // segment control
      s1.stop = 0;
      if (seg == 0) begin
        seg = 20 + $urandom % 150;
        if (($urandom % 4) == 0 && act_prev) begin s1.active = 0; s1.stop = 1; end
        else begin s1.active = 1; m = mode_e'(1 + $urandom % 5); end
        s1.sync = s1.active;
      end else begin
        s1.sync = 0;
        s1.active = act_prev;
      end
      seg--;
      s1.mode = m;
      // bus: mostly quiet with bursts of activity to exercise transaction level
      if ($urandom % 3 == 0 && ((k / 200) % 3) != 2) begin
        s1.bus.htrans = 2'($urandom);
        s1.bus.haddr  = ($urandom % 2) ? s1.bus.haddr + 4 : $urandom;
        s1.bus.hwrite = 1'($urandom);
        s1.bus.hsize  = 3'($urandom % 3);
        s1.bus.hwdata = $urandom;
        s1.bus.hrdata = $urandom;
        s1.bus.hready = 1'($urandom % 4 != 0);
        s1.bus.hresp  = ($urandom % 10 == 0) ? 2'($urandom) : 2'b00;
        s1.bus.hmaster = 4'($urandom % 2);
      end
      s1.bus.hgrant = '1;
      ca = s1.bus.htrans[1]; va = s1.bus.haddr;
      cd = s1.bus.hready && dph_act; vd = dph_wr ? s1.bus.hwdata : s1.bus.hrdata;
      cc = ca && mode_has_ctrl(m);
      vc = {s1.bus.hwrite, s1.bus.hburst, s1.bus.hsize, s1.bus.hprot, s1.bus.hmaster};
      cs = mode_has_pcs(m) || mode_has_state(m);
      vs = {s1.bus.htrans, s1.bus.hready, s1.bus.hresp};
      if (s1.bus.hready) begin dph_act = s1.bus.htrans[1]; dph_wr = s1.bus.hwrite; end
      if (cd) begin if (vd == s1.bus.hwdata) n_w++; else n_r++; end
      act_prev = s1.active;
      @(posedge clk); #1;
      if (!s1.active) begin
        chk(rec.valid == s1.stop && rec.stop == s1.stop, "stop record");
        gap = 0;
        continue;
      end
      if (s1.sync) begin ka = 0; kd = 0; kc = 0; ks = 0; gap = 0; end
      gap++;
      if (!mode_is_txn(m)) chk(rec.valid, "record every cycle at cycle level");
      chk(!(rec.a_p && !ca) && !(rec.d_p && !cd) && !(rec.c_p && !cc) && !(rec.s_p && !cs),
          "field only from its phase and mode");
      if (s1.sync) chk((rec.a_p == ca) && (rec.d_p == cd) && (rec.c_p == cc) && (rec.s_p == cs),
                       "segment start carries all fields");
      if (rec.valid) begin
        if (mode_is_txn(m)) begin
          n_rec_txn++;
          if (!s1.sync) chk(int'(rec.delta) == gap, "delta");
          if (!(rec.a_p || rec.d_p || rec.c_p || rec.s_p || s1.sync)) begin
            chk(gap == 63, "keep-alive only at counter limit"); n_keep++;
          end
        end else n_rec_cyc++;
        gap = 0;
        if (rec.a_p) begin ra = rec.addr; ka = 1; end
        if (rec.d_p) begin rd = rec.data; kd = 1; end
        if (rec.c_p) begin rc = rec.ctrl; kc = 1; end
        if (rec.s_p) begin rs = rec.sval; ks = 1; end
      end
      if (ca) chk(ka && ra == va, "address rebuilt");
      if (cd) chk(kd && rd == vd, "data rebuilt");
      if (cc) chk(kc && rc == vc, "control rebuilt");
      if (cs && mode_has_pcs(m)) chk(ks && rs == vs, "protocol signals rebuilt");
      if (cs && mode_has_state(m)) chk(ks && rs == {1'b0, dut.u_bsm.state}, "bus state rebuilt");
    end
    chk(n_keep > 0 && n_rec_txn > 100 && n_rec_cyc > 100 && n_w > 50 && n_r > 50, "coverage");
    $display("keepalive=%0d txn=%0d cyc=%0d", n_keep, n_rec_txn, n_rec_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
