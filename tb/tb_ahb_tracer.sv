// tb_ahb_tracer: end-to-end test of the AHB tracer at its default sizes.
//
// An AHB traffic model (instruction fetch runs and branches, data reads and
// writes, wait states, ERROR/RETRY/SPLIT responses, idle cycles, master and
// grant changes) drives the tracer. The testbench keeps its own record of every
// bus cycle and of which cycles were traced, then reads the trace memory back
// through the host port and decodes it with a decoder written here from the
// packet format. Four runs:
//   A  post-trigger, started by event 0, trace mode changed four times by
//      event 1 (reprogrammed between changes) through all five modes; every
//      traced cycle is checked: each field that the mode records must decode to
//      the value on the bus, also in cycles that produced no record.
//   B  full-signal cycle mode on random data: the packing FIFO overflows, packets
//      are dropped, and the trace must still decode to the end marker with
//      overflow markers, each followed by a self-contained record.
//   C  pre-trigger, trigger from the protocol-violation input: the circular
//      memory wraps and tracing stops `depth` words after the trigger.
//   D  post-trigger with a large depth: the memory fills and tracing stops.
// Each mechanism is counted and a failure is counted for one that never occurs.
module tb_ahb_tracer;
  import tracer_pkg::*;

  localparam int MW = 4096;
  localparam logic [31:0] TRIG_ADDR = 32'h0000_0F00;
  localparam logic [31:0] MCHG_ADDR = 32'h0000_0E00;

  logic        clk = 0, rst_n = 1;
  ahb_mon_t    bus;
  logic        protocol_violation = 0;
  logic        cfg_we = 0;
  logic [4:0]  cfg_addr = 0;
  logic [31:0] cfg_wdata = 0;
  logic [11:0] rd_addr = 0;
  logic [31:0] rd_data;
  logic        tracing, triggered, done, wrapped, full;
  logic [11:0] wptr;
  logic [15:0] drops;
  logic [1:0]  event_hit;

  ahb_tracer dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, dbgc = 0;
  longint cyc = 0;

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string w);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", w, cyc); end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_seq, n_hit, n_miss, n_slice[5], n_d8, n_d16, n_dfull, n_chit, n_cmiss;
  int n_verified, n_gap_one, n_gap_long;
  int n_keep, n_mode_chg, n_mode_seen[6], n_ovf_mark, n_bs_seen[9], n_waits, n_errs, n_rs;

  // ------------------------------------------------------------ traffic model
  int          resp_phase = 0;
  logic [31:0] pc = 32'h100, dval = 32'h1000;
  logic [31:0] targets [10];
  bit          rand_data = 0, force_trig = 0, force_mchg = 0;

  task automatic gen();
    int r;
    if (resp_phase == 1) begin
      bus.hready = 1; resp_phase = 2;
    end else if (resp_phase == 2) begin
      bus.hresp = HRESP_OKAY; bus.htrans = HTRANS_IDLE; bus.hready = 1; resp_phase = 0;
    end else if (!bus.hready) begin
      bus.hready = 1;                       // wait state over, address phase held
    end else begin
      r = $urandom % 100;
      bus.hresp = HRESP_OKAY;
      if (r < 2 && bus.htrans[1]) begin     // two-cycle error / retry / split response
        bus.hready = 0; resp_phase = 1;
        bus.hresp = (r == 0) ? HRESP_ERROR : 2'(2 + $urandom % 2);
        if (bus.hresp == HRESP_ERROR) n_errs++; else n_rs++;
      end else begin
        bus.hready = ($urandom % 7 != 0);
        if (!bus.hready) n_waits++;
        r = $urandom % (rand_data ? 100 : 160);
        if (force_trig) begin
          bus.htrans = HTRANS_NONSEQ; bus.haddr = TRIG_ADDR; bus.hwrite = 0; bus.hready = 1;
          force_trig = 0;
        end else if (force_mchg) begin
          bus.htrans = HTRANS_NONSEQ; bus.haddr = MCHG_ADDR; bus.hwrite = 1; bus.hready = 1;
          force_mchg = 0;
        end else if (r < 55) begin          // sequential fetch
          pc += 4; bus.htrans = HTRANS_SEQ; bus.haddr = pc; bus.hwrite = 0; bus.hsize = 3'd2;
          bus.hburst = 3'd1;
        end else if (r < 70) begin          // branch
          pc = targets[$urandom % 10]; bus.htrans = HTRANS_NONSEQ; bus.haddr = pc;
          bus.hwrite = 0; bus.hsize = 3'd2; bus.hburst = 3'd1;
        end else if (r < 85) begin          // data access
          bus.htrans = HTRANS_NONSEQ; bus.hwrite = 1'($urandom);
          bus.haddr = 32'h2000_0000 | (32'($urandom % 24) << 2);
          bus.hsize = 3'($urandom % 3); bus.hburst = 3'd0; bus.hprot = 4'($urandom % 2 + 1);
        end else if (r >= 100 || r < 97) begin
          bus.htrans = HTRANS_IDLE;
        end else begin
          bus.htrans = HTRANS_BUSY;
        end
        if ($urandom % 200 == 0) begin      // bus handover
          bus.hmaster = 4'($urandom % 3);
        end
        bus.hgrant = '0;
        bus.hgrant[bus.hmaster] = !(bus.htrans == HTRANS_IDLE && $urandom % 6 == 0);
      end
    end
    // data buses
    if (rand_data) begin bus.hwdata = $urandom; bus.hrdata = $urandom; end
    else begin
      // the data buses change in about a third of the cycles, mostly by small steps
      r = $urandom % 30;
      if (r < 10) begin
        dval = (r < 5) ? dval + 32'($signed(6'($urandom))) :
               (r < 8) ? dval + 32'($signed(13'($urandom))) : $urandom;
        if ($urandom % 2) bus.hwdata = dval; else bus.hrdata = dval;
      end
    end
  endtask

  // ------------------------------------------------------------ reference history
  typedef struct {
    ahb_mon_t b;
    mode_e    m;
    logic     ca, cd;
    logic [31:0] vd;
    logic [3:0]  bs;
  } tcyc_t;
  tcyc_t hist[$];                 // traced cycles of the current run
  logic  dph_act = 0, dph_wr = 0;
  mode_e ref_mode = MODE_FC;
  int    bs_ref = 7;
  logic  [31:0] ev1_mode_q = 0;

  function automatic int bsm_ref(int s, ahb_mon_t b);
    logic g = b.hgrant[b.hmaster], r = b.hready, a = b.htrans[1];
    case (s)
      7: return 0;
      0: return (g && r && b.htrans == HTRANS_NONSEQ) ? 1 : 0;
      1, 2, 3: begin
        if (b.hresp == HRESP_ERROR) return 5;
        if (b.hresp[1]) return 6;
        if (!r) return 3;
        return a ? 2 : 4;
      end
      4, 8: begin if (!g) return 0; if (r && a) return 1; return s; end
      5: return (r && b.hresp == HRESP_ERROR) ? 8 : 5;
      6: return (r && b.hresp[1]) ? 8 : 6;
      default: return 0;
    endcase
  endfunction

  // one bus cycle: drive, note whether traced, advance reference state
  task automatic step();
    tcyc_t t;
    @(negedge clk);
    gen();
    #1;
    if (bus.htrans[1] && bus.hready && bus.haddr == MCHG_ADDR && bus.hwrite && ev1_mode_q[0])
      ref_mode = mode_e'(ev1_mode_q[5:3]);
    bs_ref = bsm_ref(bs_ref, bus);
    t.b = bus; t.m = ref_mode; t.ca = bus.htrans[1];
    t.cd = bus.hready && dph_act; t.vd = dph_wr ? bus.hwdata : bus.hrdata;
    t.bs = 4'(bs_ref);
    if (tracing) hist.push_back(t);
    if (bus.hready) begin dph_act = bus.htrans[1]; dph_wr = bus.hwrite; end
    cyc++;
  endtask

  task automatic cfg(input logic [4:0] a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    if (a == 5'd10) ev1_mode_q = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // ------------------------------------------------------------ trace readback
  logic [31:0] wmem [MW];
  int          nwords;
  longint      bitpos;

  task automatic read_mem(input int first, input int n);
    nwords = n;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); rd_addr = 12'((first + i) % MW);
      @(posedge clk); #1 wmem[i] = rd_data;
    end
  endtask

  function automatic logic [63:0] getb(input int n);
    logic [63:0] v;
    logic [31:0] w;
    longint p;
    v = '0;
    for (int i = 0; i < n; i++) begin
      p = bitpos + longint'(i);
      w = wmem[int'(p / 32) % MW];
      if (int'(p / 32) >= nwords) w = '0;
      v[i] = w[int'(p % 32)];
    end
    bitpos += longint'(n);
    return v;
  endfunction

  // ------------------------------------------------------------ decoder
  // exact = 1: every record is placed on its traced cycle and checked
  task automatic decode(input bit exact, output int nrec, output bit ended);
    logic [31:0] pa, pd, ad [16];
    logic [14:0] cd [8];
    int apos, cpos, pos, last;
    mode_e m;
    logic [31:0] ca, da; logic [14:0] cv; logic [4:0] sv;
    bit ka, kd, kc, ks, first;
    logic [31:0] opa, opd; logic [14:0] ocv; logic [4:0] osv; bit oka, okd, okc, oks;
    bitpos = 0; nrec = 0; ended = 0; last = -1; m = MODE_END; first = 0;
    pa = 0; pd = 0; apos = 0; cpos = 0; ka = 0; kd = 0; kc = 0; ks = 0;
    while (bitpos < longint'(nwords) * 32) begin
      logic kind;
      kind = getb(1)[0];
      if (kind) begin
        mode_e nm; logic ovf;
        nm = mode_e'(getb(3)[2:0]); ovf = getb(1)[0];
        if (nm == MODE_END) begin ended = 1; break; end
        chk(mode_valid(3'(nm)), "marker mode valid");
        if (ovf) begin n_ovf_mark++; exact = 0; end
        if (m != MODE_END && nm != m) n_mode_chg++;
        n_mode_seen[nm]++;
        m = nm; first = 1;
        pa = 0; pd = 0; apos = 0; cpos = 0; ka = 0; kd = 0; kc = 0; ks = 0;
      end else begin
        logic [1:0] ac, dc, cc; logic sp; int dl;
        chk(m != MODE_END, "record after a marker");
        if (m == MODE_END) break;
        opa = pa; opd = pd; ocv = cv; osv = sv; oka = ka; okd = kd; okc = kc; oks = ks;
        ac = getb(2)[1:0]; dc = getb(2)[1:0]; cc = getb(2)[1:0]; sp = getb(1)[0];
        dl = 1;
        if (mode_is_txn(m) || first) begin
          if (!getb(1)[0]) begin dl = int'(getb(DELTA_W)); n_gap_long++; end
          else n_gap_one++;
        end
        if (mode_is_txn(m) && !first && ac == 0 && dc == 0 && cc == 0 && !sp) begin
          n_keep++; chk(dl == 63, "empty record only at the delta limit");
        end
        case (ac)
          A_SEQ: begin ca = pa + 4; n_seq++; end
          A_HIT: begin ca = ad[getb(4)[3:0]]; n_hit++; end
          A_MISS: begin
            int ns; ns = int'(getb(2)) + 1; n_miss++; n_slice[ns]++;
            ca = pa;
            for (int b = 0; b < ns; b++) ca[8*b +: 8] = getb(8)[7:0];
            ad[apos] = ca; apos = (apos + 1) % 16;
          end
          default: ;
        endcase
        if (ac != A_NONE) begin pa = ca; ka = 1; end
        case (dc)
          D_D8:   begin da = pd + 32'($signed(getb(8)[7:0]));   n_d8++; end
          D_D16:  begin da = pd + 32'($signed(getb(16)[15:0])); n_d16++; end
          D_FULL: begin da = getb(32)[31:0];                    n_dfull++; end
          default: ;
        endcase
        if (dc != D_NONE) begin pd = da; kd = 1; end
        if (cc == C_HIT)  begin cv = cd[getb(3)[2:0]]; kc = 1; n_chit++; end
        if (cc == C_MISS) begin cv = getb(15)[14:0]; cd[cpos] = cv; cpos = (cpos + 1) % 8; kc = 1; n_cmiss++; end
        chk(cc != 2'b01, "control code valid");
        if (sp) begin
          sv = 5'(getb(mode_has_pcs(m) ? 5 : 4)); ks = 1;
          if (mode_has_state(m) && sv < 9) n_bs_seen[sv]++;
        end
        chk(!(cc != C_NONE && !mode_has_ctrl(m)) && !(sp && m == MODE_MT), "fields of the mode");
        nrec++;
        pos = last + dl;
        if (exact) begin
          // cycles without a record: nothing the mode records may have changed
          for (int i = last + 1; i <= pos && i < hist.size(); i++) begin
            tcyc_t t; bit rec_here;
            t = hist[i]; rec_here = (i == pos);
            if (rec_here) begin
              chk(t.m == m, "record mode matches bus history");
              if (first) chk(i == 0 || hist[i-1].m != t.m || last == -1, "marker at segment start");
            end
            if (!rec_here && first) continue;
            n_verified++;
            if (rec_here) begin
              if (t.ca) chk(ka && pa == t.b.haddr, "address");
              if (t.cd) chk(kd && pd == t.vd, "data");
              if (t.ca && mode_has_ctrl(m))
                chk(kc && cv == {t.b.hwrite, t.b.hburst, t.b.hsize, t.b.hprot, t.b.hmaster}, "control");
              if (mode_has_pcs(m)) chk(ks && sv == {t.b.htrans, t.b.hready, t.b.hresp}, "protocol signals");
              if (mode_has_state(m)) chk(ks && sv == {1'b0, t.bs}, "bus state");
            end else begin
              if (t.ca) chk(oka && opa == t.b.haddr, "address unchanged");
              if (t.cd) chk(okd && opd == t.vd, "data unchanged");
              if (t.ca && mode_has_ctrl(m))
                chk(okc && ocv == {t.b.hwrite, t.b.hburst, t.b.hsize, t.b.hprot, t.b.hmaster}, "control unchanged");
              if (mode_has_pcs(m)) chk(oks && osv == {t.b.htrans, t.b.hready, t.b.hresp}, "protocol signals unchanged");
              if (mode_has_state(m)) chk(oks && osv == {1'b0, t.bs}, "bus state unchanged");
            end
          end
          chk(pos < hist.size(), "record within traced cycles");
        end
        last = pos; first = 0;
      end
    end
  endtask

  // ------------------------------------------------------------ runs
  initial begin
    int nrec; bit ended; int nw;
    bus = '0; bus.hready = 1; bus.hgrant = 16'h1;
    for (int i = 0; i < 10; i++) targets[i] = 32'h0001_0000 + 32'($urandom % 4096) * 16 + 32'(i) * 32'h0100_0000 * (i % 3);
    #1 rst_n = 0; #20 rst_n = 1;

    // ---- run A: post-trigger, mode changes through all five modes
    cfg(5'd4, TRIG_ADDR); cfg(5'd5, 32'hFFFF_FFFF); cfg(5'd6, 32'h3);
    cfg(5'd8, MCHG_ADDR); cfg(5'd9, 32'hFFFF_FFFF);
    cfg(5'd10, 32'h1 | 32'h4 | (32'd4 << 3) | 32'h40 | 32'h80);       // -> BT on write
    cfg(5'd1, 32'd3000);
    cfg(5'd0, 32'h1 | 32'h4 | (32'd2 << 3));                            // arm, post-T, FT
    ref_mode = MODE_FT; hist.delete();
    repeat (50) step();
    chk(!tracing && !triggered, "post-T waits for trigger");
    force_trig = 1; while (force_trig) step();
    step();
    chk(triggered, "triggered by event 0");
    begin
      mode_e seq_modes [4] = '{MODE_BT, MODE_FC, MODE_BC, MODE_MT};
      for (int s = 0; s < 4; s++) begin
        repeat (300) step();
        // quiet stretch: a long run of identical cycles (keep-alive records)
        for (int q = 0; q < 140; q++) begin
          @(negedge clk);
          bus.htrans = HTRANS_IDLE; bus.hresp = HRESP_OKAY; bus.hready = 1; resp_phase = 0;
          #1;
          begin
            tcyc_t t;
            bs_ref = bsm_ref(bs_ref, bus);
            t.b = bus; t.m = ref_mode; t.ca = 0; t.cd = bus.hready && dph_act;
            t.vd = dph_wr ? bus.hwdata : bus.hrdata; t.bs = 4'(bs_ref);
            if (tracing) hist.push_back(t);
            dph_act = 0; cyc++;
          end
        end
        if (s > 0) begin
          @(negedge clk); cfg_we = 1; cfg_addr = 5'd10;
          cfg_wdata = 32'h1 | 32'h4 | (32'(seq_modes[s]) << 3) | 32'h40 | 32'h80;
          ev1_mode_q = cfg_wdata;
          #1 begin
            tcyc_t t;
            bs_ref = bsm_ref(bs_ref, bus);
            t.b = bus; t.m = ref_mode; t.ca = 0; t.cd = 0; t.vd = 0; t.bs = 4'(bs_ref);
            if (tracing) hist.push_back(t);
            cyc++;
          end
          @(negedge clk); cfg_we = 0; #1;
          begin
            tcyc_t t;
            bs_ref = bsm_ref(bs_ref, bus);
            t.b = bus; t.m = ref_mode; t.ca = 0; t.cd = 0; t.vd = 0; t.bs = 4'(bs_ref);
            if (tracing) hist.push_back(t);
            cyc++;
          end
        end
        force_mchg = 1; while (force_mchg) step();
      end
      repeat (300) step();
    end
    cfg(5'd0, 32'h2);                                                   // disarm: stop
    repeat (40) step();
    chk(done && !tracing, "run A done");

    nw = int'(wptr);
    read_mem(0, nw);
    decode(1, nrec, ended);
    chk(ended, "run A end marker");
    chk(nrec > 100, "run A records");
    chk(n_verified > 1000, "run A cycles verified against the bus");
    $display("run A: %0d traced cycles, %0d verified, %0d words, %0d records, %0d drops",
             hist.size(), n_verified, nw, nrec, drops);
    for (int md = 1; md <= 5; md++) chk(n_mode_seen[md] > 0, "every trace mode used");

    // ---- run B: cycle mode with random data overflows the FIFO
    rand_data = 1;
    cfg(5'd10, 32'h0);
    cfg(5'd0, 32'h1 | (32'd1 << 3));                                    // pre-T, FC
    hist.delete();
    repeat (600) step();
    cfg(5'd0, 32'h2);
    repeat (40) step();
    chk(drops > 0, "run B overflow drops packets");
    nw = int'(wptr);
    read_mem(0, nw);
    decode(0, nrec, ended);
    chk(ended, "run B end marker after overflow");
    chk(n_ovf_mark > 0, "overflow marker");
    $display("run B: drops=%0d words=%0d records=%0d overflow markers=%0d", drops, nw, nrec, n_ovf_mark);
    rand_data = 0;

    // ---- run C: pre-trigger, protocol violation trigger, wrap
    cfg(5'd1, 32'd200);
    cfg(5'd0, 32'h1 | (32'd1 << 3) | 32'h40);                           // pre-T, FC, pv trigger
    hist.delete();
    while (!wrapped) step();
    repeat (500) step();
    chk(tracing && !triggered, "pre-T tracing before trigger");
    @(negedge clk); protocol_violation = 1; @(negedge clk); protocol_violation = 0;
    begin
      int w0, nstep; w0 = int'(wptr); nstep = 0;
      while (!done && nstep < 20000) begin step(); nstep++; end
      repeat (40) step();
      chk(done && wrapped, "pre-T stopped after depth, memory wrapped");
      nw = (int'(wptr) - w0 + MW) % MW;
      chk(nw >= 200 && nw <= 200 + 24, "words written after trigger ~ depth");
      $display("run C: words after trigger=%0d", nw);
    end

    // ---- run D: post-trigger until memory full
    cfg(5'd1, 32'd60000);
    cfg(5'd0, 32'h1 | 32'h4 | (32'd1 << 3));                            // post-T, FC
    force_trig = 1;
    begin
      int nstep = 0;
      while (!done && nstep < 40000) begin step(); nstep++; end
    end
    repeat (40) step();
    chk(full && done, "post-T stops when memory full");
    read_mem(0, MW);
    decode(0, nrec, ended);
    chk(nrec > 1000, "run D decodes");
    $display("run D: %0d records in a full memory", nrec);

    // ---- mechanisms
    chk(n_seq > 0, "sequential address filter");   chk(n_hit > 0, "address dictionary hit");
    chk(n_miss > 0, "address dictionary miss");
    for (int s = 1; s <= 4; s++) chk(n_slice[s] > 0, "address slice count");
    chk(n_d8 > 0 && n_d16 > 0 && n_dfull > 0, "data difference sizes");
    chk(n_chit > 0 && n_cmiss > 0, "control dictionary hit and miss");
    chk(n_keep > 0, "keep-alive record");
    chk(n_gap_one > 0, "one-bit cycle gap");
    chk(n_gap_long > 0, "long cycle gap");
    chk(n_mode_chg >= 4, "mode changes");
    chk(n_bs_seen[3] > 0 && n_bs_seen[2] > 0 && n_bs_seen[4] > 0, "bus states recorded");
    chk(n_errs > 0 && n_rs > 0 && n_waits > 0, "error, retry/split, wait states on the bus");
    $display("seq=%0d hit=%0d miss=%0d slices=%0d/%0d/%0d/%0d d8=%0d d16=%0d dfull=%0d chit=%0d cmiss=%0d keep=%0d modechg=%0d ovf=%0d",
             n_seq, n_hit, n_miss, n_slice[1], n_slice[2], n_slice[3], n_slice[4], n_d8, n_d16,
             n_dfull, n_chit, n_cmiss, n_keep, n_mode_chg, n_ovf_mark);
    $display("cycle gaps: one-bit %0d, long %0d", n_gap_one, n_gap_long);
    $display("bus states recorded: %p", n_bs_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
