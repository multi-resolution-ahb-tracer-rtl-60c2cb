// tb_cam_dict: self-checking test of the CAM dictionary.
// Random lookups drawn from a small key pool (to get both hits and misses) are
// compared with a reference table kept here: in-order fill, first-in first-out
// replacement when full, and clear (with a same-cycle lookup becoming entry 0).
module tb_cam_dict;
  localparam int N = 8, W = 15;
  logic clk = 0, rst_n = 1, clear = 0, lookup = 0;
  logic [W-1:0] key = 0;
  logic hit;
  logic [2:0] idx;
  logic [W-1:0] rt [N];
  bit rv [N];
  int rp = 0, checks = 0, failures = 0, nhit = 0, nmiss = 0, nwrap = 0;
  logic [W-1:0] pool [12];

  cam_dict #(.W(W), .N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 12; i++) pool[i] = W'($urandom);
    #1 rst_n = 0; #1 rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      logic eh; int ei;
      @(negedge clk);
      lookup = 1'($urandom % 5 != 0);
      clear  = ($urandom % 200 == 0);
      key    = pool[$urandom % 12];
      eh = 0; ei = 0;
      if (!clear) for (int i = 0; i < N; i++) if (rv[i] && rt[i] == key) begin eh = 1; ei = i; end
      #1;
      if (lookup) begin
        checks++;
        if (hit !== eh || (eh && idx !== 3'(ei))) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d hit=%b/%b idx=%0d/%0d", k, hit, eh, idx, ei);
        end
        if (eh) nhit++; else nmiss++;
      end
      if (clear) begin
        for (int i = 0; i < N; i++) rv[i] = 0;
        rp = 0;
      end
      if (lookup && !eh) begin
        rt[rp] = key; rv[rp] = 1;
        if (rp == N - 1) nwrap++;
        rp = (rp + 1) % N;
      end
    end
    checks++; if (nhit < 100 || nmiss < 100 || nwrap < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
