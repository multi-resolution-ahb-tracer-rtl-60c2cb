// tb_bsm: self-checking test of the bus state machine.
// A directed walk visits every state and every printed transition, then random
// bus cycles are checked against a reference written here as a list of
// (from-state, condition, to-state) rules, first matching rule wins.
module tb_bsm;
  import tracer_pkg::*;
  logic clk = 0, rst_n = 1;
  ahb_mon_t bus;
  bstate_e state, state_next;
  int checks = 0, failures = 0;
  int visits [9];

  bsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_next(int s, logic g, logic r, logic [1:0] t, logic [1:0] p);
    logic a = (t == 2'b10 || t == 2'b11);
    logic i = !a;
    case (s)
      7: return 0;
      0: return (g && r && t == 2'b10) ? 1 : 0;
      1, 2, 3: begin
        if (p == 2'b01) return 5;
        if (p[1]) return 6;
        if (!r) return 3;
        if (a) return 2;
        return 4;
      end
      4: begin if (!g) return 0; if (r && a) return 1; return 4; end
      5: return (r && p == 2'b01) ? 8 : 5;
      6: return (r && p[1]) ? 8 : 6;
      8: begin if (!g) return 0; if (r && a) return 1; return 8; end
      default: return -1;
    endcase
  endfunction

  task automatic step(input logic g, input logic r, input logic [1:0] t, input logic [1:0] p,
                      input int expect_to);
    int exp;
    @(negedge clk);
    bus.hgrant = '0; bus.hmaster = 4'd3; bus.hgrant[3] = g;
    bus.hready = r; bus.htrans = t; bus.hresp = p;
    exp = ref_next(int'(state), g, r, t, p);
    #1;
    checks++;
    if (int'(state_next) != exp || (expect_to >= 0 && exp != expect_to)) begin
      failures++;
      $display("FAIL from %0d: next=%0d ref=%0d want=%0d", state, state_next, exp, expect_to);
    end
    @(posedge clk); #1;
    visits[int'(state)]++;
  endtask

  initial begin
    bus = '0;
    #1 rst_n = 0;
    #1 checks++; if (state != BS_RESET) failures++;
    visits[7]++;
    @(negedge clk); rst_n = 1;
    // RESET -> ORIGIN -> START -> NORMAL -> WAIT SLAVE -> NORMAL -> IDLE -> START
    step(1, 1, 2'b00, 2'b00, 0);
    step(1, 1, 2'b10, 2'b00, 1);
    step(1, 1, 2'b11, 2'b00, 2);
    step(1, 0, 2'b11, 2'b00, 3);
    step(1, 1, 2'b11, 2'b00, 2);
    step(1, 1, 2'b00, 2'b00, 4);
    step(1, 1, 2'b10, 2'b00, 1);
    // START -> ERROR -> WAIT MASTER -> START -> RETRY/SPLIT -> WAIT MASTER -> ORIGIN
    step(1, 0, 2'b10, 2'b01, 5);
    step(1, 1, 2'b00, 2'b01, 8);
    step(1, 1, 2'b10, 2'b00, 1);
    step(1, 0, 2'b10, 2'b11, 6);
    step(1, 1, 2'b00, 2'b10, 8);
    step(0, 1, 2'b00, 2'b00, 0);
    // ORIGIN -> START -> WAIT SLAVE -> ERROR ; NORMAL -> RETRY ; WAIT SLAVE -> IDLE -> ORIGIN
    step(1, 1, 2'b10, 2'b00, 1);
    step(1, 0, 2'b10, 2'b00, 3);
    step(1, 0, 2'b00, 2'b01, 5);
    step(1, 1, 2'b00, 2'b01, 8);
    step(1, 1, 2'b10, 2'b00, 1);
    step(1, 1, 2'b11, 2'b00, 2);
    step(1, 0, 2'b11, 2'b10, 6);
    step(1, 1, 2'b00, 2'b10, 8);
    step(1, 1, 2'b10, 2'b00, 1);
    step(1, 0, 2'b10, 2'b00, 3);
    step(1, 1, 2'b01, 2'b00, 4);
    step(0, 1, 2'b00, 2'b00, 0);
    // random
    for (int k = 0; k < 5000; k++)
      step(1'($urandom % 8 != 0), 1'($urandom % 4 != 0), 2'($urandom),
           ($urandom % 6 == 0) ? 2'($urandom) : 2'b00, -1);
    for (int s = 0; s < 9; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
