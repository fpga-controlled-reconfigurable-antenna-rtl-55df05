// tb_tap_controller: self-checking test of the TAP state machine.
//
// A reference table of the IEEE 1149.1 state graph, written independently of
// the design as (state, TMS) -> next-state pairs, predicts the state after
// every rising TCK while TMS is driven at random. The decoded strobes are
// checked against the predicted state after the rising edge, and resetn /
// enable are checked after the falling edge, where they are registered.
// Also checked: asynchronous TRSTN, and that five TCKs with TMS high reach
// Test-Logic-Reset from every state.
module tb_tap_controller;
  import jtag_pkg::*;

  logic       tck = 1'b0;
  logic       tms = 1'b1;
  logic       trstn = 1'b0;
  tap_state_e state;
  tap_ctrl_t  ctrl;

  int checks = 0;
  int failures = 0;

  tap_controller dut (.tck(tck), .tms(tms), .trstn(trstn), .state(state), .ctrl(ctrl));

  always #5 tck = ~tck;

  // Reference next-state table: ref_next[state][tms].
  logic [3:0] ref_next [16][2];
  initial begin
    ref_next[4'hF] = '{4'hC, 4'hF};
    ref_next[4'hC] = '{4'hC, 4'h7};
    ref_next[4'h7] = '{4'h6, 4'h4};
    ref_next[4'h6] = '{4'h2, 4'h1};
    ref_next[4'h2] = '{4'h2, 4'h1};
    ref_next[4'h1] = '{4'h3, 4'h5};
    ref_next[4'h3] = '{4'h3, 4'h0};
    ref_next[4'h0] = '{4'h2, 4'h5};
    ref_next[4'h5] = '{4'hC, 4'h7};
    ref_next[4'h4] = '{4'hE, 4'hF};
    ref_next[4'hE] = '{4'hA, 4'h9};
    ref_next[4'hA] = '{4'hA, 4'h9};
    ref_next[4'h9] = '{4'hB, 4'hD};
    ref_next[4'hB] = '{4'hB, 4'h8};
    ref_next[4'h8] = '{4'hA, 4'hD};
    ref_next[4'hD] = '{4'hC, 4'h7};
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%h ctrl=%b", what, $time, state, ctrl);
    end
  endtask

  logic [3:0] exp_state;
  logic [15:0] visited = '0;

  initial begin : main
    #12;
    check(state == TLR && !ctrl.resetn && !ctrl.enable, "async reset");
    trstn = 1'b1;
    exp_state = 4'hF;
    @(negedge tck);
    repeat (3000) begin
      tms = ($urandom_range(0, 99) < 45);
      @(posedge tck);
      exp_state = ref_next[exp_state][tms];
      #1;
      visited[exp_state] = 1'b1;
      check(state == tap_state_e'(exp_state), "next state");
      check(ctrl.clock_ir  == (exp_state == 4'hE || exp_state == 4'hA), "clock_ir");
      check(ctrl.shift_ir  == (exp_state == 4'hA), "shift_ir");
      check(ctrl.update_ir == (exp_state == 4'hD), "update_ir");
      check(ctrl.clock_dr  == (exp_state == 4'h6 || exp_state == 4'h2), "clock_dr");
      check(ctrl.shift_dr  == (exp_state == 4'h2), "shift_dr");
      check(ctrl.update_dr == (exp_state == 4'h5), "update_dr");
      @(negedge tck);
      #1;
      check(ctrl.resetn == (exp_state != 4'hF), "resetn on falling edge");
      check(ctrl.enable == (exp_state == 4'hA || exp_state == 4'h2), "enable on falling edge");
    end
    check(visited == 16'hFFFF, "all 16 states visited");
    // Five TMS=1 clocks reach Test-Logic-Reset from every state.
    for (int s = 0; s < 16; s++) begin
      // walk to state s with the reference table: breadth-first is not needed,
      // random TMS until the state matches
      automatic int guard = 0;
      while (state != tap_state_e'(s) && guard < 200) begin
        @(negedge tck);
        tms = 1'($urandom_range(0, 1));
        @(posedge tck); #1;
        guard++;
      end
      check(state == tap_state_e'(s), "reach state");
      @(negedge tck);
      tms = 1'b1;
      repeat (5) @(posedge tck);
      #1;
      check(state == TLR, "five TMS=1 reset");
    end
    // Asynchronous TRSTN in the middle of a cycle.
    @(negedge tck); tms = 1'b0;
    repeat (3) @(posedge tck);
    #2 trstn = 1'b0;
    #1 check(state == TLR && !ctrl.resetn && !ctrl.enable, "TRSTN asynchronous");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
