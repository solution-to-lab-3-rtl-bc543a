// tb_gated_pulse_fsm: end-to-end test of the asynchronous gated pulse
// generator.
//
// The reference is the unminimised ten-state flow table of the machine
// (states P0..P9, one per input combination and history), written here
// independently of the RTL. Each reference state maps to the 3-bit code of
// the minimised state that implements it; after every single input change
// the testbench lets the latch loop settle and compares q and y with the
// reference.
//
// Phase 1 replays the classic stimulus: clk toggling every 1 ns, gate high
// from 5.5 to 15.5 ns (rises at clk high: expect two pulses) and from 30.5
// to 40.5 ns (rises at clk low: expect one pulse).
// Phase 2 applies random single-input changes, only those the flow table
// specifies (gate may not change in the middle of a pulse sequence).
// Every value change of q is traced, so the transit states of the rerouted
// transitions (0->6->1, 1->6->0, 2->5->0, 2->6->1) and the single-bit
// change property are checked as well. Each mechanism must occur at least
// once.
`timescale 1ns/10ps
module tb_gated_pulse_fsm;
  import gpf_pkg::*;

  logic       clk, gate, rst;
  logic       y;
  logic [2:0] q;

  gated_pulse_fsm dut (.clk(clk), .gate(gate), .rst(rst), .y(y), .q(q));

  // Shadow of the same netlist with a small delay in the state feedback,
  // built from the same blocks, so that the transit states of the
  // rerouted transitions become visible as separate values.
  logic [2:0] q_sh, qd_sh, s_sh, r_sh;
  logic       y_sh;
  excitation_logic u_exc_sh (.c(clk), .g(gate), .q(qd_sh), .s(s_sh), .r(r_sh));
  for (genvar i = 0; i < 3; i++) begin : g_sh
    sr_latch u_bit_sh (.rst(rst), .s(s_sh[i]), .r(r_sh[i]), .q(q_sh[i]));
  end
  assign #0.02 qd_sh = q_sh;
  output_logic u_out_sh (.q(qd_sh), .y(y_sh));

  int checks = 0, failures = 0;

  // ---------------- reference: primitive flow table ----------------
  // next[p][{c,g}], -1 = unspecified input change
  int pnext [10][4];
  bit py    [10];
  logic [2:0] pcode [10];

  initial begin
    //            {c,g}: 00  01  10  11
    pnext[0] = '{ 0,  8,  1, -1};
    pnext[1] = '{ 0, -1,  1,  2};
    pnext[2] = '{-1,  3, -1,  2};
    pnext[3] = '{-1,  3, -1,  4};
    pnext[4] = '{-1,  5, -1,  4};
    pnext[5] = '{-1,  5, -1,  6};
    pnext[6] = '{-1,  7,  1,  6};
    pnext[7] = '{ 0,  7, -1,  6};
    pnext[8] = '{-1,  8, -1,  9};
    pnext[9] = '{-1,  7, -1,  9};
    py    = '{1, 1, 1, 0, 1, 0, 1, 1, 1, 0};
    pcode = '{3'b000, 3'b011, 3'b011, 3'b001, 3'b101,
              3'b100, 3'b110, 3'b110, 3'b000, 3'b010};
  end

  int ps = 0;  // reference state

  // ---------------- transition trace ----------------
  logic [2:0] trace [$];
  always @(qd_sh) trace.push_back(qd_sh);

  int n_double = 0, n_single = 0;
  int n_r01 = 0, n_r10 = 0, n_r20 = 0, n_r21 = 0;
  int n_y_fall = 0;

  function automatic bit one_bit(logic [2:0] a, logic [2:0] b);
    return $countones(a ^ b) == 1;
  endfunction

  function automatic bit seq_is(logic [2:0] exp0, logic [2:0] exp1,
                                logic [2:0] exp2);
    return trace.size() == 3 && trace[0] == exp0 && trace[1] == exp1
           && trace[2] == exp2;
  endfunction

  // apply one input change, settle, compare
  task automatic step(bit c_new, bit g_new);
    int nx;
    bit y_before;
    y_before = y;
    nx = pnext[ps][{c_new, g_new}];
    if (nx < 0) begin
      failures++;
      $display("FAIL: testbench applied unspecified change in P%0d", ps);
      return;
    end
    trace.delete();
    trace.push_back(qd_sh);
    clk  = c_new;
    gate = g_new;
    #0.25;
    // mechanisms, classified on the reference transition
    if (ps == 1 && nx == 2) n_double++;
    if (ps == 8 && nx == 9) n_single++;
    if (pcode[ps] == ST0 && pcode[nx] == ST1) begin
      n_r01++; checks++;
      if (!seq_is(ST0, ST6, ST1)) begin
        failures++; $display("FAIL: 0->1 not routed through 6 (%p)", trace);
      end
    end
    if (pcode[ps] == ST1 && pcode[nx] == ST0) begin
      n_r10++; checks++;
      if (!seq_is(ST1, ST6, ST0)) begin
        failures++; $display("FAIL: 1->0 not routed through 6 (%p)", trace);
      end
    end
    if (pcode[ps] == ST2 && pcode[nx] == ST0) begin
      n_r20++; checks++;
      if (!seq_is(ST2, ST5, ST0)) begin
        failures++; $display("FAIL: 2->0 not routed through 5 (%p)", trace);
      end
    end
    if (pcode[ps] == ST2 && pcode[nx] == ST1) begin
      n_r21++; checks++;
      if (!seq_is(ST2, ST6, ST1)) begin
        failures++; $display("FAIL: 2->1 not routed through 6 (%p)", trace);
      end
    end
    // every recorded step flips one bit
    for (int i = 1; i < trace.size(); i++) begin
      checks++;
      if (!one_bit(trace[i-1], trace[i])) begin
        failures++;
        $display("FAIL: multi-bit step %b -> %b", trace[i-1], trace[i]);
      end
    end
    ps = nx;
    checks++;
    if (q !== pcode[ps] || y !== py[ps] || qd_sh !== q || y_sh !== y) begin
      failures++;
      $display("FAIL t=%0t c=%b g=%b: q=%b y=%b (delayed copy q=%b y=%b), expected P%0d q=%b y=%b",
               $time, clk, gate, q, y, qd_sh, y_sh, ps, pcode[ps], py[ps]);
    end
    if (y_before && !y) n_y_fall++;
  endtask

  // watchdog
  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pulses_w1, pulses_w2;

  initial begin
    clk = 1'b0; gate = 1'b0; rst = 1'b1;
    #1 rst = 1'b0;
    #1;
    checks++;
    if (q !== ST0 || y !== 1'b1) begin
      failures++; $display("FAIL: not in state 0 after reset (q=%b)", q);
    end

    // ---- phase 1: the reference stimulus, times relative to t0 ----
    // 0.5 ns slots; clk toggles on whole ns, gate at 5.5/15.5/30.5/40.5
    begin
      automatic bit c = 0, g = 0;
      for (int slot = 1; slot <= 100; slot++) begin
        #0.25;  // (step adds another 0.25 ns)
        if (slot % 2 == 0) begin
          c = ~c;
          step(c, g);
        end else if (slot == 11 || slot == 31 || slot == 61 || slot == 81) begin
          g = ~g;
          step(c, g);
        end else begin
          #0.25;
        end
        if (slot == 11) n_y_fall = 0;
        if (slot == 31) pulses_w1 = n_y_fall;
        if (slot == 61) n_y_fall = 0;
        if (slot == 81) pulses_w2 = n_y_fall;
      end
    end
    checks++;
    if (pulses_w1 != 2) begin
      failures++; $display("FAIL: %0d pulses in window 1, expected 2", pulses_w1);
    end
    checks++;
    if (pulses_w2 != 1) begin
      failures++; $display("FAIL: %0d pulses in window 2, expected 1", pulses_w2);
    end

    // ---- phase 2: random single-input changes ----
    for (int n = 0; n < 4000; n++) begin
      automatic bit c_new = clk, g_new = gate;
      if ($urandom_range(0, 2) == 0) g_new = ~gate;
      else                            c_new = ~clk;
      if (pnext[ps][{c_new, g_new}] < 0) begin
        c_new = ~clk; g_new = gate;   // clk changes are always specified
      end
      step(c_new, g_new);
      #0.75;
    end

    // ---- mechanism coverage ----
    $display("double=%0d single=%0d reroute01=%0d reroute10=%0d reroute20=%0d reroute21=%0d",
             n_double, n_single, n_r01, n_r10, n_r20, n_r21);
    checks++; if (n_double == 0) begin failures++; $display("FAIL: no double pulse"); end
    checks++; if (n_single == 0) begin failures++; $display("FAIL: no single pulse"); end
    checks++; if (n_r01 == 0) begin failures++; $display("FAIL: no 0->1"); end
    checks++; if (n_r10 == 0) begin failures++; $display("FAIL: no 1->0"); end
    checks++; if (n_r20 == 0) begin failures++; $display("FAIL: no 2->0"); end
    checks++; if (n_r21 == 0) begin failures++; $display("FAIL: no 2->1"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
