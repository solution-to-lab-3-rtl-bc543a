// tb_excitation_logic: checks the latch set/reset logic against the
// minimised flow table with its rerouted transitions.
//
// For every state code and every input combination the table specifies, the
// testbench applies the s/r outputs to the current code once (one latch
// step) and compares the result with the table's next code; it also checks
// that no latch ever sees s=r=1 and that each step flips at most one bit.
// It then iterates the step until the code is stable and compares with the
// stable state the flow table reaches (e.g. 0 --clk rises--> 6 --> 1).
module tb_excitation_logic;
  import gpf_pkg::*;
  logic       c, g;
  logic [2:0] q, s, r;
  excitation_logic dut (.c(c), .g(g), .q(q), .s(s), .r(r));

  int checks = 0, failures = 0;

  // final flow table: next state for inputs {c,g} = 00,01,11,10; -1 unspecified
  state_t codes [7] = '{ST0, ST1, ST2, ST3, ST4, ST5, ST6};
  int     nxt   [7][4] = '{
    '{ 0,  0,  6,  6},
    '{ 6,  3,  1,  1},
    '{ 5,  2,  2,  6},
    '{-1,  3,  4, -1},
    '{-1,  5,  4, -1},
    '{ 0,  5,  2, -1},
    '{ 0,  2,  6,  1}};
  bit cg_of [4][2] = '{'{0, 0}, '{0, 1}, '{1, 1}, '{1, 0}};

  function automatic logic [2:0] apply_sr(logic [2:0] cur, logic [2:0] s_i,
                                          logic [2:0] r_i);
    return (cur | s_i) & ~r_i;
  endfunction

  int n_steps = 0, n_reroutes = 0;

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int st = 0; st < 7; st++) begin
      for (int col = 0; col < 4; col++) begin
        int stable_idx;
        logic [2:0] cur;
        if (nxt[st][col] < 0) continue;
        c = cg_of[col][0];
        g = cg_of[col][1];
        // single step
        q = codes[st];
        #1;
        checks++;
        if ((s & r) != 3'b000) begin
          failures++;
          $display("FAIL state %0d in %b%b: s=r=1 on %b", st, c, g, s & r);
        end
        checks++;
        if (apply_sr(q, s, r) !== codes[nxt[st][col]]) begin
          failures++;
          $display("FAIL state %0d in %b%b: next %b expected %b (state %0d)",
                   st, c, g, apply_sr(q, s, r), codes[nxt[st][col]], nxt[st][col]);
        end
        checks++;
        if ($countones(apply_sr(q, s, r) ^ q) > 1) begin
          failures++;
          $display("FAIL state %0d in %b%b: multi-bit step", st, c, g);
        end
        n_steps++;
        // settle: follow the table to its stable state
        stable_idx = st;
        while (nxt[stable_idx][col] != stable_idx) stable_idx = nxt[stable_idx][col];
        if (stable_idx != nxt[st][col]) n_reroutes++;
        cur = codes[st];
        for (int k = 0; k < 4; k++) begin
          q = cur;
          #1;
          cur = apply_sr(cur, s, r);
        end
        checks++;
        if (cur !== codes[stable_idx]) begin
          failures++;
          $display("FAIL state %0d in %b%b: settles to %b expected %b",
                   st, c, g, cur, codes[stable_idx]);
        end
      end
    end
    checks++;
    if (n_reroutes < 4) begin
      failures++;
      $display("FAIL: only %0d rerouted transitions exercised", n_reroutes);
    end
    $display("steps=%0d rerouted=%0d", n_steps, n_reroutes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
