// tb_sr_latch: checks the set/reset latch against its behaviour table.
//
// Random sequences of (rst, s, r) are applied; a reference bit updated by
// the table (s=1,r=0 sets; r=1 clears; s=r=0 holds; rst clears; reset wins
// over set) is compared with q after each change. Holding is checked
// explicitly by applying s=r=0 after both a set and a reset.
`timescale 1ns/10ps
module tb_sr_latch;
  logic rst, s, r, q;
  sr_latch dut (.rst(rst), .s(s), .r(r), .q(q));

  int checks = 0, failures = 0;
  bit ref_q;

  task automatic apply(bit rst_i, bit s_i, bit r_i);
    rst = rst_i; s = s_i; r = r_i;
    #1;
    if (rst_i || r_i) ref_q = 1'b0;
    else if (s_i)     ref_q = 1'b1;
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL rst=%b s=%b r=%b: q=%b expected %b", rst_i, s_i, r_i, q, ref_q);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(1, 0, 0);
    // application table: 0->0, 0->1, 1->1, 1->0, with holds in between
    apply(0, 0, 0);
    apply(0, 1, 0);
    apply(0, 0, 0);
    apply(0, 1, 0);
    apply(0, 0, 1);
    apply(0, 0, 0);
    apply(0, 0, 1);
    apply(0, 1, 0);
    apply(1, 1, 0);   // rst overrides set
    apply(0, 1, 0);
    apply(0, 1, 1);   // reset wins
    for (int n = 0; n < 500; n++)
      apply($urandom_range(0, 9) == 0, 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
