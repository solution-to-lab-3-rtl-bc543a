// tb_output_logic: checks the output decoder for every state code.
//
// The expected y of each code is taken from the state table (y low in the
// pulse states 3, 5, 6), not from the XOR equation. Code 111 is unused and
// not checked.
module tb_output_logic;
  import gpf_pkg::*;
  logic [2:0] q;
  logic       y;
  output_logic dut (.q(q), .y(y));

  int checks = 0, failures = 0;

  task automatic chk(state_t st, bit exp_y);
    q = st;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s (%b): y=%b expected %b", st.name(), st, y, exp_y);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(ST0, 1); chk(ST1, 1); chk(ST2, 1); chk(ST3, 0);
    chk(ST4, 1); chk(ST5, 0); chk(ST6, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
