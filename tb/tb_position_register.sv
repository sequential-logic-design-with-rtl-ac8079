// tb_position_register: the 3-bit position register.
//
// Random values are put on d between clock edges; after each rising edge q
// must equal the value d held at that edge, and a change of d away from an
// edge (including at the falling edge) must not reach q.
module tb_position_register;
  int checks = 0, failures = 0;

  logic       clock = 1'b0;
  logic [2:0] d, q, expected;

  position_register #(.POS_W(3)) dut (.clock(clock), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      d = 3'($urandom);
      #5 expected = d;
      clock = 1'b1;
      #1 check("after rising edge");
      d = 3'($urandom);          // change between edges: must be ignored
      #4 clock = 1'b0;
      #1 check("after falling edge");
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
