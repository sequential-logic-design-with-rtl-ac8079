// tb_next_position: exhaustive check of the next-position logic.
//
// Two copies are built, one that restarts after the last digit (even ID end)
// and one that stays on it (odd ID end). For every position and both levels of
// reset_n the outputs are compared with the rule written out independently:
// reset gives 0, positions 0..6 step by one, position 7 gives 0 or 7.
module tb_next_position;
  import lab2_pkg::*;

  int checks = 0, failures = 0;

  pos_t pos, nxt_wrap, nxt_hold;
  logic reset_n;

  next_position #(.WRAP_TO_FIRST(1'b1)) dut_wrap (.pos(pos), .reset_n(reset_n), .pos_next(nxt_wrap));
  next_position #(.WRAP_TO_FIRST(1'b0)) dut_hold (.pos(pos), .reset_n(reset_n), .pos_next(nxt_hold));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s pos=%0d reset_n=%0b: got %0d expected %0d", what, pos, reset_n, got, exp);
    end
  endtask

  initial begin
    for (int r = 0; r < 2; r++) begin
      for (int p = 0; p < 8; p++) begin
        int exp_wrap, exp_hold;
        pos = pos_t'(p);
        reset_n = r[0];
        #1;
        if (r == 0) begin
          exp_wrap = 0; exp_hold = 0;
        end else if (p < 7) begin
          exp_wrap = p + 1; exp_hold = p + 1;
        end else begin
          exp_wrap = 0; exp_hold = 7;
        end
        check("wrap", int'(nxt_wrap), exp_wrap);
        check("hold", int'(nxt_hold), exp_hold);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
