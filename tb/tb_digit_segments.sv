// tb_digit_segments: position -> segment lookup for two IDs.
//
// Builds the decoder for A00123456 and A01234567 and, for all eight
// positions, compares the segments with a reference: the ID digits listed by
// hand and the active-low a..g pattern of each decimal digit, written here
// as lit-segment strings and turned into bits.
module tb_digit_segments;
  import lab2_pkg::*;

  int checks = 0, failures = 0;

  pos_t pos;
  seg_t seg_a, seg_b;

  digit_segments #(.ID(32'h0012_3456)) dut_a (.pos(pos), .seg(seg_a));
  digit_segments #(.ID(32'h0123_4567)) dut_b (.pos(pos), .seg(seg_b));

  // Segments lit for each decimal digit (standard seven-segment shapes).
  string lit [10] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg",
                      "acdfg", "acdefg", "abc", "abcdefg", "abcdfg"};
  int digits_a [8] = '{0, 0, 1, 2, 3, 4, 5, 6};
  int digits_b [8] = '{0, 1, 2, 3, 4, 5, 6, 7};

  function automatic logic [6:0] pattern(input int digit);
    logic [6:0] p = 7'h7f;
    for (int i = 0; i < lit[digit].len(); i++)
      p[6 - (lit[digit][i] - "a")] = 1'b0;   // a = bit 6 ... g = bit 0
    return p;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 8; p++) begin
      pos = pos_t'(p);
      #1;
      checks += 2;
      if (seg_a !== pattern(digits_a[p])) begin
        failures++;
        $display("FAIL ID A00123456 pos %0d: got %h expected %h", p, seg_a, pattern(digits_a[p]));
      end
      if (seg_b !== pattern(digits_b[p])) begin
        failures++;
        $display("FAIL ID A01234567 pos %0d: got %h expected %h", p, seg_b, pattern(digits_b[p]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
