// tb_seg7_lut_8: self-checking test of the eight-digit hex display decoder.
//
// Reference segment patterns are written here as the list of lit segments of
// each hex digit (letters a..g); every digit of every display is checked for
// all 16 values, plus random 32-bit words, with the active-low polarity.
module tb_seg7_lut_8;
  logic [31:0] value;
  logic [7:0][6:0] seg;

  int checks = 0, failures = 0;
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  seg7_lut_8 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] pattern(int d);
    logic [6:0] p = '1;
    for (int i = 0; i < lit[d].len(); i++) p[lit[d][i] - "a"] = 1'b0;
    return p;
  endfunction

  task automatic check_all();
    #1;
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seg[k] !== pattern(int'(value[4*k +: 4]))) begin
        failures++;
        $display("FAIL value %h digit %0d: got %b expected %b", value, k, seg[k],
                 pattern(int'(value[4*k +: 4])));
      end
    end
  endtask

  initial begin
    for (int d = 0; d < 16; d++) begin
      value = {8{4'(d)}};
      check_all();
    end
    value = 32'h0123_4567; check_all();
    value = 32'h89AB_CDEF; check_all();
    for (int n = 0; n < 50; n++) begin
      value = $urandom;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
