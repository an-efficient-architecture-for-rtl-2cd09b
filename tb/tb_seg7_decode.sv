// Testbench for seg7_decode.
//
// For each of the 16 digits the expected lit segments are listed by
// letter (a..g) and compared with the active-low output.
module tb_seg7_decode;

  logic [3:0] value = '0;
  logic [6:0] seg_n;
  int checks = 0;
  int failures = 0;

  seg7_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] lit(input string s);
    logic [6:0] m;
    m = '0;
    for (int i = 0; i < s.len(); i++) m[s[i] - "a"] = 1'b1;
    return m;
  endfunction

  initial begin
    string shapes [16];
    shapes = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
               "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    for (int v = 0; v < 16; v++) begin
      value = 4'(v);
      #1;
      checks++;
      if (seg_n !== ~lit(shapes[v])) begin
        failures++;
        $display("FAIL: digit %0d seg_n %b", v, seg_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
