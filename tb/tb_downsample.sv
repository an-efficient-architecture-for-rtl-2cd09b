// Testbench for downsample with LENGTH = 2 and LENGTH = 8.
//
// Drives a new input value every clock and checks that each output holds
// for exactly LENGTH clocks, that out_valid marks the cycle each new value
// first appears, and that the value kept is the one present on the input
// in the last cycle of the count period.
module tb_downsample;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [13:0] din = '0;
  logic [13:0] dout2, dout8;
  logic v2, v8;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  downsample #(.DATA_W(14), .LENGTH(2)) dut2 (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout2), .out_valid(v2));
  downsample #(.DATA_W(14), .LENGTH(8)) dut8 (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout8), .out_valid(v8));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int t;
    int last2, last8, nv2, nv8;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // input at cycle t (after reset release) is 100 + t; the counter
    // reaches LENGTH-1 at cycles LENGTH-1, 2*LENGTH-1, ...
    nv2 = 0;
    nv8 = 0;
    for (t = 0; t < 64; t++) begin
      din = 14'(100 + t);
      @(posedge clk);
      #1;
      if ((t % 2) == 1) begin
        check(v2 && dout2 == 14'(100 + t), $sformatf("L2 t=%0d dout %0d", t, dout2));
        nv2++;
      end else begin
        check(!v2, $sformatf("L2 t=%0d spurious valid", t));
      end
      if ((t % 8) == 7) begin
        check(v8 && dout8 == 14'(100 + t), $sformatf("L8 t=%0d dout %0d", t, dout8));
        nv8++;
      end else begin
        check(!v8 && (t < 7 ? dout8 == 0 : dout8 == 14'(100 + (t / 8) * 8 - 1)),
              $sformatf("L8 t=%0d hold %0d", t, dout8));
      end
      @(negedge clk);
    end
    check(nv2 == 32 && nv8 == 8, "output rates 1/2 and 1/8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
