// Testbench for jitter_multi_pn.
//
// Shifts a counting sequence through the three registers and checks, for
// every 10-bit select value, that 1 picks the newest register, 2 the
// oldest and any other value the middle one. It then drives the select
// from an order-3 and an order-10 PN generator over one full period each
// and checks the share of each register: 1, P-2, 1 for period P (7 and 1023).
module tb_jitter_multi_pn;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_en = 1'b0;
  logic [31:0] din = '0;
  logic [9:0] sel = '0;
  logic [31:0] dout;
  logic [1:0] tap;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  jitter_multi_pn #(.DATA_W(32), .SEL_W(10)) dut (.*);

  logic [2:0] pn3;
  logic [9:0] pn10;
  logic pn_en = 1'b0;
  logic b3, b10;
  pn_generator #(.ORDER(3))  u_pn3  (.clk(clk), .rst_n(rst_n), .en(pn_en), .state(pn3),  .bit_out(b3));
  pn_generator #(.ORDER(10)) u_pn10 (.clk(clk), .rst_n(rst_n), .en(pn_en), .state(pn10), .bit_out(b10));

  initial begin
    repeat (20000) @(posedge clk);
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
    int cnt [3];
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      din = 32'hA000_0000 + 32'(i);
      shift_en = 1'b1;
    end
    @(negedge clk);
    shift_en = 1'b0;
    // a = ..02, b = ..01, c = ..00
    for (int v = 0; v < 1024; v++) begin
      logic [31:0] e;
      sel = 10'(v);
      #1;
      e = (v == 1) ? 32'hA000_0002 : (v == 2) ? 32'hA000_0000 : 32'hA000_0001;
      check(dout == e, $sformatf("sel %0d dout %h", v, dout));
    end
    // distribution over one PN period, order 3 then order 10
    for (int o = 0; o < 2; o++) begin
      int per;
      per = (o == 0) ? 7 : 1023;
      cnt = '{0, 0, 0};
      pn_en = 1'b1;
      for (int t = 0; t < per; t++) begin
        sel = (o == 0) ? 10'(pn3) : pn10;
        #1;
        cnt[tap]++;
        @(negedge clk);
      end
      check(cnt[0] == 1 && cnt[2] == 1 && cnt[1] == per - 2,
            $sformatf("period %0d shares %0d/%0d/%0d", per, cnt[0], cnt[1], cnt[2]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
