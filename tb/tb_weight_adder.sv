// tb_weight_adder: checks the registered modulo-2^W adder: the sum of
// random operands must appear one clock later, wrap around past 2^W, and
// hold while en is low.
`timescale 1ns/1ps
module tb_weight_adder;
  localparam int unsigned W = 10;

  logic         clk = 1'b0;
  logic         en;
  logic [W-1:0] sum_in, weight, sum_out;

  weight_adder #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wrap = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp_v;
    en = 1'b1; sum_in = '0; weight = '0;
    @(negedge clk);
    exp_v = 0;
    for (int i = 0; i < 2000; i++) begin
      en     = ($urandom_range(4, 0) != 0);
      sum_in = W'($urandom);
      weight = W'($urandom);
      if (en) begin
        if (int'(sum_in) + int'(weight) >= (1 << W)) n_wrap++;
        exp_v = (int'(sum_in) + int'(weight)) % (1 << W);
      end
      @(negedge clk);
      checks++;
      if (int'(sum_out) != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL: sum %0d expected %0d", sum_out, exp_v);
      end
    end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL: no wrap-around"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
