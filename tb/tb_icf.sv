// tb_icf: self-checking testbench of the instant-configure unit. While
// enable is low q must equal d in the same clock; while it is high q must keep
// the value it had in the clock before enable rose.
module tb_icf;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, enable = 1'b0, q;
  int checks = 0, failures = 0;
  logic held;

  icf dut (.clk(clk), .rst_n(rst_n), .d(d), .enable(enable), .q(q));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    held = 1'b0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (t < 300) enable = ($urandom % 3 == 0);
      else         enable = ((t % 10) >= 3 && (t % 10) < 9);
      d = 1'($urandom);
      #1;
      checks++;
      if (q !== (enable ? held : d)) begin
        failures++;
        $display("cycle %0d: enable=%b d=%b q=%b expected %b", t, enable, d, q,
                 enable ? held : d);
      end
      held = q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
