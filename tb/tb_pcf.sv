// tb_pcf: self-checking testbench of the pre-configure unit. Random d and
// enable; a one-bit model (follow d while enable is low, hold otherwise) is
// compared with q every clock, and a frame-like pattern checks that the value
// of d one clock before enable rises is held for the whole enable window.
module tb_pcf;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, enable = 1'b0, q;
  int checks = 0, failures = 0;
  logic model;

  pcf dut (.clk(clk), .rst_n(rst_n), .d(d), .enable(enable), .q(q));

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
    model = 1'b0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (!enable) model = d;   // the clock edge just taken
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: q=%b expected %b", t, q, model);
      end
      if (t < 300) begin
        d      = 1'($urandom);
        enable = ($urandom % 3 == 0);
      end else begin
        // frames: d is the configuration in the clock before enable rises
        // and random noise while enable is high
        enable = ((t % 10) >= 2 && (t % 10) < 8);
        d      = 1'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
