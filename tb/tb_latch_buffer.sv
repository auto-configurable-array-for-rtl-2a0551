// tb_latch_buffer: self-checking testbench of the serial-to-link buffer.
// Random serial streams and frame flags go in; every clock the link must show
// start and a0/b0 delayed by two clocks and a1/b1 delayed by one clock. Also
// checks that b1 carries bit 0 of B one clock before start rises.
module tb_latch_buffer;
  import gcd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_i = 1'b0, a_i = 1'b0, b_i = 1'b0;
  link_t link_o;
  logic [2:0] hist [0:2];   // {start, a, b} of the last three clocks
  int checks = 0, failures = 0, n_pre = 0;

  latch_buffer dut (.clk(clk), .rst_n(rst_n), .start_i(start_i), .a_i(a_i),
                    .b_i(b_i), .link_o(link_o));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_start;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) hist[i] = '0;
    prev_start = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // hist[0] holds the inputs of the previous clock, hist[1] two clocks ago
      start_i = ((t % 17) >= 3);
      a_i = 1'($urandom);
      b_i = 1'($urandom);
      #1;
      if (t >= 2) begin
        checks++;
        if (link_o.start !== hist[1][2] || link_o.a0 !== hist[1][1] ||
            link_o.b0 !== hist[1][0] || link_o.a1 !== hist[0][1] ||
            link_o.b1 !== hist[0][0]) begin
          failures++;
          $display("cycle %0d: link %b", t, link_o);
        end
        // pre-configuration: the clock before start rises
        if (hist[0][2] && !hist[1][2]) begin
          checks++;
          n_pre++;
          if (link_o.b1 !== hist[0][0]) failures++;
        end
      end
      hist[1] = hist[0];
      hist[0] = {start_i, a_i, b_i};
    end
    if (n_pre == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
