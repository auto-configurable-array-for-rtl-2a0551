// tb_relay_buffer: self-checking testbench of the pipeline buffer between
// cells: every link line must reappear unchanged one clock later.
module tb_relay_buffer;
  import gcd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  link_t link_i = '0, link_o, prev;
  int checks = 0, failures = 0;

  relay_buffer dut (.clk(clk), .rst_n(rst_n), .link_i(link_i), .link_o(link_o));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    prev = '0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      #1;
      checks++;
      if (link_o !== prev) begin
        failures++;
        $display("cycle %0d: got %b expected %b", t, link_o, prev);
      end
      link_i = link_t'($urandom);
      prev   = link_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
