// tb_postproc: self-checking testbench of termination and sign detection.
// Random frames (W = 4..30 bits, both signs, B zero in about a third of them)
// are driven in the link format. Checks the serial outputs every clock and,
// two clocks after each frame, the done_o pulse with b_zero_o and a_neg_o
// against the values. Counts terminated and negative results; each must occur.
module tb_postproc;
  import gcd_pkg::*;
  import gcd_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  link_t link_i = '0;
  logic start_o, a_o, b_o, done_o, b_zero_o, a_neg_o;
  int checks = 0, failures = 0, n_zero = 0, n_neg = 0, n_done = 0;

  postproc dut (.clk(clk), .rst_n(rst_n), .link_i(link_i), .start_o(start_o),
                .a_o(a_o), .b_o(b_o), .done_o(done_o), .b_zero_o(b_zero_o),
                .a_neg_o(a_neg_o));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    val_t a, b;
    int w, gap;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 300; f++) begin
      w = 4 + $urandom % 27;
      a = rand_val(w - 1, 1'b1);
      b = ($urandom % 3 == 0) ? '0 : rand_val(w - 1, 1'b1);
      if (b == 0) n_zero++;
      if (a < 0) n_neg++;
      gap = 3 + $urandom % 4;
      for (int p = 0; p < w + gap; p++) begin
        @(negedge clk);
        if (p < w + 2) link_i = link_at(a, b, p, p < w);
        else           link_i = link_t'($urandom) & 5'b01111;
        #1;
        check(start_o == (p < w) && a_o == link_i.a0 && b_o == link_i.b0,
              $sformatf("frame %0d pos %0d: serial outputs", f, p));
        check(done_o == (p == w + 1), $sformatf("frame %0d pos %0d: done_o=%b", f, p, done_o));
        if (p == w + 1) begin
          n_done++;
          check(b_zero_o == (b == 0) && a_neg_o == (a < 0),
                $sformatf("frame %0d: flags zero=%b neg=%b", f, b_zero_o, a_neg_o));
        end
      end
    end
    check(n_zero > 0 && n_neg > 0 && n_done == 300, "a detection never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
