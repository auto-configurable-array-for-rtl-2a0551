// tb_feeder: self-checking testbench of the preprocessing feeder.
// Random operand pairs (W = 6..20 bits, two's complement, with random common
// trailing zeros) are shifted in LSB first. For each pair the output frame
// must start after exactly k = ctz(A|B) clocks, last W-k clocks, carry the
// stripped operands with the odd one on a_o, and be followed by the sign bits.
// An all-zero pair must produce no frame. Counts frames with stripping and
// with an exchange, and fails if either never happened.
module tb_feeder;
  import gcd_ref_pkg::*;

  localparam int NPAIRS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_i = 1'b0, a_i = 1'b0, b_i = 1'b0;
  logic start_o, a_o, b_o;
  int checks = 0, failures = 0, n_strip = 0, n_swap = 0;

  feeder dut (.clk(clk), .rst_n(rst_n), .start_i(start_i), .a_i(a_i), .b_i(b_i),
              .start_o(start_o), .a_o(a_o), .b_o(b_o));

  always #5 clk = ~clk;

  initial begin
    #400000;
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
    val_t a, b, ea, eb;
    int w, k, gap;
    bit swap, zero;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NPAIRS; f++) begin
      w = 6 + $urandom % 15;
      a = rand_val(w, 1'b0);
      b = rand_val(w, 1'b0);
      k = $urandom % (w / 2);
      a = (a >> k) << k;
      b = (b >> k) << k;
      if (f == 7) begin a = '0; b = '0; end
      // sign-extend from bit w-1
      a = (a << ($bits(val_t) - w)) >>> ($bits(val_t) - w);
      b = (b << ($bits(val_t) - w)) >>> ($bits(val_t) - w);
      zero = (a == 0 && b == 0);
      if (!zero) begin
        k    = ctz(a | b);
        ea   = a >>> k;
        eb   = b >>> k;
        swap = (ea[0] == 1'b0);
        if (swap) begin ea = b >>> k; eb = a >>> k; end
        if (k > 0) n_strip++;
        if (swap) n_swap++;
      end
      for (int p = 0; p < w + 3; p++) begin
        @(negedge clk);
        start_i = (p < w);
        a_i = (p < w) ? a[p] : 1'($urandom);
        b_i = (p < w) ? b[p] : 1'($urandom);
        #1;
        if (zero) begin
          check(start_o == 1'b0, $sformatf("pair %0d: frame for zero operands", f));
        end else if (p < w) begin
          check(start_o == (p >= k), $sformatf("pair %0d pos %0d: start_o=%b", f, p, start_o));
          if (p >= k) begin
            check(a_o == ea[p-k], $sformatf("pair %0d pos %0d: a_o", f, p));
            check(b_o == eb[p-k], $sformatf("pair %0d pos %0d: b_o", f, p));
          end
        end else begin
          check(start_o == 1'b0, $sformatf("pair %0d: start_o after frame", f));
          check(a_o == ea[w-1-k] && b_o == eb[w-1-k],
                $sformatf("pair %0d: sign after frame", f));
        end
      end
      gap = $urandom % 3;
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
        start_i = 1'b0;
      end
    end
    check(n_strip > 0, "no pair had common trailing zeros");
    check(n_swap > 0, "no pair needed an exchange");
    $display("stripped %0d, exchanged %0d of %0d pairs", n_strip, n_swap, NPAIRS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
