// tb_gcd_cell: self-checking testbench of one reduction cell.
// A stream of random frames (W = 8..24, odd A, both signs) is built in the
// link format with pre-configuration bit, sign-extension tail and random idle
// clocks in between. The output is recorded every clock and compared with a
// wide-integer model of one step: output frame start after 1 clock (shift) or
// 2 clocks (plus-minus), W clocks long, new A on a0/a1, new B on b0/b1, new
// b0 on line b1 one clock before the frame, two clocks of sign bits after it,
// and mode_o/plus_o during the frame. Shift, plus and minus steps and
// negative results are counted and must each occur.
module tb_gcd_cell;
  import gcd_pkg::*;
  import gcd_ref_pkg::*;

  localparam int NFR  = 300;
  localparam int NCYC = NFR * 40 + 20;

  logic clk = 1'b0, rst_n = 1'b0;
  link_t link_i, link_o;
  logic mode_o, plus_o;

  link_t stim [NCYC];
  link_t resp [NCYC];
  logic  rmode [NCYC];
  logic  rplus [NCYC];

  int checks = 0, failures = 0;
  int n_shift = 0, n_plus = 0, n_minus = 0, n_neg = 0;

  gcd_cell dut (.clk(clk), .rst_n(rst_n), .link_i(link_i), .link_o(link_o),
                .mode_o(mode_o), .plus_o(plus_o));

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  val_t fa [NFR], fb [NFR];
  int   fw [NFR], ft0 [NFR];

  initial begin
    int t, w, lat;
    val_t a, b;
    bit pm, plus;
    // build the stimulus
    for (int i = 0; i < NCYC; i++) begin
      stim[i] = link_t'($urandom);
      stim[i].start = 1'b0;
    end
    t = 10;
    for (int f = 0; f < NFR; f++) begin
      w = 8 + $urandom % 17;
      rand_pair(w, a, b);
      if (f % 5 == 0) b = b * 2;  // make sure shifts happen
      fa[f] = a; fb[f] = b; fw[f] = w;
      stim[t-1].start = 1'b0;
      stim[t-1].b1 = b[0];
      ft0[f] = t;
      for (int p = 0; p < w + 2; p++) stim[t+p] = link_at(a, b, p, p < w);
      t += w + 2 + 2 + $urandom % 4;
    end
    // run
    link_i = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      link_i = (c < 9) ? '0 : stim[c];
      #1;
      resp[c]  = link_o;
      rmode[c] = mode_o;
      rplus[c] = plus_o;
    end
    // compare
    for (int f = 0; f < NFR; f++) begin
      a = fa[f]; b = fb[f]; w = fw[f]; t = ft0[f];
      ref_step(a, b, pm, plus);
      lat = pm ? 2 : 1;
      if (!pm) n_shift++;
      else if (plus) n_plus++;
      else n_minus++;
      if (a < 0 || b < 0) n_neg++;
      check(resp[t+lat-1].b1 == b[0], $sformatf("frame %0d: pre-configuration bit", f));
      check(!resp[t+lat-1].start, $sformatf("frame %0d: early start", f));
      for (int q = 0; q < w; q++) begin
        check(resp[t+lat+q] == link_at(a, b, q, 1'b1),
              $sformatf("frame %0d pos %0d: got %b expected %b (pm=%0d plus=%0d)",
                        f, q, resp[t+lat+q], link_at(a, b, q, 1'b1), pm, plus));
        check(rmode[t+q] == pm && (!pm || rplus[t+q] == plus),
              $sformatf("frame %0d pos %0d: configuration", f, q));
      end
      for (int q = w; q < w + 2; q++) begin
        check(resp[t+lat+q] == link_at(a, b, $bits(val_t) - 2, 1'b0),
              $sformatf("frame %0d tail %0d: got %b", f, q, resp[t+lat+q]));
      end
    end
    check(n_shift > 0 && n_plus > 0 && n_minus > 0 && n_neg > 0, "a step kind never occurred");
    $display("shift %0d, plus %0d, minus %0d, negative results %0d", n_shift, n_plus, n_minus, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
