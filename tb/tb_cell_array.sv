// tb_cell_array: self-checking testbench of the cell chain (20 cells, a relay
// buffer after every 4th). Random operand frames (W = 8..40, odd A, both
// signs) follow each other with the minimum spacing of NCELLS+4 idle clocks.
// The output of every frame is compared with 20 steps of the wide-integer
// model, including its arrival clock: one clock per shift cell, two per
// plus-minus cell, one per relay buffer. Counts shift, plus and minus steps
// and frames whose B reached zero inside the array.
module tb_cell_array;
  import gcd_pkg::*;
  import gcd_ref_pkg::*;

  localparam int N    = 20;
  localparam int BE   = 4;
  localparam int NFR  = 200;
  localparam int NCYC = NFR * (40 + N + 12) + 4 * N;

  logic clk = 1'b0, rst_n = 1'b0;
  link_t link_i, link_o;
  logic [N-1:0] mode_o, plus_o;

  link_t stim [NCYC];
  link_t resp [NCYC];
  val_t fa [NFR], fb [NFR];
  int   fw [NFR], ft0 [NFR];

  int checks = 0, failures = 0;
  int n_shift = 0, n_plus = 0, n_minus = 0, n_zero = 0;

  cell_array #(.NCELLS(N), .BUF_EVERY(BE)) dut (
    .clk(clk), .rst_n(rst_n), .link_i(link_i), .link_o(link_o),
    .mode_o(mode_o), .plus_o(plus_o));

  always #5 clk = ~clk;

  initial begin
    #5000000;
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
    int t, w, lat, nbuf;
    val_t a, b;
    bit pm, plus;
    nbuf = (N - 1) / BE;
    for (int i = 0; i < NCYC; i++) begin
      stim[i] = link_t'($urandom);
      stim[i].start = 1'b0;
    end
    t = 10;
    for (int f = 0; f < NFR; f++) begin
      w = 8 + $urandom % 33;
      rand_pair(w, a, b);
      if (f % 7 == 3) begin  // B a multiple of A: B reaches zero early
        b = a;
        repeat ($urandom % 4) b = b + a;
      end
      fa[f] = a; fb[f] = b; fw[f] = w; ft0[f] = t;
      stim[t-1].b1 = b[0];
      for (int p = 0; p < w + 2; p++) stim[t+p] = link_at(a, b, p, p < w);
      t += w + N + 4 + $urandom % 4;
    end
    link_i = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      link_i = (c < 9) ? '0 : stim[c];
      #1;
      resp[c] = link_o;
    end
    for (int f = 0; f < NFR; f++) begin
      a = fa[f]; b = fb[f]; w = fw[f]; t = ft0[f];
      lat = nbuf;
      for (int s = 0; s < N; s++) begin
        ref_step(a, b, pm, plus);
        lat += pm ? 2 : 1;
        if (!pm) n_shift++;
        else if (plus) n_plus++;
        else n_minus++;
      end
      if (b == 0) n_zero++;
      check(!resp[t+lat-1].start && resp[t+lat-1].b1 == b[0],
            $sformatf("frame %0d: clock before the output frame", f));
      for (int q = 0; q < w; q++)
        check(resp[t+lat+q] == link_at(a, b, q, 1'b1),
              $sformatf("frame %0d pos %0d: got %b expected %b", f, q,
                        resp[t+lat+q], link_at(a, b, q, 1'b1)));
      for (int q = w; q < w + 2; q++)
        check(resp[t+lat+q] == link_at(a, b, $bits(val_t) - 2, 1'b0),
              $sformatf("frame %0d tail %0d", f, q));
    end
    check(n_shift > 0 && n_plus > 0 && n_minus > 0 && n_zero > 0, "a mechanism never occurred");
    $display("shift %0d, plus %0d, minus %0d, B zero at output %0d", n_shift, n_plus, n_minus, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
