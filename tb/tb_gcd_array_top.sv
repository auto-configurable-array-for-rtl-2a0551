// tb_gcd_array_top: end-to-end testbench of the GCD coprocessor at its
// default size (150 cells, relay buffer every 8 cells) with 100-bit operands
// in 101-bit frames.
//
// A host model shifts each operand pair in, collects the returned frame and,
// while b_zero_o is not set, sends the returned A and B in again. Every pass
// is checked against the wide-integer model (zero stripping, exchange, 150
// reduction steps): frame length, every bit of A and B, the arrival clock
// (2 + relay buffers + one clock per shift cell + two per plus-minus cell),
// and the termination and sign flags. At the end |A| times the stripped power
// of two must equal the GCD computed by Euclid's algorithm.
// Counted mechanisms, each of which must occur: zero stripping, exchange,
// shift, plus and minus steps, passes ending with and without B = 0, pairs
// needing more than one pass, negative results.
module tb_gcd_array_top;
  import gcd_ref_pkg::*;

  localparam int N     = 150;   // defaults of gcd_array_top
  localparam int BE    = 8;
  localparam int NBITS = 100;
  localparam int NPAIR = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start_i = 1'b0, a_i = 1'b0, b_i = 1'b0;
  logic start_o, a_o, b_o, done_o, b_zero_o, a_neg_o;
  logic [N-1:0] mode_o, plus_o;

  int checks = 0, failures = 0;
  int n_strip = 0, n_swap = 0, n_shift = 0, n_plus = 0, n_minus = 0;
  int n_term = 0, n_cont = 0, n_multi = 0, n_neg = 0, n_pass = 0;
  int steps_total = 0, clocks_total = 0;
  int rnd_pairs = 0, rnd_steps = 0, rnd_shift = 0, rnd_pm = 0, rnd_one = 0;

  gcd_array_top dut (
    .clk(clk), .rst_n(rst_n), .start_i(start_i), .a_i(a_i), .b_i(b_i),
    .start_o(start_o), .a_o(a_o), .b_o(b_o), .done_o(done_o),
    .b_zero_o(b_zero_o), .a_neg_o(a_neg_o), .mode_o(mode_o), .plus_o(plus_o));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
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

  // One pass through the coprocessor: send (a, b) in a w-bit frame, return
  // the frame that comes back and the clock (counted from the first input
  // bit) at which it started.
  task automatic run_pass(input val_t a, input val_t b, input int w,
                          output val_t ra, output val_t rb, output int rw,
                          output int t_out, output bit zero, output bit neg);
    int t = 0, q = 0;
    bit seen_done = 1'b0;
    ra = '0; rb = '0; t_out = -1;
    while (!seen_done) begin
      @(negedge clk);
      start_i = (t < w);
      a_i = (t < w) ? a[t] : 1'($urandom);
      b_i = (t < w) ? b[t] : 1'($urandom);
      #1;
      if (start_o) begin
        if (q == 0) t_out = t;
        ra[q] = a_o;
        rb[q] = b_o;
        q++;
      end
      if (done_o) begin
        seen_done = 1'b1;
        zero = b_zero_o;
        neg  = a_neg_o;
      end
      t++;
      if (t > 20 * (w + 2 * N)) begin
        check(1'b0, "pass never finished");
        seen_done = 1'b1;
      end
    end
    rw = q;
    // sign-extend the returned frame
    if (rw > 0) begin
      ra = (ra << ($bits(val_t) - rw)) >>> ($bits(val_t) - rw);
      rb = (rb << ($bits(val_t) - rw)) >>> ($bits(val_t) - rw);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    val_t x, y, g, a, b, ea, eb, ra, rb;
    int w, k, lat, rw, t_out, npass, k0, stepsum;
    bit zero, neg, pm, plus;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int pr = 0; pr < NPAIR; pr++) begin
      // operands of at most NBITS bits, some with a common factor
      x = rand_val(NBITS, 1'b0);
      y = rand_val(NBITS, 1'b0);
      if (pr % 3 == 1) begin
        g = rand_val(1 + $urandom % 30, 1'b0) + 1;
        x = (rand_val(NBITS - 32, 1'b0) * g) << ($urandom % 3);
        y = (rand_val(NBITS - 32, 1'b0) * g) << ($urandom % 3);
      end
      if (x == 0) x = 1;
      if (pr == 5) y = '0;   // B already zero
      a = x; b = y; w = NBITS + 1; npass = 0; k0 = 0; stepsum = 0;
      zero = 1'b0;
      while (!zero && npass < 20) begin
        // model of this pass
        k = ctz(a | b);
        ea = a >>> k;
        eb = b >>> k;
        if (ea[0] == 1'b0) begin
          ea = b >>> k; eb = a >>> k;
          n_swap++;
        end
        if (k > 0) n_strip++;
        if (npass == 0) k0 = k;
        lat = 2 + (N - 1) / BE;
        for (int s = 0; s < N; s++) begin
          if (eb != 0) begin
            stepsum++;
            ref_step(ea, eb, pm, plus);
            if (pr % 3 != 1) begin
              if (pm) rnd_pm++;
              else rnd_shift++;
            end
          end else begin
            ref_step(ea, eb, pm, plus);
          end
          lat += pm ? 2 : 1;
          if (!pm) n_shift++;
          else if (plus) n_plus++;
          else n_minus++;
        end
        run_pass(a, b, w, ra, rb, rw, t_out, zero, neg);
        n_pass++;
        clocks_total += t_out + rw;
        check(rw == w - k, $sformatf("pair %0d pass %0d: frame length %0d, expected %0d",
                                     pr, npass, rw, w - k));
        check(ra == ea && rb == eb, $sformatf("pair %0d pass %0d: result differs", pr, npass));
        check(t_out == k + lat, $sformatf("pair %0d pass %0d: latency %0d, expected %0d",
                                          pr, npass, t_out - k, lat));
        check(zero == (eb == 0) && neg == (ea < 0),
              $sformatf("pair %0d pass %0d: flags", pr, npass));
        if (zero) n_term++;
        else n_cont++;
        a = ra; b = rb; w = rw;
        npass++;
      end
      if (npass > 1) n_multi++;
      if (a < 0) n_neg++;
      check(zero && ((absval(a) << k0) == gcd(x, y)),
            $sformatf("pair %0d: gcd %0h expected %0h", pr, absval(a) << k0, gcd(x, y)));
      steps_total += stepsum;
      if (pr % 3 != 1) begin
        rnd_pairs++;
        rnd_steps += stepsum;
        if (npass == 1) rnd_one++;
      end
    end
    $display("pairs %0d, passes %0d, average reduction steps per pair %0.1f (%0.2f per bit)",
             NPAIR, n_pass, real'(steps_total) / NPAIR, real'(steps_total) / NPAIR / NBITS);
    $display("pairs without a planted common factor: %0d; per bit %0.2f shift and %0.2f plus-minus steps; %0d of them in one pass",
             rnd_pairs, real'(rnd_shift) / rnd_pairs / NBITS, real'(rnd_pm) / rnd_pairs / NBITS, rnd_one);
    $display("average clocks per pair, first input bit to last result bit: %0.1f (%0.2f per bit)",
             real'(clocks_total) / NPAIR, real'(clocks_total) / NPAIR / NBITS);
    $display("stripped %0d, exchanged %0d, shift %0d, plus %0d, minus %0d",
             n_strip, n_swap, n_shift, n_plus, n_minus);
    $display("passes ending with B=0 %0d, without %0d, multi-pass pairs %0d, negative results %0d",
             n_term, n_cont, n_multi, n_neg);
    check(n_strip > 0, "zero stripping never happened");
    check(n_swap > 0, "exchange never happened");
    check(n_shift > 0 && n_plus > 0 && n_minus > 0, "a step kind never happened");
    check(n_term > 0 && n_cont > 0 && n_multi > 0, "multi-pass operation never happened");
    check(n_neg > 0, "negative result never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
