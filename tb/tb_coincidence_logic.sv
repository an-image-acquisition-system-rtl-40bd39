// tb_coincidence_logic: self-checking test of the coincidence stage.
//
// A 20 MHz clock runs; pairs of comparator pulses are applied at arbitrary
// (not clock-aligned) times. For each pair the expected outcome is worked
// out from the pulse times alone: a pair whose edges are at most 300 ns
// apart must give exactly one trigger, 100 ns long, starting 550..600 ns
// after the first edge; a pair 400 ns apart or more must give none and be
// reported as a miss; a pair while the ADCs are busy or while the global
// enable is off must give none. A watchdog ends a hung run.
module tb_coincidence_logic;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, disc_x = 1'b0, disc_y = 1'b0, adc_busy = 1'b0;
  logic trigger, coinc, miss, busy_drop;

  int checks = 0, failures = 0;
  int n_trig = 0, n_miss = 0, n_drop = 0, n_coinc = 0;
  realtime t_rise, t_fall;

  always #25ns clk = ~clk;

  coincidence_logic dut (
    .clk, .rst_n,
    .enable_i(enable), .disc_x_i(disc_x), .disc_y_i(disc_y),
    .adc_busy_i(adc_busy), .trigger_o(trigger), .coinc_o(coinc),
    .miss_o(miss), .busy_drop_o(busy_drop)
  );

  always @(posedge trigger) begin n_trig++; t_rise = $realtime; end
  always @(negedge trigger) t_fall = $realtime;
  always @(posedge clk) if (rst_n) begin
    if (miss)      n_miss++;
    if (busy_drop) n_drop++;
    if (coinc)     n_coinc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply an X pulse at t0+dx and a Y pulse at t0+dy (ns), 200 ns wide,
  // then wait long enough for any trigger to be over.
  task automatic pair(input int dx, input int dy, input bit expect_trig,
                      input int expect_miss, input bit expect_drop);
    int t_tr, t_mi, t_dr, first;
    realtime t0;
    t_tr = n_trig; t_mi = n_miss; t_dr = n_drop;
    first = (dx < dy) ? dx : dy;
    t0 = $realtime;
    fork
      begin #(dx * 1ns); disc_x = 1'b1; #200ns; disc_x = 1'b0; end
      begin #(dy * 1ns); disc_y = 1'b1; #200ns; disc_y = 1'b0; end
    join
    #1500ns;
    check((n_trig - t_tr) == (expect_trig ? 1 : 0),
          $sformatf("dx=%0d dy=%0d: %0d triggers", dx, dy, n_trig - t_tr));
    check((n_miss - t_mi) == expect_miss,
          $sformatf("dx=%0d dy=%0d: miss count %0d", dx, dy, n_miss - t_mi));
    check((n_drop - t_dr) == (expect_drop ? 1 : 0),
          $sformatf("dx=%0d dy=%0d: busy drops %0d", dx, dy, n_drop - t_dr));
    if (expect_trig && n_trig != t_tr) begin
      realtime d;
      d = t_rise - (t0 + first * 1ns);
      check(d >= 549.5ns && d <= 600.5ns,
            $sformatf("dx=%0d dy=%0d: trigger delay %0t outside 550+/-50 ns", dx, dy, d));
      check((t_fall - t_rise) > 99.5ns && (t_fall - t_rise) < 100.5ns,
            $sformatf("trigger width %0t, expected 100 ns", t_fall - t_rise));
    end
  endtask

  initial begin
    #2ms;
    checks++;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #113ns rst_n = 1'b1;
    #100ns;
    // disabled: nothing happens
    pair(0, 0, 0, 0, 0);
    check(n_coinc == 0, "coincidence reported while disabled");
    enable = 1'b1;
    #200ns;
    // coincident pairs at various offsets and clock phases
    pair(0, 0, 1, 0, 0);
    pair(7, 13, 1, 0, 0);
    pair(120, 31, 1, 0, 0);
    pair(3, 253, 1, 0, 0);
    pair(260, 11, 1, 0, 0);
    for (int i = 0; i < 40; i++) begin
      int a, b;
      a = $urandom_range(0, 60);
      b = a + $urandom_range(0, 240);
      if (i % 2 == 0) pair(a, b, 1, 0, 0);
      else            pair(b, a, 1, 0, 0);
    end
    // pairs too far apart: lone edges time out, no trigger
    pair(0, 420, 0, 2, 0);
    pair(500, 0, 0, 2, 0);
    pair(0, 1000, 0, 2, 0);
    // a lone X pulse
    pair(0, 2000, 0, 2, 0);
    // ADCs busy when the trigger is due
    adc_busy = 1'b1;
    pair(10, 40, 0, 0, 1);
    adc_busy = 1'b0;
    pair(10, 40, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
