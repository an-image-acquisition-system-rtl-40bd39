// tb_adc_capture: self-checking test of the ADC conversion tracker.
//
// Two ADC models (800 ns conversions, 100 ns end-of-conversion pulses) are
// started by the testbench's trigger. Each event's expected coordinates are
// the ten most significant bits of the codes applied to the models. Checked:
// the event handed over and its handshake (held while not ready), busy from
// trigger to hand-over, no restart while an event waits, the latency from
// the later end of conversion to valid (at most 4 cycles), and the timeout
// when one converter never answers.
module tb_adc_capture
  import tdas_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic trigger = 1'b0, ev_ready = 1'b0;
  logic [11:0] vin_x = '0, vin_y = '0, x_data, y_data;
  logic x_eoc, y_eoc, y_eoc_gated, kill_y = 1'b0;
  logic busy, ev_valid, timeout;
  event_t ev;

  int checks = 0, failures = 0, n_timeout = 0;

  always #25ns clk = ~clk;

  adc_model adc_x (.start(trigger), .vin_code(vin_x), .data(x_data), .eoc(x_eoc));
  adc_model adc_y (.start(trigger), .vin_code(vin_y), .data(y_data), .eoc(y_eoc));
  assign y_eoc_gated = y_eoc && !kill_y;

  adc_capture dut (
    .clk, .rst_n, .trigger_i(trigger),
    .adc_x_data_i(x_data), .adc_x_eoc_i(x_eoc),
    .adc_y_data_i(y_data), .adc_y_eoc_i(y_eoc_gated),
    .adc_busy_o(busy), .ev_valid_o(ev_valid), .ev_ready_i(ev_ready),
    .ev_o(ev), .timeout_o(timeout)
  );

  always @(posedge clk) if (rst_n && timeout) n_timeout++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fire();
    @(negedge clk) trigger = 1'b1;
    @(negedge clk);
    @(negedge clk) trigger = 1'b0;
  endtask

  // One event: apply codes, trigger, wait for valid, check, take it.
  task automatic one_event(input logic [11:0] cx, input logic [11:0] cy,
                           input int hold_cycles);
    realtime t_eoc;
    int waited;
    vin_x = cx; vin_y = cy;
    fire();
    check(busy, "busy not set after trigger");
    @(posedge x_eoc);
    t_eoc = $realtime;
    waited = 0;
    while (!ev_valid && waited < 100) begin @(posedge clk); waited++; end
    check(ev_valid, "no event after end of conversion");
    check(($realtime - t_eoc) <= 200.5ns,
          $sformatf("valid %0t after end of conversion", $realtime - t_eoc));
    check(ev.x == cx[11:2] && ev.y == cy[11:2],
          $sformatf("event x=%0d y=%0d, expected %0d %0d", ev.x, ev.y, cx[11:2], cy[11:2]));
    // no new conversion while the event waits
    repeat (hold_cycles) begin
      @(negedge clk);
      check(ev_valid && busy && ev.x == cx[11:2] && ev.y == cy[11:2],
            "event not held while not ready");
    end
    @(negedge clk) ev_ready = 1'b1;
    @(negedge clk) ev_ready = 1'b0;
    check(!ev_valid, "event still valid after it was taken");
    check(!busy, "still busy after the event was taken");
  endtask

  initial begin
    #1ms;
    failures++; checks++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #113ns rst_n = 1'b1;
    #100ns;
    check(!busy && !ev_valid, "busy or valid after reset");
    one_event(12'hFFF, 12'h000, 0);
    one_event(12'h003, 12'h7FC, 5);
    one_event(12'h800, 12'h801, 0);
    for (int i = 0; i < 50; i++)
      one_event(12'($urandom), 12'($urandom), $urandom_range(0, 8));
    // a trigger while an event waits is ignored
    vin_x = 12'h123; vin_y = 12'h456;
    fire();
    @(posedge ev_valid);
    vin_x = 12'hABC; vin_y = 12'hDEF;
    @(negedge clk);
    fire();
    #2us;
    check(ev_valid && ev.x == 10'(12'h123 >> 2) && ev.y == 10'(12'h456 >> 2),
          "waiting event overwritten by a second trigger");
    @(negedge clk) ev_ready = 1'b1;
    @(negedge clk) ev_ready = 1'b0;
    #2us;
    check(!ev_valid, "event appeared from an ignored trigger");
    // Y converter never answers: timeout, no event, busy released
    kill_y = 1'b1;
    fire();
    #3us;
    check(n_timeout == 1, $sformatf("%0d timeouts, expected 1", n_timeout));
    check(!ev_valid && !busy, "event or busy left after a timeout");
    kill_y = 1'b0;
    #1us;
    one_event(12'h555, 12'hAAA, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
