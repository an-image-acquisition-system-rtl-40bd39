// tb_histogram_fsm: self-checking test of the read-increment-write machine.
//
// The machine drives an asynchronous SRAM model directly. Events with random
// addresses (many repeated, to hit the same pixel back to back) are offered
// on the valid/ready handshake; a reference histogram kept in the testbench
// is compared with the memory at the end. Also checked: a stream of
// back-to-back events costs exactly 4 clock cycles (200 ns) per event;
// with pause high no event is taken and idle is reported; a full counter
// (0xFFFF) stays full and is reported as saturated.
module tb_histogram_fsm
  import tdas_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pause = 1'b0, ev_valid = 1'b0, ev_ready, idle, stored, sat;
  mem_addr_t ev_addr = '0;
  mem_data_t rdata;
  sram_req_t req;

  int checks = 0, failures = 0, n_stored = 0, n_sat = 0;
  int unsigned ref_hist [mem_addr_t];

  always #25ns clk = ~clk;

  histogram_fsm dut (
    .clk, .rst_n, .pause_i(pause), .ev_valid_i(ev_valid), .ev_ready_o(ev_ready),
    .ev_addr_i(ev_addr), .mem_rdata_i(rdata), .req_o(req), .idle_o(idle),
    .stored_o(stored), .sat_o(sat)
  );

  sram_model mem (
    .addr(req.addr), .dq_in(req.wdata), .dq_out(rdata),
    .ce_n(!req.ce), .oe_n(!req.oe), .we_n(!req.we)
  );

  int t_first, t_last, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n) begin
    if (stored) begin
      n_stored++;
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
    end
    if (sat)    n_sat++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Offer one event and wait until it is taken.
  task automatic send(input mem_addr_t a);
    @(negedge clk);
    ev_valid = 1'b1;
    ev_addr  = a;
    do @(posedge clk); while (!ev_ready);
    #1ns;
    if (ref_hist.exists(a)) ref_hist[a] = (ref_hist[a] == 32'hFFFF) ? 32'hFFFF : ref_hist[a] + 1;
    else                    ref_hist[a] = 1;
    @(negedge clk);
    ev_valid = 1'b0;
  endtask

  initial begin
    #5ms;
    checks++; failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_addr_t a;
    int n0;
    #113ns rst_n = 1'b1;
    #100ns;
    check(idle, "not idle after reset");
    // isolated events
    for (int i = 0; i < 200; i++) send(mem_addr_t'($urandom_range(0, 15)));
    // back-to-back stream: valid held high, addresses change on each take
    wait (idle);
    @(negedge clk);
    n0 = n_stored;
    ev_valid = 1'b1;
    ev_addr  = 20'h00005;
    t_first  = -1;
    for (int i = 0; i < 400; i++) begin
      do @(posedge clk); while (!ev_ready);
      if (ref_hist.exists(ev_addr)) ref_hist[ev_addr]++;
      else                          ref_hist[ev_addr] = 1;
      #1ns ev_addr = (i % 3 == 0) ? ev_addr : mem_addr_t'($urandom_range(0, 20'hFFFFF));
    end
    ev_valid = 1'b0;
    wait (idle);
    @(negedge clk);
    check(n_stored - n0 == 400, $sformatf("%0d stored in the stream", n_stored - n0));
    check(t_last - t_first == 399 * 4,
          $sformatf("stream of 400 took %0d cycles between first and last store, expected %0d",
                    t_last - t_first, 399 * 4));
    // pause: finishes the event in hand, takes no new one
    send(20'h00100);
    pause = 1'b1;
    @(negedge clk);
    ev_valid = 1'b1;
    ev_addr  = 20'h00101;
    repeat (20) begin
      @(negedge clk);
      check(!ev_ready, "event taken while paused");
    end
    check(idle && !req.ce, "memory not released while paused");
    pause = 1'b0;
    do @(posedge clk); while (!ev_ready);
    ref_hist[20'h00101] = 1;
    @(negedge clk) ev_valid = 1'b0;
    // saturation
    mem.mem[20'h00200] = 16'hFFFE;
    ref_hist[20'h00200] = 16'hFFFE;
    send(20'h00200);
    send(20'h00200);
    send(20'h00200);
    wait (idle);
    repeat (2) @(negedge clk);
    check(n_sat == 2, $sformatf("%0d saturations, expected 2", n_sat));
    // compare the whole reference histogram
    foreach (ref_hist[k])
      check(mem.mem[k] == 16'(ref_hist[k]),
            $sformatf("pixel %0h holds %0d, expected %0d", k, mem.mem[k], ref_hist[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
