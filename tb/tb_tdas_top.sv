// tb_tdas_top: end-to-end test of the acquisition card at its default
// parameters (20 MHz clock, 300 ns window, 550 ns delay, 1024 x 1024 x 16
// image).
//
// Two ADC models and an SRAM model surround the card; the testbench plays
// both the detector (comparator pulses and the analog codes the ADCs will
// see) and the PC (I/O cycles). Each photon is given random 12-bit
// coordinates; the expected image is built in the testbench from those
// codes alone: ten MSBs, shifted by the resolution setting, row-packed.
//
// Host access uses ISA I/O cycles at the card's base address 0x300.
//
// Phases:
//   1  acquisition disabled: pulses must leave no trace
//   2  1024^2: single events, lone pulses (misses), events arriving while
//      the converters are busy (dropped), a converter that fails to answer
//      (timeout), and a burst at 1.0 us spacing that must be taken whole
//      (1e6 events/s); then the whole image (1 M words) is read and
//      cleared over the I/O port and compared word by word
//   3  host access in the middle of acquisition: the histogrammer pauses,
//      the waiting event is stored once the host lets go
//   4  128^2 (resolution switch) with a pixel preloaded to 0xFFFE by the
//      host, so that it saturates; the 16 K-word image is read and compared
//   5  512^2 image of a slit mask (photons on 16 evenly spaced columns),
//      read and compared
// Every mechanism (coincidence, miss, busy drop, timeout, pause, shift
// change, saturation, clear on read) is counted and must occur.
module tb_tdas_top
  import tdas_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b1;
  logic disc_x = 1'b0, disc_y = 1'b0;
  logic adc_start;
  logic [11:0] vin_x = '0, vin_y = '0, x_data, y_data;
  logic x_eoc, y_eoc, y_eoc_pin, kill_y = 1'b0;
  mem_addr_t sram_addr;
  mem_data_t dq_out, dq_in;
  logic dq_oe, ce_n, oe_n, we_n, pins_oe;
  logic [9:0]  isa_sa = '0;
  logic        isa_aen = 1'b0, isa_ior_n = 1'b1, isa_iow_n = 1'b1;
  logic [15:0] isa_sd_in = '0, isa_sd_out;
  logic        isa_sd_oe, isa_iocs16_n;
  localparam logic [9:0] BASE = 10'h300;

  int checks = 0, failures = 0;
  int unsigned ref_img [mem_addr_t];
  int exp_acc = 0, exp_miss = 0, exp_drop = 0, exp_timeout = 0;
  int n_coinc = 0, n_miss = 0, n_drop = 0, n_timeout = 0, n_stored = 0;
  int n_sat = 0, n_pause = 0, n_shift = 0, n_clear = 0, n_trig = 0;
  int cur_shift = 0;

  always #25ns clk = ~clk;

  adc_model adc_x (.start(adc_start), .vin_code(vin_x), .data(x_data), .eoc(x_eoc));
  adc_model adc_y (.start(adc_start), .vin_code(vin_y), .data(y_data), .eoc(y_eoc));
  assign y_eoc_pin = y_eoc && !kill_y;

  sram_model mem (
    .addr(sram_addr), .dq_in(dq_out), .dq_out(dq_in),
    .ce_n(ce_n || !pins_oe), .oe_n(oe_n || !pins_oe), .we_n(we_n || !pins_oe)
  );

  tdas_top dut (
    .clk, .rst_n, .disc_x, .disc_y,
    .adc_start, .adc_x_data(x_data), .adc_x_eoc(x_eoc),
    .adc_y_data(y_data), .adc_y_eoc(y_eoc_pin),
    .sram_addr, .sram_dq_out(dq_out), .sram_dq_oe(dq_oe), .sram_dq_in(dq_in),
    .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n), .sram_pins_oe(pins_oe),
    .isa_sa, .isa_aen, .isa_ior_n, .isa_iow_n, .isa_sd_in, .isa_sd_out,
    .isa_sd_oe, .isa_iocs16_n
  );

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.coinc)     n_coinc++;
    if (dut.miss)      n_miss++;
    if (dut.busy_drop) n_drop++;
    if (dut.timeout)   n_timeout++;
    if (dut.stored)    n_stored++;
    if (dut.sat)       n_sat++;
    if (dut.ev_valid && !dut.ev_ready && dut.pause && dut.ctrl.enable) n_pause++;
  end
  always @(posedge adc_start) n_trig++;

  // The data bus is never driven by card and memory at once.
  always @(posedge clk) if (rst_n && dq_oe && !oe_n && !ce_n) begin
    checks++; failures++;
    $display("FAIL: data bus contention at %0t", $realtime);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic mem_addr_t pixel(input logic [11:0] cx, input logic [11:0] cy,
                                      input int s);
    int side = 1024 >> s;
    return mem_addr_t'((int'(cy[11:2]) >> s) * side + (int'(cx[11:2]) >> s));
  endfunction

  // ---- detector side ----
  // Comparator pulses for one photon: X at +dx, Y at +dy (ns), 200 ns wide,
  // with the ADC inputs set to the photon's codes. Returns at once.
  task automatic photon(input logic [11:0] cx, input logic [11:0] cy,
                        input int dx, input int dy);
    vin_x = cx;
    vin_y = cy;
    fork
      begin #(dx * 1ns); disc_x = 1'b1; #200ns; disc_x = 1'b0; end
      begin #(dy * 1ns); disc_y = 1'b1; #200ns; disc_y = 1'b0; end
    join_none
  endtask

  task automatic accept(input logic [11:0] cx, input logic [11:0] cy,
                        input int dx, input int dy);
    mem_addr_t a = pixel(cx, cy, cur_shift);
    photon(cx, cy, dx, dy);
    exp_acc++;
    if (!ref_img.exists(a)) ref_img[a] = 0;
    if (ref_img[a] != 32'hFFFF) ref_img[a]++;
  endtask

  // ---- host side: ISA I/O cycles, 100 ns address setup, 400 ns strobe ----
  task automatic io_write(input io_reg_e r, input logic [15:0] d);
    isa_sa = BASE + 10'(r);
    #100ns isa_sd_in = d;
    #7ns isa_iow_n = 1'b0;
    #400ns isa_iow_n = 1'b1;
    #30ns isa_sa = 10'h3FF;
    #250ns;
  endtask

  task automatic io_read(input io_reg_e r, output logic [15:0] d);
    isa_sa = BASE + 10'(r);
    #100ns isa_ior_n = 1'b0;
    #400ns d = isa_sd_out;
    if (!isa_sd_oe) begin
      checks++; failures++;
      $display("FAIL: card did not drive SD on a read");
    end
    isa_ior_n = 1'b1;
    #30ns isa_sa = 10'h3FF;
    #250ns;
  endtask

  // The card's memory work must be over before the next ISA cycle.
  task automatic io_wait();
    logic [15:0] st;
    io_read(REG_STATUS, st);
    checks++;
    if (st[0]) begin
      failures++;
      $display("FAIL: host access still in progress one ISA cycle later");
    end
  endtask

  task automatic set_ctrl(input bit en, input int s, input bit host, input bit clr);
    if (s != cur_shift) n_shift++;
    cur_shift = s;
    io_write(REG_CTRL, 16'({clr, host, 2'(s), en}));
  endtask

  // Read (and clear) an N x N image from word 0 and compare it with the
  // reference; the reference is emptied.
  task automatic read_image(input int side);
    logic [15:0] d;
    int bad = 0;
    io_write(REG_ADDR_HI, 16'h0);
    io_write(REG_ADDR_LO, 16'h0);
    io_wait();
    for (int i = 0; i < side * side; i++) begin
      int unsigned e;
      e = ref_img.exists(mem_addr_t'(i)) ? ref_img[mem_addr_t'(i)] : 0;
      io_read(REG_DATA, d);
      if (d != 16'(e)) begin
        bad++;
        if (bad < 10) $display("FAIL: pixel %0d read %0d, expected %0d", i, d, e);
      end
      if (d != 0) n_clear++;
      if (i % 4096 == 0) io_wait();
    end
    checks += side * side;
    failures += bad;
    ref_img.delete();
  endtask

  initial begin
    #10s;
    checks++; failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int k;
    realtime t0;
    // reset edge, then start from an empty memory (power-up contents are
    // undefined; the pins are not driven until the host enables the card)
    #1ns rst_n = 1'b0;
    #4ns foreach (mem.mem[i]) mem.mem[i] = '0;
    mem.writes = 0;
    #108ns rst_n = 1'b1;
    #200ns;

    // 1: disabled
    photon(12'h100, 12'h200, 0, 50);
    #3us;
    check(n_coinc == 0 && n_trig == 0 && mem.writes == 0, "activity while disabled");

    // 2: full resolution
    set_ctrl(1, 0, 0, 0);
    #1us;
    for (int i = 0; i < 300; i++) begin
      int a = $urandom_range(0, 60), b = $urandom_range(0, 230);
      if (i % 2 == 0) accept(12'($urandom), 12'($urandom), a, a + b);
      else            accept(12'($urandom), 12'($urandom), a + b, a);
      #($urandom_range(1700, 4000) * 1ns);
    end
    // a few pixels hit many times
    for (int i = 0; i < 100; i++) begin
      accept(12'h7F0 + 12'(i % 3), 12'h3A5, 20, 40);
      #1700ns;
    end
    // lone pulses: partners too late, both edges miss
    for (int i = 0; i < 20; i++) begin
      photon(12'h0, 12'h0, 0, 500 + 20 * i);
      exp_miss += 2;
      #3us;
    end
    // an event while the converters are still busy is dropped
    for (int i = 0; i < 20; i++) begin
      accept(12'($urandom), 12'($urandom), 0, 30);
      #700ns;
      photon(vin_x, vin_y, 10, 10);
      exp_drop++;
      #3us;
    end
    // converter failure: the Y ADC never ends its conversion
    kill_y = 1'b1;
    photon(12'h111, 12'h222, 0, 0);
    exp_timeout++;
    #4us;
    kill_y = 1'b0;
    // burst at 1.0 us spacing (1e6 events per second)
    k = n_stored;
    t0 = $realtime;
    for (int i = 0; i < 500; i++) begin
      accept(12'($urandom), 12'($urandom), 0, 40);
      #1000ns;
    end
    #3us;
    check(n_stored - k == 500,
          $sformatf("burst at 1.0 us spacing: %0d of 500 events stored", n_stored - k));
    check(n_stored == exp_acc, $sformatf("stored %0d, expected %0d", n_stored, exp_acc));
    check(n_miss == exp_miss, $sformatf("misses %0d, expected %0d", n_miss, exp_miss));
    check(n_drop == exp_drop, $sformatf("busy drops %0d, expected %0d", n_drop, exp_drop));
    check(n_timeout == exp_timeout, $sformatf("timeouts %0d, expected %0d", n_timeout, exp_timeout));
    check(n_trig == exp_acc + exp_timeout, $sformatf("ADC starts %0d, expected %0d",
                                                     n_trig, exp_acc + exp_timeout));
    // read out and clear the whole 1024 x 1024 image
    set_ctrl(1, 0, 1, 1);
    read_image(1024);
    for (int i = 0; i < 1 << 20; i++)
      if (mem.mem[i] != 0) begin
        check(0, $sformatf("word %0d not cleared", i));
        break;
      end

    // 3: host access during acquisition
    set_ctrl(1, 0, 0, 0);
    accept(12'h404, 12'h808, 0, 0);
    @(posedge adc_start);
    set_ctrl(1, 0, 1, 0);              // host takes the memory mid-conversion
    #2us;
    check(dut.ev_valid && !dut.ev_ready, "event not held while the host owns the memory");
    io_read(REG_STATUS, d);
    check(d[1] && d[2], $sformatf("STATUS %h, expected granted and busy", d));
    photon(12'h111, 12'h111, 0, 0);    // refused: the waiting event blocks it
    exp_drop++;
    #2us;
    set_ctrl(1, 0, 0, 0);
    #1us;
    check(n_stored == exp_acc, "held event not stored after the host let go");

    // 4: 128 x 128 with a saturating pixel
    set_ctrl(1, 3, 1, 1);
    read_image(1024);                   // clears the event from phase 3
    io_write(REG_ADDR_HI, 16'h0);
    io_write(REG_ADDR_LO, 16'd555);
    io_wait();
    io_write(REG_DATA, 16'hFFFE);
    io_wait();
    ref_img[20'd555] = 32'hFFFE;
    set_ctrl(1, 3, 0, 1);
    #1us;
    for (int i = 0; i < 3; i++) begin
      // pixel 555 at 128^2: row 4, column 43
      accept(12'd43 << 5, 12'd4 << 5, 0, 10);
      #2us;
    end
    for (int i = 0; i < 400; i++) begin
      accept(12'($urandom), 12'($urandom), 15, 0);
      #($urandom_range(1100, 2000) * 1ns);
    end
    #3us;
    set_ctrl(1, 3, 1, 1);
    read_image(128);

    // 5: 512 x 512 image of a slit mask: photons only on 16 evenly spaced
    //    columns, a few codes wide
    set_ctrl(1, 1, 0, 1);
    #1us;
    for (int i = 0; i < 600; i++) begin
      int col = 128 + 256 * $urandom_range(0, 15) + $urandom_range(0, 16) - 8;
      accept(12'(col), 12'($urandom), 0, 25);
      #($urandom_range(1100, 2500) * 1ns);
    end
    #3us;
    set_ctrl(1, 1, 1, 1);
    read_image(512);

    set_ctrl(0, 1, 0, 0);
    #1us;
    check(!pins_oe, "memory pins driven with acquisition off and no host access");

    // every mechanism happened
    check(n_coinc > 0,   "no coincidence");
    check(n_miss > 0,    "no miss");
    check(n_drop > 0,    "no busy drop");
    check(n_timeout > 0, "no timeout");
    check(n_pause > 0,   "no pause for the host");
    check(n_shift > 0,   "no resolution change");
    check(n_sat == 2,    $sformatf("%0d saturations, expected 2", n_sat));
    check(n_clear > 0,   "no clear on read");
    $display("coincidences %0d, misses %0d, busy drops %0d, timeouts %0d, stored %0d",
             n_coinc, n_miss, n_drop, n_timeout, n_stored);
    $display("pause cycles %0d, resolution changes %0d, saturations %0d, words cleared %0d",
             n_pause, n_shift, n_sat, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
