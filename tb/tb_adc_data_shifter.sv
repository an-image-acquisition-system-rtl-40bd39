// tb_adc_data_shifter: self-checking test of the resolution shifter.
//
// For every shift (1024^2, 512^2, 256^2, 128^2 pixels) corner values and
// random coordinates are applied; the expected address is computed
// arithmetically as (y >> s) * (1024 >> s) + (x >> s), and must also fall
// inside the first (1024 >> s)^2 words of the memory.
module tb_adc_data_shifter
  import tdas_pkg::*;
;
  event_t    ev;
  shift_t    shift;
  mem_addr_t addr;
  int checks = 0, failures = 0;

  adc_data_shifter dut (.ev_i(ev), .shift_i(shift), .addr_o(addr));

  task automatic try(input int x, input int y, input int s);
    int side, expected;
    ev.x = coord_t'(x);
    ev.y = coord_t'(y);
    shift = shift_t'(s);
    #1ns;
    side = 1024 >> s;
    expected = (y >> s) * side + (x >> s);
    checks++;
    if (int'(addr) != expected || int'(addr) >= side * side) begin
      failures++;
      $display("FAIL: x=%0d y=%0d shift=%0d addr=%0d expected %0d", x, y, s, addr, expected);
    end
  endtask

  initial begin
    #10ms;
    checks++; failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      try(0, 0, s);
      try(1023, 1023, s);
      try(1023, 0, s);
      try(0, 1023, s);
      try(7, 8, s);
      for (int i = 0; i < 2000; i++)
        try($urandom_range(0, 1023), $urandom_range(0, 1023), s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
