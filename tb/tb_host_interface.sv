// tb_host_interface: self-checking test of the host I/O registers and the
// host's memory access path.
//
// The block drives an SRAM model filled with a known pattern
// (word i holds i*7+3, low 16 bits). The testbench plays the PC: it writes
// and reads back CTRL, loads ADDR, reads DATA words in sequence (with and
// without clear on read) and writes DATA words, polling STATUS between
// accesses as slow ISA cycles would. Expected words come from the pattern
// formula. Also checked: a memory access ends within 6 clock cycles; no
// memory cycle happens before the memory is granted; the busy flag holds
// the request until the grant comes.
module tb_host_interface
  import tdas_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  io_addr = '0;
  logic        io_wr = 1'b0, io_rd = 1'b0;
  logic [15:0] io_wdata = '0, io_rdata;
  ctrl_t       ctrl;
  logic        hist_idle = 1'b1, grant, host_busy, acq_busy = 1'b0;
  sram_req_t   req;
  mem_data_t   rdata;

  int checks = 0, failures = 0;

  always #25ns clk = ~clk;

  assign grant = (ctrl.host_mode || host_busy) && hist_idle;

  host_interface dut (
    .clk, .rst_n, .io_addr_i(io_addr), .io_wr_i(io_wr), .io_rd_i(io_rd),
    .io_wdata_i(io_wdata), .io_rdata_o(io_rdata), .ctrl_o(ctrl),
    .acq_busy_i(acq_busy), .grant_i(grant), .host_busy_o(host_busy),
    .req_o(req), .mem_rdata_i(rdata)
  );

  sram_model mem (
    .addr(req.addr), .dq_in(req.wdata), .dq_out(rdata),
    .ce_n(!req.ce), .oe_n(!req.oe), .we_n(!req.we)
  );

  function automatic logic [15:0] pattern(input int i);
    return 16'(i * 7 + 3);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic io_write(input io_reg_e r, input logic [15:0] d);
    @(negedge clk);
    io_addr = r; io_wdata = d; io_wr = 1'b1;
    @(negedge clk);
    io_wr = 1'b0;
  endtask

  task automatic io_read(input io_reg_e r, output logic [15:0] d);
    @(negedge clk);
    io_addr = r; io_rd = 1'b1;
    #1ns d = io_rdata;
    @(negedge clk);
    io_rd = 1'b0;
  endtask

  // Wait for the access to finish, counting cycles.
  task automatic settle(input int limit);
    int n = 0;
    logic [15:0] st;
    do begin
      @(negedge clk);
      io_addr = REG_STATUS;
      #1ns st = io_rdata;
      n++;
    end while (st[0] && n < 100);
    check(n <= limit, $sformatf("memory access took %0d cycles, limit %0d", n, limit));
  endtask

  initial begin
    #5ms;
    checks++; failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    for (int i = 0; i < 4096; i++) mem.mem[i] = pattern(i);
    #113ns rst_n = 1'b1;
    #100ns;
    // control flip-flops
    io_write(REG_CTRL, 16'h0007);
    io_read(REG_CTRL, d);
    check(d == 16'h0007 && ctrl.enable && ctrl.shift == 2'd3 && !ctrl.host_mode,
          $sformatf("CTRL read %h", d));
    acq_busy = 1'b1;
    io_read(REG_STATUS, d);
    check(d[2] && !d[1] && !d[0], $sformatf("STATUS %h, expected acquisition busy only", d));
    acq_busy = 1'b0;
    // no memory access before the grant: histogrammer busy
    hist_idle = 1'b0;
    io_write(REG_CTRL, 16'h0008);      // host access, no clear
    io_write(REG_ADDR_HI, 16'h0000);
    io_write(REG_ADDR_LO, 16'h0010);
    repeat (10) begin
      @(negedge clk);
      check(!req.ce, "memory cycle without grant");
    end
    io_read(REG_STATUS, d);
    check(d[0] && !d[1], $sformatf("STATUS %h, expected pending, not granted", d));
    hist_idle = 1'b1;
    settle(6);
    io_read(REG_ADDR_LO, d);
    check(d == 16'h0010, "ADDR_LO read back");
    // sequential reads without clear
    for (int i = 16; i < 80; i++) begin
      io_read(REG_DATA, d);
      check(d == pattern(i), $sformatf("word %0d read %h, expected %h", i, d, pattern(i)));
      settle(6);
    end
    check(mem.mem[20] == pattern(20), "word changed by a plain read");
    // reads with clear
    io_write(REG_CTRL, 16'h0018);
    io_write(REG_ADDR_LO, 16'd100);
    settle(6);
    for (int i = 100; i < 164; i++) begin
      io_read(REG_DATA, d);
      check(d == pattern(i), $sformatf("word %0d read %h, expected %h", i, d, pattern(i)));
      settle(6);
      check(mem.mem[i] == 16'h0, $sformatf("word %0d not cleared", i));
    end
    check(mem.mem[164] == pattern(164), "word after the cleared block changed");
    // writes at a high address
    io_write(REG_ADDR_HI, 16'h000F);
    io_write(REG_ADDR_LO, 16'hFFF0);
    settle(6);
    for (int i = 0; i < 8; i++) begin
      io_write(REG_DATA, 16'hA500 + 16'(i));
      settle(6);
    end
    for (int i = 0; i < 8; i++)
      check(mem.mem[20'hFFFF0 + i] == 16'hA500 + 16'(i), $sformatf("written word %0d", i));
    io_read(REG_ADDR_LO, d);
    check(d == 16'hFFF8, $sformatf("address after writes %h", d));
    // read back what was written
    io_write(REG_CTRL, 16'h0008);
    io_write(REG_ADDR_LO, 16'hFFF0);
    settle(6);
    for (int i = 0; i < 8; i++) begin
      io_read(REG_DATA, d);
      check(d == 16'hA500 + 16'(i), $sformatf("read back word %0d: %h", i, d));
      settle(6);
    end
    // release the memory
    io_write(REG_CTRL, 16'h0001);
    @(negedge clk);
    check(!grant && !host_busy, "memory still held after host access ended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
