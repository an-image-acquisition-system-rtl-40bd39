// tb_isa_io_port: self-checking test of the ISA I/O port.
//
// ISA I/O cycles with bus-like timing (address 100 ns before the strobe,
// strobe 400 ns low, not aligned to the 20 MHz clock) are applied. A stand-in
// register file answers reads with 0xC000 + 0x111 * offset. Checked: every
// write to the card gives exactly one write strobe with the right offset and
// data; writes to other addresses or with AEN high give none; a read puts the
// stand-in's word for the offset on SD while IOR# is low; the read strobe
// comes once, after IOR# has risen, with the read's offset; SD is not driven
// outside the card's reads.
module tb_isa_io_port
  import tdas_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [9:0]  sa = '0;
  logic        aen = 1'b0, ior_n = 1'b1, iow_n = 1'b1;
  logic [15:0] sd_in = '0, sd_out, io_wdata, io_rdata;
  logic        sd_oe, iocs16_n, io_wr, io_rd;
  logic [2:0]  io_addr;

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  logic [2:0]  last_wr_addr, last_rd_addr;
  logic [15:0] last_wr_data;
  realtime     t_rd, t_rise;

  always #25ns clk = ~clk;

  isa_io_port dut (
    .clk, .rst_n, .sa_i(sa), .aen_i(aen), .ior_n_i(ior_n), .iow_n_i(iow_n),
    .sd_i(sd_in), .sd_o(sd_out), .sd_oe_o(sd_oe), .iocs16_n_o(iocs16_n),
    .io_addr_o(io_addr), .io_wr_o(io_wr), .io_rd_o(io_rd),
    .io_wdata_o(io_wdata), .io_rdata_i(io_rdata)
  );

  assign io_rdata = 16'hC000 + 16'h0111 * 16'(io_addr);

  always @(posedge clk) if (rst_n) begin
    if (io_wr) begin n_wr++; last_wr_addr = io_addr; last_wr_data = io_wdata; end
    if (io_rd) begin n_rd++; last_rd_addr = io_addr; t_rd = $realtime; end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic isa_write(input logic [9:0] a, input logic [15:0] d, input bit dma);
    sa = a; aen = dma;
    #100ns sd_in = d;
    #13ns iow_n = 1'b0;
    #400ns iow_n = 1'b1;
    #30ns sa = 10'h3FF; sd_in = 16'hDEAD; aen = 1'b0;
    #($urandom_range(150, 400) * 1ns);
  endtask

  task automatic isa_read(input logic [9:0] a, output logic [15:0] d, output bit driven);
    bit all_driven = 1;
    sa = a;
    #100ns ior_n = 1'b0;
    repeat (8) begin
      #50ns;
      if (!sd_oe) all_driven = 0;
    end
    d = sd_out;
    #1ns ior_n = 1'b1;
    t_rise = $realtime;
    driven = all_driven;
    #30ns sa = 10'h3FF;
    #($urandom_range(250, 400) * 1ns);
  endtask

  initial begin
    #2ms;
    checks++; failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    bit drv;
    int w0, r0;
    #1ns rst_n = 1'b0;
    #112ns rst_n = 1'b1;
    #200ns;
    for (int i = 0; i < 100; i++) begin
      logic [2:0]  off = 3'($urandom);
      logic [15:0] val = 16'($urandom);
      w0 = n_wr;
      isa_write(10'h300 + 10'(off), val, 0);
      check(n_wr == w0 + 1 && last_wr_addr == off && last_wr_data == val,
            $sformatf("write %0d to offset %0d: %0d strobes, offset %0d data %h",
                      val, off, n_wr - w0, last_wr_addr, last_wr_data));
      check(n_rd == 0, "read strobe during writes");
    end
    // other addresses and DMA cycles are not ours
    w0 = n_wr;
    isa_write(10'h2F8, 16'h1234, 0);
    isa_write(10'h308, 16'h1234, 0);
    isa_write(10'h301, 16'h1234, 1);
    check(n_wr == w0, "write strobe for a cycle not addressed to the card");
    for (int i = 0; i < 100; i++) begin
      logic [2:0] off = 3'($urandom);
      r0 = n_rd;
      check(iocs16_n, "IOCS16# active while not addressed");
      isa_read(10'h300 + 10'(off), d, drv);
      check(drv, "SD not driven through the read");
      check(d == 16'hC000 + 16'h0111 * 16'(off),
            $sformatf("read offset %0d gave %h", off, d));
      check(n_rd == r0 + 1 && last_rd_addr == off,
            $sformatf("read offset %0d: %0d strobes, offset %0d", off, n_rd - r0, last_rd_addr));
      check(n_wr == w0, "write strobe during a read");
      check(t_rd > t_rise, "read strobe before IOR# went high");
    end
    // a read of another card does not drive SD
    sa = 10'h310;
    #100ns ior_n = 1'b0;
    #200ns check(!sd_oe && iocs16_n, "SD driven for another card's read");
    ior_n = 1'b1;
    #500ns;
    check(n_rd == 100, "read strobe for another card's read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
