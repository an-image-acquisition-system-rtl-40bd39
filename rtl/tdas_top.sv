// tdas_top: digital core of the two-dimensional data acquisition card.
//
// Two coordinate pulses from time-to-amplitude converters are digitised by
// two event-triggered 12-bit ADCs and counted into a 1024 x 1024 image of
// 16-bit words in an external 2 MB SRAM. The chain is:
//   comparators -> coincidence_logic -> start pulse to both ADCs
//   end of conversion -> adc_capture (ten MSBs of each result)
//   -> adc_data_shifter (resolution 1024^2 .. 128^2, pixel address)
//   -> histogram_fsm (read, +1, write: 4 cycles, 200 ns at 20 MHz)
//   -> mem_access_mux -> SRAM pins
// and isa_io_port + host_interface hold the I/O-loaded control flip-flops
// and let the PC read and clear the image while the histogrammer pauses.
//
// Throughput: a conversion takes about 800 ns and the result is stored in
// 200 ns while the next event's coincidence delay already runs, so the card
// takes up to about 1e6 events per second, bounded by the ADCs.
//
// All timing parameters count cycles of the single 20 MHz clock. The
// comparator, end-of-conversion and ISA strobe inputs are asynchronous and
// synchronised inside. The
// analog parts (comparators, ADCs) and the SRAM are outside this module.
// The card splits this logic over two CPLDs; the split is not reproduced.
// The per-event flags of the submodules (coincidence, miss, busy drop,
// timeout, stored, saturated) have no pin on the card and are left as named
// internal nets for observation in simulation, hence unused-signal lint
// warnings on them.
module tdas_top
  import tdas_pkg::*;
#(
  parameter int unsigned WINDOW_CYCLES  = 6,   // 300 ns coincidence window
  parameter int unsigned DELAY_CYCLES   = 11,  // 550 ns trigger delay
  parameter int unsigned TRIG_CYCLES    = 2,   // 100 ns ADC start pulse
  parameter int unsigned TIMEOUT_CYCLES = 40,  // 2 us conversion timeout
  parameter logic [9:0]  ISA_BASE       = 10'h300
) (
  input  logic                    clk,          // 20 MHz
  input  logic                    rst_n,
  // discriminator (comparator) outputs
  input  logic                    disc_x,
  input  logic                    disc_y,
  // the two ADCs
  output logic                    adc_start,    // to both converters
  input  logic [ADC_BITS-1:0]     adc_x_data,
  input  logic                    adc_x_eoc,
  input  logic [ADC_BITS-1:0]     adc_y_data,
  input  logic                    adc_y_eoc,
  // SRAM
  output mem_addr_t               sram_addr,
  output mem_data_t               sram_dq_out,
  output logic                    sram_dq_oe,
  input  mem_data_t               sram_dq_in,
  output logic                    sram_ce_n,
  output logic                    sram_oe_n,
  output logic                    sram_we_n,
  output logic                    sram_pins_oe,
  // ISA bus (I/O cycles only)
  input  logic [9:0]              isa_sa,
  input  logic                    isa_aen,
  input  logic                    isa_ior_n,
  input  logic                    isa_iow_n,
  input  logic [IO_DATA_BITS-1:0] isa_sd_in,
  output logic [IO_DATA_BITS-1:0] isa_sd_out,
  output logic                    isa_sd_oe,
  output logic                    isa_iocs16_n
);

  ctrl_t     ctrl;
  logic      adc_busy, trigger;
  logic      coinc, miss, busy_drop, timeout;
  logic      ev_valid, ev_ready;
  event_t    ev;
  mem_addr_t ev_addr;
  mem_data_t mem_rdata;
  sram_req_t hist_req, host_req;
  logic      hist_idle, stored, sat;
  logic      host_busy, pause, grant;
  logic [IO_ADDR_BITS-1:0] io_addr;
  logic                    io_wr, io_rd;
  logic [IO_DATA_BITS-1:0] io_wdata, io_rdata;

  // The histogrammer stops for the host and while acquisition is disabled;
  // the memory goes to the host once the histogrammer is idle.
  assign pause = ctrl.host_mode || host_busy || !ctrl.enable;
  assign grant = (ctrl.host_mode || host_busy) && hist_idle;

  coincidence_logic #(
    .WINDOW_CYCLES (WINDOW_CYCLES),
    .DELAY_CYCLES  (DELAY_CYCLES),
    .TRIG_CYCLES   (TRIG_CYCLES)
  ) u_coinc (
    .clk, .rst_n,
    .enable_i    (ctrl.enable),
    .disc_x_i    (disc_x),
    .disc_y_i    (disc_y),
    .adc_busy_i  (adc_busy),
    .trigger_o   (trigger),
    .coinc_o     (coinc),
    .miss_o      (miss),
    .busy_drop_o (busy_drop)
  );

  assign adc_start = trigger;

  adc_capture #(
    .TIMEOUT_CYCLES (TIMEOUT_CYCLES)
  ) u_capture (
    .clk, .rst_n,
    .trigger_i    (trigger),
    .adc_x_data_i (adc_x_data),
    .adc_x_eoc_i  (adc_x_eoc),
    .adc_y_data_i (adc_y_data),
    .adc_y_eoc_i  (adc_y_eoc),
    .adc_busy_o   (adc_busy),
    .ev_valid_o   (ev_valid),
    .ev_ready_i   (ev_ready),
    .ev_o         (ev),
    .timeout_o    (timeout)
  );

  adc_data_shifter u_shift (
    .ev_i    (ev),
    .shift_i (ctrl.shift),
    .addr_o  (ev_addr)
  );

  histogram_fsm u_hist (
    .clk, .rst_n,
    .pause_i     (pause),
    .ev_valid_i  (ev_valid),
    .ev_ready_o  (ev_ready),
    .ev_addr_i   (ev_addr),
    .mem_rdata_i (mem_rdata),
    .req_o       (hist_req),
    .idle_o      (hist_idle),
    .stored_o    (stored),
    .sat_o       (sat)
  );

  isa_io_port #(
    .BASE_ADDR (ISA_BASE)
  ) u_isa (
    .clk, .rst_n,
    .sa_i       (isa_sa),
    .aen_i      (isa_aen),
    .ior_n_i    (isa_ior_n),
    .iow_n_i    (isa_iow_n),
    .sd_i       (isa_sd_in),
    .sd_o       (isa_sd_out),
    .sd_oe_o    (isa_sd_oe),
    .iocs16_n_o (isa_iocs16_n),
    .io_addr_o  (io_addr),
    .io_wr_o    (io_wr),
    .io_rd_o    (io_rd),
    .io_wdata_o (io_wdata),
    .io_rdata_i (io_rdata)
  );

  host_interface u_host (
    .clk, .rst_n,
    .io_addr_i   (io_addr),
    .io_wr_i     (io_wr),
    .io_rd_i     (io_rd),
    .io_wdata_i  (io_wdata),
    .io_rdata_o  (io_rdata),
    .ctrl_o      (ctrl),
    .acq_busy_i  (adc_busy),
    .grant_i     (grant),
    .host_busy_o (host_busy),
    .req_o       (host_req),
    .mem_rdata_i (mem_rdata)
  );

  mem_access_mux u_mux (
    .enable_i     (ctrl.enable),
    .host_sel_i   (grant),
    .hist_req_i   (hist_req),
    .host_req_i   (host_req),
    .sram_addr_o  (sram_addr),
    .sram_dq_o    (sram_dq_out),
    .sram_dq_oe_o (sram_dq_oe),
    .sram_dq_i    (sram_dq_in),
    .sram_ce_n_o  (sram_ce_n),
    .sram_oe_n_o  (sram_oe_n),
    .sram_we_n_o  (sram_we_n),
    .pins_oe_o    (sram_pins_oe),
    .rdata_o      (mem_rdata)
  );

  // The coincidence stage only starts the converters when they are free.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $rose(trigger) |-> !$past(adc_busy))
    else $error("ADC start while the converters were busy");

endmodule
