// mem_access_mux: shares the SRAM pins between the histogrammer and the host.
//
// Every memory pin (address bus, data bus, chip enable, output enable, write
// enable) is multiplexed: host_sel_i hands them to the host side, otherwise
// they belong to the histogram state machine. The strobes are turned into the
// chip's active-low levels here. When the global enable is off and the host
// does not hold the memory, pins_oe_o goes low: the pad drivers of the
// control pins and buses float (tristate), so nothing on the card can
// access the memory; the strobes are also held inactive.
//
// Multiplexing all pins and the tristate on global enable follow the
// description. This design's choices: the tristate is shown as a pad enable
// output (pins_oe_o, plus sram_dq_oe_o for the data bus) rather than as
// z-valued nets, and reads return the data bus to both sides.
// Purely combinational.
module mem_access_mux
  import tdas_pkg::*;
(
  input  logic      enable_i,     // global enable
  input  logic      host_sel_i,   // memory granted to the host
  input  sram_req_t hist_req_i,
  input  sram_req_t host_req_i,
  // SRAM pins
  output mem_addr_t sram_addr_o,
  output mem_data_t sram_dq_o,
  output logic      sram_dq_oe_o, // card drives the data bus
  input  mem_data_t sram_dq_i,
  output logic      sram_ce_n_o,
  output logic      sram_oe_n_o,
  output logic      sram_we_n_o,
  output logic      pins_oe_o,    // card drives address and control pins
  output mem_data_t rdata_o       // data bus towards both masters
);

  sram_req_t sel;

  always_comb begin
    pins_oe_o = enable_i || host_sel_i;
    sel       = host_sel_i ? host_req_i : hist_req_i;
    if (!pins_oe_o) sel = SRAM_IDLE;
    sram_addr_o  = sel.addr;
    sram_dq_o    = sel.wdata;
    sram_dq_oe_o = sel.dq_oe;
    sram_ce_n_o  = !sel.ce;
    sram_oe_n_o  = !sel.oe;
    sram_we_n_o  = !sel.we;
    rdata_o      = sram_dq_i;
  end

endmodule
