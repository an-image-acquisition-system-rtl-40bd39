// isa_io_port: connects the card's registers to the PC's ISA bus.
//
// The PC reaches the card only through I/O instructions. This block decodes
// the card's I/O address range on SA (with AEN low, i.e. not a DMA cycle),
// brings the asynchronous IOR#/IOW# strobes into the 20 MHz clock domain with
// two-flop synchronisers and turns each bus cycle into one-cycle strobes
// for host_interface:
//   write: the register offset and SD are latched when the synchronised
//          IOW# is seen low (100..150 ns into the cycle, long after ISA data
//          are valid) and io_wr_o pulses at that moment;
//   read:  SD is driven (sd_oe_o) for as long as IOR# is low and the address
//          decodes, straight from the combinational register read data, and
//          io_rd_o pulses only when the synchronised IOR# goes high again,
//          so side effects of a read (address increment, next word fetched)
//          never change the word while the PC is still sampling it.
// iocs16_n_o tells the bus that the card answers 16-bit I/O cycles.
//
// That the card sits on the ISA bus and is driven by I/O instructions
// follows the description. The base address, the 16-bit data path, the
// eight-port range and the synchroniser scheme are this design's choices.
// An ISA I/O cycle must keep IOR#/IOW# low for at least 4 clock cycles
// (200 ns), which standard ISA timing exceeds.
module isa_io_port
  import tdas_pkg::*;
#(
  parameter logic [9:0] BASE_ADDR = 10'h300   // 8 ports, BASE_ADDR..+7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // ISA bus
  input  logic [9:0]              sa_i,
  input  logic                    aen_i,
  input  logic                    ior_n_i,
  input  logic                    iow_n_i,
  input  logic [IO_DATA_BITS-1:0] sd_i,
  output logic [IO_DATA_BITS-1:0] sd_o,
  output logic                    sd_oe_o,
  output logic                    iocs16_n_o,
  // register side
  output logic [IO_ADDR_BITS-1:0] io_addr_o,
  output logic                    io_wr_o,
  output logic                    io_rd_o,
  output logic [IO_DATA_BITS-1:0] io_wdata_o,
  input  logic [IO_DATA_BITS-1:0] io_rdata_i
);

  logic       hit;        // address decodes to this card
  logic [2:0] sr, sw;     // synchronisers (active-high strobes)
  logic       rd_cycle;   // a read of this card is in progress
  logic [IO_ADDR_BITS-1:0] rd_addr_q, wr_addr_q;

  assign hit = !aen_i && (sa_i[9:IO_ADDR_BITS] == BASE_ADDR[9:IO_ADDR_BITS]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0;
      sw <= '0;
    end else begin
      sr <= {sr[1:0], !ior_n_i};
      sw <= {sw[1:0], !iow_n_i};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cycle   <= 1'b0;
      rd_addr_q  <= '0;
      wr_addr_q  <= '0;
      io_wdata_o <= '0;
      io_wr_o    <= 1'b0;
      io_rd_o    <= 1'b0;
    end else begin
      io_wr_o <= 1'b0;
      io_rd_o <= 1'b0;
      // start of a write: latch offset and data, strobe once
      if (sw[1] && !sw[2] && hit) begin
        wr_addr_q  <= sa_i[IO_ADDR_BITS-1:0];
        io_wdata_o <= sd_i;
        io_wr_o    <= 1'b1;
      end
      // start of a read: remember the offset; strobe at its end
      if (sr[1] && !sr[2] && hit) begin
        rd_cycle  <= 1'b1;
        rd_addr_q <= sa_i[IO_ADDR_BITS-1:0];
      end
      if (!sr[1] && sr[2] && rd_cycle) begin
        rd_cycle <= 1'b0;
        io_rd_o  <= 1'b1;
      end
    end
  end

  // The strobes use the latched offsets; otherwise, during a read, the live
  // bus address selects the register that drives SD.
  always_comb begin
    if (io_rd_o)               io_addr_o = rd_addr_q;
    else if (!ior_n_i && hit)  io_addr_o = sa_i[IO_ADDR_BITS-1:0];
    else                       io_addr_o = wr_addr_q;
  end

  assign sd_o       = io_rdata_i;
  assign sd_oe_o    = !ior_n_i && hit;
  assign iocs16_n_o = !hit;

endmodule
