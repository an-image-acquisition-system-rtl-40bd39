// host_interface: the PC's window into the card, over ISA I/O cycles.
//
// The host controls the card with I/O instructions that load D flip-flops:
// global enable, resolution shift and a memory-access flag (see tdas_pkg
// for the register map). To read the image the host sets the access flag;
// the histogrammer finishes the event in hand and pauses, and once the
// memory is granted (grant_i) the host owns the SRAM address and data buses.
// It then loads ADDR and reads DATA word after word: each DATA read returns
// the word at ADDR, optionally writes zero back (clear on read, so the image
// is reset as it is read), and moves ADDR on by one. A DATA write stores a
// word the same way.
//
// ISA cycles are far slower than the 20 MHz clock, so the memory work runs
// behind the bus: the word for the next DATA read is fetched ahead, right
// after an ADDR write or the previous DATA access. An access needs at most
// six clock cycles (300 ns); STATUS[0] shows one still in progress, and a
// host that respects ISA timing never sees it set. Memory cycles wait for
// grant_i, and while any is pending the histogrammer is kept paused.
//
// Following the description: I/O-loaded control flip-flops for enable,
// memory access and ADC shift; host read-out and reset of the memory while
// the state machine pauses. This design's choices: the register map, the
// auto-incrementing address, clear-on-read and read-ahead. The io_* strobes
// are one-cycle pulses in the clock domain, made from the ISA bus cycles by
// isa_io_port; a read strobe comes after the PC has sampled the data.
// io_rdata_o is a combinational function of io_addr_i.
module host_interface
  import tdas_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // I/O port, one-cycle strobes
  input  logic [IO_ADDR_BITS-1:0] io_addr_i,
  input  logic                    io_wr_i,
  input  logic                    io_rd_i,
  input  logic [IO_DATA_BITS-1:0] io_wdata_i,
  output logic [IO_DATA_BITS-1:0] io_rdata_o,
  // control flip-flops
  output ctrl_t                   ctrl_o,
  input  logic                    acq_busy_i,
  // memory access
  input  logic                    grant_i,      // SRAM handed to the host
  output logic                    host_busy_o,  // host memory work pending
  output sram_req_t               req_o,
  input  mem_data_t               mem_rdata_i
);

  typedef enum logic [1:0] {E_IDLE, E_READ, E_WRITE, E_WEND} estate_e;

  estate_e   state;
  mem_addr_t addr_q;
  mem_data_t data_q;    // word read ahead at addr_q
  mem_data_t wval_q;    // word to be written at addr_q
  logic      wr_pend, inc_pend, fetch_pend;

  wire io_reg_e reg_sel = io_reg_e'(io_addr_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_o     <= '0;
      state      <= E_IDLE;
      addr_q     <= '0;
      data_q     <= '0;
      wval_q     <= '0;
      wr_pend    <= 1'b0;
      inc_pend   <= 1'b0;
      fetch_pend <= 1'b0;
    end else begin
      // memory engine
      unique case (state)
        E_IDLE: begin
          if (grant_i) begin
            if (wr_pend) begin
              state <= E_WRITE;
            end else if (inc_pend) begin
              addr_q   <= addr_q + 1'b1;
              inc_pend <= 1'b0;
            end else if (fetch_pend) begin
              state <= E_READ;
            end
          end
        end
        E_READ: begin
          data_q     <= mem_rdata_i;
          fetch_pend <= 1'b0;
          state      <= E_IDLE;
        end
        E_WRITE: state <= E_WEND;
        E_WEND: begin
          wr_pend <= 1'b0;
          state   <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase

      // bus cycles (a well-behaved host never overlaps them with the engine)
      if (io_wr_i) begin
        unique case (reg_sel)
          REG_CTRL:    ctrl_o <= ctrl_t'(io_wdata_i[$bits(ctrl_t)-1:0]);
          REG_ADDR_LO: begin
            addr_q[15:0] <= io_wdata_i;
            fetch_pend   <= 1'b1;
            inc_pend     <= 1'b0;
          end
          REG_ADDR_HI: begin
            addr_q[ADDR_BITS-1:16] <= io_wdata_i[ADDR_BITS-17:0];
            fetch_pend             <= 1'b1;
            inc_pend               <= 1'b0;
          end
          REG_DATA: begin
            wval_q     <= io_wdata_i;
            wr_pend    <= 1'b1;
            inc_pend   <= 1'b1;
            fetch_pend <= 1'b1;
          end
          default: ;
        endcase
      end else if (io_rd_i && reg_sel == REG_DATA) begin
        wval_q     <= '0;
        wr_pend    <= ctrl_o.clear_on_read;
        inc_pend   <= 1'b1;
        fetch_pend <= 1'b1;
      end
    end
  end

  assign host_busy_o = wr_pend || inc_pend || fetch_pend || (state != E_IDLE);

  always_comb begin
    io_rdata_o = '0;
    unique case (reg_sel)
      REG_CTRL:    io_rdata_o = IO_DATA_BITS'(ctrl_o);
      REG_STATUS:  io_rdata_o = IO_DATA_BITS'({acq_busy_i, grant_i, host_busy_o});
      REG_ADDR_LO: io_rdata_o = addr_q[15:0];
      REG_ADDR_HI: io_rdata_o = IO_DATA_BITS'(addr_q[ADDR_BITS-1:16]);
      REG_DATA:    io_rdata_o = data_q;
      default:     io_rdata_o = '0;
    endcase
  end

  always_comb begin
    req_o       = SRAM_IDLE;
    req_o.addr  = addr_q;
    req_o.wdata = wval_q;
    unique case (state)
      E_READ:  begin req_o.ce = 1'b1; req_o.oe = 1'b1; end
      E_WRITE: begin req_o.ce = 1'b1; req_o.we = 1'b1; req_o.dq_oe = 1'b1; end
      E_WEND:  begin req_o.ce = 1'b1; req_o.dq_oe = 1'b1; end
      default: ;
    endcase
  end

  // The memory is only touched while it is granted to the host.
  assert property (@(posedge clk) disable iff (!rst_n) (req_o.ce |-> grant_i))
    else $error("host memory cycle without grant");

endmodule
