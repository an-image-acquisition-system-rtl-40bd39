// histogram_fsm: the read-increment-write state machine that builds the image.
//
// For each event the machine spends four clock cycles on the external
// asynchronous SRAM, i.e. 200 ns at 20 MHz:
//   H_READ   address and output enable driven; the word is captured, plus
//            one, at the end of the cycle
//   H_INC    output enable released so the memory stops driving the bus
//   H_WRITE  write enable and the new word driven
//   H_WEND   write enable released with address and data still held; the
//            SRAM stores the word on this edge of its write enable
// A new event can be accepted in H_WEND, so back-to-back events cost exactly
// four cycles each. The machine runs continuously and only pauses while the
// host uses the memory: with pause_i high it finishes the event in hand,
// takes no new one, and reports idle_o so the memory can be handed over.
//
// The four cycles, the 20 MHz clock and the pause for host access follow the
// description. This design's choices: the event address is taken on a
// valid/ready handshake; a counter that is already full stays at its
// maximum (saturating) instead of wrapping to zero, and sat_o pulses.
// The SRAM strobes are decoded from the state register.
module histogram_fsm
  import tdas_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      pause_i,     // host wants the memory
  input  logic      ev_valid_i,
  output logic      ev_ready_o,
  input  mem_addr_t ev_addr_i,
  input  mem_data_t mem_rdata_i, // SRAM data bus as seen by the card
  output sram_req_t req_o,
  output logic      idle_o,      // no event in hand; memory may be given away
  output logic      stored_o,    // one event stored (pulse, in H_WEND)
  output logic      sat_o        // the stored counter was already full
);

  typedef enum logic [2:0] {
    H_IDLE,
    H_READ,
    H_INC,
    H_WRITE,
    H_WEND
  } hstate_e;

  hstate_e   state;
  mem_addr_t addr_q;
  mem_data_t count_q;
  logic      full_q;
  logic      take;

  // An event can be taken when the machine is free or finishing one.
  assign ev_ready_o = (state == H_IDLE || state == H_WEND) && !pause_i;
  assign take       = ev_valid_i && ev_ready_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= H_IDLE;
      addr_q  <= '0;
      count_q <= '0;
      full_q  <= 1'b0;
    end else begin
      unique case (state)
        H_IDLE, H_WEND: begin
          if (take) begin
            state  <= H_READ;
            addr_q <= ev_addr_i;
          end else begin
            state <= H_IDLE;
          end
        end
        H_READ: begin
          full_q  <= &mem_rdata_i;
          count_q <= (&mem_rdata_i) ? mem_rdata_i : mem_rdata_i + 1'b1;
          state   <= H_INC;
        end
        H_INC:   state <= H_WRITE;
        H_WRITE: state <= H_WEND;
        default: state <= H_IDLE;
      endcase
    end
  end

  always_comb begin
    req_o       = SRAM_IDLE;
    req_o.addr  = addr_q;
    req_o.wdata = count_q;
    unique case (state)
      H_READ:  begin req_o.ce = 1'b1; req_o.oe = 1'b1; end
      H_INC:   begin req_o.ce = 1'b1; end
      H_WRITE: begin req_o.ce = 1'b1; req_o.we = 1'b1; req_o.dq_oe = 1'b1; end
      H_WEND:  begin req_o.ce = 1'b1; req_o.dq_oe = 1'b1; end
      default: ;
    endcase
  end

  assign idle_o   = (state == H_IDLE);
  assign stored_o = (state == H_WEND);
  assign sat_o    = (state == H_WEND) && full_q;

  // Memory strobes never overlap: no read while the card drives the bus.
  assert property (@(posedge clk) disable iff (!rst_n) !(req_o.oe && req_o.dq_oe))
    else $error("bus contention on the SRAM data bus");

endmodule
