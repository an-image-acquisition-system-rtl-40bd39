// adc_capture: follows the two single-shot ADC conversions and hands each
// finished event to the histogrammer.
//
// The trigger starts both converters at once. The block then waits for the
// end-of-conversion pulse of each ADC (about 800 ns later), latches the ten
// most significant bits of each 12-bit result (the two least significant
// bits are dropped to reduce differential nonlinearity) and offers the pair
// on a valid/ready handshake. adc_busy_o is high from the trigger until the
// event is being taken (it already drops in the hand-over cycle, so the
// next conversion can start as early as possible), so no new conversion is started over a result that
// has not been stored (a trigger that comes while busy is ignored); while
// the histogrammer is paused by the host, events
// are therefore refused at the coincidence stage.
//
// Following the description: single trigger to both ADCs, event-triggered
// (not free-running) conversions, ten MSBs kept. This design's choices: the
// end-of-conversion pulses are asynchronous and at least one clock long, and
// pass a two-flop synchroniser; the data bits are stable from the end of
// conversion until the next start; a conversion that has not ended after
// TIMEOUT_CYCLES is abandoned (timeout_o pulses) so a missing pulse cannot
// hang the card.
//
// Handshake: ev_o is held while ev_valid_o is high and is taken in the cycle
// where ev_ready_i is also high.
module adc_capture
  import tdas_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 40   // 2 us at 20 MHz
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                trigger_i,     // start pulse sent to both ADCs
  input  logic [ADC_BITS-1:0] adc_x_data_i,
  input  logic                adc_x_eoc_i,   // end of conversion (async)
  input  logic [ADC_BITS-1:0] adc_y_data_i,
  input  logic                adc_y_eoc_i,
  output logic                adc_busy_o,
  output logic                ev_valid_o,
  input  logic                ev_ready_i,
  output event_t              ev_o,
  output logic                timeout_o
);

  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);

  logic [2:0]  sx, sy;
  logic        eoc_x, eoc_y;     // synchronised end-of-conversion edges
  logic        converting, done_x, done_y;
  logic [TW-1:0] tcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx <= '0;
      sy <= '0;
    end else begin
      sx <= {sx[1:0], adc_x_eoc_i};
      sy <= {sy[1:0], adc_y_eoc_i};
    end
  end

  assign eoc_x = sx[1] && !sx[2];
  assign eoc_y = sy[1] && !sy[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      converting <= 1'b0;
      done_x     <= 1'b0;
      done_y     <= 1'b0;
      tcnt       <= '0;
      ev_valid_o <= 1'b0;
      ev_o       <= '0;
      timeout_o  <= 1'b0;
    end else begin
      timeout_o <= 1'b0;
      if (ev_valid_o && ev_ready_i) ev_valid_o <= 1'b0;

      if (!converting) begin
        if (trigger_i && !ev_valid_o) begin
          converting <= 1'b1;
          done_x     <= 1'b0;
          done_y     <= 1'b0;
          tcnt       <= '0;
        end
      end else begin
        tcnt <= tcnt + 1'b1;
        if (eoc_x) begin
          done_x  <= 1'b1;
          ev_o.x  <= adc_x_data_i[ADC_BITS-1 -: COORD_BITS];
        end
        if (eoc_y) begin
          done_y  <= 1'b1;
          ev_o.y  <= adc_y_data_i[ADC_BITS-1 -: COORD_BITS];
        end
        if ((done_x || eoc_x) && (done_y || eoc_y)) begin
          converting <= 1'b0;
          ev_valid_o <= 1'b1;
        end else if (tcnt == TW'(TIMEOUT_CYCLES - 1)) begin
          converting <= 1'b0;
          timeout_o  <= 1'b1;
        end
      end
    end
  end

  assign adc_busy_o = converting || (ev_valid_o && !ev_ready_i) || trigger_i;

  // A valid event stays put until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ev_valid_o && !ev_ready_i |=> ev_valid_o && $stable(ev_o))
    else $error("event changed before it was taken");

endmodule
