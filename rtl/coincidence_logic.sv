// coincidence_logic: turns the two discriminator outputs into one ADC trigger.
//
// A photon gives one pulse on each coordinate's comparator. The block accepts
// the pair as an event when both rising edges come within a window of
// WINDOW_CYCLES clock cycles (300 ns at 20 MHz), and then issues a single
// trigger pulse TRIG_CYCLES long so that it starts DELAY_CYCLES after the
// first comparator edge (550 ns), when the TAC outputs have settled. A lone
// edge whose partner does not arrive in time is dropped (miss_o pulses).
// Both the window and the delay follow the description; the trigger length
// and the way a busy converter is handled are this design's choices: if the
// ADCs are still converting (adc_busy_i) when the trigger is due, the event
// is dropped and busy_drop_o pulses. While enable_i is low the comparator
// inputs are held and no conversion can start, as the global enable does on
// the card.
//
// The comparator outputs are asynchronous: each passes a two-flop
// synchroniser, whose latency is taken off the internal delay count so that
// the pin-to-trigger delay is DELAY_CYCLES to DELAY_CYCLES+1 cycles
// (550..600 ns at 20 MHz), inside the 550 +/- 50 ns of the description.
//
// Outputs coinc_o, miss_o and busy_drop_o are single-cycle event flags.
module coincidence_logic #(
  parameter int unsigned WINDOW_CYCLES = 6,   // 300 ns at 20 MHz
  parameter int unsigned DELAY_CYCLES  = 11,  // 550 ns at 20 MHz
  parameter int unsigned TRIG_CYCLES   = 2    // 100 ns start pulse
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable_i,      // global enable
  input  logic disc_x_i,      // comparator output, X coordinate (async)
  input  logic disc_y_i,      // comparator output, Y coordinate (async)
  input  logic adc_busy_i,    // converters cannot take a new start
  output logic trigger_o,     // start-conversion pulse to both ADCs
  output logic coinc_o,       // a coincident pair was found
  output logic miss_o,        // a lone edge timed out
  output logic busy_drop_o    // coincidence dropped, ADCs busy
);

  // cnt is 1 in the cycle after the synchronised edge is seen, which is
  // two clock edges after the first clock edge T0 following the pin edge.
  // Entering C_TRIG when cnt == FIRE_AT-1 raises the trigger at clock edge
  // T0 + (FIRE_AT+1) cycles, so FIRE_AT = DELAY_CYCLES-1 puts the trigger
  // DELAY_CYCLES after T0, i.e. DELAY_CYCLES to DELAY_CYCLES+1 cycles after
  // the pin edge.
  localparam int unsigned CNT_W    = $clog2(DELAY_CYCLES + TRIG_CYCLES + 1);
  localparam int unsigned FIRE_AT  = DELAY_CYCLES - 1;

  typedef enum logic [2:0] {
    C_IDLE,    // waiting for a first edge
    C_WAIT_X,  // Y seen, waiting for X
    C_WAIT_Y,  // X seen, waiting for Y
    C_DELAY,   // coincidence found, waiting for the settling delay
    C_TRIG     // driving the trigger
  } cstate_e;

  cstate_e           state;
  logic [CNT_W-1:0]  cnt;     // cycles since the first (synchronised) edge
  logic [2:0]        sx, sy;  // synchroniser and edge-detect stages
  logic              ex, ey;  // rising edges, gated by the enable

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx <= '0;
      sy <= '0;
    end else if (enable_i) begin
      sx <= {sx[1:0], disc_x_i};
      sy <= {sy[1:0], disc_y_i};
    end
  end

  assign ex = enable_i && sx[1] && !sx[2];
  assign ey = enable_i && sy[1] && !sy[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_IDLE;
      cnt         <= '0;
      coinc_o     <= 1'b0;
      miss_o      <= 1'b0;
      busy_drop_o <= 1'b0;
    end else begin
      coinc_o     <= 1'b0;
      miss_o      <= 1'b0;
      busy_drop_o <= 1'b0;
      cnt         <= cnt + 1'b1;
      unique case (state)
        C_IDLE: begin
          cnt <= CNT_W'(1);
          if (ex && ey) begin
            state   <= C_DELAY;
            coinc_o <= 1'b1;
          end else if (ex) begin
            state <= C_WAIT_Y;
          end else if (ey) begin
            state <= C_WAIT_X;
          end
        end
        C_WAIT_X, C_WAIT_Y: begin
          if ((state == C_WAIT_X) ? ex : ey) begin
            state   <= C_DELAY;
            coinc_o <= 1'b1;
          end else if (cnt >= CNT_W'(WINDOW_CYCLES)) begin
            state  <= C_IDLE;
            miss_o <= 1'b1;
          end
        end
        C_DELAY: begin
          if (cnt == CNT_W'(FIRE_AT - 1)) begin
            if (adc_busy_i || !enable_i) begin
              state       <= C_IDLE;
              busy_drop_o <= 1'b1;
            end else begin
              state <= C_TRIG;
            end
          end
        end
        C_TRIG: begin
          if (cnt == CNT_W'(FIRE_AT + TRIG_CYCLES - 1)) state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign trigger_o = (state == C_TRIG);

  initial begin
    assert (DELAY_CYCLES > WINDOW_CYCLES + 2)
      else $error("the trigger delay must exceed the coincidence window");
    assert (TRIG_CYCLES >= 1) else $error("TRIG_CYCLES must be at least 1");
  end

endmodule
