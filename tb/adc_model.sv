// adc_model: behavioural model of one event-triggered 12-bit sampling ADC
// for simulation only.
//
// On a rising edge of start the value on vin_code (the analog input, given
// here directly as the code it converts to) is sampled; CONV_NS later the
// result appears on data and eoc pulses high for EOC_NS. The data stay valid
// until the next start. A start that arrives during a conversion is ignored,
// as in a single-shot converter. Output levels are two-state.
module adc_model #(
  parameter int unsigned CONV_NS = 800,
  parameter int unsigned EOC_NS  = 100
) (
  input  logic        start,
  input  logic [11:0] vin_code,
  output logic [11:0] data,
  output logic        eoc
);

  logic        busy = 1'b0;
  logic [11:0] sample;
  int unsigned conversions = 0;

  initial begin
    data = '0;
    eoc  = 1'b0;
  end

  always @(posedge start) begin
    if (!busy) begin
      busy   = 1'b1;
      sample = vin_code;
      conversions++;
      #(CONV_NS * 1ns);
      data = sample;
      eoc  = 1'b1;
      #(EOC_NS * 1ns);
      eoc  = 1'b0;
      busy = 1'b0;
    end
  end

endmodule
