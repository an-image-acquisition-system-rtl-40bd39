// adc_data_shifter: forms the SRAM word address of an event and sets the
// image resolution.
//
// Every ADC result is a memory address, so shifting the ADC data right is the
// same as shifting the memory address. Each 10-bit coordinate is shifted
// right by shift_i (0..3), giving 1024, 512, 256 or 128 pixels per side;
// fewer pixels collect more counts each and are quicker for the host to read.
// The shifted Y coordinate goes above the shifted X coordinate, packed so
// that an N x N image occupies the first N*N words of the memory as rows of
// N words:  addr = (y >> s) * (1024 >> s) + (x >> s).
//
// The right shift and the 128..1024 range follow the description; the row
// packing of the address is this design's choice. Purely combinational.
module adc_data_shifter
  import tdas_pkg::*;
(
  input  event_t    ev_i,
  input  shift_t    shift_i,
  output mem_addr_t addr_o
);

  coord_t xs, ys;

  always_comb begin
    xs = ev_i.x >> shift_i;
    ys = ev_i.y >> shift_i;
    // ys << (COORD_BITS - shift) places Y just above the shifted X.
    addr_o = (mem_addr_t'(ys) << (COORD_BITS - int'(shift_i))) | mem_addr_t'(xs);
  end

endmodule
