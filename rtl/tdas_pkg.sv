// tdas_pkg: constants and types shared by the two-dimensional data
// acquisition (TDAS) logic.
//
// The card digitises two coincident coordinate pulses with 12-bit ADCs,
// keeps the ten most significant bits of each and uses the pair as the
// address of a 16-bit counter in an external static RAM. With 10 bits per
// coordinate the image is 1024 x 1024 pixels, i.e. 1 M words of 16 bits, which
// is the 2 MB of SRAM the card carries. The ADC width, the 10-bit coordinate
// and the 2 MB memory come from the design description; the 16-bit word and
// the packing of Y above X in the address are this design's reading of
// "2 MB for 1024 x 1024 pixels".
//
// The host register map (16-bit ISA I/O words, offsets from the card's base
// address) is this design's own choice:
//   0 CTRL    rw  [0] global enable  [2:1] resolution shift (0 = 1024^2,
//                 3 = 128^2)  [3] host memory access  [4] clear on read
//   1 STATUS  r   [0] host access in progress  [1] memory granted to host
//                 [2] acquisition busy (conversion or event pending)
//   2 ADDR_LO rw  memory word address bits 15:0
//   3 ADDR_HI rw  memory word address bits 19:16
//   4 DATA    rw  read: word at ADDR (then clear if CTRL[4], ADDR+1)
//                 write: store word at ADDR, ADDR+1
package tdas_pkg;

  localparam int ADC_BITS   = 12;   // AD1671 resolution
  localparam int COORD_BITS = 10;   // ADC MSBs used per coordinate
  localparam int ADDR_BITS  = 2 * COORD_BITS;  // 1 M pixel words
  localparam int DATA_BITS  = 16;   // counter per pixel (2 MB / 1 M)
  localparam int SHIFT_BITS = 2;    // shift 0..3: 1024^2 .. 128^2 pixels

  localparam int IO_ADDR_BITS = 3;
  localparam int IO_DATA_BITS = 16;

  typedef logic [COORD_BITS-1:0] coord_t;
  typedef logic [ADDR_BITS-1:0]  mem_addr_t;
  typedef logic [DATA_BITS-1:0]  mem_data_t;
  typedef logic [SHIFT_BITS-1:0] shift_t;

  // One digitised event: the two coordinates, already reduced to 10 bits.
  typedef struct packed {
    coord_t y;
    coord_t x;
  } event_t;

  // What one master asks of the SRAM pins in a cycle. Strobes are active
  // high here; the top level turns them into the chip's active-low pins.
  typedef struct packed {
    mem_addr_t addr;
    mem_data_t wdata;
    logic      ce;      // chip enable
    logic      oe;      // output enable (read)
    logic      we;      // write enable; the SRAM writes when it falls
    logic      dq_oe;   // this side drives the data bus
  } sram_req_t;

  localparam sram_req_t SRAM_IDLE = '{default: '0};

  typedef enum logic [IO_ADDR_BITS-1:0] {
    REG_CTRL    = 3'd0,
    REG_STATUS  = 3'd1,
    REG_ADDR_LO = 3'd2,
    REG_ADDR_HI = 3'd3,
    REG_DATA    = 3'd4
  } io_reg_e;

  // Control register contents.
  typedef struct packed {
    logic   clear_on_read;
    logic   host_mode;
    shift_t shift;
    logic   enable;
  } ctrl_t;

endpackage
