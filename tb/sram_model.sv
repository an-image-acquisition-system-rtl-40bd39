// sram_model: behavioural model of an asynchronous static RAM for
// simulation only (2 M bytes as 1 M words of 16 bits by default).
//
// Reads are combinational: with ce_n and oe_n low, dq_out shows the word at
// addr. A write takes place at the rising edge of we_n while ce_n is low,
// storing dq_in at addr (the address and data are held through that edge by
// the controller). Every word starts at zero.
module sram_model #(
  parameter int unsigned AW = 20,
  parameter int unsigned DW = 16
) (
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] dq_in,
  output logic [DW-1:0] dq_out,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n
);

  logic [DW-1:0] mem [2**AW];
  int unsigned   writes = 0;

  initial foreach (mem[i]) mem[i] = '0;

  assign dq_out = (!ce_n && !oe_n) ? mem[addr] : '0;

  always @(posedge we_n) begin
    if (!ce_n) begin
      mem[addr] <= dq_in;
      writes++;
    end
  end

endmodule
