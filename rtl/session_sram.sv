// session_sram: one bank of the session table (SRAM#1 or SRAM#2).
//
// The session table is two 72-Mbit synchronous SRAMs read in parallel. Each
// holds 2^17 hash sets of 16 ways, one 36-bit session entry per word, so the
// word address is {set index, way}. This module models one such device as a
// single-port synchronous memory: with ce_i high, a write (we_i high) stores
// wdata_i at addr_i, a read returns the addressed word on rdata_o on the next
// clock edge. A new address may be given every cycle. The one-cycle read
// latency is a simplification of the external device's pipelined interface.
// Contents are not cleared by reset: the state manager clears the table after
// reset.
module session_sram #(
  parameter int unsigned ADDR_W = 21,
  parameter int unsigned DATA_W = 36
) (
  input  logic              clk,
  input  logic              ce_i,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] addr_i,
  input  logic [DATA_W-1:0] wdata_i,
  output logic [DATA_W-1:0] rdata_o
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (ce_i) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end

endmodule
