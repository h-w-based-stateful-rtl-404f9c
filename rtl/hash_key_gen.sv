// hash_key_gen: hash key generator of the session state manager.
//
// First the 4-tuple is put in a direction-independent order: when the source
// IP is lower than the destination IP the tuple is kept and the
// Position_change_flag is 0; otherwise (source IP greater than or equal to the
// destination IP) the two IPs and the two ports are swapped and the flag is 1.
// Both directions of a connection therefore hash to the same set and address.
//
// Two different hash functions are then applied to the 96-bit ordered tuple:
//   Hash1 = low H1_W bits of CRC-32 (polynomial 0x04C11DB7, init all ones)
//           -> index of the hash set
//   Hash2 = low H2_W bits of CRC-32C (polynomial 0x1EDC6F41, init all ones)
//           -> hash address stored in the entry to identify the session
// The tuple ordering, the 17/25-bit widths and "two different hash functions
// such as XOR or CRC" follow the design description; the choice of the two CRC
// polynomials, their initial value and which bits are kept is this design's.
// The CRCs consume the tuple most significant bit first.
//
// Purely combinational: outputs follow the input in the same cycle.
module hash_key_gen
  import spi_pkg::*;
#(
  parameter int unsigned H1_W = 17,
  parameter int unsigned H2_W = 25
) (
  input  tuple_t           tuple_i,
  output tuple_t           tuple_o,   // ordered tuple
  output logic             pcf_o,     // Position_change_flag
  output logic [H1_W-1:0]  hash1_o,
  output logic [H2_W-1:0]  hash2_o
);

  function automatic logic [31:0] crc32_96(logic [95:0] d, logic [31:0] poly);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = 95; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = (c << 1) ^ poly;
      else              c = c << 1;
    end
    return c;
  endfunction

  logic [31:0] crc_a, crc_b;

  always_comb begin
    if (tuple_i.src_ip < tuple_i.dst_ip) begin
      pcf_o   = 1'b0;
      tuple_o = tuple_i;
    end else begin
      pcf_o            = 1'b1;
      tuple_o.src_ip   = tuple_i.dst_ip;
      tuple_o.dst_ip   = tuple_i.src_ip;
      tuple_o.src_port = tuple_i.dst_port;
      tuple_o.dst_port = tuple_i.src_port;
    end
    crc_a   = crc32_96(tuple_o, 32'h04C1_1DB7);
    crc_b   = crc32_96(tuple_o, 32'h1EDC_6F41);
    hash1_o = crc_a[H1_W-1:0];
    hash2_o = crc_b[H2_W-1:0];
  end

endmodule
