// state_info_gen: state information for the intrusion detection engine.
//
// Maps the current-state part of the packet's session and the packet's
// Position_change_flag to one of six cases:
//   000 -> not established, 001 -> SYN received, 010 -> SYN/ACK received,
//   011 -> reserved,
//   100/101 with flag 0, or 110/111 with flag 1 -> established, client to server
//   100/101 with flag 1, or 110/111 with flag 0 -> established, server to client
// The direction is the XOR of the flag with the "reversed at registration"
// bit (bit 1) of an established state. The mapping is the design's state
// information table; the numeric codes of state_info_e are this design's.
//
// Combinational.
module state_info_gen
  import spi_pkg::*;
(
  input  cstate_t     cur_i,
  input  logic        pcf_i,
  output state_info_e info_o
);

  always_comb begin
    unique case (cur_i)
      CS_FREE:     info_o = SI_NOT_EST;
      CS_SYN:      info_o = SI_SYN_RCVD;
      CS_SYNACK:   info_o = SI_SYNACK;
      CS_RESERVED: info_o = SI_RESERVED;
      default:     info_o = (pcf_i ^ cur_i[1]) ? SI_EST_S2C : SI_EST_C2S;
    endcase
  end

endmodule
