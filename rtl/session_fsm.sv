// session_fsm: next value of the 3-bit current-state part of a session entry.
//
// Transitions (from the session state diagram):
//   000 --SYN--> 001 --SYN/ACK--> 010 --ACK--> 100 (flag 0) or 110 (flag 1)
//   100 --first FIN--> 101 --second FIN--> 000
//   110 --first FIN--> 111 --second FIN--> 000
//   100, 101, 110, 111 --RST--> 000
// where "flag" is the Position_change_flag of the packet that completes the
// handshake. Every other packet leaves the state as it is.
//
// Packet classification is this design's choice, in priority order:
// RST (RST bit set), SYN (SYN set, ACK clear), SYN/ACK (SYN and ACK set),
// FIN (FIN set, whatever ACK is), ACK (ACK set only). A FIN in state 100/110
// is the first FIN and in 101/111 the second, whichever side sends it.
// RST is honoured only in the four established states, as the text lists
// them; in the handshake states it leaves the state alone.
//
// Combinational.
module session_fsm
  import spi_pkg::*;
(
  input  cstate_t    cur_i,
  input  tcp_flags_t flags_i,
  input  logic       pcf_i,
  output cstate_t    nxt_o
);

  logic is_rst, is_syn, is_synack, is_fin, is_ack;

  always_comb begin
    is_rst    = flags_i.rst;
    is_syn    = !is_rst && flags_i.syn && !flags_i.ack;
    is_synack = !is_rst && flags_i.syn && flags_i.ack;
    is_fin    = !is_rst && !flags_i.syn && flags_i.fin;
    is_ack    = !is_rst && !flags_i.syn && !flags_i.fin && flags_i.ack;

    nxt_o = cur_i;
    unique case (cur_i)
      CS_FREE:     if (is_syn)    nxt_o = CS_SYN;
      CS_SYN:      if (is_synack) nxt_o = CS_SYNACK;
      CS_SYNACK:   if (is_ack)    nxt_o = pcf_i ? CS_EST_R : CS_EST;
      CS_RESERVED: nxt_o = CS_RESERVED;
      CS_EST:      if (is_rst) nxt_o = CS_FREE; else if (is_fin) nxt_o = CS_EST_HC;
      CS_EST_HC:   if (is_rst || is_fin) nxt_o = CS_FREE;
      CS_EST_R:    if (is_rst) nxt_o = CS_FREE; else if (is_fin) nxt_o = CS_EST_R_HC;
      CS_EST_R_HC: if (is_rst || is_fin) nxt_o = CS_FREE;
      default:     nxt_o = cur_i;
    endcase
  end

endmodule
