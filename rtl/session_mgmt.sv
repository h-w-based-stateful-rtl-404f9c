// session_mgmt: session management module.
//
// Given the result of the session detection over a hash set, decides the one
// table write the packet causes:
//   - session found: the entry is rewritten with the next current state (from
//     session_fsm) and the present timer value as its time stamp. When the
//     next state is 000 (RST, or the second FIN) the entry becomes free, which
//     deletes the session.
//   - no session, packet is a SYN: a new entry {001, timer, Hash2} is written
//     into a free way, or, when all ways are live, over the least recently
//     used way (replaced_o).
//   - no session, any other packet: nothing is written; the state stays 000.
// These rules follow the design's packet-processing procedure. Only SYN
// (not SYN/ACK) opens a session.
//
// Combinational; the caller applies the write in the same cycle.
module session_mgmt
  import spi_pkg::*;
#(
  parameter int unsigned WAY_W = 5,
  parameter int unsigned H2_W  = HADDR_W
) (
  input  logic             hit_i,
  input  logic [WAY_W-1:0] hit_way_i,
  input  entry_t           hit_entry_i,
  input  logic             free_i,
  input  logic [WAY_W-1:0] free_way_i,
  input  logic [WAY_W-1:0] lru_way_i,
  input  tcp_flags_t       flags_i,
  input  logic             pcf_i,
  input  logic [H2_W-1:0]  hash2_i,
  input  logic [TS_W-1:0]  now_i,
  output logic             wr_en_o,
  output logic [WAY_W-1:0] wr_way_o,
  output entry_t           wr_entry_o,
  output cstate_t          cstate_o,
  output logic             new_session_o,
  output logic             replaced_o,
  output logic             removed_o
);

  cstate_t cur, nxt;

  assign cur = hit_i ? hit_entry_i.cstate : CS_FREE;

  session_fsm u_fsm (.cur_i(cur), .flags_i(flags_i), .pcf_i(pcf_i), .nxt_o(nxt));

  always_comb begin
    wr_en_o          = 1'b0;
    wr_way_o         = hit_way_i;
    wr_entry_o       = '0;
    wr_entry_o.ts    = now_i;
    wr_entry_o.haddr = HADDR_W'(hash2_i);
    wr_entry_o.cstate = nxt;
    cstate_o         = nxt;
    new_session_o    = 1'b0;
    replaced_o       = 1'b0;
    removed_o        = 1'b0;
    if (hit_i) begin
      wr_en_o   = 1'b1;
      removed_o = (nxt == CS_FREE);
    end else if (nxt == CS_SYN) begin
      wr_en_o       = 1'b1;
      new_session_o = 1'b1;
      replaced_o    = !free_i;
      wr_way_o      = free_i ? free_way_i : lru_way_i;
    end
  end

endmodule
