// spi_pkg: types and constants shared by the stateful packet inspection
// (SPI) session architecture.
//
// A session entry is 36 bits: a 3-bit current-state part, an 8-bit time
// stamp and a 25-bit hash address (the Hash2 value of the session's 4-tuple).
// Field widths and their left-to-right order follow the session-entry layout
// of the design; placing the current state in the most significant bits is
// this design's choice.
//
// Current-state codes follow the session state diagram: 000 free / not
// established, 001 SYN seen, 010 SYN/ACK seen, 100 and 110 established (110
// when the handshake's final ACK had its addresses swapped by the hash key
// generator), 101 and 111 the matching half-closed states.
//
// The state-information codes sent to the intrusion detection engine are
// this design's own numbering of the six cases of the state-information table.
package spi_pkg;

  localparam int unsigned ENTRY_W = 36;
  localparam int unsigned CS_W    = 3;
  localparam int unsigned TS_W    = 8;
  localparam int unsigned HADDR_W = 25;

  typedef logic [CS_W-1:0] cstate_t;
  localparam cstate_t CS_FREE     = 3'b000;
  localparam cstate_t CS_SYN      = 3'b001;
  localparam cstate_t CS_SYNACK   = 3'b010;
  localparam cstate_t CS_RESERVED = 3'b011;
  localparam cstate_t CS_EST      = 3'b100;
  localparam cstate_t CS_EST_HC   = 3'b101;
  localparam cstate_t CS_EST_R    = 3'b110;
  localparam cstate_t CS_EST_R_HC = 3'b111;

  typedef struct packed {
    cstate_t              cstate;  // [35:33]
    logic [TS_W-1:0]      ts;      // [32:25]
    logic [HADDR_W-1:0]   haddr;   // [24:0]
  } entry_t;

  // 4-tuple as carried from the packet parser (96 bits).
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
  } tuple_t;

  // TCP flag byte, in header bit order.
  typedef struct packed {
    logic cwr, ece, urg, ack, psh, rst, syn, fin;
  } tcp_flags_t;

  localparam logic [7:0] PROTO_TCP = 8'd6;

  // State information sent with each packet.
  typedef enum logic [2:0] {
    SI_NOT_EST   = 3'd0,
    SI_SYN_RCVD  = 3'd1,
    SI_SYNACK    = 3'd2,
    SI_RESERVED  = 3'd3,
    SI_EST_C2S   = 3'd4,
    SI_EST_S2C   = 3'd5
  } state_info_e;

  // Packet descriptor produced by the parser.
  typedef struct packed {
    tuple_t      tuple;
    logic [7:0]  proto;
    tcp_flags_t  flags;
    logic [15:0] ip_len;
  } pkt_desc_t;

  // Filtering policy: drop packets of protocol `proto` (when proto_en) whose
  // source or destination port equals `port` (when port_en).
  typedef struct packed {
    logic        valid;
    logic        proto_en;
    logic [7:0]  proto;
    logic        port_en;
    logic [15:0] port;
  } filter_rule_t;

  // Result of the state manager for one packet.
  typedef struct packed {
    pkt_desc_t   desc;
    cstate_t     cstate;       // current state after this packet
    logic        pcf;          // Position_change_flag of this packet
    logic        hit;          // a session entry matched
    logic        new_session;  // a session was created (SYN)
    logic        replaced;     // creation evicted the LRU entry of a full set
    logic        removed;      // session ended (RST or second FIN)
    logic        drop;         // unmatched TCP packet dropped by policy
  } sm_result_t;

  // Descriptor handed to the intrusion detection engine.
  typedef struct packed {
    pkt_desc_t   desc;
    state_info_e info;
    logic        drop;
  } ide_desc_t;

  // An entry is live when its state is not free and its age (timer minus time
  // stamp, modulo 2^TS_W) does not exceed the timeout of its class.
  function automatic logic entry_live(entry_t e, logic [TS_W-1:0] now,
                                      logic [TS_W-1:0] emb_to,
                                      logic [TS_W-1:0] est_to);
    logic [TS_W-1:0] age;
    age = now - e.ts;
    if (e.cstate == CS_FREE || e.cstate == CS_RESERVED) return 1'b0;
    if (e.cstate[2]) return age <= est_to;
    return age <= emb_to;
  endfunction

endpackage
