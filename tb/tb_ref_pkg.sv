// tb_ref_pkg: reference functions for the testbenches, written from the
// design rules rather than from the RTL.
//   ref_crc    CRC (init all ones, no reflection, no final XOR) of a 96-bit
//              message, computed as the remainder of
//              (M * x^32 + 0xFFFFFFFF * x^96) mod P by long division.
//   ref_order  tuple ordering: lower source IP first, else swap (flag 1).
//   ref_next   session state transitions, as a table.
//   ref_info   state information table.
package tb_ref_pkg;
  import spi_pkg::*;

  function automatic logic [31:0] ref_crc(logic [95:0] m, logic [31:0] poly);
    logic [127:0] v;
    logic [32:0]  p;
    p = {1'b1, poly};
    v = {m, 32'h0} ^ {32'hFFFF_FFFF, 96'h0};
    for (int i = 127; i >= 32; i--)
      if (v[i]) v[i-:33] = v[i-:33] ^ p;
    return v[31:0];
  endfunction

  function automatic tuple_t ref_order(tuple_t t, output logic pcf);
    tuple_t r;
    pcf = !(t.src_ip < t.dst_ip);
    r = pcf ? '{t.dst_ip, t.src_ip, t.dst_port, t.src_port} : t;
    return r;
  endfunction

  function automatic int ref_set(tuple_t t, int set_bits);
    logic pcf;
    logic [31:0] c;
    c = ref_crc(ref_order(t, pcf), 32'h04C1_1DB7);
    return int'(c & ((32'd1 << set_bits) - 1));
  endfunction

  // packet kinds
  typedef enum int {K_SYN, K_SYNACK, K_ACK, K_FIN, K_RST, K_DATA} kind_e;

  function automatic tcp_flags_t kind_flags(kind_e k);
    tcp_flags_t f;
    f = '0;
    case (k)
      K_SYN:    f.syn = 1;
      K_SYNACK: begin f.syn = 1; f.ack = 1; end
      K_ACK:    f.ack = 1;
      K_FIN:    begin f.fin = 1; f.ack = 1; end
      K_RST:    f.rst = 1;
      K_DATA:   begin f.ack = 1; f.psh = 1; end
      default:  ;
    endcase
    return f;
  endfunction

  function automatic logic [2:0] ref_next(logic [2:0] s, kind_e k, logic pcf);
    // (state, packet) -> state, every pair not listed keeps the state
    if (s == 3'b000 && k == K_SYN)    return 3'b001;
    if (s == 3'b001 && k == K_SYNACK) return 3'b010;
    // any packet with only ACK among SYN/FIN/RST/ACK completes the handshake
    if (s == 3'b010 && k inside {K_ACK, K_DATA}) return pcf ? 3'b110 : 3'b100;
    if (s == 3'b110 && k == K_FIN)    return 3'b111;
    if (s == 3'b111 && k == K_FIN)    return 3'b000;
    if (s == 3'b100 && k == K_FIN)    return 3'b101;
    if (s == 3'b101 && k == K_FIN)    return 3'b000;
    if (s[2] && k == K_RST)           return 3'b000;
    return s;
  endfunction

  function automatic state_info_e ref_info(logic [2:0] s, logic pcf);
    case (s)
      3'b000: return SI_NOT_EST;
      3'b001: return SI_SYN_RCVD;
      3'b010: return SI_SYNACK;
      3'b011: return SI_RESERVED;
      3'b100, 3'b101: return pcf ? SI_EST_S2C : SI_EST_C2S;
      default:        return pcf ? SI_EST_C2S : SI_EST_S2C;
    endcase
  endfunction

  // Words of an IPv4 packet (big-endian 32-bit words) with a TCP or UDP
  // header (or none for other protocols), ihl header words and npay payload
  // words.
  typedef logic [31:0] words_t [$];
  function automatic words_t build_pkt(tuple_t t, logic [7:0] proto,
                                       tcp_flags_t fl, int ihl, int npay);
    words_t w;
    int l4;
    l4 = (proto == 8'd6) ? 5 : (proto == 8'd17) ? 2 : 0;
    w.push_back({4'd4, 4'(ihl), 8'h00, 16'(4 * (ihl + l4 + npay))});
    w.push_back({16'h1234, 16'h4000});
    w.push_back({8'd64, proto, 16'h0000});
    w.push_back(t.src_ip);
    w.push_back(t.dst_ip);
    for (int i = 5; i < ihl; i++) w.push_back(32'h0101_0101);   // options
    if (l4 > 0) w.push_back({t.src_port, t.dst_port});
    if (proto == 8'd17) w.push_back(32'h0000_0000);
    if (proto == 8'd6) begin
      w.push_back($urandom);                     // sequence number
      w.push_back($urandom);                     // ack number
      w.push_back({4'd5, 4'd0, 8'(fl), 16'd8192});
      w.push_back(32'h0);
    end
    for (int i = 0; i < npay; i++) w.push_back($urandom);
    return w;
  endfunction
endpackage
