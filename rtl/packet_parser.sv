// packet_parser: extracts the fields the session architecture needs from an
// IPv4 packet.
//
// The packet arrives as big-endian 32-bit words with a valid/ready handshake,
// sop_i on the first word and eop_i on the last. The parser takes the total
// length and header length (IHL) from word 0, the protocol from word 2, the
// source and destination IP from words 3 and 4, and, at word IHL (the first
// word of the transport header), the source and destination ports. For TCP
// the flag byte is taken from bits 23:16 of transport word 3 (header byte 13). Ports are
// reported only for TCP and UDP and flags only for TCP; otherwise they are
// zero. Packets are expected to be already defragmented.
//
// The descriptor is presented on out_* after the eop word has been accepted
// and held until taken; in_ready_o is low meanwhile. Which fields are
// extracted follows the design description (the 4-tuple and what the state
// machine needs); the word-stream interface is this design's choice.
module packet_parser
  import spi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid_i,
  output logic        in_ready_o,
  input  logic        sop_i,
  input  logic        eop_i,
  input  logic [31:0] data_i,
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output pkt_desc_t   out_desc_o
);

  localparam logic [7:0] PROTO_UDP = 8'd17;

  logic [15:0] widx_q;      // index of the next word
  logic [3:0]  ihl_q;
  pkt_desc_t   acc_q;
  logic [15:0] widx;
  logic [3:0]  ihl;
  pkt_desc_t   acc_d;       // descriptor including the current word
  pkt_desc_t   fin_d;       // acc_d with absent fields cleared

  assign in_ready_o = !out_valid_o;

  always_comb begin
    widx  = sop_i ? 16'd0 : widx_q;
    ihl   = (widx == 16'd0) ? data_i[27:24] : ihl_q;
    acc_d = (widx == 16'd0) ? '0 : acc_q;
    if (widx == 16'd0) acc_d.ip_len       = data_i[15:0];
    if (widx == 16'd2) acc_d.proto        = data_i[23:16];
    if (widx == 16'd3) acc_d.tuple.src_ip = data_i;
    if (widx == 16'd4) acc_d.tuple.dst_ip = data_i;
    if (widx == 16'(ihl)) begin
      acc_d.tuple.src_port = data_i[31:16];
      acc_d.tuple.dst_port = data_i[15:0];
    end
    if (widx == 16'(ihl) + 16'd3) acc_d.flags = tcp_flags_t'(data_i[23:16]);
    fin_d = acc_d;
    if (acc_d.proto != PROTO_TCP && acc_d.proto != PROTO_UDP) begin
      fin_d.tuple.src_port = '0;
      fin_d.tuple.dst_port = '0;
    end
    if (acc_d.proto != PROTO_TCP) fin_d.flags = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx_q      <= '0;
      ihl_q       <= '0;
      acc_q       <= '0;
      out_valid_o <= 1'b0;
      out_desc_o  <= '0;
    end else begin
      if (out_valid_o && out_ready_i) out_valid_o <= 1'b0;
      if (in_valid_i && in_ready_o) begin
        widx_q <= eop_i ? 16'd0 : widx + 1'b1;
        ihl_q  <= ihl;
        acc_q  <= acc_d;
        if (eop_i) begin
          out_valid_o <= 1'b1;
          out_desc_o  <= fin_d;
        end
      end
    end
  end

endmodule
