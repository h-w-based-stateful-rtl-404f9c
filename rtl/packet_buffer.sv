// packet_buffer: holds the words of each packet while its header is being
// inspected and then sends the packet on to the intrusion detection engine
// together with its state information, or discards it.
//
// Every word the top accepts is written into a word FIFO of 2^AW entries
// (data and end-of-packet bit). Two small queues, each of PKTS entries,
// receive the per-packet decisions in packet order: verd_* from the packet
// filter (one event per packet: passed to the state manager, or dropped)
// and res_* from the state manager output (state information and the drop
// flag of the unmatched-packet policy, one per passed packet). The output
// side waits until the packet at the head of the word FIFO has its
// decisions, then either streams it out on out_* with out_info_o held for
// the whole packet, or pops its words without output when the filter or the
// state manager dropped it. A packet's decisions can only exist once all of
// its words are stored, because the parser reports a packet at its last
// word, so the head packet is always complete when it is sent.
//
// At most PKTS packets (a power of two) are held; a new packet (sop) is
// refused while PKTS are stored, which also keeps the two queues from
// overflowing. A packet
// must fit in the word FIFO (2^AW words; 512 words = 2048 bytes by
// default, above the 1500-byte Ethernet payload). Sending the packet data
// with the state information follows the design description; the buffer,
// its sizes and the discard of dropped packets are this design's choices.
//
// Timing: in_ready_o is combinational from the FIFO fill and in_sop_i. A
// word can leave out_* one cycle after its packet's last decision arrived;
// then one word per cycle while out_ready_i is high, and dropped packets are
// discarded at one word per cycle.
module packet_buffer
  import spi_pkg::*;
#(
  parameter int unsigned AW   = 9,
  parameter int unsigned PKTS = 8,
  localparam int unsigned QW  = $clog2(PKTS)
) (
  input  logic        clk,
  input  logic        rst_n,
  // copy of the packet word stream (written when in_valid_i && in_ready_o)
  input  logic        in_valid_i,
  output logic        in_ready_o,
  input  logic        in_sop_i,
  input  logic        in_eop_i,
  input  logic [31:0] in_data_i,
  // filter decision per packet: verd_valid_i for one cycle, verd_pass_i = 1
  // when the packet went on to the state manager
  input  logic        verd_valid_i,
  input  logic        verd_pass_i,
  // state manager result per passed packet
  input  logic        res_valid_i,
  input  state_info_e res_info_i,
  input  logic        res_drop_i,
  // packets with state information, towards the detection engine
  output logic        out_valid_o,
  input  logic        out_ready_i,
  output logic        out_sop_o,
  output logic        out_eop_o,
  output logic [31:0] out_data_o,
  output state_info_e out_info_o
);

  localparam int unsigned DEPTH = 1 << AW;

  // ---- word FIFO ----
  logic [32:0]  mem_q [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [AW:0]   cnt_q;
  logic [QW:0]   npkt_q;        // packets with at least one word stored
  logic          wr, rd;

  assign in_ready_o = (cnt_q != (AW+1)'(DEPTH)) &&
                      (!in_sop_i || npkt_q != (QW+1)'(PKTS));
  assign wr = in_valid_i && in_ready_o;

  // ---- decision queues ----
  logic          vq_q [PKTS];
  logic [QW-1:0] vw_q, vr_q;
  logic [QW:0]   vn_q;
  state_info_e   rq_info_q [PKTS];
  logic          rq_drop_q [PKTS];
  logic [QW-1:0] rw_q, rr_q;
  logic [QW:0]   rn_q;

  // ---- output side ----
  logic head_ok, head_send, head_first_q, pop_pkt;
  logic [32:0] head;

  assign head = mem_q[rp_q];
  // the head packet is decided when its filter verdict is present and, if it
  // passed, its state manager result too
  assign head_ok   = cnt_q != '0 && vn_q != '0 && (!vq_q[vr_q] || rn_q != '0);
  assign head_send = vq_q[vr_q] && !rq_drop_q[rr_q];

  assign out_valid_o = head_ok && head_send;
  assign out_sop_o   = head_first_q;
  assign out_eop_o   = head[32];
  assign out_data_o  = head[31:0];
  assign out_info_o  = rq_info_q[rr_q];

  assign rd      = head_ok && (!head_send || out_ready_i);
  assign pop_pkt = rd && head[32];

  always_ff @(posedge clk) begin
    if (wr) mem_q[wp_q] <= {in_eop_i, in_data_i};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0; rp_q <= '0; cnt_q <= '0; npkt_q <= '0;
      vw_q <= '0; vr_q <= '0; vn_q <= '0;
      rw_q <= '0; rr_q <= '0; rn_q <= '0;
      head_first_q <= 1'b1;
      for (int i = 0; i < PKTS; i++) begin
        vq_q[i] <= 1'b0; rq_info_q[i] <= SI_NOT_EST; rq_drop_q[i] <= 1'b0;
      end
    end else begin
      if (wr) wp_q <= wp_q + 1'b1;
      if (rd) begin
        rp_q <= rp_q + 1'b1;
        head_first_q <= head[32];
      end
      cnt_q  <= cnt_q + (AW+1)'(wr) - (AW+1)'(rd);
      npkt_q <= npkt_q + (QW+1)'(wr && in_sop_i) - (QW+1)'(pop_pkt);

      if (verd_valid_i) begin
        vq_q[vw_q] <= verd_pass_i;
        vw_q <= vw_q + 1'b1;
      end
      if (pop_pkt) vr_q <= vr_q + 1'b1;
      vn_q <= vn_q + (QW+1)'(verd_valid_i) - (QW+1)'(pop_pkt);

      if (res_valid_i) begin
        rq_info_q[rw_q] <= res_info_i;
        rq_drop_q[rw_q] <= res_drop_i;
        rw_q <= rw_q + 1'b1;
      end
      if (pop_pkt && vq_q[vr_q]) rr_q <= rr_q + 1'b1;
      rn_q <= rn_q + (QW+1)'(res_valid_i) - (QW+1)'(pop_pkt && vq_q[vr_q]);
    end
  end

endmodule
