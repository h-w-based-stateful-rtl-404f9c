// state_manager: session state manager of the stateful packet inspection
// module.
//
// For every packet it receives, the manager hashes the 4-tuple (hash_key_gen),
// reads the 2*WAYS_PER_SRAM entries of the hash set chosen by Hash1 from the
// two session-table SRAMs in parallel (one word of each per cycle), lets
// session_detect look for the entry holding Hash2, and lets session_mgmt
// decide the single write that updates, creates, replaces or deletes the
// session. The result carries the session's current state after the packet
// and the packet's Position_change_flag, from which state_info_gen derives
// the state information for the intrusion detection engine.
//
// Time stamps come from an internal 8-bit timer that advances every
// TICK_CYCLES clocks. Embryonic sessions (001, 010) time out after
// cfg_emb_timeout_i ticks and established ones after cfg_est_timeout_i; a
// timed-out entry no longer matches and counts as free at once. So that it
// is also removed from the table before the 8-bit time stamp wraps, a
// background sweep walks the table one word pair at a time and clears
// timed-out entries: one step after every packet and one step every two
// cycles while no packet waits. A full sweep takes at most about
// 2*2^(SET_BITS+log2(WAYS_PER_SRAM)) packets or cycles, which must stay below
// (256 - timeout) ticks; with the defaults it is about 4.2 M cycles against a
// 125 M-cycle tick.
// After reset the manager first writes zero to every word of both SRAMs
// (init_done_o rises when finished) and accepts no packet before that.
// The set scan, dual SRAM, LRU replacement, the two timeouts and the
// processing order follow the design description; the sweep, the clear after
// reset, the tick length and the handshakes are this design's choices.
// Packets that are not TCP bypass the table: state 000, never dropped.
// TCP packets without a session are flagged for dropping when
// cfg_drop_unmatched_i is set (security policy), and passed on otherwise.
//
// Interface: in_* and out_* are valid/ready handshakes; one packet is in
// flight at a time. Timing for a TCP packet: out_valid_o rises
// WAYS_PER_SRAM + 2 cycles after the cycle in which the packet is accepted;
// a non-TCP packet is answered on the next cycle. After each response the
// manager spends two cycles on a sweep step before it accepts the next
// packet, so the packet period is WAYS_PER_SRAM + 6 cycles (22 with 16 ways).
// The SRAM ports expect a one-cycle read latency.
module state_manager
  import spi_pkg::*;
#(
  parameter int unsigned SET_BITS      = 17,
  parameter int unsigned WAYS_PER_SRAM = 16,
  parameter int unsigned TICK_CYCLES   = 125_000_000,
  localparam int unsigned WORD_W = $clog2(WAYS_PER_SRAM),
  localparam int unsigned WAY_W  = WORD_W + 1,
  localparam int unsigned ADDR_W = SET_BITS + WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // packets from the packet filter
  input  logic              in_valid_i,
  output logic              in_ready_o,
  input  pkt_desc_t         in_desc_i,
  // results towards the state info generator
  output logic              out_valid_o,
  input  logic              out_ready_i,
  output sm_result_t        out_res_o,
  // administrator settings
  input  logic [TS_W-1:0]   cfg_emb_timeout_i,
  input  logic [TS_W-1:0]   cfg_est_timeout_i,
  input  logic              cfg_drop_unmatched_i,
  // SRAM#1
  output logic              sa_ce_o,
  output logic              sa_we_o,
  output logic [ADDR_W-1:0] sa_addr_o,
  output entry_t            sa_wdata_o,
  input  entry_t            sa_rdata_i,
  // SRAM#2
  output logic              sb_ce_o,
  output logic              sb_we_o,
  output logic [ADDR_W-1:0] sb_addr_o,
  output entry_t            sb_wdata_o,
  input  entry_t            sb_rdata_i,
  // status
  output logic              init_done_o,
  output logic              sweep_remove_o,
  output logic [TS_W-1:0]   now_o
);

  typedef enum logic [2:0] {
    S_INIT, S_IDLE, S_SCAN, S_DECIDE, S_RESP, S_SW_RD, S_SW_CHK
  } state_e;

  state_e state_q;

  // ---------------------------------------------------------------- timer
  logic [$clog2(TICK_CYCLES+1)-1:0] tick_cnt_q;
  logic [TS_W-1:0]                  now_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_cnt_q <= '0;
      now_q      <= '0;
    end else if (tick_cnt_q == $bits(tick_cnt_q)'(TICK_CYCLES - 1)) begin
      tick_cnt_q <= '0;
      now_q      <= now_q + 1'b1;
    end else begin
      tick_cnt_q <= tick_cnt_q + 1'b1;
    end
  end
  assign now_o = now_q;

  // ---------------------------------------------------------- hash keys
  tuple_t                 tuple_ord;
  logic                   pcf_d;
  logic [SET_BITS-1:0]    hash1_d;
  logic [HADDR_W-1:0]     hash2_d;

  hash_key_gen #(.H1_W(SET_BITS), .H2_W(HADDR_W)) u_hash (
    .tuple_i(in_desc_i.tuple), .tuple_o(tuple_ord), .pcf_o(pcf_d),
    .hash1_o(hash1_d), .hash2_o(hash2_d)
  );

  pkt_desc_t           desc_q;
  logic                pcf_q;
  logic [SET_BITS-1:0] hash1_q;
  logic [HADDR_W-1:0]  hash2_q;

  // ---------------------------------------------------------- set scan
  logic [WORD_W:0]   cnt_q;        // words issued so far
  logic              rd_valid_q;
  logic [WORD_W-1:0] rd_word_q;
  logic              det_start;

  logic             hit, free, lru_valid;
  logic [WAY_W-1:0] hit_way, free_way, lru_way;
  entry_t           hit_entry;

  session_detect #(.WAYS_PER_SRAM(WAYS_PER_SRAM), .H2_W(HADDR_W)) u_detect (
    .clk, .rst_n,
    .start_i(det_start), .valid_i(rd_valid_q), .word_i(rd_word_q),
    .entry_a_i(sa_rdata_i), .entry_b_i(sb_rdata_i),
    .hash2_i(hash2_q), .now_i(now_q),
    .emb_to_i(cfg_emb_timeout_i), .est_to_i(cfg_est_timeout_i),
    .hit_o(hit), .hit_way_o(hit_way), .hit_entry_o(hit_entry),
    .free_o(free), .free_way_o(free_way),
    .lru_valid_o(lru_valid), .lru_way_o(lru_way)
  );

  logic             wr_en, new_session, replaced, removed;
  logic [WAY_W-1:0] wr_way;
  entry_t           wr_entry;
  cstate_t          cstate_new;

  session_mgmt #(.WAY_W(WAY_W), .H2_W(HADDR_W)) u_mgmt (
    .hit_i(hit), .hit_way_i(hit_way), .hit_entry_i(hit_entry),
    .free_i(free), .free_way_i(free_way), .lru_way_i(lru_way),
    .flags_i(desc_q.flags), .pcf_i(pcf_q), .hash2_i(hash2_q), .now_i(now_q),
    .wr_en_o(wr_en), .wr_way_o(wr_way), .wr_entry_o(wr_entry),
    .cstate_o(cstate_new), .new_session_o(new_session),
    .replaced_o(replaced), .removed_o(removed)
  );

  // ---------------------------------------------------- init and sweep
  logic [ADDR_W-1:0] ptr_q;        // clear pointer, then sweep pointer
  logic              exp_a, exp_b;

  always_comb begin
    exp_a = (sa_rdata_i.cstate != CS_FREE) &&
            !entry_live(sa_rdata_i, now_q, cfg_emb_timeout_i, cfg_est_timeout_i);
    exp_b = (sb_rdata_i.cstate != CS_FREE) &&
            !entry_live(sb_rdata_i, now_q, cfg_emb_timeout_i, cfg_est_timeout_i);
  end

  // ------------------------------------------------------- SRAM ports
  always_comb begin
    sa_ce_o = 1'b0; sa_we_o = 1'b0; sa_addr_o = ptr_q; sa_wdata_o = '0;
    sb_ce_o = 1'b0; sb_we_o = 1'b0; sb_addr_o = ptr_q; sb_wdata_o = '0;
    det_start = 1'b0;
    unique case (state_q)
      S_INIT: begin
        sa_ce_o = 1'b1; sa_we_o = 1'b1;
        sb_ce_o = 1'b1; sb_we_o = 1'b1;
      end
      S_IDLE: det_start = 1'b1;
      S_SCAN: begin
        sa_addr_o = {hash1_q, cnt_q[WORD_W-1:0]};
        sb_addr_o = {hash1_q, cnt_q[WORD_W-1:0]};
        sa_ce_o   = (cnt_q < (WORD_W+1)'(WAYS_PER_SRAM));
        sb_ce_o   = sa_ce_o;
      end
      S_DECIDE: begin
        sa_addr_o  = {hash1_q, wr_way[WORD_W-1:0]};
        sb_addr_o  = {hash1_q, wr_way[WORD_W-1:0]};
        sa_wdata_o = wr_entry;
        sb_wdata_o = wr_entry;
        sa_ce_o    = wr_en && !wr_way[WORD_W];
        sb_ce_o    = wr_en &&  wr_way[WORD_W];
        sa_we_o    = sa_ce_o;
        sb_we_o    = sb_ce_o;
      end
      S_SW_RD: begin
        sa_ce_o = 1'b1; sb_ce_o = 1'b1;
      end
      S_SW_CHK: begin
        sa_ce_o = exp_a; sa_we_o = exp_a;
        sb_ce_o = exp_b; sb_we_o = exp_b;
      end
      default: ;
    endcase
  end

  assign in_ready_o     = (state_q == S_IDLE);
  assign out_valid_o    = (state_q == S_RESP);
  assign init_done_o    = (state_q != S_INIT);
  assign sweep_remove_o = (state_q == S_SW_CHK) && (exp_a || exp_b);

  // ------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_INIT;
      ptr_q      <= '0;
      cnt_q      <= '0;
      rd_valid_q <= 1'b0;
      rd_word_q  <= '0;
      desc_q     <= '0;
      pcf_q      <= 1'b0;
      hash1_q    <= '0;
      hash2_q    <= '0;
      out_res_o  <= '0;
    end else begin
      rd_valid_q <= 1'b0;
      unique case (state_q)
        S_INIT: begin
          ptr_q <= ptr_q + 1'b1;
          if (ptr_q == '1) state_q <= S_IDLE;
        end
        S_IDLE: begin
          if (in_valid_i) begin
            desc_q  <= in_desc_i;
            pcf_q   <= pcf_d;
            hash1_q <= hash1_d;
            hash2_q <= hash2_d;
            cnt_q   <= '0;
            if (in_desc_i.proto == PROTO_TCP) begin
              state_q <= S_SCAN;
            end else begin
              out_res_o        <= '0;
              out_res_o.desc   <= in_desc_i;
              out_res_o.pcf    <= pcf_d;
              out_res_o.cstate <= CS_FREE;
              state_q          <= S_RESP;
            end
          end else begin
            state_q <= S_SW_RD;
          end
        end
        S_SCAN: begin
          if (cnt_q < (WORD_W+1)'(WAYS_PER_SRAM)) begin
            cnt_q      <= cnt_q + 1'b1;
            rd_valid_q <= 1'b1;
            rd_word_q  <= cnt_q[WORD_W-1:0];
          end else begin
            state_q <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          out_res_o.desc        <= desc_q;
          out_res_o.cstate      <= cstate_new;
          out_res_o.pcf         <= pcf_q;
          out_res_o.hit         <= hit;
          out_res_o.new_session <= new_session;
          out_res_o.replaced    <= replaced;
          out_res_o.removed     <= removed;
          out_res_o.drop        <= !hit && !new_session && cfg_drop_unmatched_i;
          state_q               <= S_RESP;
        end
        S_RESP: if (out_ready_i) state_q <= S_SW_RD;
        S_SW_RD: state_q <= S_SW_CHK;
        S_SW_CHK: begin
          ptr_q   <= ptr_q + 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A response is held until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid_o && !out_ready_i |=> out_valid_o && $stable(out_res_o));

  // lru_valid is only needed when the set is full; it is then always set.
  assert property (@(posedge clk) disable iff (!rst_n)
                   state_q == S_DECIDE && new_session && !free |-> lru_valid);

endmodule
