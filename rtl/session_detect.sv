// session_detect: session detection module.
//
// Searches one hash set of the session table for the packet's session. The
// set is spread over two SRAMs (ways 0..W-1 in SRAM#1, ways W..2W-1 in
// SRAM#2) which are read in parallel, one word of each per cycle, so a
// 32-way set arrives as 16 pairs. For every pair presented with valid_i the
// module keeps:
//   - hit:  the first live entry whose hash address equals Hash2,
//   - free: the first way that is not live (state 000, or timed out),
//   - lru:  the live way with the greatest age (timer minus time stamp), i.e.
//           the least recently used entry, which is replaced when the set is
//           full.
// "Live" is spi_pkg::entry_live: an embryonic entry (001, 010) expires after
// emb_to_i timer ticks, an established one after est_to_i. Searching by
// Hash2 inside the set chosen by Hash1, and LRU replacement by time stamp,
// follow the design description; scanning pair by pair and ties going to the
// lower way are this design's choices.
//
// Timing: start_i clears the result; each valid_i cycle folds one pair in;
// results are valid the cycle after the last pair.
module session_detect
  import spi_pkg::*;
#(
  parameter int unsigned WAYS_PER_SRAM = 16,
  parameter int unsigned H2_W          = HADDR_W,
  localparam int unsigned WORD_W = $clog2(WAYS_PER_SRAM),
  localparam int unsigned WAY_W  = WORD_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic              valid_i,
  input  logic [WORD_W-1:0] word_i,
  input  entry_t            entry_a_i,   // from SRAM#1
  input  entry_t            entry_b_i,   // from SRAM#2
  input  logic [H2_W-1:0]   hash2_i,
  input  logic [TS_W-1:0]   now_i,
  input  logic [TS_W-1:0]   emb_to_i,
  input  logic [TS_W-1:0]   est_to_i,
  output logic              hit_o,
  output logic [WAY_W-1:0]  hit_way_o,
  output entry_t            hit_entry_o,
  output logic              free_o,
  output logic [WAY_W-1:0]  free_way_o,
  output logic              lru_valid_o,
  output logic [WAY_W-1:0]  lru_way_o
);

  logic [TS_W-1:0] lru_age_q;

  logic            live_a, live_b, match_a, match_b;
  logic [TS_W-1:0] age_a, age_b;
  logic [WAY_W-1:0] way_a, way_b;

  always_comb begin
    way_a   = {1'b0, word_i};
    way_b   = {1'b1, word_i};
    live_a  = entry_live(entry_a_i, now_i, emb_to_i, est_to_i);
    live_b  = entry_live(entry_b_i, now_i, emb_to_i, est_to_i);
    match_a = live_a && (entry_a_i.haddr[H2_W-1:0] == hash2_i);
    match_b = live_b && (entry_b_i.haddr[H2_W-1:0] == hash2_i);
    age_a   = now_i - entry_a_i.ts;
    age_b   = now_i - entry_b_i.ts;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_o       <= 1'b0;
      hit_way_o   <= '0;
      hit_entry_o <= '0;
      free_o      <= 1'b0;
      free_way_o  <= '0;
      lru_valid_o <= 1'b0;
      lru_way_o   <= '0;
      lru_age_q   <= '0;
    end else if (start_i) begin
      hit_o       <= 1'b0;
      free_o      <= 1'b0;
      lru_valid_o <= 1'b0;
      lru_age_q   <= '0;
    end else if (valid_i) begin
      // hit
      if (!hit_o) begin
        if (match_a) begin
          hit_o <= 1'b1; hit_way_o <= way_a; hit_entry_o <= entry_a_i;
        end else if (match_b) begin
          hit_o <= 1'b1; hit_way_o <= way_b; hit_entry_o <= entry_b_i;
        end
      end
      // free way
      if (!free_o) begin
        if (!live_a) begin
          free_o <= 1'b1; free_way_o <= way_a;
        end else if (!live_b) begin
          free_o <= 1'b1; free_way_o <= way_b;
        end
      end
      // least recently used live way
      if (live_a && (!lru_valid_o || age_a > lru_age_q) &&
          !(live_b && age_b > age_a)) begin
        lru_valid_o <= 1'b1; lru_way_o <= way_a; lru_age_q <= age_a;
      end else if (live_b && (!lru_valid_o || age_b > lru_age_q)) begin
        lru_valid_o <= 1'b1; lru_way_o <= way_b; lru_age_q <= age_b;
      end
    end
  end

endmodule
