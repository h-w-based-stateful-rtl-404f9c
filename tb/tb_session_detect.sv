// tb_session_detect: random hash sets (with planted matches, free and
// timed-out entries) streamed as 16 pairs; hit, free way and LRU way are
// compared with a brute-force search of the same 32 entries.
module tb_session_detect;
  import spi_pkg::*;

  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, valid;
  logic [3:0] word;
  entry_t ea, eb;
  logic [24:0] h2;
  logic [7:0] now, emb_to, est_to;
  logic hit, free, lru_valid;
  logic [4:0] hit_way, free_way, lru_way;
  entry_t hit_entry;
  int checks = 0, failures = 0;

  session_detect #(.WAYS_PER_SRAM(W)) dut (
    .clk, .rst_n, .start_i(start), .valid_i(valid), .word_i(word),
    .entry_a_i(ea), .entry_b_i(eb), .hash2_i(h2), .now_i(now),
    .emb_to_i(emb_to), .est_to_i(est_to),
    .hit_o(hit), .hit_way_o(hit_way), .hit_entry_o(hit_entry),
    .free_o(free), .free_way_o(free_way), .lru_valid_o(lru_valid), .lru_way_o(lru_way));

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  entry_t set_e [2*W];

  initial begin
    int  e_hit, e_free, e_lru, best_age, age, lim;
    bit  live;
    start = 0; valid = 0; word = 0; ea = '0; eb = '0; h2 = '0;
    now = 0; emb_to = 10; est_to = 100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 400; trial++) begin
      h2 = 25'($urandom); now = 8'($urandom);
      emb_to = 8'($urandom_range(1, 60)); est_to = 8'($urandom_range(60, 250));
      for (int w = 0; w < 2*W; w++) begin
        set_e[w].cstate = 3'($urandom);
        set_e[w].ts     = now - 8'($urandom_range(0, 255));
        set_e[w].haddr  = ($urandom_range(0, 9) == 0) ? h2 : 25'($urandom);
        if (trial % 4 == 0) begin   // full set of fresh sessions
          set_e[w].cstate = 3'b100 | 3'($urandom_range(0, 3));
          set_e[w].ts     = now - 8'($urandom_range(0, 50));
        end
      end
      // reference
      e_hit = -1; e_free = -1; e_lru = -1; best_age = -1;
      for (int w = 0; w < 2*W; w++) begin
        // visit order: pair by pair, SRAM#1 before SRAM#2
        int v;
        v = (w % 2 == 0) ? w / 2 : W + w / 2;
        age  = int'(8'(now - set_e[v].ts));
        lim  = set_e[v].cstate[2] ? est_to : emb_to;
        live = !(set_e[v].cstate inside {3'b000, 3'b011}) && age <= lim;
        if (live && set_e[v].haddr == h2 && e_hit < 0) e_hit = v;
        if (!live && e_free < 0) e_free = v;
        if (live && age > best_age) begin best_age = age; e_lru = v; end
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < W; k++) begin
        valid = 1; word = 4'(k); ea = set_e[k]; eb = set_e[W+k];
        @(negedge clk);
      end
      valid = 0; ea = '0; eb = '0;
      chk("hit flag", hit == (e_hit >= 0));
      if (e_hit >= 0) begin
        chk("hit way", hit_way == 5'(e_hit));
        chk("hit entry", hit_entry == set_e[e_hit]);
      end
      chk("free flag", free == (e_free >= 0));
      if (e_free >= 0) chk("free way", free_way == 5'(e_free));
      chk("lru flag", lru_valid == (e_lru >= 0));
      if (e_lru >= 0) chk("lru way", lru_way == 5'(e_lru));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
