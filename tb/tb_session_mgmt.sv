// tb_session_mgmt: update of a hit entry, creation into a free way, LRU
// replacement of a full set, deletion on RST / second FIN, and no write for
// an unmatched non-SYN packet.
module tb_session_mgmt;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  logic hit, free;
  logic [4:0] hit_way, free_way, lru_way, wr_way;
  entry_t hit_entry, wr_entry;
  tcp_flags_t fl;
  logic pcf;
  logic [24:0] h2;
  logic [7:0] now;
  logic wr_en, new_s, repl, rem;
  cstate_t cs;
  int checks = 0, failures = 0;

  session_mgmt dut (.hit_i(hit), .hit_way_i(hit_way), .hit_entry_i(hit_entry),
    .free_i(free), .free_way_i(free_way), .lru_way_i(lru_way), .flags_i(fl),
    .pcf_i(pcf), .hash2_i(h2), .now_i(now), .wr_en_o(wr_en), .wr_way_o(wr_way),
    .wr_entry_o(wr_entry), .cstate_o(cs), .new_session_o(new_s),
    .replaced_o(repl), .removed_o(rem));

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_s;
    for (int i = 0; i < 500; i++) begin
      kind_e k;
      k = kind_e'($urandom_range(0, int'(K_DATA)));
      hit = $urandom_range(0, 1); free = $urandom_range(0, 1);
      hit_way = 5'($urandom); free_way = 5'($urandom); lru_way = 5'($urandom);
      hit_entry = '{3'($urandom), 8'($urandom), 25'($urandom)};
      if (hit_entry.cstate == 3'b000 || hit_entry.cstate == 3'b011) hit_entry.cstate = 3'b100;
      fl = kind_flags(k); pcf = $urandom_range(0, 1);
      h2 = 25'($urandom); now = 8'($urandom);
      #1;
      if (hit) begin
        exp_s = ref_next(hit_entry.cstate, k, pcf);
        chk("hit write", wr_en && wr_way == hit_way);
        chk("hit entry", wr_entry == {exp_s, now, h2});
        chk("hit state", cs == exp_s);
        chk("hit flags", !new_s && !repl && rem == (exp_s == 3'b000));
      end else if (k == K_SYN) begin
        chk("new write", wr_en && new_s && wr_entry == {3'b001, now, h2});
        chk("new way", wr_way == (free ? free_way : lru_way));
        chk("replaced", repl == !free);
        chk("new state", cs == 3'b001);
      end else begin
        chk("no write", !wr_en && !new_s && !repl && cs == 3'b000);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
