// tb_state_manager_rand: random TCP traffic over a small pool of connections
// into a tiny session table (2 sets x 4 ways), so that sets overflow, entries
// are replaced, sessions time out and the timer wraps many times. Every
// result (state after the packet, hit, new session, replacement, removal) is
// compared with a behavioural model of the table that keeps absolute time
// stamps and applies the documented rules: search by Hash2 in the Hash1 set,
// update on hit, create only on SYN into the first free way or the least
// recently used one, and expire embryonic / established entries after their
// timeouts. Packets are only sent when no timer tick can fall inside their
// processing, so that model and design see the same time. A last phase
// opens a session in every pool connection, lets the 8-bit timer wrap once
// with no traffic, and checks that the background sweep has cleared them all,
// so none is found again when its time stamp looks young.
module tb_state_manager_rand;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  localparam int SB = 1, WPS = 2, TICK = 100, AW = SB + 1, NWAY = 2 * WPS;
  localparam int EMB = 3, EST = 8, POOL = 14, NPKT = 4000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  pkt_desc_t in_d;
  sm_result_t res;
  logic [7:0] now;
  logic init_done, sweep_rm;
  logic sa_ce, sa_we, sb_ce, sb_we;
  logic [AW-1:0] sa_addr, sb_addr;
  entry_t sa_wd, sa_rd, sb_wd, sb_rd;
  int checks = 0, failures = 0;
  int n_repl = 0, n_new = 0, n_rm = 0, n_exp = 0, n_est = 0;

  state_manager #(.SET_BITS(SB), .WAYS_PER_SRAM(WPS), .TICK_CYCLES(TICK)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready), .in_desc_i(in_d),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_res_o(res),
    .cfg_emb_timeout_i(8'(EMB)), .cfg_est_timeout_i(8'(EST)), .cfg_drop_unmatched_i(1'b0),
    .sa_ce_o(sa_ce), .sa_we_o(sa_we), .sa_addr_o(sa_addr), .sa_wdata_o(sa_wd), .sa_rdata_i(sa_rd),
    .sb_ce_o(sb_ce), .sb_we_o(sb_we), .sb_addr_o(sb_addr), .sb_wdata_o(sb_wd), .sb_rdata_i(sb_rd),
    .init_done_o(init_done), .sweep_remove_o(sweep_rm), .now_o(now));

  session_sram #(.ADDR_W(AW), .DATA_W(36)) m1 (.clk, .ce_i(sa_ce), .we_i(sa_we),
    .addr_i(sa_addr), .wdata_i(sa_wd), .rdata_o(sa_rd));
  session_sram #(.ADDR_W(AW), .DATA_W(36)) m2 (.clk, .ce_i(sb_ce), .we_i(sb_we),
    .addr_i(sb_addr), .wdata_i(sb_wd), .rdata_o(sb_rd));

  // absolute time, following the design's timer
  int now_abs = 0, since_tick = 0;
  logic [7:0] now_prev = 0;
  always @(posedge clk) begin
    if (rst_n && now != now_prev) begin now_abs++; since_tick = 0; end
    else since_tick++;
    now_prev <= now;
  end

  // model of the table
  typedef struct { logic [2:0] st; int ts; logic [24:0] h; } ment_t;
  ment_t tab [2**SB][NWAY];

  function automatic bit mlive(ment_t e, int t);
    if (e.st == 3'b000 || e.st == 3'b011) return 0;
    return (t - e.ts) <= (e.st[2] ? EST : EMB);
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one packet, update the model and compare
  task automatic one_pkt(tuple_t t, kind_e k);
    tuple_t o;
    logic pcf;
    int set, hit, fre, lru, best, age, t_now;
    logic [24:0] h2;
    logic [31:0] c;
    logic [2:0] exp_st;
    bit exp_new, exp_repl, exp_rm;
      // keep a timer tick out of the packet's processing
    @(negedge clk);
    while (since_tick + 30 >= TICK || since_tick < 2) @(negedge clk);
    t_now = now_abs;
    // model
    o   = ref_order(t, pcf);
    set = ref_set(t, SB);
    c   = ref_crc(o, 32'h1EDC_6F41);
    h2  = c[24:0];
    hit = -1; fre = -1; lru = -1; best = -1;
    for (int i = 0; i < NWAY; i++) begin
      int v;
      v = (i % 2 == 0) ? i / 2 : WPS + i / 2;
      age = t_now - tab[set][v].ts;
      if (mlive(tab[set][v], t_now)) begin
        if (hit < 0 && tab[set][v].h == h2) hit = v;
        if (age > best) begin best = age; lru = v; end
      end else if (fre < 0) fre = v;
    end
    exp_new = 0; exp_repl = 0; exp_rm = 0;
    if (hit >= 0) begin
      exp_st = ref_next(tab[set][hit].st, k, pcf);
      exp_rm = (exp_st == 3'b000);
      tab[set][hit] = '{exp_st, t_now, h2};
    end else if (k == K_SYN) begin
      exp_st = 3'b001; exp_new = 1; exp_repl = (fre < 0);
      tab[set][(fre >= 0) ? fre : lru] = '{3'b001, t_now, h2};
    end else begin
      exp_st = 3'b000;
    end
    // design
    in_valid = 1; in_d = '0; in_d.tuple = t; in_d.proto = 8'd6; in_d.flags = kind_flags(k);
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    chk("state", res.cstate == exp_st);
    chk("hit", res.hit == (hit >= 0));
    chk("new session", res.new_session == exp_new);
    chk("replaced", res.replaced == exp_repl);
    chk("removed", res.removed == exp_rm);
    if (res.cstate != exp_st || res.hit != (hit >= 0))
      $display("   kind %0d set %0d: got state %b hit %0d, expected %b hit %0d",
               k, set, res.cstate, res.hit, exp_st, hit >= 0);
    n_new += exp_new; n_repl += exp_repl; n_rm += exp_rm;
    if (exp_st[2] && hit >= 0) n_est++;
    if (hit < 0 && k != K_SYN) n_exp++;
    @(negedge clk);
  endtask

  tuple_t pool [POOL];

  initial begin
    for (int s = 0; s < 2**SB; s++)
      for (int w = 0; w < NWAY; w++) tab[s][w] = '{3'b000, 0, '0};
    for (int i = 0; i < POOL; i++)
      pool[i] = '{$urandom, $urandom, 16'($urandom), 16'($urandom)};
    in_valid = 0; in_d = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int n = 0; n < NPKT; n++) begin
      tuple_t t;
      kind_e k;
      // traffic: pick a connection, a direction and a packet kind
      t = pool[$urandom_range(0, POOL - 1)];
      if ($urandom_range(0, 1)) t = '{t.dst_ip, t.src_ip, t.dst_port, t.src_port};
      case ($urandom_range(0, 9))
        0, 1:    k = K_SYN;
        2:       k = K_SYNACK;
        3, 4:    k = K_ACK;
        5:       k = K_FIN;
        6:       k = K_RST;
        default: k = K_DATA;
      endcase
      // mostly follow the connection's own progress
      if ($urandom_range(0, 9) < 7) begin
        logic [2:0] cur;
        logic pf;
        logic [31:0] cc;
        cur = 3'b000;
        cc = ref_crc(ref_order(t, pf), 32'h1EDC_6F41);
        for (int v = 0; v < NWAY; v++)
          if (mlive(tab[ref_set(t, SB)][v], now_abs) && tab[ref_set(t, SB)][v].h == cc[24:0])
            cur = tab[ref_set(t, SB)][v].st;
        case (cur)
          3'b000:  k = K_SYN;
          3'b001:  k = K_SYNACK;
          3'b010:  k = K_ACK;
          default: k = ($urandom_range(0, 5) == 0) ? K_FIN : K_DATA;
        endcase
      end
      // let time pass now and then
      if ($urandom_range(0, 7) == 0) repeat ($urandom_range(1, 4) * TICK) @(posedge clk);
      one_pkt(t, k);
    end
    // wrap-around: touch every connection, stay idle for one full timer
    // period (256 ticks), then try them again: all must have timed out
    for (int i = 0; i < POOL; i++) one_pkt(pool[i], K_SYN);
    repeat (256 * TICK) @(posedge clk);
    for (int i = 0; i < POOL; i++) begin
      one_pkt(pool[i], K_DATA);
      if (res.hit) begin failures++; $display("FAIL entry survived a timer wrap"); end
    end
    $display("new %0d, replaced %0d, removed %0d, established hits %0d, unmatched %0d, timer ticks %0d",
             n_new, n_repl, n_rm, n_est, n_exp, now_abs);
    checks++;
    if (n_repl == 0 || n_rm == 0 || n_est == 0 || now_abs < 300) begin
      failures++; $display("FAIL traffic did not exercise replacement, removal or wrap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
