// tb_state_manager: the session state manager with two small session-table
// SRAMs (4 sets x 2 x 4 ways). Directed scenarios: a handshake, data both
// ways and FIN/FIN close for a client with the lower IP (state 100) and one
// with the higher IP (state 110, closed by RST); unmatched packets with and
// without the drop policy; a non-TCP bypass; filling a set and LRU
// replacement; embryonic and established timeouts and the background sweep.
// Expected states come from the transition table, the response latency is
// checked against WAYS_PER_SRAM + 2 cycles, the timer against TICK_CYCLES.
module tb_state_manager;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  localparam int SB = 2, WPS = 4, TICK = 200, AW = SB + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  pkt_desc_t in_d;
  sm_result_t res;
  logic [7:0] emb_to, est_to, now;
  logic drop_unm, init_done, sweep_rm;
  logic sa_ce, sa_we, sb_ce, sb_we;
  logic [AW-1:0] sa_addr, sb_addr;
  entry_t sa_wd, sa_rd, sb_wd, sb_rd;
  int checks = 0, failures = 0, sweeps = 0;

  state_manager #(.SET_BITS(SB), .WAYS_PER_SRAM(WPS), .TICK_CYCLES(TICK)) dut (
    .clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready), .in_desc_i(in_d),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_res_o(res),
    .cfg_emb_timeout_i(emb_to), .cfg_est_timeout_i(est_to), .cfg_drop_unmatched_i(drop_unm),
    .sa_ce_o(sa_ce), .sa_we_o(sa_we), .sa_addr_o(sa_addr), .sa_wdata_o(sa_wd), .sa_rdata_i(sa_rd),
    .sb_ce_o(sb_ce), .sb_we_o(sb_we), .sb_addr_o(sb_addr), .sb_wdata_o(sb_wd), .sb_rdata_i(sb_rd),
    .init_done_o(init_done), .sweep_remove_o(sweep_rm), .now_o(now));

  session_sram #(.ADDR_W(AW), .DATA_W(36)) m1 (.clk, .ce_i(sa_ce), .we_i(sa_we),
    .addr_i(sa_addr), .wdata_i(sa_wd), .rdata_o(sa_rd));
  session_sram #(.ADDR_W(AW), .DATA_W(36)) m2 (.clk, .ce_i(sb_ce), .we_i(sb_we),
    .addr_i(sb_addr), .wdata_i(sb_wd), .rdata_o(sb_rd));

  always @(posedge clk) if (sweep_rm) sweeps++;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one packet, return the result and the latency in cycles
  task automatic send(tuple_t t, logic [7:0] proto, kind_e k, output sm_result_t r,
                      output int lat);
    @(negedge clk);
    in_valid = 1; in_d = '0; in_d.tuple = t; in_d.proto = proto; in_d.flags = kind_flags(k);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
    lat = 0;   // clock edges after the accepting edge
    while (!out_valid) begin @(negedge clk); lat++; end
    r = res;
    @(negedge clk);   // the result was taken at the edge before (out_ready high)
    chk("result keeps descriptor", r.desc.tuple == t);
  endtask

  // send a TCP packet and check the resulting state and latency
  task automatic tcp(tuple_t t, kind_e k, logic [2:0] exp_state, logic exp_hit,
                     string what, output sm_result_t r);
    int lat;
    send(t, 8'd6, k, r, lat);
    chk({what, ": state"}, r.cstate == exp_state);
    chk({what, ": hit"}, r.hit == exp_hit);
    chk({what, ": latency"}, lat == WPS + 2);
    if (lat != WPS + 2) $display("   latency %0d", lat);
    if (r.cstate != exp_state || r.hit != exp_hit)
      $display("   got state %b hit %0d", r.cstate, r.hit);
  endtask

  function automatic tuple_t rev(tuple_t t);
    return '{t.dst_ip, t.src_ip, t.dst_port, t.src_port};
  endfunction

  task automatic wait_ticks(int n);
    repeat (n * TICK) @(posedge clk);
  endtask

  initial begin
    sm_result_t r;
    int lat, n_same;
    tuple_t a, b, c, x;
    tuple_t same [10];
    logic [7:0] t0;
    in_valid = 0; in_d = '0; out_ready = 1; emb_to = 8'd3; est_to = 8'd10; drop_unm = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // table clear takes 2^AW cycles
    repeat (2 ** AW + 2) @(posedge clk);
    chk("init done", init_done);

    // timer advances once per TICK cycles
    @(negedge clk); t0 = now;
    repeat (TICK) @(posedge clk);
    @(negedge clk);
    chk("timer tick", now == t0 + 1);

    // client with the lower IP: states 001, 010, 100, 101, 000
    a = '{32'h0A00_0001, 32'h0A00_0002, 16'd40000, 16'd80};
    tcp(a, K_SYN, 3'b001, 0, "A syn", r);
    chk("A new session", r.new_session && !r.replaced && r.pcf == 0);
    tcp(rev(a), K_SYNACK, 3'b010, 1, "A synack", r);
    chk("A synack pcf", r.pcf == 1);
    tcp(a, K_ACK, 3'b100, 1, "A ack", r);
    tcp(a, K_DATA, 3'b100, 1, "A data c2s", r);
    chk("A c2s info", ref_info(r.cstate, r.pcf) == SI_EST_C2S);
    tcp(rev(a), K_DATA, 3'b100, 1, "A data s2c", r);
    chk("A s2c info", ref_info(r.cstate, r.pcf) == SI_EST_S2C);
    tcp(rev(a), K_FIN, 3'b101, 1, "A fin1", r);
    tcp(a, K_FIN, 3'b000, 1, "A fin2", r);
    chk("A removed", r.removed);
    tcp(a, K_DATA, 3'b000, 0, "A after close", r);
    chk("A unmatched passes", !r.drop);

    // client with the higher IP: state 110, RST
    b = '{32'hC0A8_0105, 32'h0A00_0009, 16'd5555, 16'd22};
    tcp(b, K_SYN, 3'b001, 0, "B syn", r);
    chk("B pcf", r.pcf == 1);
    tcp(rev(b), K_SYNACK, 3'b010, 1, "B synack", r);
    tcp(b, K_ACK, 3'b110, 1, "B ack", r);
    chk("B c2s info", ref_info(r.cstate, r.pcf) == SI_EST_C2S);
    tcp(rev(b), K_DATA, 3'b110, 1, "B s2c", r);
    chk("B s2c info", ref_info(r.cstate, r.pcf) == SI_EST_S2C);
    tcp(rev(b), K_RST, 3'b000, 1, "B rst", r);

    // unmatched packets and the drop policy; a SYN/ACK does not open a session
    drop_unm = 1;
    c = '{32'h0B00_0001, 32'h0B00_0002, 16'd1, 16'd2};
    tcp(c, K_SYNACK, 3'b000, 0, "C synack unmatched", r);
    chk("C dropped", r.drop && !r.new_session);
    tcp(c, K_ACK, 3'b000, 0, "C ack unmatched", r);
    chk("C ack dropped", r.drop);
    drop_unm = 0;

    // non-TCP bypass
    send(c, 8'd17, K_DATA, r, lat);
    chk("udp bypass", r.cstate == 3'b000 && !r.hit && !r.drop && lat == 0);

    // fill one set: 2*WPS sessions one tick apart, touch the first, add one
    emb_to = 8'd200; est_to = 8'd200;
    n_same = 0;
    while (n_same < 2 * WPS + 1) begin
      x = '{$urandom, $urandom, 16'($urandom), 16'($urandom)};
      if (ref_set(x, SB) == 1) begin same[n_same] = x; n_same++; end
    end
    for (int i = 0; i < 2 * WPS; i++) begin
      tcp(same[i], K_SYN, 3'b001, 0, "fill syn", r);
      chk("fill not replaced", r.new_session && !r.replaced);
      wait_ticks(1);
    end
    tcp(rev(same[0]), K_SYNACK, 3'b010, 1, "touch first", r);
    tcp(same[2 * WPS], K_SYN, 3'b001, 0, "overflow syn", r);
    chk("overflow replaced", r.new_session && r.replaced);
    tcp(rev(same[1]), K_SYNACK, 3'b000, 0, "LRU victim gone", r);
    tcp(same[0], K_ACK, 3'b100 | {1'b0, ref_order(same[0], lat[0]) != same[0], 1'b0}, 1,
        "recent kept", r);
    for (int i = 2; i < 2 * WPS; i++) tcp(rev(same[i]), K_SYNACK, 3'b010, 1, "others kept", r);

    // embryonic timeout, then sweep
    emb_to = 8'd2; est_to = 8'd6;
    a = '{32'h0C00_0001, 32'h0C00_0002, 16'd7, 16'd8};
    tcp(a, K_SYN, 3'b001, 0, "D syn", r);
    b = '{32'h0D00_0001, 32'h0D00_0002, 16'd7, 16'd8};
    tcp(b, K_SYN, 3'b001, 0, "E syn", r);
    tcp(rev(b), K_SYNACK, 3'b010, 1, "E synack", r);
    tcp(b, K_ACK, 3'b100, 1, "E ack", r);
    sweeps = 0;
    wait_ticks(4);
    chk("sweep removed entries", sweeps > 0);
    tcp(rev(a), K_SYNACK, 3'b000, 0, "D embryonic timed out", r);
    tcp(b, K_DATA, 3'b100, 1, "E established survives", r);
    wait_ticks(8);
    tcp(b, K_DATA, 3'b000, 0, "E established timed out", r);

    // back-pressure on the result
    out_ready = 0;
    @(negedge clk);
    in_valid = 1; in_d = '0; in_d.tuple = c; in_d.proto = 8'd6; in_d.flags = kind_flags(K_SYN);
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
    repeat (30) @(negedge clk);
    chk("result held", out_valid && res.new_session);
    out_ready = 1;
    @(negedge clk);
    chk("result taken", !out_valid);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
