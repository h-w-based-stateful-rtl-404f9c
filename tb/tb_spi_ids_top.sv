// tb_spi_ids_top: end-to-end test of the SPI module at reduced size
// (8 sets x 2 x 4 ways, 200-cycle timer tick). Packets go in as IPv4 word
// streams; each descriptor for the intrusion detection engine is checked for
// its tuple, state information and drop flag. Every mechanism of the design
// is made to happen and counted: table clear, filter drop, non-TCP bypass,
// session creation, handshakes registered in both orientations (100 and 110),
// both directions of state information, half-close and close by FIN, RST,
// unmatched packets passed and dropped, LRU replacement in a full set,
// embryonic and established timeouts, the background sweep and back-pressure
// from the engine. The packet data output is taken with random back-pressure
// and must carry, word by word and with the right state information, exactly
// the packets that reached the engine and were not dropped. A mechanism that
// never happened counts as a failure.
module tb_spi_ids_top;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  localparam int SB = 3, WPS = 4, TICK = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pkt_valid, pkt_ready, pkt_sop, pkt_eop;
  logic [31:0] pkt_data;
  logic rule_we;
  logic [2:0] rule_idx;
  filter_rule_t rule;
  logic [7:0] emb_to, est_to, now;
  logic drop_unm, ide_valid, ide_ready, filt_drop, sweep_rm, init_done;
  ide_desc_t ide;
  sm_result_t sres;
  int checks = 0, failures = 0;
  logic pd_valid, pd_ready, pd_sop, pd_eop;
  logic [31:0] pd_data;
  state_info_e pd_info;
  // words expected on the packet data output, with their state information
  logic [31:0] expw [$];
  logic        exps [$], expe [$];
  state_info_e expi [$];

  typedef enum int {
    M_INIT, M_FILTER, M_BYPASS, M_NEW, M_EST, M_EST_REV, M_C2S, M_S2C, M_HALF,
    M_FIN_CLOSE, M_RST, M_UNM_PASS, M_UNM_DROP, M_REPLACE, M_EMB_TO, M_EST_TO,
    M_SWEEP, M_BACKPRESSURE, M_PKT_DATA, M_N
  } mech_e;
  int mech [M_N];

  spi_ids_top #(.SET_BITS(SB), .WAYS_PER_SRAM(WPS), .TICK_CYCLES(TICK)) dut (
    .clk, .rst_n, .pkt_valid_i(pkt_valid), .pkt_ready_o(pkt_ready),
    .pkt_sop_i(pkt_sop), .pkt_eop_i(pkt_eop), .pkt_data_i(pkt_data),
    .rule_we_i(rule_we), .rule_idx_i(rule_idx), .rule_wdata_i(rule),
    .cfg_emb_timeout_i(emb_to), .cfg_est_timeout_i(est_to), .cfg_drop_unmatched_i(drop_unm),
    .ide_valid_o(ide_valid), .ide_ready_i(ide_ready), .ide_desc_o(ide), .sess_res_o(sres),
    .pd_valid_o(pd_valid), .pd_ready_i(pd_ready), .pd_sop_o(pd_sop), .pd_eop_o(pd_eop),
    .pd_data_o(pd_data), .pd_info_o(pd_info),
    .filt_drop_o(filt_drop), .sweep_remove_o(sweep_rm), .init_done_o(init_done), .now_o(now));

  always @(posedge clk) if (sweep_rm) mech[M_SWEEP]++;

  // the packet data output, taken with random back-pressure, must carry
  // exactly the packets that reached the engine undropped, in order
  initial begin
    pd_ready = 0;
    forever begin
      @(negedge clk);
      pd_ready = $urandom_range(0, 2) != 0;
    end
  end
  always @(posedge clk) begin
    if (rst_n && pd_valid && pd_ready) begin
      checks++;
      if (expw.size() == 0) begin
        failures++;
        $display("FAIL packet data word with none expected (t=%0t)", $time);
      end else begin
        logic [31:0] w;
        logic ps, pe;
        state_info_e pi;
        w = expw.pop_front(); ps = exps.pop_front(); pe = expe.pop_front(); pi = expi.pop_front();
        if (pd_data != w || pd_sop != ps || pd_eop != pe || pd_info != pi) begin
          failures++;
          $display("FAIL packet data word %h sop %b eop %b info %0d, expected %h %b %b %0d (t=%0t)",
                   pd_data, pd_sop, pd_eop, pd_info, w, ps, pe, pi, $time);
        end else if (pe) mech[M_PKT_DATA]++;
      end
    end
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one packet; return 1 and the descriptor if it reached the engine,
  // 0 if the filter dropped it.
  task automatic send(tuple_t t, logic [7:0] proto, kind_e k, output bit got,
                      output ide_desc_t d, output sm_result_t s);
    words_t w;
    w = build_pkt(t, proto, kind_flags(k), 5, $urandom_range(0, 3));
    for (int i = 0; i < w.size(); i++) begin
      @(negedge clk);
      pkt_valid = 1; pkt_data = w[i]; pkt_sop = (i == 0); pkt_eop = (i == w.size() - 1);
      @(posedge clk);
      while (!pkt_ready) @(posedge clk);
    end
    @(negedge clk); pkt_valid = 0; pkt_sop = 0; pkt_eop = 0;
    got = 0;
    forever begin
      @(posedge clk);
      if (filt_drop) begin got = 0; break; end
      if (ide_valid && ide_ready) begin got = 1; d = ide; s = sres; break; end
    end
    if (got && !d.drop)
      for (int i = 0; i < w.size(); i++) begin
        expw.push_back(w[i]); exps.push_back(i == 0); expe.push_back(i == w.size() - 1);
        expi.push_back(d.info);
      end
    @(negedge clk);
  endtask

  task automatic tcp(tuple_t t, kind_e k, state_info_e exp_info, logic exp_drop,
                     string what, output sm_result_t s);
    bit got;
    ide_desc_t d;
    send(t, 8'd6, k, got, d, s);
    chk({what, ": delivered"}, got);
    chk({what, ": tuple"}, d.desc.tuple == t && d.desc.flags == kind_flags(k));
    chk({what, ": info"}, d.info == exp_info);
    chk({what, ": drop"}, d.drop == exp_drop);
    if (d.info != exp_info) $display("   info %0d exp %0d state %b", d.info, exp_info, s.cstate);
    if (s.new_session) mech[M_NEW]++;
    if (s.replaced) mech[M_REPLACE]++;
    if (d.info == SI_EST_C2S) mech[M_C2S]++;
    if (d.info == SI_EST_S2C) mech[M_S2C]++;
    if (s.cstate == 3'b100 && k == K_ACK && s.hit) mech[M_EST]++;
    if (s.cstate == 3'b110 && k == K_ACK && s.hit) mech[M_EST_REV]++;
    if (s.cstate inside {3'b101, 3'b111}) mech[M_HALF]++;
    if (s.removed && k == K_FIN) mech[M_FIN_CLOSE]++;
    if (s.removed && k == K_RST) mech[M_RST]++;
    if (!s.hit && !s.new_session && !d.drop) mech[M_UNM_PASS]++;
    if (!s.hit && !s.new_session && d.drop) mech[M_UNM_DROP]++;
  endtask

  function automatic tuple_t rev(tuple_t t);
    return '{t.dst_ip, t.src_ip, t.dst_port, t.src_port};
  endfunction

  // full handshake from client c; returns with the session established
  task automatic open_session(tuple_t c, string what);
    sm_result_t s;
    logic pcf;
    void'(ref_order(c, pcf));
    tcp(c, K_SYN, SI_SYN_RCVD, 0, {what, " syn"}, s);
    tcp(rev(c), K_SYNACK, SI_SYNACK, 0, {what, " synack"}, s);
    tcp(c, K_ACK, SI_EST_C2S, 0, {what, " ack"}, s);
    chk({what, " registered orientation"}, s.cstate == (pcf ? 3'b110 : 3'b100));
  endtask

  initial begin
    sm_result_t s;
    ide_desc_t d;
    bit got;
    tuple_t a, b, u;
    tuple_t same [2 * WPS + 1];
    int n_same;
    pkt_valid = 0; pkt_sop = 0; pkt_eop = 0; pkt_data = 0; rule_we = 0; rule_idx = 0;
    rule = '0; emb_to = 8'd3; est_to = 8'd12; drop_unm = 0; ide_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge init_done);
    mech[M_INIT]++;
    // policy: drop telnet
    @(negedge clk); rule_we = 1; rule_idx = 3'd2; rule = '{1, 1, 8'd6, 1, 16'd23};
    @(negedge clk); rule_we = 0;

    // filtered packet
    u = '{32'h0101_0101, 32'h0202_0202, 16'd3333, 16'd23};
    send(u, 8'd6, K_SYN, got, d, s);
    chk("telnet filtered", !got);
    if (!got) mech[M_FILTER]++;

    // non-TCP passes around the table
    send(u, 8'd17, K_DATA, got, d, s);
    chk("udp delivered", got && d.info == SI_NOT_EST && !d.drop && !s.hit);
    if (got && !s.hit) mech[M_BYPASS]++;

    // session A: client has the lower IP, closed by FIN/FIN
    a = '{32'h0A00_0001, 32'h0A00_0063, 16'd41000, 16'd80};
    open_session(a, "A");
    tcp(a, K_DATA, SI_EST_C2S, 0, "A c2s", s);
    tcp(rev(a), K_DATA, SI_EST_S2C, 0, "A s2c", s);
    tcp(a, K_FIN, SI_EST_C2S, 0, "A fin1", s);
    tcp(rev(a), K_FIN, SI_NOT_EST, 0, "A fin2", s);
    tcp(a, K_DATA, SI_NOT_EST, 0, "A unmatched after close", s);

    // session B: client has the higher IP, half-closed then RST
    b = '{32'hC0A8_0A0A, 32'h0A00_0005, 16'd5000, 16'd443};
    open_session(b, "B");
    tcp(rev(b), K_DATA, SI_EST_S2C, 0, "B s2c", s);
    tcp(b, K_DATA, SI_EST_C2S, 0, "B c2s", s);
    tcp(rev(b), K_FIN, SI_EST_S2C, 0, "B fin1", s);
    tcp(b, K_RST, SI_NOT_EST, 0, "B rst", s);

    // unmatched packet dropped by policy
    drop_unm = 1;
    tcp(b, K_DATA, SI_NOT_EST, 1, "B unmatched dropped", s);
    drop_unm = 0;

    // fill one set and overflow it
    emb_to = 8'd250; est_to = 8'd250;
    n_same = 0;
    while (n_same < 2 * WPS + 1) begin
      tuple_t x;
      x = '{$urandom, $urandom, 16'($urandom_range(1024, 65535)), 16'($urandom_range(1, 1000))};
      if (x.src_port != 23 && x.dst_port != 23 && ref_set(x, SB) == 5) begin
        same[n_same] = x; n_same++;
      end
    end
    for (int i = 0; i < 2 * WPS; i++) begin
      tcp(same[i], K_SYN, SI_SYN_RCVD, 0, "fill", s);
      repeat (TICK) @(posedge clk);
    end
    tcp(rev(same[0]), K_SYNACK, SI_SYNACK, 0, "refresh first", s);
    tcp(same[2 * WPS], K_SYN, SI_SYN_RCVD, 0, "overflow", s);
    chk("overflow replaced", s.replaced);
    tcp(rev(same[1]), K_SYNACK, SI_NOT_EST, 0, "oldest evicted", s);
    tcp(same[0], K_ACK, SI_EST_C2S, 0, "refreshed kept", s);

    // timeouts and sweep
    emb_to = 8'd2; est_to = 8'd5;
    a = '{32'h0A0A_0001, 32'h0A0A_0002, 16'd1111, 16'd25};
    tcp(a, K_SYN, SI_SYN_RCVD, 0, "T syn", s);
    b = '{32'h0B0B_0001, 32'h0B0B_0002, 16'd2222, 16'd25};
    open_session(b, "U");
    repeat (4 * TICK) @(posedge clk);
    tcp(rev(a), K_SYNACK, SI_NOT_EST, 0, "T embryonic timed out", s);
    if (!s.hit) mech[M_EMB_TO]++;
    tcp(rev(b), K_DATA, SI_EST_S2C, 0, "U still established", s);
    repeat (8 * TICK) @(posedge clk);
    tcp(b, K_DATA, SI_NOT_EST, 0, "U established timed out", s);
    if (!s.hit) mech[M_EST_TO]++;

    // back-pressure from the engine
    ide_ready = 0;
    fork
      begin
        a = '{32'h0E00_0001, 32'h0E00_0002, 16'd9, 16'd10};
        tcp(a, K_SYN, SI_SYN_RCVD, 0, "held syn", s);
      end
      begin
        repeat (60) @(negedge clk);
        chk("held while not ready", ide_valid);
        if (ide_valid) mech[M_BACKPRESSURE]++;
        ide_ready = 1;
      end
    join

    repeat (100) @(posedge clk);
    chk("all packet data delivered", expw.size() == 0);
    for (int m = 0; m < int'(M_N); m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
      else $display("mechanism %-16s x%0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
