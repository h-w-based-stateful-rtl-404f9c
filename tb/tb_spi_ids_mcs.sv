// tb_spi_ids_mcs: maximum-concurrent-sessions workload on the default-size
// design (2^17 sets x 32 ways). A first TCP session is opened with a full
// handshake; then N_FILL further sessions are opened with SYN packets from
// random 4-tuples, back to back at line rate; finally a data packet of the
// first session is sent. The first session must still be found and reported
// as established (client to server): the state needed to detect an exploit
// in it has survived. The test also counts LRU replacements (none are
// expected at this load) and checks the sustained packet period against the
// budget of a 2 Gbit/s stream of minimum-size Ethernet frames at an 8 ns
// clock (84 bytes per frame on the wire -> 42 cycles). When one million
// sessions are open, it also histograms how many fall into each hash set
// (using the reference Hash1) and reports mean, standard deviation, the
// fullest set and the Z-score of 32 sessions per set, the same measure the
// document uses to argue that a set practically never overflows.
module tb_spi_ids_mcs;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_FILL = 1_500_000, N_HIST = 1_000_000, SETS = 1 << 17;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pkt_valid, pkt_ready, pkt_sop, pkt_eop;
  logic [31:0] pkt_data;
  logic [7:0] now;
  logic ide_valid, filt_drop, sweep_rm, init_done;
  ide_desc_t ide;
  sm_result_t sres;
  int checks = 0, failures = 0;
  int n_out = 0, n_new = 0, n_repl = 0;

  spi_ids_top dut (
    .clk, .rst_n, .pkt_valid_i(pkt_valid), .pkt_ready_o(pkt_ready),
    .pkt_sop_i(pkt_sop), .pkt_eop_i(pkt_eop), .pkt_data_i(pkt_data),
    .rule_we_i(1'b0), .rule_idx_i('0), .rule_wdata_i('0),
    .cfg_emb_timeout_i(8'd255), .cfg_est_timeout_i(8'd255), .cfg_drop_unmatched_i(1'b0),
    .ide_valid_o(ide_valid), .ide_ready_i(1'b1), .ide_desc_o(ide), .sess_res_o(sres),
    .pd_valid_o(), .pd_ready_i(1'b1), .pd_sop_o(), .pd_eop_o(), .pd_data_o(), .pd_info_o(),
    .filt_drop_o(filt_drop), .sweep_remove_o(sweep_rm), .init_done_o(init_done), .now_o(now));

  always @(posedge clk) begin
    if (ide_valid) begin
      n_out++;
      if (sres.new_session) n_new++;
      if (sres.replaced) n_repl++;
    end
  end

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // stream the words of one packet without waiting for its result
  task automatic push(tuple_t t, kind_e k);
    words_t w;
    w = build_pkt(t, 8'd6, kind_flags(k), 5, 0);
    for (int i = 0; i < w.size(); i++) begin
      pkt_valid = 1; pkt_data = w[i]; pkt_sop = (i == 0); pkt_eop = (i == w.size() - 1);
      @(posedge clk);
      while (!pkt_ready) @(posedge clk);
      #1;
    end
    pkt_valid = 0; pkt_sop = 0; pkt_eop = 0;
  endtask

  // sessions per set among the first N_HIST + 1 sessions
  int occ [SETS];
  task automatic report_occupancy();
    int hist [33];
    int mx;
    real mean, var_, sd, z;
    mx = 0; mean = 0.0; var_ = 0.0;
    foreach (hist[i]) hist[i] = 0;
    foreach (occ[i]) begin
      mean += real'(occ[i]);
      if (occ[i] > mx) mx = occ[i];
      hist[(occ[i] > 32) ? 32 : occ[i]]++;
    end
    mean /= real'(SETS);
    foreach (occ[i]) var_ += (real'(occ[i]) - mean) ** 2;
    sd = (var_ / real'(SETS)) ** 0.5;
    z = (32.0 - mean) / sd;
    $display("%0d sessions over %0d sets: mean %.2f, sd %.2f, fullest set %0d, Z(32) = %.1f",
             N_HIST + 1, SETS, mean, sd, mx, z);
    for (int i = 0; i <= mx; i++) $display("  %2d sessions: %0d sets", i, hist[i]);
    chk("no set holds more than 32 sessions", mx <= 32);
    chk("32 sessions per set at least 6 standard deviations above the mean", z >= 6.0);
  endtask

  task automatic wait_out(int n);
    while (n_out < n) @(posedge clk);
    #1;
  endtask

  initial begin
    tuple_t a, x;
    longint t_start, t_end;
    real per_pkt;
    pkt_valid = 0; pkt_sop = 0; pkt_eop = 0; pkt_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge init_done);
    #1;
    a = '{32'h0A00_0001, 32'hC0A8_0001, 16'd40001, 16'd80};
    foreach (occ[i]) occ[i] = 0;
    occ[ref_set(a, 17)]++;
    push(a, K_SYN);                          wait_out(1);
    push('{a.dst_ip, a.src_ip, a.dst_port, a.src_port}, K_SYNACK); wait_out(2);
    push(a, K_ACK);                          wait_out(3);
    chk("first session established", ide.info == SI_EST_C2S);

    t_start = $time;
    for (int i = 0; i < N_FILL; i++) begin
      x = '{$urandom, $urandom, 16'($urandom), 16'($urandom)};
      if (i < N_HIST) occ[ref_set(x, 17)]++;
      if (i == N_HIST) report_occupancy();
      push(x, K_SYN);
    end
    wait_out(3 + N_FILL);
    t_end = $time;
    per_pkt = real'(t_end - t_start) / 10.0 / real'(N_FILL);
    $display("filled %0d sessions: %0d new, %0d replaced, %.2f cycles per packet",
             N_FILL, n_new - 1, n_repl, per_pkt);
    chk("all fill packets opened sessions", n_new == N_FILL + 1);
    chk("no replacement at this load", n_repl == 0);
    chk("packet period within the 2 Gbit/s budget", per_pkt <= 42.0);

    push(a, K_DATA);                         wait_out(4 + N_FILL);
    chk("first session still established", ide.info == SI_EST_C2S && sres.hit);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
