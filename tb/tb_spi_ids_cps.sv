// tb_spi_ids_cps: connections-per-second workload on the default-size design
// (2^17 sets x 32 ways). N_CONN complete TCP connections are run through the
// whole module, up to ACTIVE of them open at the same time and their packets
// interleaved at random, back to back at line rate. Each connection is
//   SYN (client), SYN/ACK (server), ACK (client), data (client),
//   data (server), FIN (client), FIN (server), ACK (client)
// and every result is compared, in order, with the reference transition and
// state-information tables: handshake phases, established in both
// directions, half-close, removal on the second FIN, and the last ACK found no
// more. The test counts created and removed sessions (every one must be
// removed again, none replaced) and converts the measured time into
// connections per second at the 8 ns clock, to be compared with the 40,000
// connections per second the prototype sustained.
module tb_spi_ids_cps;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_CONN = 50_000, ACTIVE = 64, STEPS = 8;
  localparam real CLK_NS = 8.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pkt_valid, pkt_ready, pkt_sop, pkt_eop;
  logic [31:0] pkt_data;
  logic [7:0] now;
  logic ide_valid, filt_drop, sweep_rm, init_done;
  ide_desc_t ide;
  sm_result_t sres;
  int checks = 0, failures = 0;
  int n_out = 0, n_new = 0, n_repl = 0, n_rm = 0, n_bad = 0;

  typedef struct {
    tuple_t      t;
    state_info_e info;
    logic        hit;
  } exp_t;
  exp_t expq[$];

  spi_ids_top dut (
    .clk, .rst_n, .pkt_valid_i(pkt_valid), .pkt_ready_o(pkt_ready),
    .pkt_sop_i(pkt_sop), .pkt_eop_i(pkt_eop), .pkt_data_i(pkt_data),
    .rule_we_i(1'b0), .rule_idx_i('0), .rule_wdata_i('0),
    .cfg_emb_timeout_i(8'd255), .cfg_est_timeout_i(8'd255), .cfg_drop_unmatched_i(1'b0),
    .ide_valid_o(ide_valid), .ide_ready_i(1'b1), .ide_desc_o(ide), .sess_res_o(sres),
    .pd_valid_o(), .pd_ready_i(1'b1), .pd_sop_o(), .pd_eop_o(), .pd_data_o(), .pd_info_o(),
    .filt_drop_o(filt_drop), .sweep_remove_o(sweep_rm), .init_done_o(init_done), .now_o(now));

  // every result against the head of the expectation queue
  always @(posedge clk) begin
    if (ide_valid) begin
      exp_t e;
      n_out++;
      if (sres.new_session) n_new++;
      if (sres.replaced) n_repl++;
      if (sres.removed) n_rm++;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL result with nothing sent (t=%0t)", $time);
      end else begin
        e = expq.pop_front();
        if (ide.desc.tuple != e.t || ide.info != e.info || sres.hit != e.hit) begin
          failures++;
          n_bad++;
          if (n_bad <= 10)
            $display("FAIL result %0d: info %0d hit %0d, expected info %0d hit %0d",
                     n_out, ide.info, sres.hit, e.info, e.hit);
        end
      end
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
    w = build_pkt(t, 8'd6, kind_flags(k), 5, (k == K_DATA) ? 4 : 0);
    for (int i = 0; i < w.size(); i++) begin
      pkt_valid = 1; pkt_data = w[i]; pkt_sop = (i == 0); pkt_eop = (i == w.size() - 1);
      @(posedge clk);
      while (!pkt_ready) @(posedge clk);
      #1;
    end
    pkt_valid = 0; pkt_sop = 0; pkt_eop = 0;
  endtask

  // the connection's packets: kind and whether the client sends it
  function automatic kind_e step_kind(int s);
    case (s)
      0: return K_SYN;
      1: return K_SYNACK;
      2: return K_ACK;
      3, 4: return K_DATA;
      5, 6: return K_FIN;
      default: return K_ACK;
    endcase
  endfunction
  function automatic logic step_from_client(int s);
    return !(s == 1 || s == 4 || s == 6);
  endfunction

  initial begin
    tuple_t     cli [ACTIVE];
    logic [2:0] st  [ACTIVE];
    int         stp [ACTIVE];
    int started, finished, n_sent;
    longint t_start, t_end;
    real cps;
    pkt_valid = 0; pkt_sop = 0; pkt_eop = 0; pkt_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge init_done);
    #1;

    started = 0; finished = 0; n_sent = 0;
    for (int i = 0; i < ACTIVE; i++) stp[i] = STEPS;   // empty slot
    t_start = $time;
    while (finished < N_CONN) begin
      int i;
      tuple_t t;
      kind_e k;
      logic pcf;
      exp_t e;
      i = $urandom_range(ACTIVE - 1);
      if (stp[i] == STEPS) begin
        if (started == N_CONN) continue;
        cli[i] = '{$urandom, $urandom, 16'($urandom_range(65535, 1024)), 16'(80)};
        if (cli[i].src_ip == cli[i].dst_ip) cli[i].dst_ip = ~cli[i].dst_ip;
        st[i] = 3'b000;
        stp[i] = 0;
        started++;
      end
      k = step_kind(stp[i]);
      t = step_from_client(stp[i]) ? cli[i]
          : '{cli[i].dst_ip, cli[i].src_ip, cli[i].dst_port, cli[i].src_port};
      void'(ref_order(t, pcf));
      e.t = t;
      e.hit = (st[i] != 3'b000);
      st[i] = ref_next(st[i], k, pcf);
      e.info = ref_info(st[i], pcf);
      expq.push_back(e);
      push(t, k);
      n_sent++;
      stp[i]++;
      if (stp[i] == STEPS) finished++;
    end
    while (n_out < n_sent) @(posedge clk);
    t_end = $time;
    #1;

    cps = real'(N_CONN) / (real'(t_end - t_start) / 10.0 * CLK_NS * 1.0e-9);
    $display("%0d connections, %0d packets: %0d created, %0d removed, %0d replaced, %.0f connections/s at %.0f ns",
             N_CONN, n_sent, n_new, n_rm, n_repl, cps, CLK_NS);
    chk("every packet answered", n_out == n_sent && expq.size() == 0);
    chk("one session created per connection", n_new == N_CONN);
    chk("every session removed at its close", n_rm == N_CONN);
    chk("no replacement", n_repl == 0);
    chk("at least 40,000 connections per second", cps >= 40_000.0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
