// tb_spi_ids_full: the SPI module at its default size (2^17 sets x 32 ways,
// two 2^21 x 36-bit SRAMs). Waits for the table clear after reset (2^21
// cycles), then takes two TCP sessions through a complete life: 3-way
// handshake, data in both directions, close by FIN/FIN and by RST, checking
// the state information of every descriptor, plus a non-TCP packet and an
// unmatched packet. It also checks the table-clear time and that a TCP
// packet is answered WAYS_PER_SRAM + 2 = 18 cycles after the state manager
// accepts it.
module tb_spi_ids_full;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pkt_valid, pkt_ready, pkt_sop, pkt_eop;
  logic [31:0] pkt_data;
  logic [7:0] now;
  logic ide_valid, filt_drop, sweep_rm, init_done;
  ide_desc_t ide;
  sm_result_t sres;
  int checks = 0, failures = 0;
  longint cyc = 0;

  spi_ids_top dut (
    .clk, .rst_n, .pkt_valid_i(pkt_valid), .pkt_ready_o(pkt_ready),
    .pkt_sop_i(pkt_sop), .pkt_eop_i(pkt_eop), .pkt_data_i(pkt_data),
    .rule_we_i(1'b0), .rule_idx_i('0), .rule_wdata_i('0),
    .cfg_emb_timeout_i(8'd5), .cfg_est_timeout_i(8'd60), .cfg_drop_unmatched_i(1'b0),
    .ide_valid_o(ide_valid), .ide_ready_i(1'b1), .ide_desc_o(ide), .sess_res_o(sres),
    .pd_valid_o(), .pd_ready_i(1'b1), .pd_sop_o(), .pd_eop_o(), .pd_data_o(), .pd_info_o(),
    .filt_drop_o(filt_drop), .sweep_remove_o(sweep_rm), .init_done_o(init_done), .now_o(now));


  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // State manager accept -> result latency, on its internal handshakes.
  // The result rises 18 edges after the accepting edge, so it is first
  // sampled at the 19th.
  longint acc_cyc;
  always @(posedge clk) begin
    if (dut.u_sm.in_valid_i && dut.u_sm.in_ready_o) acc_cyc = cyc;
    if (ide_valid && ide.desc.proto == 8'd6) begin
      checks++;
      if (cyc - acc_cyc != 19) begin
        failures++; $display("FAIL latency %0d", cyc - acc_cyc);
      end
    end
    cyc++;
  end

  task automatic send(tuple_t t, logic [7:0] proto, kind_e k, output ide_desc_t d);
    words_t w;
    w = build_pkt(t, proto, kind_flags(k), 5, 2);
    for (int i = 0; i < w.size(); i++) begin
      @(negedge clk);
      pkt_valid = 1; pkt_data = w[i]; pkt_sop = (i == 0); pkt_eop = (i == w.size() - 1);
      @(posedge clk);
      while (!pkt_ready) @(posedge clk);
    end
    @(negedge clk); pkt_valid = 0; pkt_sop = 0; pkt_eop = 0;
    do @(posedge clk); while (!ide_valid);
    d = ide;
    @(negedge clk);
  endtask

  task automatic tcp(tuple_t t, kind_e k, state_info_e exp, string what);
    ide_desc_t d;
    send(t, 8'd6, k, d);
    chk({what, " tuple"}, d.desc.tuple == t);
    chk({what, " info"}, d.info == exp);
    if (d.info != exp) $display("   info %0d exp %0d", d.info, exp);
  endtask

  function automatic tuple_t rev(tuple_t t);
    return '{t.dst_ip, t.src_ip, t.dst_port, t.src_port};
  endfunction

  initial begin
    tuple_t a, b;
    ide_desc_t d;
    pkt_valid = 0; pkt_sop = 0; pkt_eop = 0; pkt_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge init_done);
    chk("table clear time", cyc >= 64'd2097152 && cyc < 64'd2097152 + 10);

    a = '{32'h0A01_0203, 32'hAC10_0001, 16'd51000, 16'd80};
    tcp(a, K_SYN, SI_SYN_RCVD, "A syn");
    tcp(rev(a), K_SYNACK, SI_SYNACK, "A synack");
    tcp(a, K_ACK, SI_EST_C2S, "A ack");
    tcp(a, K_DATA, SI_EST_C2S, "A request");
    tcp(rev(a), K_DATA, SI_EST_S2C, "A response");
    tcp(a, K_FIN, SI_EST_C2S, "A fin1");
    tcp(rev(a), K_FIN, SI_NOT_EST, "A fin2");
    tcp(rev(a), K_DATA, SI_NOT_EST, "A after close");

    b = '{32'hD000_0001, 32'h0A00_0002, 16'd6000, 16'd25};
    tcp(b, K_SYN, SI_SYN_RCVD, "B syn");
    tcp(rev(b), K_SYNACK, SI_SYNACK, "B synack");
    tcp(b, K_ACK, SI_EST_C2S, "B ack");
    tcp(rev(b), K_DATA, SI_EST_S2C, "B s2c");
    tcp(b, K_RST, SI_NOT_EST, "B rst");

    send(a, 8'd1, K_DATA, d);
    chk("icmp bypass", d.info == SI_NOT_EST && !d.drop);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
