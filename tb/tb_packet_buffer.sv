// tb_packet_buffer: random test of the packet buffer with a small FIFO
// (32 words, 4 packets) so that it fills and refuses new packets. Packets of
// 1 to 32 words are written with random gaps; a filter thread gives each
// packet, in order and after a random delay, a pass or drop verdict, and a
// second thread gives each passed packet its state information and drop
// flag, so verdicts of later packets often arrive before results of earlier
// ones. The output is taken with random back-pressure and compared word by
// word (data, sop, eop, state information) with the packets that should
// survive; dropped packets must not appear.
module tb_packet_buffer;
  import spi_pkg::*;

  localparam int AW = 5, PKTS = 4, NPKT = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, in_sop, in_eop;
  logic [31:0] in_data;
  logic verd_valid, verd_pass, res_valid, res_drop;
  state_info_e res_info;
  logic out_valid, out_ready, out_sop, out_eop;
  logic [31:0] out_data;
  state_info_e out_info;
  int checks = 0, failures = 0;
  int n_refused = 0, n_fdrop = 0, n_rdrop = 0, n_out_pkts = 0, n_bp = 0;

  packet_buffer #(.AW(AW), .PKTS(PKTS)) dut (
    .clk, .rst_n,
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_sop_i(in_sop), .in_eop_i(in_eop),
    .in_data_i(in_data),
    .verd_valid_i(verd_valid), .verd_pass_i(verd_pass),
    .res_valid_i(res_valid), .res_info_i(res_info), .res_drop_i(res_drop),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_sop_o(out_sop),
    .out_eop_o(out_eop), .out_data_o(out_data), .out_info_o(out_info));

  typedef logic [31:0] words_t [$];
  typedef struct { words_t w; logic pass; logic rdrop; state_info_e info; } pkt_t;
  pkt_t stored [$];     // all words written, waiting for the filter verdict
  pkt_t passed [$];     // passed the filter, waiting for the result
  logic [31:0] expw [$];
  logic        exps [$], expe [$];
  state_info_e expi [$];
  int n_done_in = 0, n_verd = 0;

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    pkt_t p;
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NPKT; n++) begin
      int len;
      len = ($urandom_range(0, 3) == 0) ? 32 : $urandom_range(1, 12);
      p.w = {};
      for (int i = 0; i < len; i++) p.w.push_back($urandom);
      p.pass  = $urandom_range(0, 4) != 0;
      p.rdrop = $urandom_range(0, 4) == 0;
      p.info  = state_info_e'($urandom_range(0, 5));
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) @(negedge clk);
        in_valid = 1; in_data = p.w[i]; in_sop = (i == 0); in_eop = (i == len - 1);
        @(posedge clk);
        while (!in_ready) begin
          if (in_sop) n_refused++;
          @(posedge clk);
        end
        @(negedge clk);
        in_valid = 0;
      end
      in_sop = 0; in_eop = 0;
      stored.push_back(p);
      if (p.pass && !p.rdrop)
        for (int i = 0; i < len; i++) begin
          expw.push_back(p.w[i]); exps.push_back(i == 0); expe.push_back(i == len - 1);
          expi.push_back(p.info);
        end
      n_done_in++;
    end
  end

  // filter verdicts, in order, after the whole packet was written
  initial begin
    pkt_t p;
    verd_valid = 0; verd_pass = 0;
    forever begin
      @(negedge clk);
      verd_valid = 0;
      if (stored.size() != 0 && $urandom_range(0, 2) == 0) begin
        p = stored.pop_front();
        verd_valid = 1; verd_pass = p.pass;
        if (p.pass) passed.push_back(p); else n_fdrop++;
        n_verd++;
      end
    end
  end

  // state manager results, in order, for passed packets
  initial begin
    pkt_t p;
    res_valid = 0; res_drop = 0; res_info = SI_NOT_EST;
    forever begin
      @(negedge clk);
      res_valid = 0;
      if (passed.size() != 0 && $urandom_range(0, 5) == 0) begin
        p = passed.pop_front();
        res_valid = 1; res_drop = p.rdrop; res_info = p.info;
        if (p.rdrop) n_rdrop++;
      end
    end
  end

  // consumer with random back-pressure
  initial begin
    out_ready = 0;
    forever begin
      @(negedge clk);
      out_ready = $urandom_range(0, 3) != 0;
    end
  end
  always @(posedge clk) begin
    if (rst_n && out_valid && !out_ready) n_bp++;
    if (rst_n && out_valid && out_ready) begin
      if (expw.size() == 0) chk("word out with nothing expected", 0);
      else begin
        logic [31:0] w;
        logic s, e;
        state_info_e i;
        w = expw.pop_front(); s = exps.pop_front(); e = expe.pop_front(); i = expi.pop_front();
        chk("word data/sop/eop/info", out_data == w && out_sop == s && out_eop == e && out_info == i);
        if (e) n_out_pkts++;
      end
    end
  end

  initial begin
    wait (n_done_in == NPKT && n_verd == NPKT && passed.size() == 0);
    repeat (200) @(posedge clk);
    chk("every expected word sent", expw.size() == 0);
    chk("buffer refused packets when full", n_refused > 0);
    chk("filter-dropped packets seen", n_fdrop > 0);
    chk("policy-dropped packets seen", n_rdrop > 0);
    chk("output back-pressure seen", n_bp > 0);
    $display("%0d packets: %0d sent, %0d filter drops, %0d policy drops, %0d refusals",
             NPKT, n_out_pkts, n_fdrop, n_rdrop, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
