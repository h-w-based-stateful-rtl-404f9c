// tb_packet_parser: random TCP, UDP and other IPv4 packets with varying
// header lengths and payloads, random gaps and output back-pressure; every
// descriptor is compared with the fields used to build the packet.
module tb_packet_parser;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, sop, eop, out_valid, out_ready;
  logic [31:0] data;
  pkt_desc_t desc;
  int checks = 0, failures = 0;
  pkt_desc_t expq [$];

  packet_parser dut (.clk, .rst_n, .in_valid_i(in_valid), .in_ready_o(in_ready),
    .sop_i(sop), .eop_i(eop), .data_i(data), .out_valid_o(out_valid),
    .out_ready_i(out_ready), .out_desc_o(desc));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || desc != expq[0]) begin
        failures++;
        $display("FAIL got %h exp %h", desc, expq.size() != 0 ? expq[0] : '0);
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    words_t w;
    pkt_desc_t e;
    in_valid = 0; sop = 0; eop = 0; data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      tuple_t t;
      logic [7:0] pr;
      tcp_flags_t fl;
      int ihl, np;
      t = {$urandom, $urandom, 16'($urandom), 16'($urandom)};
      case ($urandom_range(0, 3))
        0, 1: pr = 8'd6;
        2: pr = 8'd17;
        default: pr = 8'd1;
      endcase
      fl = tcp_flags_t'(8'($urandom));
      ihl = $urandom_range(5, 8); np = $urandom_range(0, 4);
      w = build_pkt(t, pr, fl, ihl, np);
      e = '0; e.tuple = t; e.proto = pr; e.ip_len = 16'(4 * w.size());
      if (pr != 8'd6 && pr != 8'd17) begin e.tuple.src_port = 0; e.tuple.dst_port = 0; end
      if (pr == 8'd6) e.flags = fl;
      expq.push_back(e);
      for (int i = 0; i < w.size(); i++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; data = w[i]; sop = (i == 0); eop = (i == w.size() - 1);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 0; sop = 0; eop = 0;
    end
    repeat (20) @(posedge clk);
    if (expq.size() != 0) begin failures++; $display("FAIL %0d missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
