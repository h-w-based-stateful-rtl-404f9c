// tb_packet_filter: programs a few protocol / port rules, sends random
// descriptors with back-pressure and checks that exactly the packets matching
// a rule are dropped and all others come out in order.
module tb_packet_filter;
  import spi_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rule_we;
  logic [2:0] rule_idx;
  filter_rule_t rule;
  logic in_valid, in_ready, out_valid, out_ready, drop;
  pkt_desc_t in_d, out_d;
  int checks = 0, failures = 0, drops_seen = 0, drops_exp = 0;
  pkt_desc_t expq [$];

  packet_filter #(.N_RULES(8)) dut (.clk, .rst_n, .rule_we_i(rule_we),
    .rule_idx_i(rule_idx), .rule_wdata_i(rule), .in_valid_i(in_valid),
    .in_ready_o(in_ready), .in_desc_i(in_d), .out_valid_o(out_valid),
    .out_ready_i(out_ready), .out_desc_o(out_d), .drop_o(drop));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference policy: drop UDP to/from port 53, anything on port 23, and ICMP
  function automatic bit ref_drop(pkt_desc_t d);
    if (d.proto == 8'd17 && (d.tuple.src_port == 16'd53 || d.tuple.dst_port == 16'd53)) return 1;
    if (d.tuple.src_port == 16'd23 || d.tuple.dst_port == 16'd23) return 1;
    if (d.proto == 8'd1) return 1;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_d != expq[0]) begin failures++; $display("FAIL out"); end
      if (expq.size() != 0) void'(expq.pop_front());
    end
    if (rst_n && drop) drops_seen++;
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  task automatic wr_rule(int i, filter_rule_t r);
    @(negedge clk); rule_we = 1; rule_idx = 3'(i); rule = r;
    @(negedge clk); rule_we = 0;
  endtask

  initial begin
    rule_we = 0; rule_idx = 0; rule = '0; in_valid = 0; in_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr_rule(0, '{1, 1, 8'd17, 1, 16'd53});
    wr_rule(3, '{1, 0, 8'd0, 1, 16'd23});
    wr_rule(7, '{1, 1, 8'd1, 0, 16'd0});
    wr_rule(5, '{0, 1, 8'd6, 0, 16'd0});   // invalid rule: must not drop TCP
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_d = '0;
      in_d.tuple = {$urandom, $urandom, 16'($urandom_range(0, 3) == 0 ? 53 : $urandom_range(20, 25)),
                    16'($urandom_range(0, 3) == 0 ? 23 : $urandom_range(50, 90))};
      in_d.proto = ($urandom_range(0, 2) == 0) ? 8'd17 : ($urandom_range(0, 5) == 0) ? 8'd1 : 8'd6;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (ref_drop(in_d)) drops_exp++; else expq.push_back(in_d);
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (drops_seen != drops_exp || expq.size() != 0) begin
      failures++; $display("FAIL drops %0d exp %0d left %0d", drops_seen, drops_exp, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
