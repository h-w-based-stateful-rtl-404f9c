// tb_hash_key_gen: checks the tuple ordering, the Position_change_flag and
// both hash values against a long-division CRC reference, and that the two
// directions of a connection produce the same hash key.
module tb_hash_key_gen;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  tuple_t      t, t_ord, exp_ord;
  logic        pcf, exp_pcf;
  logic [16:0] h1;
  logic [24:0] h2;
  int checks = 0, failures = 0;

  hash_key_gen dut (.tuple_i(t), .tuple_o(t_ord), .pcf_o(pcf), .hash1_o(h1), .hash2_o(h2));

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%h", what, t); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] h1_fwd;
    logic [24:0] h2_fwd;
    logic [31:0] ca, cb;
    for (int i = 0; i < 300; i++) begin
      t = {$urandom, $urandom, 16'($urandom), 16'($urandom)};
      if (i == 0) t.dst_ip = t.src_ip;                      // equal IPs swap
      if (i == 1) t = '{32'h0A000001, 32'h0A000002, 16'd1234, 16'd80};
      #1;
      exp_ord = ref_order(t, exp_pcf);
      ca = ref_crc(exp_ord, 32'h04C1_1DB7);
      cb = ref_crc(exp_ord, 32'h1EDC_6F41);
      chk("pcf", pcf == exp_pcf);
      chk("order", t_ord == exp_ord);
      chk("hash1", h1 == ca[16:0]);
      chk("hash2", h2 == cb[24:0]);
      if (i == 1) chk("pcf0 for lower src", pcf == 1'b0);
      if (i == 0) chk("pcf1 for equal ip", pcf == 1'b1);
      // reverse direction gives the same key with the opposite flag
      if (t.src_ip != t.dst_ip) begin
        h1_fwd = h1; h2_fwd = h2;
        t = '{t.dst_ip, t.src_ip, t.dst_port, t.src_port};
        #1;
        chk("reverse h1", h1 == h1_fwd);
        chk("reverse h2", h2 == h2_fwd);
        chk("reverse pcf", pcf == !exp_pcf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
