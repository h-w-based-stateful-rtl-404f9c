// tb_session_sram: writes random words at random addresses of a reduced
// SRAM, reads them back with one-cycle latency, checks against a shadow copy.
module tb_session_sram;
  localparam int AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ce, we;
  logic [AW-1:0] addr;
  logic [35:0] wdata, rdata;
  logic [35:0] shadow [2**AW];
  bit written [2**AW];
  int checks = 0, failures = 0;

  session_sram #(.ADDR_W(AW), .DATA_W(36)) dut (.clk, .ce_i(ce), .we_i(we),
    .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [AW-1:0] a;
    ce = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = AW'($urandom);
      ce = 1; addr = a;
      if ($urandom_range(0, 1) == 0 || !written[a]) begin
        we = 1; wdata = {4'($urandom), $urandom};
        shadow[a] = wdata; written[a] = 1;
      end else begin
        we = 0;
        @(negedge clk);
        ce = 0; we = 0;
        checks++;
        if (rdata != shadow[a]) begin
          failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, shadow[a]);
        end
      end
    end
    // a disabled cycle keeps the read data
    @(negedge clk); ce = 1; we = 0; addr = a;
    @(negedge clk); ce = 0; addr = a + 1'b1;
    @(negedge clk);
    checks++;
    if (rdata != shadow[a]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
