// tb_state_info_gen: all state / flag combinations against the state
// information table.
module tb_state_info_gen;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  cstate_t     cur;
  logic        pcf;
  state_info_e info;
  int checks = 0, failures = 0;

  state_info_gen dut (.cur_i(cur), .pcf_i(pcf), .info_o(info));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int p = 0; p < 2; p++) begin
        cur = 3'(s); pcf = p[0];
        #1;
        checks++;
        if (info != ref_info(cur, pcf)) begin
          failures++;
          $display("FAIL state %b pcf %0d -> %0d", cur, pcf, info);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
