// tb_session_fsm: every state x packet kind x Position_change_flag against
// the transition table.
module tb_session_fsm;
  import spi_pkg::*;
  import tb_ref_pkg::*;

  cstate_t    cur, nxt;
  tcp_flags_t fl;
  logic       pcf;
  int checks = 0, failures = 0;

  session_fsm dut (.cur_i(cur), .flags_i(fl), .pcf_i(pcf), .nxt_o(nxt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int k = 0; k <= int'(K_DATA); k++)
        for (int p = 0; p < 2; p++) begin
          if (s == 3) continue;
          cur = 3'(s); fl = kind_flags(kind_e'(k)); pcf = p[0];
          #1;
          checks++;
          if (nxt !== ref_next(cur, kind_e'(k), pcf)) begin
            failures++;
            $display("FAIL state %b kind %0d pcf %0d -> %b", cur, k, pcf, nxt);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
