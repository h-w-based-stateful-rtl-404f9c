// packet_filter: applies the filtering policies before the state manager.
//
// Holds N_RULES programmable rules (spi_pkg::filter_rule_t). A packet that
// matches any valid rule -- same protocol when proto_en is set, and source or
// destination port equal to `port` when port_en is set -- is dropped: it is
// consumed, reported by a one-cycle drop_o pulse and not forwarded. Every
// other packet is passed on unchanged. Filtering on protocols and ports
// follows the design description; the rule format, the number of rules and
// "drop on match, pass by default" are this design's choices. Rules are
// written one at a time through rule_we_i/rule_idx_i/rule_wdata_i and are all
// invalid after reset.
//
// Timing: one register stage. in_ready_o is high while the output register is
// empty or being emptied; a packet accepted at one edge appears on out_* at
// the next.
module packet_filter
  import spi_pkg::*;
#(
  parameter int unsigned N_RULES = 8,
  localparam int unsigned IDX_W  = (N_RULES > 1) ? $clog2(N_RULES) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rule_we_i,
  input  logic [IDX_W-1:0] rule_idx_i,
  input  filter_rule_t rule_wdata_i,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  input  pkt_desc_t    in_desc_i,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output pkt_desc_t    out_desc_o,
  output logic         drop_o
);

  filter_rule_t rules_q [N_RULES];
  logic         match;

  always_comb begin
    match = 1'b0;
    for (int i = 0; i < N_RULES; i++) begin
      if (rules_q[i].valid &&
          (!rules_q[i].proto_en || rules_q[i].proto == in_desc_i.proto) &&
          (!rules_q[i].port_en  || rules_q[i].port == in_desc_i.tuple.src_port ||
                                   rules_q[i].port == in_desc_i.tuple.dst_port))
        match = 1'b1;
    end
  end

  assign in_ready_o = !out_valid_o || out_ready_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_RULES; i++) rules_q[i] <= '0;
      out_valid_o <= 1'b0;
      out_desc_o  <= '0;
      drop_o      <= 1'b0;
    end else begin
      if (rule_we_i) rules_q[rule_idx_i] <= rule_wdata_i;
      drop_o <= 1'b0;
      if (in_ready_o) begin
        out_valid_o <= in_valid_i && !match;
        drop_o      <= in_valid_i && match;
        if (in_valid_i) out_desc_o <= in_desc_i;
      end
    end
  end

endmodule
