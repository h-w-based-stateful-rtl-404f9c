// spi_ids_top: SPI-based intrusion detection module with its session table.
//
// Stateful packet inspection keeps one small entry per TCP session so that
// each packet can be labelled with the state of its connection (handshake in
// progress, established, and which side sent it) before pattern matching.
// The data path is
//
//   packet words -> packet_parser -> packet_filter -> state_manager
//        -> state_info_gen -> descriptor for the intrusion detection engine
//   packet words -> packet_buffer -> packet with its state information
//
// and state_manager uses two external session-table SRAMs (session_sram,
// SRAM#1 and SRAM#2) read in parallel, together forming a 2^SET_BITS-set,
// 2*WAYS_PER_SRAM-way set-associative table of 36-bit entries (defaults:
// 131072 sets x 32 ways = 4 M entries, two 72-Mbit devices).
//
// Blocks outside this module: IP de-fragmentation (upstream; packets must
// arrive whole), TCP reassembly (fed from sess_res_o alongside the IDE
// descriptor), the intrusion detection engine (ide_*), and the management CPU
// (rule_* and cfg_* ports).
//
// Interface: pkt_* is a 32-bit big-endian word stream with sop/eop and a
// valid/ready handshake. ide_valid_o/ide_ready_i hand over one descriptor
// per packet that passed the filter; sess_res_o is valid with it. Packets
// dropped by the filter give a filt_drop_o pulse instead. pd_* sends the
// words of every packet that was neither filtered nor dropped by the
// unmatched-packet policy, in order, with pd_info_o held for the packet;
// it is independent of ide_*, but packet input stops while BUF_PKTS
// packets or 2^BUF_AW words wait in the buffer. A packet may be at most
// 2^BUF_AW words long. init_done_o rises
// once the session table has been cleared after reset (2^(SET_BITS+4)
// cycles with the defaults); packets wait until then.
module spi_ids_top
  import spi_pkg::*;
#(
  parameter int unsigned SET_BITS      = 17,
  parameter int unsigned WAYS_PER_SRAM = 16,
  parameter int unsigned TICK_CYCLES   = 125_000_000,
  parameter int unsigned N_RULES       = 8,
  parameter int unsigned BUF_AW        = 9,
  parameter int unsigned BUF_PKTS      = 8,
  localparam int unsigned IDX_W  = (N_RULES > 1) ? $clog2(N_RULES) : 1,
  localparam int unsigned ADDR_W = SET_BITS + $clog2(WAYS_PER_SRAM)
) (
  input  logic             clk,
  input  logic             rst_n,
  // packet input (after IP de-fragmentation)
  input  logic             pkt_valid_i,
  output logic             pkt_ready_o,
  input  logic             pkt_sop_i,
  input  logic             pkt_eop_i,
  input  logic [31:0]      pkt_data_i,
  // policy and settings from the management CPU
  input  logic             rule_we_i,
  input  logic [IDX_W-1:0] rule_idx_i,
  input  filter_rule_t     rule_wdata_i,
  input  logic [TS_W-1:0]  cfg_emb_timeout_i,
  input  logic [TS_W-1:0]  cfg_est_timeout_i,
  input  logic             cfg_drop_unmatched_i,
  // towards the intrusion detection engine and TCP reassembly
  output logic             ide_valid_o,
  input  logic             ide_ready_i,
  output ide_desc_t        ide_desc_o,
  output sm_result_t       sess_res_o,
  output logic             pd_valid_o,
  input  logic             pd_ready_i,
  output logic             pd_sop_o,
  output logic             pd_eop_o,
  output logic [31:0]      pd_data_o,
  output state_info_e      pd_info_o,
  // status
  output logic             filt_drop_o,
  output logic             sweep_remove_o,
  output logic             init_done_o,
  output logic [TS_W-1:0]  now_o
);

  logic      par_valid, par_ready;
  pkt_desc_t par_desc;
  logic      flt_valid, flt_ready;
  pkt_desc_t flt_desc;

  logic      par_in_ready, buf_in_ready;

  // a word is taken when both the parser and the buffer can take it
  assign pkt_ready_o = par_in_ready && buf_in_ready;

  packet_parser u_parser (
    .clk, .rst_n,
    .in_valid_i(pkt_valid_i && buf_in_ready), .in_ready_o(par_in_ready),
    .sop_i(pkt_sop_i), .eop_i(pkt_eop_i), .data_i(pkt_data_i),
    .out_valid_o(par_valid), .out_ready_i(par_ready), .out_desc_o(par_desc)
  );

  packet_filter #(.N_RULES(N_RULES)) u_filter (
    .clk, .rst_n,
    .rule_we_i, .rule_idx_i, .rule_wdata_i,
    .in_valid_i(par_valid), .in_ready_o(par_ready), .in_desc_i(par_desc),
    .out_valid_o(flt_valid), .out_ready_i(flt_ready), .out_desc_o(flt_desc),
    .drop_o(filt_drop_o)
  );

  logic              sa_ce, sa_we, sb_ce, sb_we;
  logic [ADDR_W-1:0] sa_addr, sb_addr;
  entry_t            sa_wdata, sa_rdata, sb_wdata, sb_rdata;
  sm_result_t        sm_res;

  state_manager #(
    .SET_BITS(SET_BITS), .WAYS_PER_SRAM(WAYS_PER_SRAM), .TICK_CYCLES(TICK_CYCLES)
  ) u_sm (
    .clk, .rst_n,
    .in_valid_i(flt_valid), .in_ready_o(flt_ready), .in_desc_i(flt_desc),
    .out_valid_o(ide_valid_o), .out_ready_i(ide_ready_i), .out_res_o(sm_res),
    .cfg_emb_timeout_i, .cfg_est_timeout_i, .cfg_drop_unmatched_i,
    .sa_ce_o(sa_ce), .sa_we_o(sa_we), .sa_addr_o(sa_addr), .sa_wdata_o(sa_wdata),
    .sa_rdata_i(sa_rdata),
    .sb_ce_o(sb_ce), .sb_we_o(sb_we), .sb_addr_o(sb_addr), .sb_wdata_o(sb_wdata),
    .sb_rdata_i(sb_rdata),
    .init_done_o, .sweep_remove_o, .now_o
  );

  session_sram #(.ADDR_W(ADDR_W), .DATA_W(ENTRY_W)) u_sram1 (
    .clk, .ce_i(sa_ce), .we_i(sa_we), .addr_i(sa_addr), .wdata_i(sa_wdata),
    .rdata_o(sa_rdata)
  );

  session_sram #(.ADDR_W(ADDR_W), .DATA_W(ENTRY_W)) u_sram2 (
    .clk, .ce_i(sb_ce), .we_i(sb_we), .addr_i(sb_addr), .wdata_i(sb_wdata),
    .rdata_o(sb_rdata)
  );

  state_info_e info;

  state_info_gen u_info (.cur_i(sm_res.cstate), .pcf_i(sm_res.pcf), .info_o(info));

  always_comb begin
    ide_desc_o.desc = sm_res.desc;
    ide_desc_o.info = info;
    ide_desc_o.drop = sm_res.drop;
  end
  assign sess_res_o = sm_res;

  packet_buffer #(.AW(BUF_AW), .PKTS(BUF_PKTS)) u_buf (
    .clk, .rst_n,
    .in_valid_i(pkt_valid_i && par_in_ready), .in_ready_o(buf_in_ready),
    .in_sop_i(pkt_sop_i), .in_eop_i(pkt_eop_i), .in_data_i(pkt_data_i),
    .verd_valid_i(filt_drop_o || (flt_valid && flt_ready)), .verd_pass_i(!filt_drop_o),
    .res_valid_i(ide_valid_o && ide_ready_i), .res_info_i(info), .res_drop_i(sm_res.drop),
    .out_valid_o(pd_valid_o), .out_ready_i(pd_ready_i), .out_sop_o(pd_sop_o),
    .out_eop_o(pd_eop_o), .out_data_o(pd_data_o), .out_info_o(pd_info_o)
  );

endmodule
