// parallel_turbo_top: the two parallel turbo decoding datapaths built from
// contention-free interleavers, side by side with their own ports.
//
// lte_*: the reconfigurable LTE turbo decoder (QPP interleaver, barrel-shift
// networks, up to 8 SISO decoders, N = 40..6144). It is complete: a received
// block goes in, decoded bits come out.
// ibp_*: the memory and interconnection system of the hybrid-parallel design
// with the IBP interleaver (32 sub-blocks of 128 symbols, 2 symbols per
// decoder per cycle, double-prime intra-block permutation, butterfly
// networks). Its decoder-side ports (ibp_out_*) are where that design's 32
// radix-2^2 SISO decoders would connect; they are not part of this RTL.
// The two parts share only clock and reset. See lte_turbo_decoder and
// ibp_interleaver for interface timing.
module parallel_turbo_top
  import turbo_pkg::*;
#(
  parameter int unsigned N_MAX   = 6144,
  parameter int unsigned NW      = $clog2(N_MAX + 1),
  parameter int unsigned IBP_PSL = 5,
  parameter int unsigned IBP_M   = 128,
  parameter int unsigned IBP_PT  = 2,
  parameter int unsigned IBP_PS  = 1 << IBP_PSL,
  parameter int unsigned IBP_SW  = $clog2(IBP_PSL + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // LTE decoder
  input  logic          lte_start,
  input  logic [NW-1:0] lte_cfg_n,
  input  logic [NW-1:0] lte_cfg_f1,
  input  logic [NW-1:0] lte_cfg_f2,
  input  logic [3:0]    lte_cfg_iter,
  input  logic [1:0]    lte_cfg_ps_log2,
  input  logic          lte_in_valid,
  output logic          lte_in_ready,
  input  rx_t           lte_in_sys,
  input  rx_t           lte_in_p1,
  input  rx_t           lte_in_p2,
  output logic          lte_out_valid,
  output logic          lte_out_bit,
  output logic          lte_out_last,
  output logic          lte_busy,
  output logic          lte_done,
  // IBP memory and interconnection
  input  logic [IBP_SW-1:0]       ibp_nsb_log2,
  input  logic                    ibp_ld_valid,
  input  logic [IBP_PT-1:0][RX_W-1:0] ibp_ld_data,
  input  logic                    ibp_start,
  input  logic                    ibp_interleaved,
  output logic                    ibp_busy,
  output logic                    ibp_out_valid,
  output logic                    ibp_out_last,
  output logic [IBP_PS-1:0][IBP_PT-1:0][RX_W-1:0] ibp_out_data
);
  lte_turbo_decoder #(.N_MAX(N_MAX), .NW(NW)) u_lte (
    .clk, .rst_n,
    .start(lte_start), .cfg_n(lte_cfg_n), .cfg_f1(lte_cfg_f1), .cfg_f2(lte_cfg_f2),
    .cfg_iter(lte_cfg_iter), .cfg_ps_log2(lte_cfg_ps_log2),
    .in_valid(lte_in_valid), .in_ready(lte_in_ready),
    .in_sys(lte_in_sys), .in_p1(lte_in_p1), .in_p2(lte_in_p2),
    .out_valid(lte_out_valid), .out_bit(lte_out_bit), .out_last(lte_out_last),
    .busy(lte_busy), .done(lte_done));

  ibp_interleaver #(.PS_LOG2(IBP_PSL), .M(IBP_M), .PT(IBP_PT), .DW(RX_W)) u_ibp (
    .clk, .rst_n, .nsb_log2(ibp_nsb_log2),
    .ld_valid(ibp_ld_valid), .ld_data(ibp_ld_data),
    .start(ibp_start), .interleaved(ibp_interleaved), .busy(ibp_busy),
    .out_valid(ibp_out_valid), .out_last(ibp_out_last), .out_data(ibp_out_data));
endmodule
