// rdp_system: the complete networked reconfiguration system, the remote
// bitstreams server (rdp_server_node) and the lightweight target
// (rdp_platform) side by side on one clock.
//
// The LAN between them is not part of the design: each node's MAC byte
// stream is brought out (srv_* and tgt_*), and whatever stands for the
// network (a cable model, a channel that loses or corrupts frames) connects
// srv_tx_* to tgt_rx_* and tgt_tx_* to srv_rx_*. The bitstream store of the
// server, the target's ICAP port, its trace line and both nodes' control and
// status signals are ports as well. Parameters are those of the two nodes;
// the defaults are the design's main configuration.
module rdp_system
  import rdp_pkg::*;
#(
  parameter int unsigned SLOTS          = 7,
  parameter int unsigned SLOT_BYTES     = 1500,
  parameter int unsigned NAME_BYTES     = 16,
  parameter int unsigned MAX_DATA_BYTES = rdp_pkg::MAX_DATA,
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000,
  parameter int unsigned BYTE_CYCLES    = 8,
  parameter int unsigned UART_DIV       = 868,
  localparam int unsigned CW = $clog2(SLOTS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // server link
  input  logic                       srv_rx_dv,
  input  logic                       srv_rx_stb,
  input  logic [7:0]                 srv_rxd,
  output logic                       srv_tx_dv,
  output logic                       srv_tx_stb,
  output logic [7:0]                 srv_txd,
  // server control and bitstream store
  input  logic                       srv_push,
  input  logic [31:0]                srv_push_len,
  output logic                       srv_req_valid,
  output logic [NAME_BYTES-1:0][7:0] srv_req_name,
  output logic [31:0]                bs_addr,
  input  logic [7:0]                 bs_data,
  output logic                       srv_busy,
  output logic                       srv_done,
  output logic [15:0]                srv_restarts,
  output logic [15:0]                srv_n,
  // target link
  input  logic                       tgt_rx_dv,
  input  logic                       tgt_rx_stb,
  input  logic [7:0]                 tgt_rxd,
  output logic                       tgt_tx_dv,
  output logic                       tgt_tx_stb,
  output logic [7:0]                 tgt_txd,
  // target control
  input  logic                       tgt_name_req,
  input  logic [NAME_BYTES-1:0][7:0] tgt_name,
  input  logic [CW-1:0]              tgt_mem_slots,
  // ICAP and trace
  output logic                       icap_ce_n,
  output logic                       icap_write_n,
  output logic [7:0]                 icap_i,
  input  logic                       icap_busy,
  output logic                       uart_txd,
  // target status
  output logic                       tgt_active,
  output logic                       tgt_done,
  output logic                       tgt_err,
  output logic [7:0]                 tgt_err_code,
  output logic [15:0]                tgt_pkt_cnt,
  output logic [15:0]                tgt_p,
  output logic [CW-1:0]              tgt_ring_count,
  output logic [31:0]                icap_bytes
);

  localparam logic [47:0] TGT_MAC = 48'h02_00_00_00_00_01;
  localparam logic [47:0] SRV_MAC = 48'h02_00_00_00_00_10;

  rdp_server_node #(
    .MAC_ADDR(SRV_MAC), .TARGET_MAC(TGT_MAC), .MAX_DATA_BYTES(MAX_DATA_BYTES),
    .NAME_BYTES(NAME_BYTES), .TIMEOUT_CYCLES(TIMEOUT_CYCLES), .BYTE_CYCLES(BYTE_CYCLES)
  ) u_server (
    .clk, .rst_n,
    .rx_dv (srv_rx_dv), .rx_stb (srv_rx_stb), .rxd (srv_rxd),
    .tx_dv (srv_tx_dv), .tx_stb (srv_tx_stb), .txd (srv_txd),
    .push (srv_push), .push_len (srv_push_len),
    .req_valid (srv_req_valid), .req_name (srv_req_name),
    .bs_addr, .bs_data,
    .busy (srv_busy), .done (srv_done), .restarts (srv_restarts), .cur_n (srv_n)
  );

  rdp_platform #(
    .MAC_ADDR(TGT_MAC), .SERVER_MAC(SRV_MAC), .SLOTS(SLOTS), .SLOT_BYTES(SLOT_BYTES),
    .NAME_BYTES(NAME_BYTES), .TIMEOUT_CYCLES(TIMEOUT_CYCLES), .BYTE_CYCLES(BYTE_CYCLES),
    .UART_DIV(UART_DIV)
  ) u_target (
    .clk, .rst_n,
    .rx_dv (tgt_rx_dv), .rx_stb (tgt_rx_stb), .rxd (tgt_rxd),
    .tx_dv (tgt_tx_dv), .tx_stb (tgt_tx_stb), .txd (tgt_txd),
    .name_req (tgt_name_req), .name (tgt_name), .mem_slots (tgt_mem_slots),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy, .uart_txd,
    .sess_active (tgt_active), .sess_done (tgt_done), .sess_err (tgt_err),
    .err_code (tgt_err_code), .pkt_cnt (tgt_pkt_cnt), .cur_p (tgt_p),
    .ring_count (tgt_ring_count), .icap_bytes
  );

endmodule
