// rdp_server_node: the remote bitstreams server as seen from the network:
// the server protocol engine (rdp_server) with its own receive and transmit
// MACs (eth_rx, eth_tx). DATA, N and all other messages go to TARGET_MAC.
//
// Interfaces: the MAC byte streams towards the PHY (see eth_rx/eth_tx), the
// bitstream store (bs_addr out, bs_data in with one cycle of read latency),
// the local start (push with push_len bytes), the name request of a master
// mode target (req_valid, req_name) and status.
//
// The design describes the server only by its protocol state machine; running
// it as hardware with its own MAC is this design's choice, made so that the
// whole link can be simulated cycle by cycle.
module rdp_server_node
  import rdp_pkg::*;
#(
  parameter logic [47:0] MAC_ADDR       = 48'h02_00_00_00_00_10,
  parameter logic [47:0] TARGET_MAC     = 48'h02_00_00_00_00_01,
  parameter int unsigned MAX_DATA_BYTES = rdp_pkg::MAX_DATA,
  parameter int unsigned NAME_BYTES     = 16,
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000,
  parameter int unsigned BYTE_CYCLES    = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rx_dv,
  input  logic                       rx_stb,
  input  logic [7:0]                 rxd,
  output logic                       tx_dv,
  output logic                       tx_stb,
  output logic [7:0]                 txd,
  input  logic                       push,
  input  logic [31:0]                push_len,
  output logic                       req_valid,
  output logic [NAME_BYTES-1:0][7:0] req_name,
  output logic [31:0]                bs_addr,
  input  logic [7:0]                 bs_data,
  output logic                       busy,
  output logic                       done,
  output logic [15:0]                restarts,
  output logic [15:0]                cur_n
);

  logic        rx_pay_valid, rx_frm_end, rx_frm_ok;
  logic [7:0]  rx_pay_data;
  logic [47:0] rx_src;
  logic        tx_start, tx_busy, tx_done;
  logic [10:0] tx_len, tx_pay_idx;
  logic [7:0]  tx_pay_byte;
  logic [15:0] cur_p;

  eth_rx #(.MAC_ADDR(MAC_ADDR)) u_rx (
    .clk, .rst_n, .rx_dv, .rx_stb, .rxd,
    .pay_valid (rx_pay_valid), .pay_data (rx_pay_data),
    .frm_end (rx_frm_end), .frm_ok (rx_frm_ok), .frm_src (rx_src)
  );

  eth_tx #(.MAC_ADDR(MAC_ADDR), .BYTE_CYCLES(BYTE_CYCLES)) u_tx (
    .clk, .rst_n, .tx_start, .tx_dst (TARGET_MAC), .tx_len, .tx_busy, .tx_done,
    .pay_idx (tx_pay_idx), .pay_byte (tx_pay_byte), .tx_dv, .tx_stb, .txd
  );

  rdp_server #(
    .MAX_DATA_BYTES(MAX_DATA_BYTES), .NAME_BYTES(NAME_BYTES), .TIMEOUT_CYCLES(TIMEOUT_CYCLES)
  ) u_server (
    .clk, .rst_n, .push, .push_len, .req_valid, .req_name, .bs_addr, .bs_data,
    .rx_pay_valid, .rx_pay_data, .rx_frm_end, .rx_frm_ok,
    .tx_start, .tx_len, .tx_busy, .tx_done, .tx_pay_idx, .tx_pay_byte,
    .busy, .done, .restarts, .cur_n, .cur_p
  );

endmodule
