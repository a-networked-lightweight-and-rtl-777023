// rdp_platform: the lightweight reconfigurable target.
//
// Data path: Ethernet receive MAC (eth_rx) -> protocol engine (rdp_target)
// -> circular packet buffer (pkt_ring, the producer side) -> ICAP writer
// (icap_writer, the consumer side) -> ICAP port. The engine replies (NAME, P,
// ACK, NACK) through the transmit MAC (eth_tx) and reports protocol events on
// the serial trace line (trace_uart). The producer and the consumer run
// independently: the buffer decouples the bursty network from the ICAP,
// which takes up to one byte per clock, and the engine withholds its ACK
// until the buffer has room for the next burst.
//
// External interfaces: the MAC byte streams towards the PHY (rx_dv/rx_stb/rxd
// and tx_dv/tx_stb/txd, see eth_rx and eth_tx), the Virtex-II style ICAP
// port, the UART output, the local request (name_req, name, mem_slots; see
// rdp_target) and status outputs.
//
// The design runs this path in software on an embedded processor with
// vendor buses, memories and peripherals; here every part of it is hardware
// and the blocks are wired point to point. The defaults are the design's
// main configuration: 7 slots of 1500 bytes (P = 3) and a 100 MHz clock with
// a 100 Mb/s link.
module rdp_platform
  import rdp_pkg::*;
#(
  parameter logic [47:0] MAC_ADDR       = 48'h02_00_00_00_00_01,
  parameter logic [47:0] SERVER_MAC     = 48'h02_00_00_00_00_10,
  parameter int unsigned SLOTS          = 7,
  parameter int unsigned SLOT_BYTES     = 1500,
  parameter int unsigned NAME_BYTES     = 16,
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000,
  parameter int unsigned BYTE_CYCLES    = 8,
  parameter int unsigned UART_DIV       = 868,
  localparam int unsigned CW = $clog2(SLOTS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // link
  input  logic                       rx_dv,
  input  logic                       rx_stb,
  input  logic [7:0]                 rxd,
  output logic                       tx_dv,
  output logic                       tx_stb,
  output logic [7:0]                 txd,
  // local request
  input  logic                       name_req,
  input  logic [NAME_BYTES-1:0][7:0] name,
  input  logic [CW-1:0]              mem_slots,
  // ICAP
  output logic                       icap_ce_n,
  output logic                       icap_write_n,
  output logic [7:0]                 icap_i,
  input  logic                       icap_busy,
  // trace
  output logic                       uart_txd,
  // status
  output logic                       sess_active,
  output logic                       sess_done,
  output logic                       sess_err,
  output logic [7:0]                 err_code,
  output logic [15:0]                pkt_cnt,
  output logic [15:0]                cur_p,
  output logic [CW-1:0]              ring_count,
  output logic [31:0]                icap_bytes
);

  localparam int unsigned OW = $clog2(SLOT_BYTES);
  localparam int unsigned LW = $clog2(SLOT_BYTES + 1);

  logic        rx_pay_valid, rx_frm_end, rx_frm_ok;
  logic [7:0]  rx_pay_data;
  logic [47:0] rx_src;
  logic        tx_start, tx_busy, tx_done;
  logic [10:0] tx_len, tx_pay_idx;
  logic [7:0]  tx_pay_byte;

  logic          r_wr_en, r_commit, r_flush, r_rd_en, r_pop, r_empty, r_full;
  logic [OW-1:0] r_wr_off, r_rd_off;
  logic [7:0]    r_wr_data, r_rd_data;
  logic [LW-1:0] r_commit_len, r_head_len;

  logic        tr_valid;
  logic [7:0]  tr_char;
  logic [15:0] tr_dropped;
  logic [15:0] cur_n;

  eth_rx #(.MAC_ADDR(MAC_ADDR)) u_rx (
    .clk, .rst_n, .rx_dv, .rx_stb, .rxd,
    .pay_valid (rx_pay_valid), .pay_data (rx_pay_data),
    .frm_end (rx_frm_end), .frm_ok (rx_frm_ok), .frm_src (rx_src)
  );

  eth_tx #(.MAC_ADDR(MAC_ADDR), .BYTE_CYCLES(BYTE_CYCLES)) u_tx (
    .clk, .rst_n, .tx_start, .tx_dst (SERVER_MAC), .tx_len, .tx_busy, .tx_done,
    .pay_idx (tx_pay_idx), .pay_byte (tx_pay_byte), .tx_dv, .tx_stb, .txd
  );

  rdp_target #(
    .SLOTS(SLOTS), .SLOT_BYTES(SLOT_BYTES), .NAME_BYTES(NAME_BYTES),
    .TIMEOUT_CYCLES(TIMEOUT_CYCLES)
  ) u_target (
    .clk, .rst_n, .name_req, .name, .mem_slots,
    .rx_pay_valid, .rx_pay_data, .rx_frm_end, .rx_frm_ok,
    .tx_start, .tx_len, .tx_busy, .tx_done, .tx_pay_idx, .tx_pay_byte,
    .ring_wr_en (r_wr_en), .ring_wr_off (r_wr_off), .ring_wr_data (r_wr_data),
    .ring_commit (r_commit), .ring_commit_len (r_commit_len), .ring_flush (r_flush),
    .ring_count, .ring_full (r_full),
    .sess_active, .sess_done, .sess_err, .err_code, .cur_n, .cur_p, .pkt_cnt,
    .trace_valid (tr_valid), .trace_char (tr_char)
  );

  pkt_ring #(.SLOTS(SLOTS), .SLOT_BYTES(SLOT_BYTES)) u_ring (
    .clk, .rst_n, .flush (r_flush),
    .wr_en (r_wr_en), .wr_off (r_wr_off), .wr_data (r_wr_data),
    .commit (r_commit), .commit_len (r_commit_len),
    .rd_en (r_rd_en), .rd_off (r_rd_off), .rd_data (r_rd_data),
    .head_len (r_head_len), .pop (r_pop),
    .count (ring_count), .empty (r_empty), .full (r_full)
  );

  icap_writer #(.SLOT_BYTES(SLOT_BYTES)) u_icap (
    .clk, .rst_n, .flush (r_flush),
    .empty (r_empty), .head_len (r_head_len), .rd_en (r_rd_en), .rd_off (r_rd_off),
    .rd_data (r_rd_data), .pop (r_pop),
    .icap_ce_n, .icap_write_n, .icap_i, .icap_busy, .bytes_written (icap_bytes)
  );

  trace_uart #(.CLK_DIV(UART_DIV)) u_uart (
    .clk, .rst_n, .ev_valid (tr_valid), .ev_char (tr_char),
    .txd (uart_txd), .dropped (tr_dropped)
  );

endmodule
