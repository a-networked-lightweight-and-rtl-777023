// rdp_server: protocol engine of the remote bitstreams server (left-hand
// state machine of the protocol).
//
// A transfer starts either from the local side (push with the bitstream's
// length in bytes, the target's slave mode) or from a NAME message of the
// target (master mode): the name is shown on req_name with a one-cycle
// req_valid, and the bitstream store answers with push once it has the file.
// The server then sends N = ceil(len / MAX_DATA_BYTES), waits for P, and sends
// bursts of up to P DATA packets numbered 1..N, each carrying up to
// MAX_DATA_BYTES bytes read from the bitstream store (bs_addr out, bs_data
// in, one cycle of read latency). After each burst it waits for an
// acknowledge: an ACK that names the last packet sent continues with the
// next burst, or ends the transfer (done) after packet N; a NACK restarts
// the whole bitstream by sending N again. A timer of TIMEOUT_CYCLES while
// waiting for P or for an acknowledge also restarts it. restarts counts the
// restarts.
//
// Following the protocol as designed: the order of N, P, bursts of P packets
// and acknowledges, restart from the start state after a negative answer, and
// the timer. This design's own choices: the message layout (rdp_pkg), the
// handshake with the bitstream store, ignoring an ACK with an unexpected
// sequence number, and returning to idle after packet N instead of starting
// over.
module rdp_server
  import rdp_pkg::*;
#(
  parameter int unsigned MAX_DATA_BYTES = rdp_pkg::MAX_DATA,
  parameter int unsigned NAME_BYTES     = 16,
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // local control and bitstream store
  input  logic                       push,
  input  logic [31:0]                push_len,
  output logic                       req_valid,
  output logic [NAME_BYTES-1:0][7:0] req_name,
  output logic [31:0]                bs_addr,
  input  logic [7:0]                 bs_data,
  // from eth_rx
  input  logic                       rx_pay_valid,
  input  logic [7:0]                 rx_pay_data,
  input  logic                       rx_frm_end,
  input  logic                       rx_frm_ok,
  // to eth_tx
  output logic                       tx_start,
  output logic [10:0]                tx_len,
  input  logic                       tx_busy,
  input  logic                       tx_done,
  input  logic [10:0]                tx_pay_idx,
  output logic [7:0]                 tx_pay_byte,
  // status
  output logic                       busy,
  output logic                       done,
  output logic [15:0]                restarts,
  output logic [15:0]                cur_n,
  output logic [15:0]                cur_p
);

  typedef enum logic [2:0] {V_IDLE, V_START, V_WAIT_P, V_SEND_PKT, V_WAIT_ACK} state_t;
  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);

  state_t        st;
  logic          sent;
  logic [31:0]   len_q;
  logic [31:0]   off;      // first byte of the next packet
  logic [15:0]   pkt;      // packets sent
  logic [15:0]   burst;
  logic [TW-1:0] timer;
  logic [NAME_BYTES-1:0][7:0] name_buf;

  logic [7:0]  h_typ;
  logic [15:0] h_seq, h_val;
  logic [10:0] h_cnt;

  rdp_hdr_rx u_hdr (
    .clk, .rst_n,
    .pay_valid (rx_pay_valid),
    .pay_data  (rx_pay_data),
    .frm_end   (rx_frm_end),
    .typ       (h_typ),
    .seq       (h_seq),
    .val       (h_val),
    .cnt       (h_cnt)
  );

  logic rx_msg;
  assign rx_msg = rx_frm_end && rx_frm_ok && h_cnt >= 11'(HDR_BYTES);

  // data bytes of the next packet
  logic [31:0] remain;
  logic [15:0] dlen;
  assign remain = len_q - off;
  assign dlen   = (remain > 32'(MAX_DATA_BYTES)) ? 16'(MAX_DATA_BYTES) : remain[15:0];

  logic [7:0]  m_typ;
  logic [15:0] m_seq, m_val;
  always_comb begin
    m_typ  = MSG_N;
    m_seq  = '0;
    m_val  = cur_n;
    tx_len = 11'(HDR_BYTES);
    if (st == V_SEND_PKT) begin
      m_typ  = MSG_DATA;
      m_seq  = pkt + 16'd1;
      m_val  = dlen;
      tx_len = 11'(HDR_BYTES) + 11'(dlen);
    end
  end

  assign bs_addr = off + 32'(tx_pay_idx) - 32'(HDR_BYTES);

  always_comb begin
    unique case (tx_pay_idx)
      11'd0:   tx_pay_byte = m_typ;
      11'd1:   tx_pay_byte = 8'h00;
      11'd2:   tx_pay_byte = m_seq[15:8];
      11'd3:   tx_pay_byte = m_seq[7:0];
      11'd4:   tx_pay_byte = m_val[15:8];
      11'd5:   tx_pay_byte = m_val[7:0];
      default: tx_pay_byte = bs_data;
    endcase
  end

  assign tx_start = (st == V_START || st == V_SEND_PKT) && !sent && !tx_busy;
  assign busy     = (st != V_IDLE);

  // N = ceil(len / MAX_DATA_BYTES)
  logic [31:0] n_calc;
  assign n_calc = (push_len + 32'(MAX_DATA_BYTES) - 32'd1) / 32'(MAX_DATA_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= V_IDLE;
      sent      <= 1'b0;
      len_q     <= '0;
      off       <= '0;
      pkt       <= '0;
      burst     <= '0;
      timer     <= '0;
      name_buf  <= '0;
      req_name  <= '0;
      req_valid <= 1'b0;
      done      <= 1'b0;
      restarts  <= '0;
      cur_n     <= '0;
      cur_p     <= '0;
    end else begin
      req_valid <= 1'b0;
      done      <= 1'b0;
      if (tx_start) sent <= 1'b1;

      if (rx_frm_end || rx_pay_valid || !(st == V_WAIT_P || st == V_WAIT_ACK))
        timer <= '0;
      else
        timer <= timer + 1'b1;

      // collect the name bytes of a NAME message
      if (rx_pay_valid && h_cnt >= 11'(HDR_BYTES) && 32'(h_cnt) < HDR_BYTES + NAME_BYTES)
        name_buf[32'(h_cnt) - HDR_BYTES] <= rx_pay_data;

      unique case (st)
        V_IDLE: begin
          if (push && push_len != '0) begin
            len_q <= push_len;
            cur_n <= n_calc[15:0];
            st    <= V_START;
          end else if (rx_msg && h_typ == MSG_NAME) begin
            req_name  <= name_buf;
            req_valid <= 1'b1;
          end
        end
        V_START: begin
          // N (cur_n) was fixed by push; every restart begins here
          if (!sent) begin
            off   <= '0;
            pkt   <= '0;
            burst <= '0;
          end
          if (sent && tx_done) begin
            sent <= 1'b0;
            st   <= V_WAIT_P;
          end
        end
        V_WAIT_P: begin
          if (rx_msg && h_typ == MSG_P && h_val != '0) begin
            cur_p <= h_val;
            st    <= V_SEND_PKT;
          end else if (timer == TW'(TIMEOUT_CYCLES)) begin
            st       <= V_START;
            restarts <= restarts + 16'd1;
          end
        end
        V_SEND_PKT: if (sent && tx_done) begin
          sent  <= 1'b0;
          pkt   <= pkt + 16'd1;
          off   <= off + 32'(dlen);
          burst <= burst + 16'd1;
          if (pkt + 16'd1 == cur_n || burst + 16'd1 == cur_p) begin
            burst <= '0;
            st    <= V_WAIT_ACK;
          end
        end
        V_WAIT_ACK: begin
          if (rx_msg && h_typ == MSG_ACK && h_seq == pkt) begin
            if (pkt == cur_n) begin
              st   <= V_IDLE;
              done <= 1'b1;
            end else begin
              st <= V_SEND_PKT;
            end
          end else if ((rx_msg && h_typ == MSG_NACK) || timer == TW'(TIMEOUT_CYCLES)) begin
            st       <= V_START;
            restarts <= restarts + 16'd1;
          end
        end
        default: st <= V_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tx_start |-> !tx_busy);
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (push_len <= 32'(MAX_DATA_BYTES) * 32'd65535));

endmodule
