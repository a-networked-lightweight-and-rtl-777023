// rdp_target: protocol engine of the lightweight target (right-hand state
// machine of the protocol).
//
// Session: in master mode the local side asks for a bitstream by name
// (name_req with name[]), and the engine sends a NAME message and waits for N;
// in slave mode it simply waits for N. On N (total number of packets) it
// chooses the burst size P from the packet slots made available for this
// session, P = max(1, (mem_slots-1)/2), which is 3 for the 2P+1 = 7 slots of
// the default buffer, and answers with P. It then accepts DATA packets 1..N in
// order. Each packet's data is written into the tail slot of pkt_ring while
// it arrives and committed only if the frame is good: correct FCS, type DATA,
// sequence number one above the last one, a length between 1 and SLOT_BYTES
// that the frame actually carries, and a free slot. After the P-th packet of
// a burst, or the N-th packet, it sends an ACK carrying the last sequence
// number, once the buffer has room for the next burst (count + P <= slots);
// the N-th packet ends the session (sess_done). Any error stops the session:
// the buffer and the ICAP pipeline are flushed (flush), a NACK carrying the
// error code is sent, and the engine returns to waiting for N, so the server
// restarts the bitstream from its beginning. A timer of TIMEOUT_CYCLES
// without a received frame while packets are expected (or while a name
// request is unanswered) counts as an error (NACK, or a repeated name request).
// Messages received while a reply is being sent are ignored.
//
// Following the protocol as designed: the states, N and P negotiation, the
// acknowledge every P packets, sequence checking, restart from the beginning
// of the bitstream and the timers. This design's own choices: the message
// layout (rdp_pkg), the formula for P, the rule that waits for buffer room
// before acknowledging, the ACK after a short final burst, the error codes
// and the timer length. trace_valid/trace_char report protocol events for the
// serial trace line.
module rdp_target
  import rdp_pkg::*;
#(
  parameter int unsigned SLOTS          = 7,
  parameter int unsigned SLOT_BYTES     = 1500,
  parameter int unsigned NAME_BYTES     = 16,
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000,
  localparam int unsigned OW = $clog2(SLOT_BYTES),
  localparam int unsigned LW = $clog2(SLOT_BYTES + 1),
  localparam int unsigned CW = $clog2(SLOTS + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // local control
  input  logic                      name_req,
  input  logic [NAME_BYTES-1:0][7:0] name,
  input  logic [CW-1:0]             mem_slots,
  // from eth_rx
  input  logic                      rx_pay_valid,
  input  logic [7:0]                rx_pay_data,
  input  logic                      rx_frm_end,
  input  logic                      rx_frm_ok,
  // to eth_tx
  output logic                      tx_start,
  output logic [10:0]               tx_len,
  input  logic                      tx_busy,
  input  logic                      tx_done,
  input  logic [10:0]               tx_pay_idx,
  output logic [7:0]                tx_pay_byte,
  // packet buffer producer side
  output logic                      ring_wr_en,
  output logic [OW-1:0]             ring_wr_off,
  output logic [7:0]                ring_wr_data,
  output logic                      ring_commit,
  output logic [LW-1:0]             ring_commit_len,
  output logic                      ring_flush,
  input  logic [CW-1:0]             ring_count,
  input  logic                      ring_full,
  // status
  output logic                      sess_active,
  output logic                      sess_done,
  output logic                      sess_err,
  output logic [7:0]                err_code,
  output logic [15:0]               cur_n,
  output logic [15:0]               cur_p,
  output logic [15:0]               pkt_cnt,
  output logic                      trace_valid,
  output logic [7:0]                trace_char
);

  typedef enum logic [2:0] {
    S_WAIT_N, S_SEND_NAME, S_SEND_P, S_WAIT_PKT, S_SEND_ACK, S_SEND_NACK
  } state_t;

  // error codes carried in the value field of a NACK
  localparam logic [7:0] E_FCS = 8'd1, E_TYPE = 8'd2, E_SEQ = 8'd3,
                         E_LEN = 8'd4, E_OVF = 8'd5, E_TIMEOUT = 8'd6;

  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);

  state_t                     st;
  logic                       sent;        // reply handed to eth_tx
  logic                       named;       // waiting for N after a name request
  logic [NAME_BYTES-1:0][7:0] name_q;
  logic [15:0]                burst;
  logic [CW-1:0]              slots_q;
  logic [TW-1:0]              timer;

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

  // ---- data bytes go straight into the tail slot ----
  logic [10:0] d_idx;
  assign d_idx        = h_cnt - 11'(HDR_BYTES);
  assign ring_wr_en   = (st == S_WAIT_PKT) && rx_pay_valid && h_cnt >= 11'(HDR_BYTES) &&
                        h_typ == MSG_DATA && d_idx < 11'(SLOT_BYTES) && !ring_full;
  assign ring_wr_off  = OW'(d_idx);
  assign ring_wr_data = rx_pay_data;

  // ---- checks on a complete DATA frame ----
  logic [7:0] pkt_err;
  always_comb begin
    pkt_err = '0;
    if (!rx_frm_ok)                                              pkt_err = E_FCS;
    else if (h_cnt < 11'(HDR_BYTES) || h_typ != MSG_DATA)        pkt_err = E_TYPE;
    else if (h_seq != pkt_cnt + 16'd1)                           pkt_err = E_SEQ;
    else if (h_val == '0 || h_val > 16'(SLOT_BYTES) ||
             32'(h_cnt) < 32'(h_val) + HDR_BYTES)                pkt_err = E_LEN;
    else if (ring_full)                                          pkt_err = E_OVF;
  end

  logic pkt_good;
  assign pkt_good        = (st == S_WAIT_PKT) && rx_frm_end && pkt_err == '0;
  assign ring_commit     = pkt_good;
  assign ring_commit_len = LW'(h_val);

  // P from the slots granted for the transfer
  logic [CW-1:0] slots_eff;
  logic [15:0]   p_new;
  always_comb begin
    slots_eff = (32'(mem_slots) > SLOTS) ? CW'(SLOTS) : mem_slots;
    if (slots_eff == '0) slots_eff = CW'(1);
    p_new = 16'((32'(slots_eff) - 32'd1) >> 1);
    if (p_new == '0) p_new = 16'd1;
  end

  logic room;
  assign room = (32'(ring_count) + 32'(cur_p) <= 32'(slots_q));

  // ---- reply messages ----
  logic [7:0]  m_typ;
  logic [15:0] m_seq, m_val;
  always_comb begin
    m_typ  = MSG_ACK;
    m_seq  = pkt_cnt;
    m_val  = cur_p;
    tx_len = 11'(HDR_BYTES);
    unique case (st)
      S_SEND_NAME: begin
        m_typ  = MSG_NAME; m_seq = '0; m_val = 16'(NAME_BYTES);
        tx_len = 11'(HDR_BYTES + NAME_BYTES);
      end
      S_SEND_P:    begin m_typ = MSG_P;    m_seq = '0; end
      S_SEND_NACK: begin m_typ = MSG_NACK; m_val = {8'h00, err_code}; end
      default: ;
    endcase
  end

  always_comb begin
    unique case (tx_pay_idx)
      11'd0:   tx_pay_byte = m_typ;
      11'd1:   tx_pay_byte = 8'h00;
      11'd2:   tx_pay_byte = m_seq[15:8];
      11'd3:   tx_pay_byte = m_seq[7:0];
      11'd4:   tx_pay_byte = m_val[15:8];
      11'd5:   tx_pay_byte = m_val[7:0];
      default: tx_pay_byte = (32'(tx_pay_idx) < HDR_BYTES + NAME_BYTES) ?
                             name_q[32'(tx_pay_idx) - HDR_BYTES] : 8'h00;
    endcase
  end

  logic ready_to_send;
  assign ready_to_send = (st == S_SEND_NAME || st == S_SEND_P || st == S_SEND_NACK ||
                          (st == S_SEND_ACK && (room || pkt_cnt == cur_n)));
  assign tx_start = ready_to_send && !sent && !tx_busy;

  assign sess_active = (st != S_WAIT_N) && (st != S_SEND_NAME);
  assign ring_flush  = (st == S_SEND_NACK) && !sent;

  // ---- state machine ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_WAIT_N;
      sent        <= 1'b0;
      named       <= 1'b0;
      name_q      <= '0;
      burst       <= '0;
      slots_q     <= '0;
      timer       <= '0;
      cur_n       <= '0;
      cur_p       <= '0;
      pkt_cnt     <= '0;
      err_code    <= '0;
      sess_done   <= 1'b0;
      sess_err    <= 1'b0;
      trace_valid <= 1'b0;
      trace_char  <= '0;
    end else begin
      sess_done   <= 1'b0;
      sess_err    <= 1'b0;
      trace_valid <= 1'b0;
      if (tx_start) sent <= 1'b1;

      // timer: runs only while an answer from the server is expected
      if (rx_frm_end || rx_pay_valid || !(st == S_WAIT_PKT || (st == S_WAIT_N && named)))
        timer <= '0;
      else
        timer <= timer + 1'b1;

      unique case (st)
        S_WAIT_N: begin
          if (rx_frm_end && rx_frm_ok && h_cnt >= 11'(HDR_BYTES) &&
              h_typ == MSG_N && h_val != '0) begin
            cur_n       <= h_val;
            cur_p       <= p_new;
            slots_q     <= slots_eff;
            pkt_cnt     <= '0;
            burst       <= '0;
            named       <= 1'b0;
            st          <= S_SEND_P;
            trace_valid <= 1'b1;
            trace_char  <= TR_N;
          end else if (named && timer == TW'(TIMEOUT_CYCLES)) begin
            st          <= S_SEND_NAME;
            trace_valid <= 1'b1;
            trace_char  <= TR_TIMEOUT;
          end else if (name_req && !named) begin
            name_q      <= name;
            st          <= S_SEND_NAME;
            trace_valid <= 1'b1;
            trace_char  <= TR_NAME;
          end
        end
        S_SEND_NAME: if (sent && tx_done) begin
          sent  <= 1'b0;
          named <= 1'b1;
          st    <= S_WAIT_N;
        end
        S_SEND_P: if (sent && tx_done) begin
          sent <= 1'b0;
          st   <= S_WAIT_PKT;
        end
        S_WAIT_PKT: begin
          if (rx_frm_end) begin
            if (pkt_err != '0) begin
              err_code    <= pkt_err;
              sess_err    <= 1'b1;
              st          <= S_SEND_NACK;
              trace_valid <= 1'b1;
              trace_char  <= TR_NACK;
            end else begin
              pkt_cnt <= pkt_cnt + 16'd1;
              burst   <= burst + 16'd1;
              if (pkt_cnt + 16'd1 == cur_n || burst + 16'd1 == cur_p)
                st <= S_SEND_ACK;
            end
          end else if (timer == TW'(TIMEOUT_CYCLES)) begin
            err_code    <= E_TIMEOUT;
            sess_err    <= 1'b1;
            st          <= S_SEND_NACK;
            trace_valid <= 1'b1;
            trace_char  <= TR_TIMEOUT;
          end
        end
        S_SEND_ACK: if (sent && tx_done) begin
          sent        <= 1'b0;
          burst       <= '0;
          trace_valid <= 1'b1;
          if (pkt_cnt == cur_n) begin
            st         <= S_WAIT_N;
            sess_done  <= 1'b1;
            trace_char <= TR_DONE;
          end else begin
            st         <= S_WAIT_PKT;
            trace_char <= TR_ACK;
          end
        end
        S_SEND_NACK: if (sent && tx_done) begin
          sent <= 1'b0;
          st   <= S_WAIT_N;
        end
        default: st <= S_WAIT_N;
      endcase
    end
  end

  // a reply is started only when the transmitter is free
  assert property (@(posedge clk) disable iff (!rst_n) tx_start |-> !tx_busy);
  // data is committed only while a session expects packets
  assert property (@(posedge clk) disable iff (!rst_n) ring_commit |-> st == S_WAIT_PKT);

endmodule
