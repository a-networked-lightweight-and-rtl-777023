// eth_tx: transmit half of the Ethernet controller of the target and the server.
//
// A frame is started by a one-cycle tx_start while tx_busy is low; tx_dst and
// tx_len (payload bytes, at most 1500) are sampled then. The block sends one
// byte every BYTE_CYCLES clocks (8 gives 100 Mb/s from a 100 MHz clock):
// 7 preamble bytes 0x55, the SFD 0xD5, destination, MAC_ADDR as source, the
// protocol EtherType, the payload padded with zeros to 46 bytes, the FCS
// (complemented CRC-32, least significant byte first) and then 12 idle byte
// times of inter-frame gap, after which tx_done pulses and tx_busy falls.
// tx_dv stays high from the first preamble byte to the last FCS byte and
// tx_stb marks the cycle each byte is put on txd.
//
// The payload is pulled from the client by index: pay_idx names the next
// payload byte from the moment the previous one is sent, and pay_byte is
// sampled BYTE_CYCLES-1 clocks later, so a client may read it from a memory
// with one cycle of latency (BYTE_CYCLES must then be at least 2).
// The byte interface and its pacing are this design's own choices.
module eth_tx
  import rdp_pkg::*;
#(
  parameter logic [47:0] MAC_ADDR    = 48'h02_00_00_00_00_01,
  parameter int unsigned BYTE_CYCLES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tx_start,
  input  logic [47:0] tx_dst,
  input  logic [10:0] tx_len,
  output logic        tx_busy,
  output logic        tx_done,
  output logic [10:0] pay_idx,
  input  logic [7:0]  pay_byte,
  output logic        tx_dv,
  output logic        tx_stb,
  output logic [7:0]  txd
);

  typedef enum logic [2:0] {T_IDLE, T_PRE, T_HDR, T_PAY, T_FCS, T_IFG} tstate_t;
  localparam int unsigned DW = (BYTE_CYCLES > 1) ? $clog2(BYTE_CYCLES) : 1;

  tstate_t      st;
  logic [DW-1:0] div;
  logic [10:0]  cnt;
  logic [111:0] hdr;
  logic [10:0]  len;
  logic [10:0]  plen;      // payload bytes on the wire, padded
  logic [31:0]  crc;
  logic         slot;      // a byte is sent this cycle

  assign tx_busy = (st != T_IDLE);
  assign slot    = (st != T_IDLE) && (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= T_IDLE;
      div     <= '0;
      cnt     <= '0;
      hdr     <= '0;
      len     <= '0;
      plen    <= '0;
      crc     <= '1;
      pay_idx <= '0;
      tx_dv   <= 1'b0;
      tx_stb  <= 1'b0;
      txd     <= '0;
      tx_done <= 1'b0;
    end else begin
      tx_stb  <= 1'b0;
      tx_done <= 1'b0;
      if (st == T_IDLE) begin
        if (tx_start) begin
          st      <= T_PRE;
          div     <= '0;
          cnt     <= '0;
          hdr     <= {tx_dst, MAC_ADDR, RDP_ETHERTYPE};
          len     <= tx_len;
          plen    <= (tx_len < 11'(ETH_MIN_PAYLOAD)) ? 11'(ETH_MIN_PAYLOAD) : tx_len;
          crc     <= '1;
          pay_idx <= '0;
        end
      end else begin
        div <= (div == DW'(BYTE_CYCLES - 1)) ? '0 : div + 1'b1;
        if (slot) begin
          cnt <= cnt + 11'd1;
          unique case (st)
            T_PRE: begin
              tx_dv  <= 1'b1;
              tx_stb <= 1'b1;
              txd    <= (cnt == 11'd7) ? 8'hD5 : 8'h55;
              if (cnt == 11'd7) begin st <= T_HDR; cnt <= '0; end
            end
            T_HDR: begin
              tx_stb <= 1'b1;
              txd    <= hdr[111:104];
              crc    <= crc32_byte(crc, hdr[111:104]);
              hdr    <= {hdr[103:0], 8'h00};
              if (cnt == 11'd13) begin st <= T_PAY; cnt <= '0; end
            end
            T_PAY: begin
              tx_stb  <= 1'b1;
              txd     <= (cnt < len) ? pay_byte : 8'h00;
              crc     <= crc32_byte(crc, (cnt < len) ? pay_byte : 8'h00);
              pay_idx <= pay_idx + 11'd1;
              if (cnt == plen - 11'd1) begin st <= T_FCS; cnt <= '0; end
            end
            T_FCS: begin
              tx_stb <= 1'b1;
              txd    <= ~crc[7:0];
              crc    <= {8'h00, crc[31:8]};
              if (cnt == 11'd3) begin st <= T_IFG; cnt <= '0; end
            end
            T_IFG: begin
              tx_dv <= 1'b0;
              if (cnt == 11'd11) begin st <= T_IDLE; tx_done <= 1'b1; end
            end
            default: st <= T_IDLE;
          endcase
        end
      end
    end
  end

  initial assert (BYTE_CYCLES >= 2) else $error("eth_tx: BYTE_CYCLES must be at least 2");

endmodule
