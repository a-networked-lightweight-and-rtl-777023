// eth_rx: receive half of the Ethernet controller of the target and the server.
//
// The link side is an 8-bit byte stream in the style of GMII: rx_dv frames a
// whole frame (preamble, SFD, header, payload, FCS) and rx_stb marks each
// cycle that carries a byte, so the same block serves a 100 Mb/s link at one
// byte every 8 clocks or a faster one. After the SFD (0xD5) the 14 header bytes
// are checked: the frame is kept only if its destination is MAC_ADDR or the
// broadcast address and its EtherType is the protocol's (rdp_pkg). Payload
// bytes are handed on one per received byte, four bytes late, so that the FCS
// is never passed on. When rx_dv falls, frm_end pulses for one cycle with
// frm_ok = 1 if the CRC-32 over header, payload and FCS gave the Ethernet
// residue, at least the 4 FCS bytes arrived and the payload is at most 1500
// bytes. frm_src holds the sender's address from then on. Frames for other
// stations produce no output at all.
//
// The design only requires of the Ethernet controller that it detects every
// transmission error; filtering, framing and the byte interface are this
// design's own choices.
module eth_rx
  import rdp_pkg::*;
#(
  parameter logic [47:0] MAC_ADDR = 48'h02_00_00_00_00_01
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_dv,
  input  logic        rx_stb,
  input  logic [7:0]  rxd,
  output logic        pay_valid,
  output logic [7:0]  pay_data,
  output logic        frm_end,
  output logic        frm_ok,
  output logic [47:0] frm_src
);

  typedef enum logic [2:0] {R_IDLE, R_PRE, R_HDR, R_PAY, R_DROP} rstate_t;

  rstate_t      st;
  logic [3:0]   hcnt;
  logic [103:0] hsr;       // first 13 header bytes
  logic [31:0]  crc;
  logic [31:0]  dly;       // 4-byte delay line that holds back the FCS
  logic [2:0]   dcnt;      // bytes in the delay line
  logic [10:0]  plen;      // payload bytes passed on
  logic         too_long;

  logic [111:0] hdr_full;
  assign hdr_full = {hsr, rxd};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= R_IDLE;
      hcnt      <= '0;
      hsr       <= '0;
      crc       <= '1;
      dly       <= '0;
      dcnt      <= '0;
      plen      <= '0;
      too_long  <= 1'b0;
      pay_valid <= 1'b0;
      pay_data  <= '0;
      frm_end   <= 1'b0;
      frm_ok    <= 1'b0;
      frm_src   <= '0;
    end else begin
      pay_valid <= 1'b0;
      frm_end   <= 1'b0;
      if (!rx_dv) begin
        if (st == R_PAY) begin
          frm_end <= 1'b1;
          frm_ok  <= (crc == CRC32_RESIDUE) && (dcnt == 3'd4) && !too_long;
        end
        st <= R_IDLE;
      end else begin
        unique case (st)
          R_IDLE, R_PRE: begin
            st <= R_PRE;
            if (rx_stb && rxd == 8'hD5) begin
              st   <= R_HDR;
              hcnt <= '0;
              crc  <= '1;
            end
          end
          R_HDR: if (rx_stb) begin
            crc  <= crc32_byte(crc, rxd);
            hsr  <= {hsr[95:0], rxd};
            hcnt <= hcnt + 4'd1;
            if (hcnt == 4'd13) begin
              if ((hdr_full[111:64] == MAC_ADDR || hdr_full[111:64] == 48'hFFFF_FFFF_FFFF) &&
                  hdr_full[15:0] == RDP_ETHERTYPE) begin
                st       <= R_PAY;
                frm_src  <= hdr_full[63:16];
                dcnt     <= '0;
                plen     <= '0;
                too_long <= 1'b0;
              end else begin
                st <= R_DROP;
              end
            end
          end
          R_PAY: if (rx_stb) begin
            crc <= crc32_byte(crc, rxd);
            dly <= {dly[23:0], rxd};
            if (dcnt == 3'd4) begin
              if (plen == 11'(ETH_MAX_PAYLOAD)) begin
                too_long <= 1'b1;
              end else begin
                pay_valid <= 1'b1;
                pay_data  <= dly[31:24];
                plen      <= plen + 11'd1;
              end
            end else begin
              dcnt <= dcnt + 3'd1;
            end
          end
          R_DROP: ;
          default: st <= R_IDLE;
        endcase
      end
    end
  end

endmodule
