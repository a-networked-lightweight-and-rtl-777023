// rdp_hdr_rx: picks the protocol header out of a received payload stream.
//
// Follows the payload bytes of eth_rx and keeps the message type, sequence
// number and value field of the current frame (layout in rdp_pkg). cnt is the
// offset, within the payload, of the byte presented on pay_valid/pay_data in
// the same cycle, and counts the bytes seen so far once the frame has ended;
// it returns to zero the cycle after frm_end. The fields of a frame are
// complete from its sixth payload byte on, and stay valid during frm_end.
module rdp_hdr_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pay_valid,
  input  logic [7:0]  pay_data,
  input  logic        frm_end,
  output logic [7:0]  typ,
  output logic [15:0] seq,
  output logic [15:0] val,
  output logic [10:0] cnt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      typ <= '0;
      seq <= '0;
      val <= '0;
      cnt <= '0;
    end else if (frm_end) begin
      cnt <= '0;
    end else if (pay_valid) begin
      cnt <= cnt + 11'd1;
      unique case (cnt)
        11'd0:   typ       <= pay_data;
        11'd2:   seq[15:8] <= pay_data;
        11'd3:   seq[7:0]  <= pay_data;
        11'd4:   val[15:8] <= pay_data;
        11'd5:   val[7:0]  <= pay_data;
        default: ;
      endcase
    end
  end

endmodule
