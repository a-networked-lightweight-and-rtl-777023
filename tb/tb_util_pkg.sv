// tb_util_pkg: reference functions for the testbenches, written independently
// of the RTL: Ethernet CRC-32 computed MSB-first on bit-reversed bytes,
// frame building and protocol message building.
package tb_util_pkg;

  typedef byte unsigned bq_t[$];

  localparam logic [15:0] ETYPE = 16'h88B5;

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction

  function automatic logic [31:0] rev32(input logic [31:0] w);
    for (int i = 0; i < 32; i++) rev32[i] = w[31-i];
  endfunction

  // CRC-32 of IEEE 802.3, non-reflected formulation with explicit reversal
  function automatic logic [31:0] crc32(input bq_t q);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (q[k]) begin
      logic [7:0] b = rev8(q[k]);
      for (int i = 7; i >= 0; i--) begin
        logic fb = c[31] ^ b[i];
        c = {c[30:0], 1'b0};
        if (fb) c = c ^ 32'h04C1_1DB7;
      end
    end
    return ~rev32(c);
  endfunction

  // full wire image: preamble, SFD, header, payload padded to 46, FCS
  function automatic bq_t eth_frame(input logic [47:0] dst, input logic [47:0] src,
                                    input logic [15:0] etype, input bq_t pay);
    bq_t f, w;
    logic [31:0] c;
    for (int i = 5; i >= 0; i--) f.push_back(dst[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(src[8*i +: 8]);
    f.push_back(etype[15:8]);
    f.push_back(etype[7:0]);
    foreach (pay[i]) f.push_back(pay[i]);
    while (f.size() < 14 + 46) f.push_back(8'h00);
    c = crc32(f);
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    for (int i = 0; i < 7; i++) w.push_back(8'h55);
    w.push_back(8'hD5);
    foreach (f[i]) w.push_back(f[i]);
    return w;
  endfunction

  // protocol message: type, 0, seq (BE), value (BE), body
  function automatic bq_t msg(input byte unsigned typ, input int seq, input int val, input bq_t body);
    bq_t m;
    m.push_back(typ);
    m.push_back(8'h00);
    m.push_back(seq[15:8]);
    m.push_back(seq[7:0]);
    m.push_back(val[15:8]);
    m.push_back(val[7:0]);
    foreach (body[i]) m.push_back(body[i]);
    return m;
  endfunction

  // deterministic bitstream content
  function automatic byte unsigned bs_byte(input int unsigned addr);
    logic [31:0] h = addr * 32'h9E37_79B1;
    return h[23:16] ^ h[7:0];
  endfunction

endpackage
