// tb_eth_pkg: testbench helpers for building and checking Ethernet frames of
// the 0xfade protocol. Written independently of the RTL: the CRC-32 here is
// the textbook MSB-first (non-reflected) formulation with explicit bit
// reversal, checked at start-up against the standard test vector
// CRC-32("123456789") = 0xCBF43926.
package tb_eth_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic logic [7:0] rev8(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[i] = b[7-i];
    return r;
  endfunction

  function automatic logic [31:0] rev32(input logic [31:0] w);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = w[31-i];
    return r;
  endfunction

  // IEEE 802.3 CRC-32 of a byte string, as transmitted (final value).
  function automatic logic [31:0] crc32(input bytes_t d);
    logic [31:0] c = 32'hffff_ffff;
    foreach (d[k]) begin
      logic [7:0] b = rev8(d[k]);
      for (int i = 7; i >= 0; i--) begin
        logic fb = c[31] ^ b[i];
        c = {c[30:0], 1'b0};
        if (fb) c = c ^ 32'h04c1_1db7;
      end
    end
    return ~rev32(c);
  endfunction

  function automatic bit crc_selftest();
    bytes_t v = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    return crc32(v) == 32'hcbf4_3926;
  endfunction

  // Frame body (without preamble and FCS) of a command frame, padded to
  // 60 bytes so that with the FCS it is the 64-byte minimum.
  function automatic bytes_t cmd_body(input logic [47:0] tgt, input logic [47:0] src,
                                      input logic [15:0] op, input logic [15:0] set_num,
                                      input logic [15:0] pkt_num,
                                      input logic [15:0] etype = 16'hfade);
    bytes_t b;
    for (int i = 5; i >= 0; i--) b.push_back(tgt[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) b.push_back(src[i*8 +: 8]);
    b.push_back(etype[15:8]);   b.push_back(etype[7:0]);
    b.push_back(op[15:8]);      b.push_back(op[7:0]);
    b.push_back(set_num[15:8]); b.push_back(set_num[7:0]);
    b.push_back(pkt_num[15:8]); b.push_back(pkt_num[7:0]);
    while (b.size() < 60) b.push_back(8'h00);
    return b;
  endfunction

  // Complete wire image: preamble, SFD, body, FCS (least significant byte
  // first). corrupt flips one bit of the FCS.
  function automatic bytes_t on_wire(input bytes_t body, input bit corrupt = 0);
    bytes_t w;
    logic [31:0] f = crc32(body);
    if (corrupt) f[5] = ~f[5];
    repeat (7) w.push_back(8'h55);
    w.push_back(8'hd5);
    foreach (body[i]) w.push_back(body[i]);
    for (int i = 0; i < 4; i++) w.push_back(f[i*8 +: 8]);
    return w;
  endfunction

endpackage
