// tb_ref_pkg: reference model of the 64-byte MAC header for the testbenches.
// It lays the header out byte by byte from explicit offsets (0 Fullrate,
// 1-2 Length, 3 PktType, 4-9 DstAddr, 10-15 SrcAddr, 16 Resend, 17-20 result,
// 21-22 sequence, 23-61 zero, 62-63 checksum) and computes the CRC-16/CCITT
// (init 0xFFFF, polynomial 0x1021) as a bit-serial division over the whole
// message, independently of the RTL.
package tb_ref_pkg;
  typedef byte unsigned bytes_t[$];

  function automatic logic [15:0] ref_crc(bytes_t m, int n);
    logic [15:0] r = 16'hFFFF;
    for (int i = 0; i < n; i++)
      for (int b = 7; b >= 0; b--) begin
        logic fb = r[15] ^ m[i][b];
        r = r << 1;
        if (fb) r = r ^ 16'h1021;
      end
    return r;
  endfunction

  function automatic bytes_t ref_header(byte unsigned fullrate, int length,
                                        byte unsigned ptype, logic [47:0] dst,
                                        logic [47:0] src, byte unsigned resend,
                                        logic [31:0] result, logic [15:0] seq);
    bytes_t h;
    logic [15:0] c;
    for (int i = 0; i < 64; i++) h.push_back(8'h00);
    h[0] = fullrate;
    h[1] = 8'(length >> 8);
    h[2] = 8'(length);
    h[3] = ptype;
    for (int i = 0; i < 6; i++) h[4 + i]  = dst[47 - 8*i -: 8];
    for (int i = 0; i < 6; i++) h[10 + i] = src[47 - 8*i -: 8];
    h[16] = resend;
    for (int i = 0; i < 4; i++) h[17 + i] = result[31 - 8*i -: 8];
    h[21] = seq[15:8];
    h[22] = seq[7:0];
    c = ref_crc(h, 62);
    h[62] = c[15:8];
    h[63] = c[7:0];
    return h;
  endfunction
endpackage
