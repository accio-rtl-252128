// accio_tb_pkg: helpers shared by the testbenches. Builds reference
// Ethernet II + IPv4 + UDP frames byte by byte (with its own IPv4 checksum,
// written independently of the RTL), and cuts byte strings into 64-bit stream
// words with byte-keep masks, byte 0 in bits [7:0].
package accio_tb_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic logic [15:0] ref_csum(input bytes_t h);
    int unsigned s = 0;
    for (int i = 0; i + 1 < h.size(); i += 2) s += {h[i], h[i+1]};
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return ~16'(s);
  endfunction

  function automatic bytes_t udp_frame(input logic [47:0] dmac, input logic [47:0] smac,
                                       input logic [31:0] sip, input logic [31:0] dip,
                                       input logic [15:0] sport, input logic [15:0] dport,
                                       input logic [15:0] ident, input bytes_t pay);
    bytes_t f, ip;
    logic [15:0] c;
    for (int i = 5; i >= 0; i--) f.push_back(dmac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(smac[8*i +: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    ip = '{8'h45, 8'h00, 8'((20 + 8 + pay.size()) >> 8), 8'(20 + 8 + pay.size()),
           ident[15:8], ident[7:0], 8'h40, 8'h00, 8'd64, 8'd17, 8'h00, 8'h00,
           sip[31:24], sip[23:16], sip[15:8], sip[7:0],
           dip[31:24], dip[23:16], dip[15:8], dip[7:0]};
    c = ref_csum(ip);
    ip[10] = c[15:8]; ip[11] = c[7:0];
    f = {f, ip};
    f.push_back(sport[15:8]); f.push_back(sport[7:0]);
    f.push_back(dport[15:8]); f.push_back(dport[7:0]);
    f.push_back(8'((8 + pay.size()) >> 8)); f.push_back(8'(8 + pay.size()));
    f.push_back(8'h00); f.push_back(8'h00);
    f = {f, pay};
    return f;
  endfunction

  function automatic bytes_t rand_bytes(input int n);
    bytes_t b;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    return b;
  endfunction

  function automatic int n_words(input int nbytes);
    return (nbytes + 7) / 8;
  endfunction

  function automatic logic [63:0] word_of(input bytes_t b, input int w);
    logic [63:0] d = '0;
    for (int i = 0; i < 8; i++) if (8*w + i < b.size()) d[8*i +: 8] = b[8*w + i];
    return d;
  endfunction

  function automatic logic [7:0] keep_of(input bytes_t b, input int w);
    logic [7:0] k = '0;
    for (int i = 0; i < 8; i++) if (8*w + i < b.size()) k[i] = 1'b1;
    return k;
  endfunction

endpackage
