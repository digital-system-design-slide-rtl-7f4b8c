// des_ref_pkg: behavioural DES model for testbenches.
//
// A straightforward software-style DES (encryption and decryption) written
// with functions: key schedule with left rotations computed up front, then
// 16 rounds in a loop. It shares only the constant tables of des_pkg with
// the RTL; the algorithm (bit selection, key schedule, round order) is coded
// independently, and des_ref_selftest checks it against published known
// answers before a testbench relies on it.
package des_ref_pkg;
  import des_pkg::*;

  // Select bits of an n-bit value (right-aligned in x) by a 1-based table.
  function automatic logic [63:0] select_bits(input logic [63:0] x, input int n,
                                              input int unsigned tbl[], input int m);
    logic [63:0] r;
    r = '0;
    for (int i = 0; i < m; i++) r = {r[62:0], x[n - int'(tbl[i])]};
    return r;
  endfunction

  function automatic logic [31:0] f(input logic [31:0] r, input logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s;
    int unsigned e[], p[];
    e = new[48]; p = new[32];
    foreach (e[i]) e[i] = E_TABLE[i];
    foreach (p[i]) p[i] = P_TABLE[i];
    x = 48'(select_bits(64'(r), 32, e, 48)) ^ k;
    s = '0;
    for (int b = 0; b < 8; b++) begin
      logic [5:0] a;
      a = x[47 - 6*b -: 6];
      s = {s[27:0], SBOX_TABLE[b][{a[5], a[0], a[4:1]}]};
    end
    return 32'(select_bits(64'(s), 32, p, 32));
  endfunction

  function automatic logic [63:0] crypt(input logic [63:0] key, input logic [63:0] din,
                                        input bit decrypt);
    localparam int SHIFTS [16] = '{1,1,2,2,2,2,2,2,1,2,2,2,2,2,2,1};
    logic [47:0] ks [16];
    logic [27:0] c, d;
    logic [55:0] cd;
    logic [63:0] x;
    logic [31:0] l, r, t;
    int unsigned pc1[], pc2[], ip[], fp[];
    pc1 = new[56]; pc2 = new[48]; ip = new[64]; fp = new[64];
    foreach (pc1[i]) pc1[i] = PC1_TABLE[i];
    foreach (pc2[i]) pc2[i] = PC2_TABLE[i];
    foreach (ip[i])  ip[i]  = IP_TABLE[i];
    foreach (fp[i])  fp[i]  = FP_TABLE[i];
    cd = 56'(select_bits(key, 64, pc1, 56));
    c = cd[55:28];
    d = cd[27:0];
    for (int i = 0; i < 16; i++) begin
      for (int s = 0; s < SHIFTS[i]; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      ks[i] = 48'(select_bits(64'({c, d}), 56, pc2, 48));
    end
    x = select_bits(din, 64, ip, 64);
    l = x[63:32];
    r = x[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ f(r, ks[decrypt ? 15 - i : i]);
      l = t;
    end
    return select_bits({r, l}, 64, fp, 64);
  endfunction

  // Returns the number of published known answers the model gets wrong.
  function automatic int des_ref_selftest();
    int bad = 0;
    if (crypt(64'h133457799bbcdff1, 64'h0123456789abcdef, 0) != 64'h85e813540f0ab405) bad++;
    if (crypt(64'h0123456789abcdef, 64'h4e6f772069732074, 0) != 64'h3fa40e8a984d4815) bad++;
    if (crypt(64'h0101010101010101, 64'h8000000000000000, 0) != 64'h95f8a5e5dd31d900) bad++;
    if (crypt(64'h8001010101010101, 64'h0000000000000000, 0) != 64'h95a8d72813daa94d) bad++;
    if (crypt(64'h7ca110454a1a6e57, 64'h01a1d6d039776742, 0) != 64'h690f5b0d9a26939b) bad++;
    if (crypt(64'h0131d9619dc1376e, 64'h5cd54ca83def57da, 0) != 64'h7a389d10354bd271) bad++;
    return bad;
  endfunction

endpackage
