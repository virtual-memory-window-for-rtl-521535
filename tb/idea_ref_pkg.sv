// Reference model of IDEA for the testbenches: key expansion, the
// modulo-(2^16+1) product and block encryption, written as plain sequential
// code after the algorithm's definition (independently of the RTL's shared-
// operator schedule). Checked against the published vector
// key 0001..0008, plaintext 0000 0001 0002 0003 -> 11FB ED2B 0198 6DE5.
package idea_ref_pkg;

  typedef logic [15:0] subkeys_t [52];

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    longint unsigned aa, bb, p;
    aa = (a == 0) ? 65536 : a;
    bb = (b == 0) ? 65536 : b;
    p  = (aa * bb) % 65537;
    return (p == 65536) ? 16'd0 : p[15:0];
  endfunction

  // Encryption subkeys: the 128-bit key, rotated left by 25 bits after each
  // group of eight 16-bit subkeys.
  function automatic subkeys_t ref_expand(logic [127:0] key);
    subkeys_t k;
    logic [127:0] kk;
    kk = key;
    for (int i = 0; i < 52; i++) begin
      k[i] = kk[127 - 16*(i%8) -: 16];
      if (i % 8 == 7) kk = {kk[102:0], kk[127:103]};
    end
    return k;
  endfunction

  function automatic logic [63:0] ref_encrypt(subkeys_t k, logic [63:0] blk);
    logic [15:0] x1, x2, x3, x4, s2, s3;
    x1 = blk[63:48]; x2 = blk[47:32]; x3 = blk[31:16]; x4 = blk[15:0];
    for (int r = 0; r < 8; r++) begin
      x1 = ref_mul(x1, k[6*r]);
      x2 = x2 + k[6*r+1];
      x3 = x3 + k[6*r+2];
      x4 = ref_mul(x4, k[6*r+3]);
      s3 = x3;
      x3 = x3 ^ x1;
      x3 = ref_mul(x3, k[6*r+4]);
      s2 = x2;
      x2 = x2 ^ x4;
      x2 = x2 + x3;
      x2 = ref_mul(x2, k[6*r+5]);
      x3 = x3 + x2;
      x1 = x1 ^ x2;
      x4 = x4 ^ x3;
      x2 = x2 ^ s3;
      x3 = x3 ^ s2;
    end
    return {ref_mul(x1, k[48]), 16'(x3 + k[49]), 16'(x2 + k[50]), ref_mul(x4, k[51])};
  endfunction

endpackage
