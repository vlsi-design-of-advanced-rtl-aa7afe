// aes_ref_pkg: behavioural reference model used by the testbenches.
//
// A straightforward FIPS-197 cipher written independently of the RTL: the S-box table is
// generated with the classic generator walk (p *= 3, q /= 3), the key is fully expanded into
// a word array, and rounds are applied byte by byte on a 4x4 array. Also provides reference
// GHASH multiplication (bit-serial, right-shift form) and helpers for modes.
package aes_ref_pkg;
  typedef logic [127:0] blk_t;

  function automatic logic [7:0] ref_xt(input logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    logic [7:0] x = a;
    logic [7:0] y = b;
    while (y != 0) begin
      if (y[0]) r ^= x;
      x = ref_xt(x);
      y = y >> 1;
    end
    return r;
  endfunction

  function automatic void ref_tables(output logic [7:0] sb [256], output logic [7:0] isb [256]);
    logic [7:0] p = 1, q = 1, x;
    sb[0] = 8'h63;
    do begin
      p = p ^ ref_xt(p);                         // p * 3
      q = q ^ (q << 1); q = q ^ (q << 2); q = q ^ (q << 4);
      if (q[7]) q ^= 8'h09;                      // q / 3
      x = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]};
      sb[p] = x ^ 8'h63;
    end while (p != 1);
    for (int i = 0; i < 256; i++) isb[sb[i]] = i[7:0];
  endfunction

  function automatic blk_t ref_aes(input logic [255:0] key, input bit k256, input bit dec, input blk_t din);
    logic [7:0] sb [256];
    logic [7:0] isb [256];
    logic [31:0] w [60];
    logic [7:0] s [16];
    logic [7:0] t [16];
    logic [7:0] rc;
    int nk, nr;
    logic [31:0] tmp;
    blk_t o;
    ref_tables(sb, isb);
    nk = k256 ? 8 : 4;
    nr = k256 ? 14 : 10;
    for (int i = 0; i < nk; i++) w[i] = key[255-32*i -: 32];
    rc = 1;
    for (int i = nk; i < 4*(nr+1); i++) begin
      tmp = w[i-1];
      if (i % nk == 0) begin
        tmp = {sb[tmp[23:16]], sb[tmp[15:8]], sb[tmp[7:0]], sb[tmp[31:24]]} ^ {rc, 24'h0};
        rc = ref_xt(rc);
      end else if (nk == 8 && i % nk == 4) begin
        tmp = {sb[tmp[31:24]], sb[tmp[23:16]], sb[tmp[15:8]], sb[tmp[7:0]]};
      end
      w[i] = w[i-nk] ^ tmp;
    end
    for (int i = 0; i < 16; i++) s[i] = din[127-8*i -: 8];
    if (!dec) begin
      for (int i = 0; i < 16; i++) s[i] ^= w[i/4][31-8*(i%4) -: 8];
      for (int r = 1; r <= nr; r++) begin
        for (int i = 0; i < 16; i++) t[i] = sb[s[4*(((i/4) + (i%4)) % 4) + i%4]];
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            if (r != nr)
              s[4*c+rr] = ref_mul(t[4*c+rr], 2) ^ ref_mul(t[4*c+(rr+1)%4], 3) ^ t[4*c+(rr+2)%4] ^ t[4*c+(rr+3)%4];
            else s[4*c+rr] = t[4*c+rr];
        for (int i = 0; i < 16; i++) s[i] ^= w[4*r + i/4][31-8*(i%4) -: 8];
      end
    end else begin
      for (int i = 0; i < 16; i++) s[i] ^= w[4*nr + i/4][31-8*(i%4) -: 8];
      for (int r = nr - 1; r >= 0; r--) begin
        for (int i = 0; i < 16; i++) t[4*(((i/4) + (i%4)) % 4) + i%4] = isb[s[i]];
        for (int i = 0; i < 16; i++) t[i] ^= w[4*r + i/4][31-8*(i%4) -: 8];
        for (int c = 0; c < 4; c++)
          for (int rr = 0; rr < 4; rr++)
            if (r != 0)
              s[4*c+rr] = ref_mul(t[4*c+rr], 14) ^ ref_mul(t[4*c+(rr+1)%4], 11) ^
                          ref_mul(t[4*c+(rr+2)%4], 13) ^ ref_mul(t[4*c+(rr+3)%4], 9);
            else s[4*c+rr] = t[4*c+rr];
      end
    end
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = s[i];
    return o;
  endfunction

  function automatic blk_t ref_ghash_mul(input blk_t x, input blk_t y);
    blk_t z = 0;
    blk_t v = y;
    for (int i = 0; i < 128; i++) begin
      if (x[127-i]) z = z ^ v;
      if (v[0]) v = (v >> 1) ^ {8'he1, 120'h0};
      else v = v >> 1;
    end
    return z;
  endfunction

  function automatic blk_t ref_rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
endpackage
