// Reference models used by the top-level testbench.
//
// Plain behavioural versions of the five kernels, written without the
// loop structure of the design: SIMON and AES expand their whole key
// schedule first, DES works on bit arrays, the sort is an insertion sort,
// and the CORDIC model draws its arctangent constants from $atan.
package tb_ref_pkg;
  timeunit 1ns; timeprecision 1ps;

  function automatic logic [63:0] rl64(input logic [63:0] v, input int s);
    return (v << s) | (v >> (64 - s));
  endfunction

  function automatic logic [127:0] simon(input logic [127:0] p, input logic [127:0] k);
    string z2s = "10101111011100000011010010011000101000010001111110010110110011";
    logic [63:0] ks [68];
    logic [63:0] x, y, t, tmp;
    ks[0] = k[63:0];
    ks[1] = k[127:64];
    for (int i = 0; i < 66; i++) begin
      tmp = rl64(ks[i+1], 61);
      tmp = tmp ^ rl64(tmp, 63);
      ks[i+2] = ~ks[i] ^ 64'd3 ^ tmp ^ ((z2s[i % 62] == "1") ? 64'd1 : 64'd0);
    end
    x = p[127:64];
    y = p[63:0];
    for (int i = 0; i < 68; i++) begin
      t = x;
      x = y ^ ((rl64(x, 1) & rl64(x, 8)) ^ rl64(x, 2)) ^ ks[i];
      y = t;
    end
    return {x, y};
  endfunction

  function automatic logic [7:0] r8(input logic [7:0] v, input int s);
    return (v << s) | (v >> (8 - s));
  endfunction

  function automatic logic [7:0] xt(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [127:0] aes256(input logic [127:0] p, input logic [255:0] k);
    logic [7:0] sb [256];
    logic [7:0] pp, qq;
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0] st [16], tmp [16];
    // S-box from the powers of 3 and of its inverse.
    pp = 8'h01; qq = 8'h01;
    do begin
      pp = pp ^ xt(pp);
      qq ^= qq << 1; qq ^= qq << 2; qq ^= qq << 4;
      if (qq[7]) qq ^= 8'h09;
      sb[pp] = qq ^ r8(qq, 1) ^ r8(qq, 2) ^ r8(qq, 3) ^ r8(qq, 4) ^ 8'h63;
    end while (pp != 8'h01);
    sb[0] = 8'h63;
    for (int i = 0; i < 8; i++) w[i] = k[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= 8'h01 << (i / 8 - 1);
      end else if (i % 8 == 4) begin
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
      end
      w[i] = w[i-8] ^ t;
    end
    for (int b = 0; b < 16; b++) st[b] = p[127-8*b -: 8] ^ w[b/4][31-8*(b%4) -: 8];
    for (int r = 1; r <= 14; r++) begin
      for (int b = 0; b < 16; b++) st[b] = sb[st[b]];
      for (int b = 0; b < 16; b++) tmp[b] = st[4*(((b/4) + (b%4)) % 4) + b%4];
      st = tmp;
      if (r != 14)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = st[4*c]; a1 = st[4*c+1]; a2 = st[4*c+2]; a3 = st[4*c+3];
          st[4*c]   = xt(a0) ^ (xt(a1) ^ a1) ^ a2 ^ a3;
          st[4*c+1] = a0 ^ xt(a1) ^ (xt(a2) ^ a2) ^ a3;
          st[4*c+2] = a0 ^ a1 ^ xt(a2) ^ (xt(a3) ^ a3);
          st[4*c+3] = (xt(a0) ^ a0) ^ a1 ^ a2 ^ xt(a3);
        end
      for (int b = 0; b < 16; b++) st[b] ^= w[4*r + b/4][31-8*(b%4) -: 8];
    end
    for (int b = 0; b < 16; b++) aes256[127-8*b -: 8] = st[b];
  endfunction

  function automatic logic [63:0] des(input logic [63:0] p, input logic [63:0] k);
    import des_pkg::*;
    logic b [1:64];
    logic kb [1:64];
    logic cd [1:56];
    logic sk [16][1:48];
    logic l [1:32], r [1:32], er [1:48], fo [1:32], so [1:32], t [1:56], pre [1:64];
    int row, col, v;
    for (int i = 1; i <= 64; i++) begin
      b[i]  = p[64-i];
      kb[i] = k[64-i];
    end
    for (int i = 1; i <= 56; i++) cd[i] = kb[PC1_T[i-1]];
    for (int n = 0; n < 16; n++) begin
      for (int s = 0; s < SHIFTS[n]; s++) begin
        t = cd;
        for (int i = 1; i <= 28; i++) begin
          cd[i]      = t[(i % 28) + 1];
          cd[i + 28] = t[(i % 28) + 29];
        end
      end
      for (int i = 1; i <= 48; i++) sk[n][i] = cd[PC2_T[i-1]];
    end
    for (int i = 1; i <= 32; i++) begin
      l[i] = b[IP_T[i-1]];
      r[i] = b[IP_T[i+31]];
    end
    for (int n = 0; n < 16; n++) begin
      for (int i = 1; i <= 48; i++) er[i] = r[E_T[i-1]] ^ sk[n][i];
      for (int g = 0; g < 8; g++) begin
        row = 2 * er[6*g+1] + er[6*g+6];
        col = 8 * er[6*g+2] + 4 * er[6*g+3] + 2 * er[6*g+4] + er[6*g+5];
        v = 32'(SBOX[64*g + 16*row + col]);
        for (int i = 0; i < 4; i++) so[4*g+1+i] = v[3-i];
      end
      for (int i = 1; i <= 32; i++) fo[i] = so[P_T[i-1]] ^ l[i];
      l = r;
      r = fo;
    end
    for (int i = 1; i <= 32; i++) begin
      pre[i]      = r[i];
      pre[i + 32] = l[i];
    end
    for (int i = 1; i <= 64; i++) des[64 - IP_T[i-1]] = pre[i];
  endfunction

  function automatic logic [511:0] sort32(input logic [511:0] v);
    logic [15:0] a [32];
    logic [15:0] t;
    int k;
    for (int i = 0; i < 32; i++) a[i] = v[16*i +: 16];
    for (int i = 1; i < 32; i++) begin
      t = a[i];
      k = i - 1;
      while (k >= 0 && a[k] > t) begin
        a[k+1] = a[k];
        k--;
      end
      a[k+1] = t;
    end
    for (int i = 0; i < 32; i++) sort32[16*i +: 16] = a[i];
  endfunction

  function automatic logic [50:0] cordic(input logic [50:0] v);
    logic signed [16:0] x, y, z, xn, yn, a;
    {x, y, z} = v;
    for (int i = 0; i < 15; i++) begin
      a = 17'($rtoi($atan(1.0 / (2.0 ** i)) * 16384.0 + 0.5));
      if (z >= 0) begin
        xn = x - (y >>> i); yn = y + (x >>> i); z = z - a;
      end else begin
        xn = x + (y >>> i); yn = y - (x >>> i); z = z + a;
      end
      x = xn; y = yn;
    end
    return {x, y, z};
  endfunction
endpackage
