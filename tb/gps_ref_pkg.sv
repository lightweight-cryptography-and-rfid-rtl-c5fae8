// gps_ref_pkg: golden model of the cryptoGPS response for the testbenches.
//
// Written independently of the RTL: PRESENT-80 with the permutation in the
// form P(i) = 16*(i mod 4) + i/4 and a bit-by-bit key schedule, the
// challenge positions from the five compact bytes, and the response
//   y = (r + sum_i s << P_i) mod 2^1088,  r = C17 || ... || C1,
// where C1 = E_k(IV) and C(j+1) = E_k(Cj) (output-feedback mode). C17 is
// the IV of the next run.
package gps_ref_pkg;

  localparam logic [3:0] SB [16] = '{4'hC, 4'h5, 4'h6, 4'hB, 4'h9, 4'h0, 4'hA, 4'hD,
                                     4'h3, 4'hE, 4'hF, 4'h8, 4'h4, 4'h7, 4'h1, 4'h2};

  function automatic logic [63:0] ref_present(input logic [79:0] key, input logic [63:0] pt);
    logic [63:0] st, t;
    logic [79:0] k, kr;
    st = pt;
    k  = key;
    for (int r = 1; r <= 31; r++) begin
      st = st ^ k[79:16];
      for (int n = 0; n < 16; n++) st[4*n +: 4] = SB[st[4*n +: 4]];
      t = '0;
      for (int i = 0; i < 64; i++) t[16 * (i % 4) + i / 4] = st[i];
      st = t;
      for (int i = 0; i < 80; i++) kr[(i + 61) % 80] = k[i];
      kr[79:76] = SB[kr[79:76]];
      kr[19:15] = kr[19:15] ^ 5'(r);
      k = kr;
    end
    return st ^ k[79:16];
  endfunction

  typedef int unsigned pos_t [5];

  function automatic pos_t ref_positions(input logic [39:0] c);
    pos_t p;
    int unsigned acc;
    acc = 0;
    for (int i = 0; i < 5; i++) begin
      logic [7:0] n;
      n = c[8*i +: 8];
      acc = acc + ((i == 0) ? 0 : 160) + 8 * int'(n[4:0]) + int'(n[7:5]);
      p[i] = acc;
    end
    return p;
  endfunction

  // Expected response and next IV.
  function automatic void ref_response(input logic [79:0] key, input logic [63:0] iv,
                                       input logic [39:0] c, input logic [159:0] s,
                                       output logic [1087:0] y, output logic [63:0] iv_next);
    logic [2303:0] acc;
    logic [63:0]   blk;
    pos_t          p;
    acc = '0;
    blk = iv;
    for (int b = 0; b < 17; b++) begin
      blk = ref_present(key, blk);
      acc[64*b +: 64] = blk;
    end
    p = ref_positions(c);
    for (int i = 0; i < 5; i++) acc = acc + ({2144'h0, s} << p[i]);
    y       = acc[1087:0];
    iv_next = blk;
  endfunction

endpackage
