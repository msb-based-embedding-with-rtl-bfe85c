// tb_ref_pkg: bit-level reference model of the embedding, extraction and
// integrity rules, written independently of the RTL for the testbenches.
// Pixels are 24-bit words {R,G,B}; plane 0 is red, 1 green, 2 blue.
package tb_ref_pkg;

  function automatic logic [7:0] pl(logic [23:0] p, int i);
    return p[23 - 8*i -: 8];
  endfunction

  function automatic logic [23:0] set_pl(logic [23:0] p, int i, logic [7:0] v);
    logic [23:0] q = p;
    q[23 - 8*i -: 8] = v;
    return q;
  endfunction

  function automatic int kval(logic [23:0] p);
    return int'(p[23]) + int'(p[15]) + int'(p[7]) + 1;
  endfunction

  // indicator plane: method 0 red, 1 user (3 -> red), 2 cyclic, 3 red
  function automatic int ind_of(int method, int user, int pixel_index);
    if (method == 1) return (user == 3) ? 0 : user;
    if (method == 2) return pixel_index % 3;
    return 0;
  endfunction

  // message bit source: words, bit 15 first
  function automatic bit msg_bit(ref logic [15:0] words[], input int pos);
    return words[pos / 16][15 - (pos % 16)];
  endfunction

  // embed into one pixel, consuming bits from pos
  function automatic logic [23:0] embed(logic [23:0] p, int ind, ref logic [15:0] words[],
                                        ref int pos);
    int d[2];
    int k = kval(p);
    logic [1:0] code = pl(p, ind)[1:0];
    logic [23:0] q = p;
    int n = 0;
    for (int i = 0; i < 3; i++) if (i != ind) begin d[n] = i; n++; end
    // code bit 1 selects the first data plane, bit 0 the second
    for (int j = 0; j < 2; j++) begin
      if (code[1 - j]) begin
        logic [7:0] v = pl(q, d[j]);
        for (int b = k - 1; b >= 0; b--) begin
          v[b] = msg_bit(words, pos);
          pos++;
        end
        q = set_pl(q, d[j], v);
      end
    end
    return q;
  endfunction

  // recovered bits of one stego pixel, appended to a queue
  function automatic void extract(logic [23:0] p, int ind, ref bit q[$]);
    int d[2];
    int k = kval(p);
    logic [1:0] code = pl(p, ind)[1:0];
    int n = 0;
    for (int i = 0; i < 3; i++) if (i != ind) begin d[n] = i; n++; end
    for (int j = 0; j < 2; j++)
      if (code[1 - j])
        for (int b = k - 1; b >= 0; b--) q.push_back(pl(p, d[j])[b]);
  endfunction

  // integrity nibbles written into the last row, last column and corner
  function automatic void integrity(int n, ref logic [23:0] img[]);
    logic [11:0] rx [], cx [];
    logic [11:0] corner;
    rx = new[n];
    cx = new[n];
    for (int i = 0; i < n; i++) begin rx[i] = '0; cx[i] = '0; end
    for (int r = 0; r < n - 1; r++)
      for (int c = 0; c < n - 1; c++) begin
        logic [23:0] p = img[r*n + c];
        logic [11:0] nb = {p[19:16], p[11:8], p[3:0]};
        rx[r] ^= nb;
        cx[c] ^= nb;
      end
    corner = '0;
    for (int i = 0; i < n - 1; i++) corner ^= rx[i] ^ cx[i];
    for (int r = 0; r < n - 1; r++) begin
      logic [23:0] p = img[r*n + n - 1];
      img[r*n + n - 1] = {p[23:20], rx[r][11:8], p[15:12], rx[r][7:4], p[7:4], rx[r][3:0]};
    end
    for (int c = 0; c < n - 1; c++) begin
      logic [23:0] p = img[(n-1)*n + c];
      img[(n-1)*n + c] = {p[23:20], cx[c][11:8], p[15:12], cx[c][7:4], p[7:4], cx[c][3:0]};
    end
    begin
      logic [23:0] p = img[n*n - 1];
      img[n*n - 1] = {p[23:20], corner[11:8], p[15:12], corner[7:4], p[7:4], corner[3:0]};
    end
  endfunction

  // full stego image: embedding in the inner pixels, then integrity
  // nibbles. img is N*N pixels in raster order.
  function automatic void stego_image(int n, int method, int user, ref logic [23:0] img[],
                                      ref logic [15:0] words[], output int nbits);
    int pos = 0;
    for (int r = 0; r < n - 1; r++)
      for (int c = 0; c < n - 1; c++)
        img[r*n + c] = embed(img[r*n + c], ind_of(method, user, r*n + c), words, pos);
    integrity(n, img);
    nbits = pos;
  endfunction

  // pack pixels into 16-bit words: byte stream R,G,B,..., earlier byte low
  function automatic logic [15:0] packed_word(ref logic [23:0] img[], input int w);
    logic [7:0] lo, hi;
    int b0 = 2*w, b1 = 2*w + 1;
    lo = pl(img[b0 / 3], b0 % 3);
    hi = pl(img[b1 / 3], b1 % 3);
    return {hi, lo};
  endfunction

endpackage
