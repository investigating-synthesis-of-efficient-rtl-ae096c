// ocr_ref_pkg: reference models used by the testbenches.
//
// Written straight from the algorithm, not from the RTL structure:
//   density_ref  counts black pixels inside each of the 44 windows of the
//                64x256 image directly (no block decomposition);
//   tansig_ref   rounds tanh(i/512)*512;
//   nn_ref       evaluates the 44/80/50 network in the same 16-bit Q9
//                arithmetic as the hardware (normalize, truncate products
//                to bits 24..9, half-table tansig with saturation at
//                3.875, linear output).
// The image is 512 32-bit words: pixel (y, x) is bit x%32 of word
// y*8 + x/32, and 1 is black.
package ocr_ref_pkg;

  typedef logic [31:0] image_t [512];

  // Window of feature f (1..44): first row, rows, first column, columns
  function automatic void window(input int f, output int r0, output int nr, output int c0, output int nc);
    int i;
    if (f <= 16) begin
      i = f - 1;  r0 = 32 * (i % 2); nr = 32; c0 = 32 * (i / 2); nc = 32;
    end else if (f <= 32) begin
      i = f - 17; r0 = 16 * (i % 4); nr = 16; c0 = 64 * (i / 4); nc = 64;
    end else if (f <= 40) begin
      i = f - 33; r0 = 32 * (i % 2); nr = 32; c0 = 64 * (i / 2); nc = 64;
    end else begin
      i = f - 41; r0 = 32 * (i % 2); nr = 32; c0 = 128 * (i / 2); nc = 128;
    end
  endfunction

  function automatic bit pixel(const ref image_t img, input int y, input int x);
    return img[y * 8 + x / 32][x % 32];
  endfunction

  function automatic void density_ref(const ref image_t img, output int feat [44]);
    int r0, nr, c0, nc;
    for (int f = 1; f <= 44; f++) begin
      window(f, r0, nr, c0, nc);
      feat[f-1] = 0;
      for (int y = r0; y < r0 + nr; y++)
        for (int x = c0; x < c0 + nc; x++)
          feat[f-1] += int'(pixel(img, y, x));
    end
  endfunction

  // Random image: each pixel black with probability pct/100
  function automatic void random_image(output image_t img, input int pct);
    for (int w = 0; w < 512; w++)
      for (int b = 0; b < 32; b++)
        img[w][b] = (($urandom % 100) < pct);
  endfunction

  function automatic int sx16(input longint v);
    return int'(signed'(16'(v)));
  endfunction

  function automatic int tansig_ref(input int i);
    return int'($floor($tanh(real'(i) / 512.0) * 512.0 + 0.5));
  endfunction

  // Scale constant for a feature whose maximum is xmax
  function automatic int norm_p(input int xmax);
    return int'($floor(1023.0 / real'(xmax) * 16384.0 + 0.5));
  endfunction

  function automatic int normalize_ref(input int x, input int p);
    longint prod;
    prod = longint'(x) * longint'(p);
    return sx16((prod >> 14) - 512);
  endfunction

  function automatic int qmul(input int a, input int b);
    longint prod;
    prod = longint'(a) * longint'(b);
    return sx16(prod >>> 9);
  endfunction

  function automatic void nn_ref(input int feat [44], input int p [44],
                                 input int w1 [80][44], input int w2 [50][80],
                                 output int outv [50], output int n_sat, output int n_neg);
    int xn [44];
    int h [80];
    int s, mag, t;
    n_sat = 0;
    n_neg = 0;
    for (int i = 0; i < 44; i++) xn[i] = normalize_ref(feat[i], p[i]);
    for (int j = 0; j < 80; j++) begin
      s = 0;
      for (int i = 0; i < 44; i++) s += qmul(xn[i], w1[j][i]);
      mag = (s < 0) ? -s : s;
      if (mag > 1984) begin
        t = 512;
        n_sat++;
      end else t = tansig_ref(mag);
      if (s < 0) n_neg++;
      h[j] = (s < 0) ? -t : t;
    end
    for (int k = 0; k < 50; k++) begin
      s = 0;
      for (int j = 0; j < 80; j++) s += qmul(h[j], w2[k][j]);
      outv[k] = s;
    end
  endfunction

  // Cycle count of one recognition run (source design's equation),
  // b = bits moved per read
  function automatic int rec_cycles(input int n_in, input int n_hid, input int n_out, input int b);
    int nf, nh;
    nf = (16 * n_in + b - 1) / b;
    nh = (16 * n_hid + b - 1) / b;
    return (nf + 1) + (nf + 1) * n_hid + (2 * n_hid + 1) + (nh + 1) * n_out + n_out;
  endfunction

endpackage
