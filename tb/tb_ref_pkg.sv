// tb_ref_pkg: reference models for the RCE testbenches.
//
// Written independently of the RTL: the CRC is computed bit-serially, the
// compressed records are built as a bit queue and cut into words afterwards,
// and the test waveforms come from a small hash so any testbench can
// regenerate them.
package tb_ref_pkg;

  typedef logic [63:0] word_q_t[$];

  // Test waveform: pedestal per channel, +-4 counts of noise and occasional
  // pulses, clipped to 12 bits.
  function automatic logic [11:0] adc(input int ch, input int t, input int seed);
    int unsigned h;
    int v;
    h = ch * 32'd1103515245 + t * 32'd12345 + seed * 32'd2654435761 + 32'd7;
    h = h ^ (h >> 13);
    h = h * 32'd2246822519;
    h = h ^ (h >> 16);
    v = 400 + (ch % 37) * 20 + int'(h % 9) - 4;
    if (((t + 3 * ch) % 61) < 6) v += 1800 >> ((t + 3 * ch) % 61);
    if (seed % 5 == 4 && (t % 3 == 0)) v = int'(h % 4096);  // noisy mode
    if (v < 0) v = 0;
    if (v > 4095) v = 4095;
    return 12'(v);
  endfunction

  // CRC-16/CCITT (poly 0x1021, init 0xFFFF), bit-serial, MSB first.
  function automatic logic [15:0] crc_ref(input logic [15:0] w [], input int n);
    logic [15:0] c;
    logic fb;
    c = 16'hFFFF;
    for (int k = 0; k < n; k++)
      for (int b = 15; b >= 0; b--) begin
        fb = c[15] ^ w[k][b];
        c  = c << 1;
        if (fb) c = c ^ 16'h1021;
      end
    return c;
  endfunction

  // One link frame: header, 128 samples packed 12 bits LSB first, CRC.
  function automatic void make_frame(input logic [7:0] seq, input logic [3:0] feb_err,
                                     input logic [11:0] s [128],
                                     output logic [15:0] f [98]);
    logic [15:0] tmp [];
    logic        bits [$];
    tmp = new[98];
    tmp[0] = {feb_err, 4'h0, seq};
    for (int c = 0; c < 128; c++)
      for (int b = 0; b < 12; b++) bits.push_back(s[c][b]);
    for (int k = 0; k < 96; k++)
      for (int b = 0; b < 16; b++) tmp[1 + k][b] = bits[16 * k + b];
    tmp[97] = crc_ref(tmp, 97);
    for (int k = 0; k < 98; k++) f[k] = tmp[k];
  endfunction

  // Compressed record of one channel, as a list of 64-bit words.
  function automatic void encode_channel(input logic [11:0] wave [$], input int chan,
                                         inout word_q_t out);
    logic bits [$];
    int   ticks;
    int   prev;
    int   z [16];
    int   mx, w, d, nw;
    logic [63:0] word;
    ticks = wave.size();
    out.push_back({8'hC1, 24'h0, 16'(ticks), 16'(chan)});
    prev = 0;
    for (int b0 = 0; b0 < ticks; b0 += 16) begin
      mx = 0;
      for (int i = 0; i < 16; i++) begin
        d = int'(wave[b0 + i]) - prev;
        prev = int'(wave[b0 + i]);
        z[i] = (d >= 0) ? 2 * d : -2 * d - 1;
        if (z[i] > mx) mx = z[i];
      end
      w = 0;
      while ((mx >> w) != 0) w++;
      for (int b = 0; b < 4; b++) bits.push_back(w[b]);
      for (int i = 0; i < 16; i++)
        for (int b = 0; b < w; b++) bits.push_back(z[i][b]);
    end
    nw = bits.size() / 64 + 1;   // always one final, partly filled word
    for (int k = 0; k < nw; k++) begin
      word = '0;
      for (int b = 0; b < 64; b++)
        if (64 * k + b < bits.size()) word[b] = bits[64 * k + b];
      out.push_back(word);
    end
  endfunction

  // Channel order of the compressor output: one record per lane in turn.
  function automatic int out_channel(input int idx, input int n_ch, input int lanes);
    int cpl;
    cpl = n_ch / lanes;
    return (idx % lanes) * cpl + idx / lanes;
  endfunction

  // Whole compressed chunk as the RCE writes it.
  function automatic void encode_chunk(input int n_ch, input int lanes, input int ticks,
                                       input int seed, input int tick0,
                                       input logic [15:0] seq, input logic [7:0] errs,
                                       input logic [63:0] ts, output word_q_t out);
    logic [11:0] wave [$];
    int ch;
    out = {};
    out.push_back({8'hC0, errs, seq, 32'(n_ch)});
    out.push_back(ts);
    for (int i = 0; i < n_ch; i++) begin
      ch = out_channel(i, n_ch, lanes);
      wave = {};
      for (int t = 0; t < ticks; t++) wave.push_back(adc(ch, tick0 + t, seed));
      encode_channel(wave, ch, out);
    end
    out.push_back({8'hCF, 24'h0, 32'(out.size() + 1)});
  endfunction

endpackage
