// Test helpers: a behavioural model of the subcarrier a tag's load
// modulation leaves on one receiver channel after down conversion, and the
// frame structures used to drive the demodulator.
//
// A frame is a list of subcarrier periods, each either silent or carrying
// one period of a sine at the subcarrier frequency, in reference phase or
// inverted. Phase changes therefore fall on the tag's own subcarrier period
// boundaries, as in the HF RFID standards. sample() renders the frame at one
// sample per carrier clock with a chosen delay (the unknown phase between
// tag and reader), amplitude, DC offset and uniform noise.
package rfid_tb_pkg;

  class tag_signal;
    bit on  [$];   // subcarrier present in this period
    bit inv [$];   // subcarrier inverted in this period
    int period;    // samples per subcarrier period

    function new(int p);
      period = p;
    endfunction

    function void add(int n, bit o, bit i);
      for (int k = 0; k < n; k++) begin
        on.push_back(o);
        inv.push_back(i);
      end
    endfunction

    function int periods();
      return on.size();
    endfunction

    // ISO/IEC 14443 type B style BPSK frame: pilot (reference phase = 1),
    // SOF zeros and ones, then the given bits; returns nothing, bits are
    // appended in transmission order. 1 = reference phase.
    function void bpsk(int pilot, int sof0, int sof1, bit bits [$], int ppb);
      add(pilot, 1'b1, 1'b0);
      add(sof0 * ppb, 1'b1, 1'b1);
      add(sof1 * ppb, 1'b1, 1'b0);
      foreach (bits[k]) add(ppb, 1'b1, !bits[k]);
    endfunction

    // Manchester frame: start symbol (a 1), then symbols: 0 = bit 0,
    // 1 = bit 1, 2 = collision (subcarrier in both halves).
    function void manchester(int syms [$], int ppb);
      int hp;
      hp = ppb / 2;
      add(hp, 1'b1, 1'b0); add(hp, 1'b0, 1'b0);
      foreach (syms[k]) begin
        add(hp, syms[k] != 0, 1'b0);
        add(hp, syms[k] != 1, 1'b0);
      end
    endfunction

    // Sample n of the rendered frame.
    function int sample(longint n, int delay, int amp, int dc, int noise);
      longint t;
      longint k;
      real    ph, v;
      v = 0.0;
      t = n - longint'(delay);
      if (t >= 0) begin
        k = t / period;
        if (k < on.size() && on[k]) begin
          ph = 2.0 * 3.14159265358979 * (real'(t % period) + 0.5) / real'(period);
          v  = real'(amp) * $sin(ph);
          if (inv[k]) v = -v;
        end
      end
      if (noise > 0) v = v + real'(int'($urandom_range(2*noise, 0)) - noise);
      return int'(v) + dc;
    endfunction
  endclass

  // Bits of ISO/IEC 14443 type B characters: start bit 0, 8 data bits LSB
  // first, stop bit 1.
  function automatic void char_bits(input byte unsigned c, ref bit q [$]);
    q.push_back(1'b0);
    for (int b = 0; b < 8; b++) q.push_back(c[b]);
    q.push_back(1'b1);
  endfunction

endpackage
