// tb_util_pkg: reference models shared by the testbenches.
//
// The pixel counter's code is described here as a bit stream rather than a
// register: b[t] = b[t-9] ^ b[t-5], starting from nine ones, and the counter
// word after k up steps is the last nine bits of the stream, newest bit in
// bit 0. lfsr_word(k) gives that word, lfsr_index(w) the k in 0..510 it
// stands for (-1 for a word the counter never takes).
// ramp_count() gives how many steps a pixel counts in one sample: the
// comparator latch is primed with RAMP at its start value, a step counts while
// the latch says 'count', and after step j the latch holds
// (sense > start - j*step). ref_line() gives the REF line that pulses in
// step c (1..511) and gc_count() how many of the first n steps of a sample a
// gain-correction pixel with coefficient coeff keeps.
package tb_util_pkg;

  localparam int N = 9;
  localparam int PERIOD = 511;

  function automatic logic [N-1:0] lfsr_word(int k);
    logic b [0:PERIOD+N];
    logic [N-1:0] w;
    int kk = ((k % PERIOD) + PERIOD) % PERIOD;
    for (int t = 0; t < N; t++) b[t] = 1'b1;
    for (int t = N; t < kk + N; t++) b[t] = b[t-9] ^ b[t-5];
    for (int i = 0; i < N; i++) w[i] = b[kk + N - 1 - i];
    return w;
  endfunction

  function automatic int lfsr_index(logic [N-1:0] w);
    for (int k = 0; k < PERIOD; k++)
      if (lfsr_word(k) == w) return k;
    return -1;
  endfunction

  function automatic int ramp_count(int sense, int start, int step, int nsteps);
    bit stop = (sense > start);
    int n = 0;
    for (int j = 0; j < nsteps; j++) begin
      if (!stop) n++;
      stop = (sense > start - j * step);
    end
    return n;
  endfunction

  function automatic int ref_line(int c);
    int t = 0;
    while (((c >> t) & 1) == 0 && t < N) t++;
    return N - 1 - t;
  endfunction

  // counts kept among the first n steps when only steps 1..n are seen
  function automatic int gc_count(int coeff, int n, int gc_bits = 9);
    int kept = 0;
    for (int c = 1; c <= n; c++) begin
      int k = ref_line(((c - 1) % PERIOD) + 1);
      if (k >= gc_bits || ((coeff >> k) & 1) != 0) kept++;
    end
    return kept;
  endfunction

endpackage
