// bpsk_tb_pkg: reference models shared by the testbenches.
//
// sine_ref computes a table word from the sine formula with real arithmetic
// (round(32767 * sin(2*pi*i/512))), written apart from the table the
// design computes. lfsr_ref produces the modulating bit sequence from the
// recurrence b[n] = b[n-8] ^ b[n-6] ^ b[n-5] ^ b[n-4] of the polynomial
// x^8 + x^6 + x^5 + x^4 + 1 with all-ones history.
package bpsk_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic logic signed [15:0] sine_ref(int unsigned i);
    real    x;
    int     r;
    x = 32767.0 * $sin(2.0 * PI * real'(i % 512) / 512.0);
    r = (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
    return 16'(r);
  endfunction

  // Table index of oscillator step k for a 32-bit phase increment
  function automatic int unsigned phase_idx(longint unsigned k, longint unsigned inc);
    longint unsigned ph;
    ph = (k * inc) & 64'hFFFF_FFFF;
    return int'(ph >> 23);
  endfunction

  // Bit n (n >= 0) of the LFSR output sequence; output at step t is b[t-8]
  function automatic bit lfsr_ref(int n);
    bit b [$];
    for (int j = 0; j < 8; j++) b.push_back(1'b1);   // b[-8..-1]
    for (int j = 8; j <= n; j++)
      b.push_back(b[j-8] ^ b[j-6] ^ b[j-5] ^ b[j-4]);
    return b[n];
  endfunction

endpackage
