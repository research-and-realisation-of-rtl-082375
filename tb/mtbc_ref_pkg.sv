// mtbc_ref_pkg: reference models for the MTBC testbenches, written
// independently of the RTL. The RSC {13,15} encoder is modelled with three
// named register bits (feedback taps D^2, D^3; parity taps 1, D, D^3); the
// MTBC frame is built as a bit list [data, tail, zeros, interleaved data+tail];
// interleaver tables keep every position in its residue class modulo 7;
// the channel is BPSK with approximately Gaussian noise (sum of uniforms)
// and 4-bit quantisation.
package mtbc_ref_pkg;

  typedef struct {
    bit r1, r2, r3;
  } ref_rsc_t;

  function automatic bit ref_step(ref ref_rsc_t s, input bit u, output bit p);
    bit a;
    a = u ^ s.r2 ^ s.r3;
    p = a ^ s.r1 ^ s.r3;
    s.r3 = s.r2;
    s.r2 = s.r1;
    s.r1 = a;
    return a;
  endfunction

  // Residue-preserving random permutation of 0..k-1 into perm.
  function automatic void ref_make_perm(int k, ref int perm[]);
    int grp[7][$];
    perm = new[k];
    for (int t = 0; t < k; t++) grp[t % 7].push_back(t);
    for (int c = 0; c < 7; c++)
      for (int i = grp[c].size() - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(i, 0);
        tmp = grp[c][i]; grp[c][i] = grp[c][j]; grp[c][j] = tmp;
      end
    for (int q = 0; q < k; q++) perm[q] = grp[q % 7][q / 7];
  endfunction

  // Full MTBC encoding of one block.
  // xs: K systematic bits; y1/y2: K parity bits of each half (unpunctured);
  // n0: zero bits inserted; end1/end2: encoder state bits after each half.
  function automatic void ref_encode(input bit d[], input int perm[],
                                     output bit xs[], output bit y1[], output bit y2[],
                                     output int n0, output int end1, output int end2);
    ref_rsc_t s = '{0, 0, 0};
    int n = d.size();
    int k = n + 3;
    bit p, dummy;
    xs = new[k]; y1 = new[k]; y2 = new[k];
    for (int t = 0; t < n; t++) begin
      xs[t] = d[t];
      dummy = ref_step(s, d[t], p);
      y1[t] = p;
    end
    for (int t = n; t < k; t++) begin
      xs[t] = s.r2 ^ s.r3;            // makes the register input zero
      dummy = ref_step(s, xs[t], p);
      y1[t] = p;
    end
    end1 = int'({s.r1, s.r2, s.r3});
    n0 = (7 - (k % 7)) % 7;
    for (int t = 0; t < n0; t++) dummy = ref_step(s, 1'b0, p);
    for (int q = 0; q < k; q++) begin
      dummy = ref_step(s, xs[perm[q]], p);
      y2[q] = p;
    end
    end2 = int'({s.r1, s.r2, s.r3});
  endfunction

  // Approximately Gaussian sample with standard deviation sigma.
  function automatic real ref_gauss(real sigma);
    real acc = 0.0;
    for (int i = 0; i < 12; i++) acc += real'($urandom_range(1000000, 0)) / 1000000.0;
    return (acc - 6.0) * sigma;
  endfunction

  // BPSK (1 -> +amp, 0 -> -amp) plus noise, quantised to 4-bit two's complement.
  function automatic int ref_channel(bit b, real amp, real sigma);
    real r = (b ? amp : -amp) + ((sigma > 0.0) ? ref_gauss(sigma) : 0.0);
    int q = int'(r);   // rounds to nearest
    if (q > 7) q = 7;
    if (q < -8) q = -8;
    return q;
  endfunction

endpackage
