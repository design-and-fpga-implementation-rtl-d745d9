// srrc_ref.svh -- square-root raised-cosine reference for the filter
// testbenches, computed from the closed form (roll-off 0.35, 4 samples per
// symbol, peak scaled to 1/2 of the unit-energy pulse, which is the
// scaling of the document's coefficient list) instead of the stored
// coefficient list, so a wrong tap in the design shows up.
function automatic real srrc_ref(int n);   // n = sample offset from centre
  real a, t, num, den, pi;
  pi = 3.14159265358979;
  a = 0.35;
  t = n / 4.0;
  if (n == 0) return 0.5 * (1.0 - a + 4.0 * a / pi);
  num = $sin(pi * t * (1.0 - a)) + 4.0 * a * t * $cos(pi * t * (1.0 + a));
  den = pi * t * (1.0 - (4.0 * a * t) * (4.0 * a * t));
  return 0.5 * num / den;
endfunction
