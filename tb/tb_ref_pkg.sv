// tb_ref_pkg: reference arithmetic of the synthesizer for the testbenches.
//
// Computed from first principles, without the RTL's tables: the quarter table
// entry i is round(65535 * sin(i * pi / 1024)), a period is 2^19 position
// units, Q2/Q4 are mirrored (2^17 - m), Q3/Q4 negative, the magnitude is
// linearly interpolated with an 8-bit weight, scaled by amp / 2^16 and the
// frame sum is saturated to 25 bits. The frame model keeps, per component,
// the accumulated position, advanced by the frequency word every frame.
package tb_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic int ref_rom(int i);
    return $rtoi(65535.0 * $sin(real'(i) * PI / 1024.0) + 0.5);
  endfunction

  function automatic int ref_mag(int pos);   // 24-bit magnitude at position
    int q, m, qp, i, f;
    q  = (pos >> 17) & 3;
    m  = pos & 32'h1FFFF;
    qp = (q == 1 || q == 3) ? 131072 - m : m;
    i  = qp >> 8;
    f  = qp & 255;
    return ref_rom(i) * 256 + (ref_rom(i + 1) - ref_rom(i)) * f;
  endfunction

  function automatic longint ref_comp(int pos, int amp);   // signed 25-bit component sample
    longint s;
    int q;
    q = (pos >> 17) & 3;
    s = (longint'(ref_mag(pos)) * amp) >>> 16;
    return (q >= 2) ? -s : s;
  endfunction

  function automatic longint ref_sat(longint s);
    if (s > 64'sd16777215)  return 64'sd16777215;
    if (s < -64'sd16777216) return -64'sd16777216;
    return s;
  endfunction

  // Additive synthesis state: NC components.
  class synth_model;
    int nc;
    int amp[], freq[], phase[], pos[];
    int clips;
    function new(int n);
      nc = n;
      amp = new[n]; freq = new[n]; phase = new[n]; pos = new[n];
      foreach (amp[k]) begin amp[k] = 0; freq[k] = 0; phase[k] = 0; pos[k] = 0; end
      clips = 0;
    endfunction
    // One output sample; advances every component.
    function longint next_sample();
      longint s = 0, r;
      for (int k = 0; k < nc; k++) begin
        s += ref_comp((pos[k] + phase[k]) & 32'h7FFFF, amp[k]);
        pos[k] = (pos[k] + freq[k]) & 32'h7FFFF;
      end
      r = ref_sat(s);
      if (r != s) clips++;
      return r;
    endfunction
  endclass
endpackage
