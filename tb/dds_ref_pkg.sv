// dds_ref_pkg: reference arithmetic for the synthesizer testbenches.
//
// Computes, straight from the waveform definitions and floating-point
// trigonometry, the sample a correct synthesizer must produce for a given
// truncated phase.  Phase p of an N = 2^PHASE_W step cycle stands for the
// angle 2*pi*(p + 0.5)/N (the table samples the middle of each step); the
// sine amplitude is rounded to the nearest integer of full scale
// 2^(AMP_W-1)-1, symmetric about zero.
package dds_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int sine_ref(int unsigned p, int unsigned phase_w, int unsigned amp_w);
    real full, s;
    int  mag;
    full = real'((1 << (amp_w - 1)) - 1);
    s    = $sin(2.0 * PI * (real'(p) + 0.5) / real'(1 << phase_w));
    mag  = $rtoi(full * (s < 0.0 ? -s : s) + 0.5);
    return (s < 0.0) ? -mag : mag;
  endfunction

  // sel: 0 sine, 1 cosine, 2 square, 3 sawtooth (same code as the design).
  function automatic int wave_ref(int unsigned p, int unsigned sel, int unsigned duty,
                                  int unsigned phase_w, int unsigned amp_w);
    int unsigned n;
    int          full;
    n    = 1 << phase_w;
    full = (1 << (amp_w - 1)) - 1;
    case (sel)
      0:       return sine_ref(p, phase_w, amp_w);
      1:       return sine_ref((p + n / 4) % n, phase_w, amp_w);
      2:       return (p < duty) ? full : -full;
      default: begin
        // Ramp from -2^(amp_w-1) to 2^(amp_w-1)-1 over one cycle.
        if (phase_w >= amp_w) return int'(p >> (phase_w - amp_w)) - (1 << (amp_w - 1));
        else                  return int'(p << (amp_w - phase_w)) - (1 << (amp_w - 1));
      end
    endcase
  endfunction

endpackage
