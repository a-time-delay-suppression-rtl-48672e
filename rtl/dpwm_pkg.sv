// dpwm_pkg: widths and rounding helpers shared by the ADC-less DPWM controller.
//
// The widths are the bus widths printed in the controller block diagram:
// 8-bit staircase address / DAC code / latched voltage code y2, 8-bit
// integrator state n_I, 11-bit Memory3/Memory4 outputs a and b, 10-bit
// Memory2 address (address'), and 9-bit duty word u(k) / DPWM counter.
// The fixed-point format of the gains (Q8.8) is this design's own choice.
package dpwm_pkg;

  localparam int unsigned ADDR_W = 8;   // staircase address, DAC code, y2
  localparam int unsigned NI_W   = 8;   // integrator n_I
  localparam int unsigned AB_W   = 11;  // a and b (Memory3 / Memory4 outputs)
  localparam int unsigned PC_W   = 10;  // address' of Memory2
  localparam int unsigned U_W    = 9;   // u(k) and DPWM counter
  localparam int unsigned GAIN_FRAC = 8; // gains are signed Q8.8 integers

  // Default PID gains (Q8.8, in duty codes per voltage code), reference
  // voltage code r and nominal duty u_Ref. The document gives none of these
  // numbers; they suit a 3.3 V to 1.2 V buck sensed over 0..1.7 V.
  localparam int KP_Q8 = -128;   // K_P = -0.5
  localparam int KI_Q8 = -48;    // K_I = -0.1875
  localparam int KD_Q8 = -64;    // K_D = -0.25
  localparam int R_CODE = 181;   // r: 1.2 V / 1.7 V * 256
  localparam int U_REF  = 186;   // u_Ref: 1.2 V / 3.3 V * 512

  // Memory2 is addressed in reverse (see memory2_pid_lut): the programmable
  // counter starts at PC_BASE - (a - b), and word p of Memory2 holds the
  // control for address' = y2 + a - b = PC_BASE + (2**ADDR_W - 1) - p.
  localparam int PC_BASE = 512;

  // Divide with rounding to nearest (half away from zero); den must be non-zero.
  function automatic int div_round(input longint num, input longint den);
    longint q;
    longint an;
    longint ad;
    an = (num < 0) ? -num : num;
    ad = (den < 0) ? -den : den;
    q  = (2 * an + ad) / (2 * ad);
    if ((num < 0) != (den < 0)) q = -q;
    return int'(q);
  endfunction

  // Clamp to [lo, hi].
  function automatic int clamp(input int v, input int lo, input int hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

endpackage
