// Host-side arithmetic for the cogging testbenches: what the front-end
// computer works out for one transfer.  Independent of the RTL.
//
//   Frev            = 28.023 MHz / 360          (RHIC, gamma = 10.52)
//   Fclock          = 1024 * Frev
//   dphi_kicker     = 360 deg / bunches         (in degrees of one RHIC turn)
//   dphi_synchro    = (90 deg + 19/4 * dphi_kicker) * 4   (synchro-reference degrees)
//   kicker clock advance = dphi_kicker / 4      (the kicker clock runs at Frev/4)
//   N ticks = Fclock * fill time, delta = total phase / N ticks, then
//   N ticks recomputed as total phase / delta so the advance lands on the
//   intended phase to within one delta.  delta is rounded up so the
//   recomputed hop never exceeds the fill time.
package tb_cog_host_pkg;
  localparam real F_RF   = 28.023e6;
  localparam real F_REV  = F_RF / 360.0;
  localparam real F_CLK  = 1024.0 * F_REV;
  localparam real TWO32  = 4294967296.0;

  typedef struct {
    longint unsigned total;  // phase units to slip, 2^32 per output cycle
    longint unsigned delta;  // delta phase A - B
    longint unsigned ticks;  // clocks spent on B
  } hop_t;

  function automatic hop_t plan(input real phase_deg, input real fill_time_s);
    hop_t h;
    longint unsigned n0;
    h.total = longint'(phase_deg / 360.0 * TWO32 + 0.5);
    n0      = longint'(F_CLK * fill_time_s + 0.5);
    h.delta = (h.total + n0 - 1) / n0;
    h.ticks = (h.total + h.delta / 2) / h.delta;
    return h;
  endfunction

  function automatic real synchro_deg(input int bunches);
    real k;
    k = 360.0 / real'(bunches);
    return (90.0 + 19.0 / 4.0 * k) * 4.0;
  endfunction

  function automatic real kicker_deg(input int bunches);
    return 360.0 / real'(bunches) / 4.0;
  endfunction
endpackage
