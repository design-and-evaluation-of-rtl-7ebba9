// timing_pkg: rates and delays shared by the blocks of the 10 Hz LINAC
// trigger channel.
//
// The line frequency (60 Hz), the trigger rate (10 Hz) and the 40 ms delay
// that the PG&E path needs before it triggers the LINAC are the values of the
// booster timing system. The 1 MHz reference clock that times the delay and
// the missing-clock detector, and the 150 ms missing-clock timeout
// (one and a half trigger periods), are this design's own choices.
package timing_pkg;
  localparam int unsigned LINE_HZ       = 60;        // power line frequency
  localparam int unsigned TRIG_HZ       = 10;        // trigger rate of both sources
  localparam int unsigned PGE_DELAY_MS  = 40;        // delay on the PG&E path
  localparam int unsigned REF_HZ        = 1_000_000; // reference clock (own choice)
  localparam int unsigned PS_TIMEOUT_MS = 150;       // peaking strip declared missing (own choice)

  // Number of reference clock cycles in a span of milliseconds.
  function automatic int unsigned ms_to_cycles(int unsigned ref_hz, int unsigned ms);
    return int'((longint'(ref_hz) * longint'(ms)) / 1000);
  endfunction
endpackage
