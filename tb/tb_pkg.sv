// Shared testbench helpers: the reference model of a cell conversion and the
// record of an event rebuilt from a serial lane.
package tb_pkg;

  // pedestal of the behavioural cell model of a channel with seed 'seed'
  function automatic int ped(int seed, int cidx);
    return (37 * cidx + 11 * seed + 5) % 13;
  endfunction

  // ideal N-bit single-slope conversion of a level in 12-bit steps
  function automatic int adc(int level, int n);
    int step, k;
    step = 4096 >> n;
    k = (level + step - 1) / step;
    return (k > (1 << n) - 1) ? (1 << n) - 1 : k;
  endfunction

  function automatic int seg_len_of(int mode);
    return (mode == 1) ? 64 : (mode == 2) ? 32 : 256;
  endfunction

  typedef struct {
    int     ch, res, segm, start, evno, len;
    int     s [256];
    longint t_first, t_last;   // clocks of the first and last lane bit
  } event_t;

endpackage
