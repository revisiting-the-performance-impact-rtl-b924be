// bp_tb_pkg: counters reported by the behavioural back end of the front-end testbenches.
package bp_tb_pkg;
  typedef struct {
    int checks, failures;
    int deliver, correct, l1, part, full, misp, dec, hu, hu_drop;
    int cm_norm, cm_comp, cm_skip, stalls, commits, cycles;
  } bp_stats_t;
endpackage
