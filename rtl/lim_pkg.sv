// Shared types of the monitor-based interrupt limiter.
//
// sens_e is the per-source sensitivity: an EDGE source is caught on each
// rising edge of its line and forwarded to the MCU as a one-clock pulse; a
// LEVEL source is caught while its line is high and forwarded as a line that
// stays high until the MCU enters an ISR. Using one setting for both the
// detection side and the MCU side is a choice of this design.
// mon_t bundles the single-bit monitoring lines that the MCU drives.
package lim_pkg;
  typedef enum logic {
    SENS_LEVEL = 1'b0,
    SENS_EDGE  = 1'b1
  } sens_e;

  typedef struct packed {
    logic isr;    // MON_INT: high while an ISR body runs
    logic tick;   // MON_TICK: pulse per OS timer-tick ISR
    logic ctx;    // MON_CTX: high during a task context switch
    logic slack;  // MON_SLACK: high while the MCU runs below the hard-priority level
  } mon_t;
endpackage
