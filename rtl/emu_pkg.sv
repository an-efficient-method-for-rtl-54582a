// emu_pkg: constants and helpers shared by the queueing-network emulator.
//
// The emulator models a discrete-time network in which one time slot is the
// transmission time of one fixed-size cell. Random traffic is produced from
// 16-bit uniform words compared against thresholds (threshold = rate * 65535),
// which is why RW, the random word width, is 16 throughout.
//
// mark_before() compares two virtual finishing times by the sign of their
// difference, so that the comparison stays right when the mark registers wrap
// around after a very long run (a design choice; the marks only ever need to be
// compared against values less than half the register range away).
package emu_pkg;

  // Width of the uniform random word (16 bits in the reference emulator).
  localparam int unsigned RW = 16;

  // Width of the slot and event counters.
  localparam int unsigned CNT_W = 32;

  // Width of a virtual finishing time (mark) and of the virtual time.
  localparam int unsigned MARK_W = 32;

  // Number of clock cycles in one Fair Queueing slot.
  localparam int unsigned FQ_SLOT_CYCLES = 3;

  // Kinds of histograms kept by the Fair Queueing instrumentation.
  typedef enum logic [1:0] {
    HIST_GAP   = 2'd0,  // time between two consecutive cells (slots)
    HIST_BURST = 2'd1,  // length of a run of back-to-back cells (slots)
    HIST_OCC   = 2'd2   // queue occupation sampled every slot (cells)
  } hist_kind_e;

  // Traffic source selector of the single-queue emulator.
  typedef enum logic [1:0] {
    SRC_BERNOULLI = 2'd0,
    SRC_ONOFF     = 2'd1,
    SRC_MMBP      = 2'd2
  } src_kind_e;

  // True when mark a is strictly earlier than mark b (wrap-safe).
  function automatic logic mark_before(input logic [MARK_W-1:0] a, input logic [MARK_W-1:0] b);
    logic [MARK_W-1:0] d;
    d = a - b;
    return d[MARK_W-1];
  endfunction

endpackage
