// obs_pkg: constants and types shared by the index-based parallel burst
// scheduler.
//
// The scheduler assigns each optical data burst (arrival time, departure
// time) to one of NUM_CH data channels using LAUC-VF (latest available
// unused channel with void filling). Every channel keeps its idle gaps
// ("voids") indexed by the time slot in which each void starts, so a single
// mask / AND / priority-code pass finds the one candidate void per channel.
//
// The channel count (16) and the five-cycle scheduling process come from the
// published design. The number of slots, the time-stamp width and the slot
// length are not given there and are this design's choices: 17-bit times
// cover the time stamps of the published waveforms (up to 116817), and 64
// slots of 2048 time units cover the whole 17-bit time range, so the
// scheduling window starts at time 0.
package obs_pkg;

  // Number of data channels (published value).
  parameter int unsigned NUM_CH     = 16;
  // Number of time slots per scheduling window (own choice).
  parameter int unsigned NUM_SLOTS  = 64;
  // Width of a time stamp (own choice, fits the published time stamps).
  parameter int unsigned TIME_W     = 17;
  // Slot length tau = 2**SLOT_SHIFT time units (own choice).
  parameter int unsigned SLOT_SHIFT = 11;

  // Phases of one scheduling process as sequenced by the control unit.
  typedef enum logic [2:0] {
    ST_INIT   = 3'd0,  // after reset: load the initial void of every channel
    ST_IDLE   = 3'd1,  // waiting for Start
    ST_LOCATE = 3'd2,  // mask, AND filter, priority coder -> candidate index
    ST_READ   = 3'd3,  // void table read of the candidate entry
    ST_VERIFY = 3'd4,  // verification circuit and comparand translation
    ST_SELECT = 3'd5,  // channel selector comparator tree
    ST_UPDATE = 3'd6   // write back index vector and void table; Finish
  } sched_state_e;

endpackage
