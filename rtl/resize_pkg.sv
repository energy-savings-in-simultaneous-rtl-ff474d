// resize_pkg: constants and types shared by the partition-resizing logic.
//
// The resized structures are split into NPART equal partitions, and only the
// last active partition may be switched on or off, so the set of live
// partitions is always 0..K-1 and is fully described by the count K.
// The sampling period (32K cycles), the upsize threshold (32K stalls) and the
// 300-cycle power-switching time are the values the resizing scheme is tuned
// with; the partition count of four is this design's reading of the
// partitioned-resource drawing.
package resize_pkg;

  // Default timing of the resizing controllers.
  localparam int unsigned DEF_SAMPLE_PERIOD_LOG2 = 15;     // 32K-cycle sampling period
  localparam int unsigned DEF_UPSIZE_THRESHOLD   = 32768;  // 32K stalls trigger an upsize
  localparam int unsigned DEF_POWER_DELAY        = 300;    // cycles to switch a partition

  // Default partitioning and sizes (8-wide machine, 2 hardware threads).
  localparam int unsigned DEF_NPART       = 4;
  localparam int unsigned DEF_NTHREADS    = 2;
  localparam int unsigned DEF_MACHINE_W   = 8;
  localparam int unsigned DEF_ROB_ENTRIES = 96;   // per thread
  localparam int unsigned DEF_LSQ_ENTRIES = 48;   // per thread
  localparam int unsigned DEF_IQ_ENTRIES  = 64;   // shared
  localparam int unsigned DEF_PRF_ENTRIES = 192;  // shared, one file each for INT and FP

  // Direction of a partition power transition.
  typedef enum logic {
    PWR_OFF = 1'b0,
    PWR_ON  = 1'b1
  } pwr_dir_e;

  // Resizing FSM for circular queues (ROB, LSQ).
  typedef enum logic [2:0] {
    Q_STABLE     = 3'd0,  // no resizing in progress
    Q_UP_POWER   = 3'd1,  // next partition is being powered up
    Q_UP_PHASE   = 3'd2,  // waiting for head/tail to allow attaching it
    Q_DOWN_PHASE = 3'd3,  // waiting for head/tail to allow detaching the last one
    Q_DOWN_POWER = 3'd4   // detached partition is being powered down
  } qstate_e;

  // Resizing FSM for out-of-order buffers (IQ, PRF).
  typedef enum logic [1:0] {
    B_STABLE     = 2'd0,
    B_UP_POWER   = 2'd1,  // partition powering up, attached when done
    B_DOWN_PHASE = 2'd2,  // no new allocations there; waiting for it to drain
    B_DOWN_POWER = 2'd3
  } bstate_e;

endpackage
