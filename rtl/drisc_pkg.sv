// drisc_pkg: types and constants shared by the microthreaded (DRISC) core.
// Thread states follow the six states of the thread life cycle (empty,
// waiting, ready, running, suspended, unused). Registers carry a two-bit
// synchronisation state (empty, full, waiting). Memory requests carry a tag
// made of a two-bit request type (I-cache line read, D-cache line read, data
// write) and a cache-line index, so that responses may return in any order.
// Widths of the parked-read payload held in an empty register are this
// design's own choice.
package drisc_pkg;

  typedef enum logic [2:0] {
    TS_EMPTY     = 3'd0,
    TS_WAITING   = 3'd1,
    TS_READY     = 3'd2,
    TS_RUNNING   = 3'd3,
    TS_SUSPENDED = 3'd4,
    TS_UNUSED    = 3'd5
  } tstate_e;

  typedef enum logic [1:0] {
    RS_EMPTY   = 2'd0,
    RS_FULL    = 2'd1,
    RS_WAITING = 2'd2
  } rstate_e;

  typedef enum logic [1:0] {
    MT_IREAD  = 2'd0,
    MT_DREAD  = 2'd1,
    MT_DWRITE = 2'd2
  } mtype_e;

  // Memory tag: request type plus a line index (wide enough for 64 lines).
  localparam int unsigned MTAG_IDX_W = 6;
  typedef struct packed {
    mtype_e                  mtype;
    logic [MTAG_IDX_W-1:0]   idx;
  } mtag_t;

  // Family table entry. Thread and register references use fixed 16-bit
  // fields so that the struct does not depend on module parameters.
  typedef enum logic [1:0] {
    FS_FREE     = 2'd0,  // unused entry
    FS_ALLOC    = 2'd1,  // allocated, parameters being set
    FS_CREATING = 2'd2,  // registers held, threads being created / running
    FS_DONE     = 2'd3   // all threads ended, waiting for release
  } fstate_e;

  typedef enum logic [2:0] {
    FP_PC    = 3'd0,   // code address of the thread body
    FP_START = 3'd1,   // first index
    FP_STEP  = 3'd2,   // index step
    FP_COUNT = 3'd3,   // number of threads (0 = unbounded)
    FP_BLOCK = 3'd4,   // block size: threads per processor
    FP_REGS  = 3'd5,   // {globals[15:10], shareds[9:5], locals[4:0]}
    FP_PARENT= 3'd6    // register of the creator that receives the return code
  } fparam_e;

  typedef struct packed {
    fstate_e      state;
    logic [31:0]  pc;
    logic [31:0]  start;
    logic [31:0]  step;
    logic [31:0]  count;
    logic [15:0]  block;      // requested, later granted block size
    logic [5:0]   nglob;
    logic [4:0]   nshr;
    logic [4:0]   nloc;
    logic [15:0]  parent_reg;
    logic [15:0]  reg_base;
    logic [15:0]  reg_size;
    logic [31:0]  created;    // threads created so far
    logic [15:0]  live;       // threads allocated and not ended
    logic [15:0]  nalloc;     // thread-table entries held by the family
    logic         has_prev;   // a thread has been created
    logic [15:0]  prev_shr;   // shareds of the last created thread
    logic [15:0]  prev_tid;   // the last created thread
    logic         mem_valid;  // membership list non-empty
    logic [15:0]  mem_head;
    logic [15:0]  mem_tail;
  } fam_t;

  // Layout of the payload of a non-full register (bit positions are this
  // design's choice). While empty with a parked read it holds the read info
  // and the next register of the line's list; while waiting it also holds the
  // reference of the suspended thread.
  localparam int unsigned PL_SIZE_LSB = 0;   // 4 bits: log2 of bytes (0..3)
  localparam int unsigned PL_OFF_LSB  = 4;   // 6 bits: byte offset in line
  localparam int unsigned PL_NEXT_LSB = 16;  // 16 bits: next register + valid
  localparam int unsigned PL_TID_LSB  = 32;  // 16 bits: waiting thread

  // Family commands from the pipeline: allocate an entry, set a parameter,
  // start creation.
  typedef enum logic [1:0] {
    FC_ALLOC  = 2'd0,
    FC_SET    = 2'd1,
    FC_CREATE = 2'd2
  } fcop_e;

  // Thread events from the pipeline.
  typedef enum logic [1:0] {
    EV_END    = 2'd0,  // thread executed its last instruction
    EV_SWITCH = 2'd1   // context switch: re-check the I-cache at a new PC
  } evop_e;

endpackage
