// diw_pkg: shared types and constants of the dynamically resized instruction window.
//
// The window (issue queue, reorder buffer, load/store queue) is built physically at its
// largest size and run at one of three levels. Each level fixes the number of entries in
// use and the pipeline depth of every resource:
//
//   level        1     2     3
//   IQ entries   64   160   256   depth 1 / 2 / 2
//   ROB entries 128   320   512   depth 1 / 2 / 2
//   LSQ entries  64   160   256   depth 1 / 2 / 2
//
// These numbers, the 4-wide issue and the 300-cycle memory latency follow the original
// configuration. The tag width, the payload width and the number of ports are this
// design's own choices. Tags are reorder-buffer indices (P6-style renaming: a result is
// named by the ROB entry of the instruction that produces it).
package diw_pkg;

  // Machine width: dispatch, issue and commit width.
  localparam int unsigned MACHINE_W = 4;

  // Physical (level 3) sizes.
  localparam int unsigned IQ_MAX  = 256;
  localparam int unsigned ROB_MAX = 512;
  localparam int unsigned LSQ_MAX = 256;

  localparam int unsigned ROB_IW = $clog2(ROB_MAX);
  localparam int unsigned LSQ_IW = $clog2(LSQ_MAX);

  // Minimum main-memory latency in cycles, the time after which MLP is predicted gone.
  localparam int unsigned MEM_LAT_CYC = 300;

  // Opaque per-instruction payload carried through the window (opcode, destination
  // register, sequence number: whatever the rest of the core needs back).
  localparam int unsigned PAY_W  = 16;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  typedef logic [ROB_IW-1:0] rob_idx_t;
  typedef logic [LSQ_IW-1:0] lsq_idx_t;

  // Window level; the encoding is level number minus one.
  typedef enum logic [1:0] {
    LVL1 = 2'd0,
    LVL2 = 2'd1,
    LVL3 = 2'd2
  } level_e;

  function automatic int unsigned iq_size(level_e l);
    case (l)
      LVL1:    return 64;
      LVL2:    return 160;
      default: return 256;
    endcase
  endfunction

  function automatic int unsigned rob_size(level_e l);
    case (l)
      LVL1:    return 128;
      LVL2:    return 320;
      default: return 512;
    endcase
  endfunction

  function automatic int unsigned lsq_size(level_e l);
    return iq_size(l);
  endfunction

  // Pipeline depth of IQ, ROB and LSQ at a level (the same for all three).
  function automatic int unsigned pipe_depth(level_e l);
    return (l == LVL1) ? 1 : 2;
  endfunction

  // The level one below l (LVL1 stays LVL1).
  function automatic level_e level_below(level_e l);
    case (l)
      LVL3:    return LVL2;
      default: return LVL1;
    endcase
  endfunction

  // An instruction as it enters the window.
  typedef struct packed {
    logic             src1_wait; // src1 has a producer still in the window
    rob_idx_t         src1_tag;
    logic             src2_wait;
    rob_idx_t         src2_tag;
    logic             is_load;
    logic             is_store;
    logic             self_wake; // fixed one-cycle latency: wakes dependents at select
    logic [PAY_W-1:0] payload;
  } disp_uop_t;

  // An instruction as it leaves the issue queue.
  typedef struct packed {
    rob_idx_t         rob_idx;
    lsq_idx_t         lsq_idx;
    logic             is_load;
    logic             is_store;
    logic             self_wake;
    logic [PAY_W-1:0] payload;
  } iss_uop_t;

  // An issue-queue entry as written at dispatch.
  typedef struct packed {
    logic     src1_wait;
    rob_idx_t src1_tag;
    logic     src2_wait;
    rob_idx_t src2_tag;
    iss_uop_t uop;
  } iq_in_t;

  // A load leaving the load/store queue search: forwarded from an older store, or to be
  // read from the data cache.
  typedef struct packed {
    rob_idx_t          rob_idx;
    lsq_idx_t          lsq_idx;
    logic [ADDR_W-1:0] addr;
    logic              fwd;
    logic [DATA_W-1:0] data;
  } ld_res_t;

endpackage
