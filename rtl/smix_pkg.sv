// smix_pkg: shared constants and types of the SMIX interface.
//
// SMIX lets a core run operators with many inputs and outputs through ordinary
// two-input/one-output instructions. Operands are moved into a grouped custom
// register file (CRF) with `fill`, the operator is started with `exec`, and
// results are moved back with `pick` (or `fillpick`, a fill and a pick in one
// instruction). Each group holds N_IN input and N_OUT output registers.
//
// Two register groups and a 64-bit datapath (RV64) are the evaluated
// configuration. Four inputs and two outputs per group follow the worked
// example operator OpA(ai0, ai1, ai2, 0x3) with results 0 and 1; the actual
// operator shapes of the benchmark kernels are not given, so these two sizes
// are choices of this design. The physical register tag width, ROB index
// width and the opcode encoding are also this design's own.
package smix_pkg;

  localparam int unsigned XLEN     = 64;  // GPR width (RV64)
  localparam int unsigned N_GROUPS = 2;   // CRF groups
  localparam int unsigned N_IN     = 4;   // input registers per group (even)
  localparam int unsigned N_OUT    = 2;   // output registers per group
  localparam int unsigned PREG_W   = 7;   // physical register tag width
  localparam int unsigned ROB_W    = 6;   // ROB index width (power-of-two ROB)

  localparam int unsigned N_FILL_SLOTS = N_IN / 2;  // a fill writes one pair
  localparam int unsigned GID_W   = (N_GROUPS > 1)     ? $clog2(N_GROUPS)     : 1;
  localparam int unsigned IDXI_W  = (N_FILL_SLOTS > 1) ? $clog2(N_FILL_SLOTS) : 1;
  localparam int unsigned IDXO_W  = (N_OUT > 1)        ? $clog2(N_OUT)        : 1;

  typedef logic [XLEN-1:0]   xword_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [ROB_W-1:0]  rob_idx_t;
  typedef logic [GID_W-1:0]  gid_t;
  typedef logic [IDXI_W-1:0] idx_in_t;
  typedef logic [IDXO_W-1:0] idx_out_t;

  typedef enum logic [1:0] {
    SMIX_FILL     = 2'd0,  // I[2*idx_in], I[2*idx_in+1] <= rs1, rs2
    SMIX_PICK     = 2'd1,  // rd <= O[idx_out]
    SMIX_FILLPICK = 2'd2,  // fill and pick in one instruction
    SMIX_EXEC     = 2'd3   // fill, run the operator, pick from the new result
  } smix_op_e;

  // Decoded SMIX micro-op as it is dispatched into a group issue queue.
  typedef struct packed {
    smix_op_e op;
    gid_t     gid;
    idx_in_t  idx_in;
    idx_out_t idx_out;
    preg_t    prs1;
    preg_t    prs2;
    preg_t    prd;
    rob_idx_t rob_idx;
  } smix_uop_t;

  // GPR source operands are read by fill, fillpick and exec.
  function automatic logic op_reads_gpr(smix_op_e op);
    return op != SMIX_PICK;
  endfunction

  // A GPR destination is written by pick, fillpick and exec.
  function automatic logic op_writes_gpr(smix_op_e op);
    return op != SMIX_FILL;
  endfunction

  // Position of a ROB index relative to the ROB head (0 = oldest).
  function automatic rob_idx_t rob_age(rob_idx_t idx, rob_idx_t head);
    return idx - head;
  endfunction

endpackage
