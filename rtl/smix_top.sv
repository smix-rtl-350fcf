// smix_top: out-of-order SMIX interface for a superscalar core.
//
// The core's dispatch stage hands decoded SMIX instructions (fill, pick,
// fillpick, exec) to this unit, which runs them out of order with respect to
// each other wherever the custom register file allows it:
//   dispatch   the instruction goes to the issue queue of its register group
//              (disp_ready reflects that queue), which sets its pre_counter
//   issue      each group queue offers its oldest instruction whose
//              pre_counter is zero, whose GPR operands are ready and whose
//              ROB index is not past wait_ptr; the arbiter issues the oldest
//              offer, one per cycle
//   reg-read   one cycle after issue the physical GPRs are read through the
//              rr_* port (an asynchronous read of the core's register file)
//   execute    the pipelined SMIX FU with the grouped CRF runs it in the same
//              cycle as reg-read; the result appears on wb_* OP_LAT cycles
//              later and also wakes dependent SMIX instructions
// Instructions of different groups never wait for each other, so one
// group's operator can be filled and run while another group is still
// waiting for operands.
//
// Parts of the core that this unit plugs into are ports: the ROB (rob_head,
// wait_ptr, flush_*), the physical register file (rr_*, wb_*), the wake-up
// buses of the core's other functional units (host_wake_*), and the
// kernel-specific operator (op_*, fixed latency OP_LAT, see smix_fu).
// Timing: an instruction issued in cycle t reads registers and enters the FU
// in cycle t+1 and writes back in cycle t+1+OP_LAT.
// The organisation (per-group queues with counters, a multiplexer into one
// issue port, one pipelined SMIX FU) follows the SMIX out-of-order design;
// the register-read stage, the port list and the sizes not fixed there
// (queue depth, wake-up ports, latency) are this design's choices.
module smix_top
  import smix_pkg::*;
#(
  parameter int unsigned IQ_DEPTH = 8,
  parameter int unsigned NHWAKE   = 2,
  parameter int unsigned OP_LAT   = 2,
  localparam int unsigned CNT_W   = $clog2(IQ_DEPTH + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // dispatch
  input  logic                     disp_valid,
  input  smix_uop_t                disp_uop,
  input  logic                     disp_rs1_rdy,
  input  logic                     disp_rs2_rdy,
  output logic                     disp_ready,
  // wake-up from the core's other functional units
  input  logic [NHWAKE-1:0]        host_wake_valid,
  input  preg_t [NHWAKE-1:0]       host_wake_tag,
  // ROB
  input  rob_idx_t                 rob_head,
  input  rob_idx_t                 wait_ptr,
  input  logic                     flush_valid,
  input  rob_idx_t                 flush_rob_idx,
  // physical register file read
  output logic                     rr_valid,
  output preg_t                    rr_prs1,
  output preg_t                    rr_prs2,
  input  xword_t                   rr_rs1_data,
  input  xword_t                   rr_rs2_data,
  // operator
  output logic                     op_start,
  output gid_t                     op_gid,
  output xword_t [N_IN-1:0]        op_in,
  input  logic                     op_done,
  input  xword_t [N_OUT-1:0]       op_out,
  // write-back / completion
  output logic                     wb_valid,
  output logic                     wb_wen,
  output preg_t                    wb_prd,
  output rob_idx_t                 wb_rob_idx,
  output xword_t                   wb_data,
  // observability
  output logic                     iss_valid,
  output smix_uop_t                iss_uop,
  output logic [N_GROUPS-1:0][CNT_W-1:0] iq_inst_counter,
  output logic [N_GROUPS-1:0][CNT_W-1:0] iq_lec_p1
);

  localparam int unsigned NWAKE = NHWAKE + 1;

  logic [NWAKE-1:0]  wake_valid;
  preg_t [NWAKE-1:0] wake_tag;

  assign wake_valid = {host_wake_valid, wb_wen};
  assign wake_tag   = {host_wake_tag, wb_prd};

  logic [N_GROUPS-1:0] q_disp_ready, q_req_valid, q_grant;
  smix_uop_t           q_req_uop [N_GROUPS];
  rob_idx_t            q_req_age [N_GROUPS];

  for (genvar g = 0; g < N_GROUPS; g++) begin : g_iq
    smix_issue_queue #(
      .DEPTH (IQ_DEPTH),
      .NWAKE (NWAKE),
      .GROUP (g)
    ) u_iq (
      .clk          (clk),
      .rst_n        (rst_n),
      .disp_valid   (disp_valid && disp_uop.gid == gid_t'(g)),
      .disp_uop     (disp_uop),
      .disp_rs1_rdy (disp_rs1_rdy),
      .disp_rs2_rdy (disp_rs2_rdy),
      .disp_ready   (q_disp_ready[g]),
      .wake_valid   (wake_valid),
      .wake_tag     (wake_tag),
      .rob_head     (rob_head),
      .wait_ptr     (wait_ptr),
      .flush_valid  (flush_valid),
      .flush_rob_idx(flush_rob_idx),
      .req_valid    (q_req_valid[g]),
      .req_uop      (q_req_uop[g]),
      .req_age      (q_req_age[g]),
      .grant        (q_grant[g]),
      .inst_counter (iq_inst_counter[g]),
      .lec_p1       (iq_lec_p1[g])
    );
  end

  assign disp_ready = q_disp_ready[disp_uop.gid] && !flush_valid;

  smix_issue_arbiter #(.NQ(N_GROUPS)) u_arb (
    .req_valid(q_req_valid),
    .req_uop  (q_req_uop),
    .req_age  (q_req_age),
    .grant    (q_grant),
    .iss_valid(iss_valid),
    .iss_uop  (iss_uop)
  );

  // register-read stage
  smix_uop_t rr_uop;

  always_ff @(posedge clk) begin
    if (!rst_n) rr_valid <= 1'b0;
    else        rr_valid <= iss_valid;
  end

  always_ff @(posedge clk) rr_uop <= iss_uop;

  assign rr_prs1 = rr_uop.prs1;
  assign rr_prs2 = rr_uop.prs2;

  smix_fu #(.OP_LAT(OP_LAT)) u_fu (
    .clk         (clk),
    .rst_n       (rst_n),
    .iss_valid   (rr_valid),
    .iss_uop     (rr_uop),
    .iss_rs1     (rr_rs1_data),
    .iss_rs2     (rr_rs2_data),
    .op_start    (op_start),
    .op_gid      (op_gid),
    .op_in       (op_in),
    .op_done     (op_done),
    .op_out      (op_out),
    .resp_valid  (wb_valid),
    .resp_wen    (wb_wen),
    .resp_prd    (wb_prd),
    .resp_rob_idx(wb_rob_idx),
    .resp_data   (wb_data)
  );

endmodule
