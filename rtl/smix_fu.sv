// smix_fu: pipelined SMIX functional unit with the grouped custom register
// file.
//
// One SMIX instruction enters per cycle with its two GPR operand values. All
// four instruction kinds flow through the same OP_LAT-stage pipeline, which is
// what keeps the CRF consistent once the issue logic has ordered them:
//   fill      writes I[2*idx_in], I[2*idx_in+1] of its group in the issue cycle
//   exec      does the same fill, and in the issue cycle hands all input
//             registers of its group (with the new pair bypassed in) to the
//             operator; OP_LAT cycles later the operator's outputs overwrite
//             the group's output registers and O[idx_out] is returned as rd
//   pick      reads O[idx_out] of its group in the last stage
//   fillpick  fills in the issue cycle and picks in the last stage
// Because inputs are read and written in the first stage and outputs in the
// last stage, an instruction issued after another one in the same group
// always sees that one's effect, and never disturbs an older one.
//
// Operator port: op_start/op_gid/op_in launch the group's operator; the
// operator must answer with op_done/op_out exactly OP_LAT cycles later (a
// fixed-latency pipelined operator, one launch per cycle). The operator
// itself is kernel specific and is outside this module.
// Response port: resp_valid in the last stage for every instruction (fills
// included, so the core can mark them complete); resp_wen says whether
// resp_data is to be written to physical register resp_prd.
// Timing: an instruction issued in cycle t responds in cycle t+OP_LAT.
// The four instruction semantics follow the SMIX definitions; the stage at
// which each one touches the CRF, the operator handshake and OP_LAT = 2 are
// this design's choices.
module smix_fu
  import smix_pkg::*;
#(
  parameter int unsigned OP_LAT = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // issue
  input  logic              iss_valid,
  input  smix_uop_t         iss_uop,
  input  xword_t            iss_rs1,
  input  xword_t            iss_rs2,
  // operator
  output logic              op_start,
  output gid_t              op_gid,
  output xword_t [N_IN-1:0] op_in,
  input  logic              op_done,
  input  xword_t [N_OUT-1:0] op_out,
  // response / write-back
  output logic              resp_valid,
  output logic              resp_wen,
  output preg_t             resp_prd,
  output rob_idx_t          resp_rob_idx,
  output xword_t            resp_data
);

  initial assert (OP_LAT >= 1) else $error("smix_fu: OP_LAT must be at least 1");

  // ---------------------------------------------------------------- stage 0
  logic              fill_we;
  xword_t [N_IN-1:0] in_rd_data;

  assign fill_we  = iss_valid && (iss_uop.op != SMIX_PICK);
  assign op_start = iss_valid && (iss_uop.op == SMIX_EXEC);
  assign op_gid   = iss_uop.gid;

  always_comb begin
    op_in = in_rd_data;
    op_in[2*iss_uop.idx_in]   = iss_rs1;
    op_in[2*iss_uop.idx_in+1] = iss_rs2;
  end

  // ---------------------------------------------------------- stage pipe
  logic      pv [OP_LAT];
  smix_uop_t pu [OP_LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < OP_LAT; k++) pv[k] <= 1'b0;
    end else begin
      pv[0] <= iss_valid;
      for (int k = 1; k < OP_LAT; k++) pv[k] <= pv[k-1];
    end
  end

  always_ff @(posedge clk) begin
    pu[0] <= iss_uop;
    for (int k = 1; k < OP_LAT; k++) pu[k] <= pu[k-1];
  end

  // ------------------------------------------------------------ last stage
  smix_uop_t last;
  logic      last_v, last_exec;
  xword_t    out_rd_data;

  assign last      = pu[OP_LAT-1];
  assign last_v    = pv[OP_LAT-1];
  assign last_exec = last_v && (last.op == SMIX_EXEC);

  assign resp_valid   = last_v;
  assign resp_wen     = last_v && op_writes_gpr(last.op);
  assign resp_prd     = last.prd;
  assign resp_rob_idx = last.rob_idx;
  assign resp_data    = last_exec ? op_out[last.idx_out] : out_rd_data;

  smix_crf u_crf (
    .clk        (clk),
    .rst_n      (rst_n),
    .fill_we    (fill_we),
    .fill_gid   (iss_uop.gid),
    .fill_slot  (iss_uop.idx_in),
    .fill_data0 (iss_rs1),
    .fill_data1 (iss_rs2),
    .in_rd_gid  (iss_uop.gid),
    .in_rd_data (in_rd_data),
    .out_we     (last_exec),
    .out_wgid   (last.gid),
    .out_wdata  (op_out),
    .out_rd_gid (last.gid),
    .out_rd_idx (last.idx_out),
    .out_rd_data(out_rd_data)
  );

  // The operator answers exactly when an exec reaches the last stage.
  assert property (@(posedge clk) disable iff (!rst_n) op_done == last_exec)
    else $error("smix_fu: operator response out of step with the pipeline");

endmodule
