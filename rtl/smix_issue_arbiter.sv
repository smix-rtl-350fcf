// smix_issue_arbiter: picks the SMIX instruction that issues this cycle.
//
// Each group issue queue offers at most one instruction that is free to
// issue, together with its ROB age (0 = oldest in the ROB). The arbiter
// grants the oldest offer and forwards that instruction to the single SMIX
// issue port; ties (which distinct ROB indices cannot produce) go to the
// lower group. Purely combinational: grant and iss_* follow req_* in the same
// cycle. One SMIX issue per cycle and the oldest-first rule are this design's
// choices; the multiplexer between the group queues and the issue stage is
// part of the SMIX out-of-order organisation.
module smix_issue_arbiter
  import smix_pkg::*;
#(
  parameter int unsigned NQ = N_GROUPS
) (
  input  logic [NQ-1:0]     req_valid,
  input  smix_uop_t         req_uop [NQ],
  input  rob_idx_t          req_age [NQ],
  output logic [NQ-1:0]     grant,
  output logic              iss_valid,
  output smix_uop_t         iss_uop
);

  localparam int unsigned SEL_W = (NQ > 1) ? $clog2(NQ) : 1;

  always_comb begin
    logic [SEL_W-1:0] best;
    rob_idx_t best_age;
    best      = 0;
    best_age  = '1;
    iss_valid = 1'b0;
    for (int q = 0; q < NQ; q++) begin
      if (req_valid[q] && (!iss_valid || req_age[q] < best_age)) begin
        iss_valid = 1'b1;
        best      = SEL_W'(q);
        best_age  = req_age[q];
      end
    end
    grant   = '0;
    iss_uop = req_uop[best];
    if (iss_valid) grant[best] = 1'b1;
  end

  assert final ($onehot0(grant));

endmodule
