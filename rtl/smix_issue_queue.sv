// smix_issue_queue: issue queue of one SMIX register group with counter-based
// dependency tracking.
//
// Within one group, an exec must follow every older fill, pick and exec of
// that group, and every fill or pick must follow the youngest older exec;
// fills (and picks) between two execs may go in any order. The queue tracks
// this with two counters and a per-entry pre_counter instead of comparing
// entries with each other:
//   inst_counter       number of this group's instructions that have been
//                      dispatched and not yet issued (the queue occupancy)
//   last_exec_counter  pre_counter of the youngest exec still waiting; it is
//                      kept here as last_exec_counter + 1 (lec_p1), which is 0
//                      when no exec is waiting
// At dispatch an exec takes pre_counter = inst_counter and makes itself the
// last exec; any other SMIX instruction takes pre_counter = last_exec_counter
// + 1. Each time an instruction of this group issues, every non-zero
// pre_counter and both counters drop by one. An entry may issue when its
// pre_counter is zero, its GPR operands are ready, and its ROB index is not
// younger than wait_ptr (so no SMIX instruction changes the CRF while it is
// still speculative). Among the entries that may issue, the oldest (by ROB
// age from rob_head) is offered on req_*; the arbiter answers with grant in
// the same cycle.
// Recovery: flush_valid removes every entry younger than flush_rob_idx. The
// surviving entries' pre_counters stay correct because they only count older
// instructions; inst_counter becomes the number of survivors and
// last_exec_counter + 1 is reset to that same number, so a fill or pick
// dispatched after the flush conservatively waits for every survivor. No
// snapshot of the counters is needed.
// Operand readiness: disp_rs*_rdy gives the state at dispatch; wake_* ports
// broadcast physical tags that become ready (checked at dispatch too).
// The counter rules, the wait_pointer condition and the flush rule follow the
// SMIX dynamic-scheduling scheme. DEPTH, the decrement on issue, the oldest-
// first choice and the exact flush interface are this design's choices.
module smix_issue_queue
  import smix_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NWAKE = 3,
  parameter int unsigned GROUP = 0,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic              disp_valid,
  input  smix_uop_t         disp_uop,
  input  logic              disp_rs1_rdy,
  input  logic              disp_rs2_rdy,
  output logic              disp_ready,
  // operand wake-up
  input  logic [NWAKE-1:0]  wake_valid,
  input  preg_t [NWAKE-1:0] wake_tag,
  // ROB state
  input  rob_idx_t          rob_head,
  input  rob_idx_t          wait_ptr,
  input  logic              flush_valid,
  input  rob_idx_t          flush_rob_idx,
  // issue request / grant
  output logic              req_valid,
  output smix_uop_t         req_uop,
  output rob_idx_t          req_age,
  input  logic              grant,
  // counters (observability)
  output logic [CNT_W-1:0]  inst_counter,
  output logic [CNT_W-1:0]  lec_p1
);

  typedef struct packed {
    logic             valid;
    logic             r1;
    logic             r2;
    logic [CNT_W-1:0] pre;
    smix_uop_t        uop;
  } entry_t;

  entry_t q [DEPTH];

  // ---------------------------------------------------------- wake-up
  function automatic logic woken(preg_t tag, logic [NWAKE-1:0] wv, preg_t [NWAKE-1:0] wt);
    logic hit = 1'b0;
    for (int w = 0; w < NWAKE; w++) hit |= wv[w] && (wt[w] == tag);
    return hit;
  endfunction

  // ---------------------------------------------------------- select
  logic [DEPTH-1:0]         can_issue;
  logic [$clog2(DEPTH)-1:0] sel;
  rob_idx_t                 wait_age;

  assign wait_age = rob_age(wait_ptr, rob_head);

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      can_issue[i] = q[i].valid && (q[i].pre == '0) && q[i].r1 && q[i].r2 &&
                     (rob_age(q[i].uop.rob_idx, rob_head) <= wait_age);
  end

  always_comb begin
    req_valid = 1'b0;
    sel       = '0;
    req_age   = '1;
    for (int i = 0; i < DEPTH; i++) begin
      if (can_issue[i] && (!req_valid || rob_age(q[i].uop.rob_idx, rob_head) < req_age)) begin
        req_valid = 1'b1;
        sel       = i[$clog2(DEPTH)-1:0];
        req_age   = rob_age(q[i].uop.rob_idx, rob_head);
      end
    end
  end

  assign req_uop = q[sel].uop;

  // ---------------------------------------------------------- dispatch slot
  logic                     full;
  logic [$clog2(DEPTH)-1:0] free_slot;

  always_comb begin
    full      = 1'b1;
    free_slot = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!q[i].valid) begin
        full      = 1'b0;
        free_slot = i[$clog2(DEPTH)-1:0];
      end
    end
  end

  assign disp_ready = !full;

  logic issue, disp_fire;
  assign issue     = req_valid && grant;
  assign disp_fire = disp_valid && !full && !flush_valid;

  function automatic logic [CNT_W-1:0] dec_sat(logic [CNT_W-1:0] v, logic d);
    return (d && v != '0) ? v - 1'b1 : v;
  endfunction

  // pre_counter of the instruction being dispatched, already counting an
  // issue in the same cycle.
  logic [CNT_W-1:0] disp_pre;
  assign disp_pre = (disp_uop.op == SMIX_EXEC) ? dec_sat(inst_counter, issue)
                                               : dec_sat(lec_p1, issue);

  // survivors of a flush (entries not younger than the flush point)
  logic [DEPTH-1:0] keep;
  logic [CNT_W-1:0] n_keep;
  rob_idx_t         flush_age;
  assign flush_age = rob_age(flush_rob_idx, rob_head);

  always_comb begin
    n_keep = '0;
    for (int i = 0; i < DEPTH; i++) begin
      keep[i] = q[i].valid && !(issue && sel == i[$clog2(DEPTH)-1:0]) &&
                (rob_age(q[i].uop.rob_idx, rob_head) <= flush_age);
      n_keep += {{(CNT_W-1){1'b0}}, keep[i]};
    end
  end

  // ---------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i].valid <= 1'b0;
      inst_counter <= '0;
      lec_p1       <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (q[i].valid) begin
          if (woken(q[i].uop.prs1, wake_valid, wake_tag)) q[i].r1 <= 1'b1;
          if (woken(q[i].uop.prs2, wake_valid, wake_tag)) q[i].r2 <= 1'b1;
          q[i].pre <= dec_sat(q[i].pre, issue);
        end
      end
      if (issue) q[sel].valid <= 1'b0;

      if (flush_valid) begin
        for (int i = 0; i < DEPTH; i++) if (!keep[i]) q[i].valid <= 1'b0;
        inst_counter <= n_keep;
        lec_p1       <= n_keep;
      end else begin
        if (disp_fire) begin
          q[free_slot].valid <= 1'b1;
          q[free_slot].uop   <= disp_uop;
          q[free_slot].pre   <= disp_pre;
          q[free_slot].r1    <= !op_reads_gpr(disp_uop.op) || disp_rs1_rdy ||
                                woken(disp_uop.prs1, wake_valid, wake_tag);
          q[free_slot].r2    <= !op_reads_gpr(disp_uop.op) || disp_rs2_rdy ||
                                woken(disp_uop.prs2, wake_valid, wake_tag);
        end
        inst_counter <= inst_counter + CNT_W'(disp_fire) - CNT_W'(issue);
        if (disp_fire && disp_uop.op == SMIX_EXEC) lec_p1 <= disp_pre + 1'b1;
        else                                        lec_p1 <= dec_sat(lec_p1, issue);
      end
    end
  end

  // ---------------------------------------------------------- checks
  assert property (@(posedge clk) disable iff (!rst_n)
                   disp_valid && !flush_valid && !full |-> disp_uop.gid == gid_t'(GROUP))
    else $error("smix_issue_queue: instruction for another group dispatched");
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req_valid)
    else $error("smix_issue_queue: grant without request");
  // A pre_counter counts older waiting instructions of this group, so it is
  // always below the number of waiting instructions.
  for (genvar i = 0; i < DEPTH; i++) begin : g_inv
    assert property (@(posedge clk) disable iff (!rst_n) q[i].valid |-> q[i].pre < inst_counter)
      else $error("smix_issue_queue: pre_counter out of range");
  end
  assert property (@(posedge clk) disable iff (!rst_n) lec_p1 <= inst_counter)
    else $error("smix_issue_queue: last_exec_counter out of range");

endmodule
