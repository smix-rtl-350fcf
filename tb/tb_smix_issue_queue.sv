// tb_smix_issue_queue: cycle-exact test of one group's SMIX issue queue.
//
// The testbench dispatches random fill/pick/fillpick/exec streams for one
// group, wakes random operand tags, holds a branch in front of some of them
// (wait_ptr) and then either resolves or flushes it, and grants the queue's
// request on most cycles. It keeps its own model of the ordering rule,
// written without counters: every instruction carries a barrier, the number
// of older instructions that must have issued before it may issue (all older
// ones for exec; everything up to the youngest older exec for the others;
// after a flush, everything that survived it). Every cycle it checks that
//   - the request is present exactly when some entry is eligible, and is the
//     oldest eligible entry (so nothing issues early and nothing is held back)
//   - inst_counter equals the number of waiting entries and
//     last_exec_counter + 1 equals the number of waiting entries that the
//     next fill or pick would have to wait for
//   - disp_ready is low exactly when the queue is full
// It also counts the mechanisms it exercised (out-of-order issue within the
// group, pre_counter stalls, operand stalls, wait_ptr stalls, flushes, a full
// queue, ROB index wrap-around) and fails if one never happened.
module tb_smix_issue_queue;
  import smix_pkg::*;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned NWAKE = 3;
  localparam int unsigned NTAGS = 16;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              disp_valid, disp_rs1_rdy, disp_rs2_rdy, disp_ready;
  smix_uop_t         disp_uop;
  logic [NWAKE-1:0]  wake_valid;
  preg_t [NWAKE-1:0] wake_tag;
  rob_idx_t          rob_head, wait_ptr, flush_rob_idx;
  logic              flush_valid;
  logic              req_valid, grant;
  smix_uop_t         req_uop;
  rob_idx_t          req_age;
  logic [CNT_W-1:0]  inst_counter, lec_p1;

  smix_issue_queue #(.DEPTH(DEPTH), .NWAKE(NWAKE), .GROUP(0)) dut (.*);

  typedef struct {
    int       seq;
    rob_idx_t rob;
    smix_op_e op;
    preg_t    prs1, prs2;
    int       barrier;
    bit       done;      // issued or flushed
  } ins_t;

  ins_t ins[$];
  bit   tag_rdy [NTAGS];
  int   nb = 0;          // barrier for the next fill/pick/fillpick
  int   checks = 0, failures = 0, cyc = 0;
  int   n_ooo = 0, n_pre_stall = 0, n_opnd_stall = 0, n_wait_stall = 0;
  int   n_flush = 0, n_full = 0, n_issue = 0, n_wrap = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic bit dep_ok(int i);
    for (int j = 0; j < ins.size(); j++)
      if (ins[j].seq < ins[i].barrier && !ins[j].done) return 0;
    return 1;
  endfunction

  function automatic bit opnd_ok(int i);
    if (ins[i].op == SMIX_PICK) return 1;
    return tag_rdy[ins[i].prs1] && tag_rdy[ins[i].prs2];
  endfunction

  function automatic bit wait_ok(int i);
    return rob_age(ins[i].rob, rob_head) <= rob_age(wait_ptr, rob_head);
  endfunction

  function automatic int waiting();
    int n = 0;
    foreach (ins[j]) if (!ins[j].done) n++;
    return n;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rob_idx_t next_rob, branch, iss_rob;
    int       next_seq, exp_idx, oldest_wait, n_lec;
    bit       have_branch, do_flush, do_disp, do_grant, disp_acc;
    int       round_left;

    disp_valid = 0; disp_uop = '0; disp_rs1_rdy = 0; disp_rs2_rdy = 0;
    wake_valid = '0; wake_tag = '0; flush_valid = 0; flush_rob_idx = '0;
    grant = 0;
    rob_head = '0; wait_ptr = '1;
    next_seq = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int round = 0; round < 60; round++) begin
      // a new stretch of ROB indices, often wrapping past the top
      rob_head = rob_idx_t'($urandom());
      wait_ptr = rob_head - 1'b1;
      next_rob = rob_head;
      have_branch = 0;
      foreach (tag_rdy[t]) tag_rdy[t] = ($urandom_range(2) == 0);
      round_left = $urandom_range(40, 10);
      while (round_left > 0 || waiting() != 0) begin
        @(negedge clk);
        cyc++;
        // ---------------- checks against the model
        exp_idx = -1;
        foreach (ins[j]) begin
          if (!ins[j].done) begin
            if (dep_ok(j) && opnd_ok(j) && wait_ok(j)) begin
              if (exp_idx < 0 || rob_age(ins[j].rob, rob_head) < rob_age(ins[exp_idx].rob, rob_head))
                exp_idx = j;
            end else if (!dep_ok(j) && opnd_ok(j) && wait_ok(j)) n_pre_stall++;
            else if (dep_ok(j) && !opnd_ok(j)) n_opnd_stall++;
            else if (dep_ok(j) && opnd_ok(j) && !wait_ok(j)) n_wait_stall++;
          end
        end
        check(req_valid == (exp_idx >= 0), "request present exactly when eligible");
        if (req_valid && exp_idx >= 0)
          check(req_uop.rob_idx == ins[exp_idx].rob, "oldest eligible requested");
        check(int'(inst_counter) == waiting(), "inst_counter");
        n_lec = 0;
        foreach (ins[j]) if (!ins[j].done && ins[j].seq < nb) n_lec++;
        check(int'(lec_p1) == n_lec, "last_exec_counter");
        check(disp_ready == (waiting() < DEPTH), "disp_ready");

        // ---------------- stimulus
        do_grant = ($urandom_range(4) != 0);
        grant    = do_grant && req_valid;
        do_flush = have_branch && $urandom_range(12) == 0;
        flush_valid   = 0;
        disp_valid    = 0;
        if (do_flush) begin
          if ($urandom_range(1) == 0) begin
            flush_valid   = 1;
            flush_rob_idx = branch;
          end
        end
        do_disp = !flush_valid && round_left > 0 && $urandom_range(3) != 0 &&
                  rob_age(next_rob, rob_head) < 62;
        if (do_disp) begin
          disp_valid = 1;
          disp_uop.op      = smix_op_e'($urandom_range(3));
          disp_uop.gid     = '0;
          disp_uop.idx_in  = idx_in_t'($urandom());
          disp_uop.idx_out = idx_out_t'($urandom());
          disp_uop.prs1    = preg_t'($urandom_range(NTAGS - 1));
          disp_uop.prs2    = preg_t'($urandom_range(NTAGS - 1));
          disp_uop.prd     = preg_t'($urandom());
          disp_uop.rob_idx = next_rob;
          disp_rs1_rdy     = tag_rdy[disp_uop.prs1];
          disp_rs2_rdy     = tag_rdy[disp_uop.prs2];
          if (!disp_ready) n_full++;
        end
        // branch in front of later instructions
        if (!have_branch && !flush_valid && !do_disp && round_left > 4 && $urandom_range(5) == 0) begin
          have_branch = 1;
          branch      = next_rob;
          next_rob    = next_rob + 1'b1;
          wait_ptr    = branch;
        end
        for (int w = 0; w < NWAKE; w++) begin
          wake_valid[w] = ($urandom_range(2) == 0) || (round_left == 0 && w == 0);
          wake_tag[w]   = preg_t'($urandom_range(NTAGS - 1));
        end

        // ---------------- model update at the clock edge
        #1 disp_acc = disp_valid && disp_ready;
        iss_rob = req_uop.rob_idx;
        @(posedge clk);
        #1;
        if (grant) begin
          foreach (ins[j])
            if (!ins[j].done && ins[j].rob == iss_rob) begin
              foreach (ins[k]) if (!ins[k].done && ins[k].seq < ins[j].seq) begin
                n_ooo++;
                break;
              end
              ins[j].done = 1;
            end
          n_issue++;
        end
        if (disp_acc) begin
          ins_t e;
          e.seq = next_seq;
          e.rob = next_rob;
          e.op = disp_uop.op;
          e.prs1 = disp_uop.prs1;
          e.prs2 = disp_uop.prs2;
          e.done = 0;
          if (e.op == SMIX_EXEC) begin
            e.barrier = next_seq;
            nb = next_seq + 1;
          end else e.barrier = nb;
          ins.push_back(e);
          if (rob_idx_t'(next_rob + 1'b1) == '0) n_wrap++;
          next_seq++;
          next_rob = next_rob + 1'b1;
          round_left--;
        end
        for (int w = 0; w < NWAKE; w++) if (wake_valid[w]) tag_rdy[wake_tag[w]] = 1;
        if (do_flush) begin
          if (flush_valid) begin
            foreach (ins[j])
              if (!ins[j].done && rob_age(ins[j].rob, rob_head) > rob_age(branch, rob_head))
                ins[j].done = 1;
            next_rob = branch + 1'b1;
            nb = next_seq;
            n_flush++;
          end
          have_branch = 0;
          wait_ptr = rob_head - 1'b1;
        end
        // forget instructions that are long gone
        while (ins.size() > 0 && ins[0].done && ins.size() > 4 * DEPTH) void'(ins.pop_front());
        if (round_left == 0 && have_branch) begin
          have_branch = 0;
          wait_ptr = rob_head - 1'b1;
        end
      end
    end
    $display("issued=%0d ooo=%0d pre_stall=%0d opnd_stall=%0d wait_stall=%0d flush=%0d full=%0d wrap=%0d",
             n_issue, n_ooo, n_pre_stall, n_opnd_stall, n_wait_stall, n_flush, n_full, n_wrap);
    check(n_ooo > 0, "out-of-order issue within the group happened");
    check(n_pre_stall > 0, "pre_counter stall happened");
    check(n_opnd_stall > 0, "operand stall happened");
    check(n_wait_stall > 0, "wait_ptr stall happened");
    check(n_flush > 0, "flush happened");
    check(n_full > 0, "full queue happened");
    check(n_wrap > 0, "ROB index wrap happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
