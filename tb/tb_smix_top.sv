// tb_smix_top: end-to-end test of the out-of-order SMIX unit at its default
// size.
//
// The testbench plays the rest of the core around smix_top: it renames and
// dispatches a random SMIX program over both register groups, holds the
// physical register file (written by the unit's write-back and by "host"
// instructions that finish after random delays and broadcast their tags on
// the host wake-up port), plays the ROB (a branch sets wait_ptr in front of
// younger instructions and is then resolved or flushed) and runs the test
// operator. A sequential golden model executes the same program in program
// order at dispatch, with a CRF snapshot taken at each branch and restored on
// a flush. Every write-back must carry the golden value of its destination,
// every surviving instruction must complete exactly once, and no flushed one
// may complete.
// The test counts the mechanisms it exercised and fails if one never
// happened: issue ahead of an older instruction of the other group, issue
// ahead of an older instruction of the same group, a pre_counter stall, an
// operand stall resolved by the host wake-up and one resolved by the SMIX
// write-back, a wait_ptr stall, a flush, a full queue, and each of the four
// instructions.
module tb_smix_top;
  import smix_pkg::*;
  import smix_tb_pkg::*;

  localparam int unsigned OP_LAT = 2;   // default of smix_top
  localparam int unsigned NTAGS  = 1 << PREG_W;
  localparam int unsigned NPRE   = 16;  // preloaded ready registers per round
  localparam int unsigned CNT_W  = $clog2(8 + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               disp_valid, disp_rs1_rdy, disp_rs2_rdy, disp_ready;
  smix_uop_t          disp_uop;
  logic [1:0]         host_wake_valid;
  preg_t [1:0]        host_wake_tag;
  rob_idx_t           rob_head, wait_ptr, flush_rob_idx;
  logic               flush_valid;
  logic               rr_valid;
  preg_t              rr_prs1, rr_prs2;
  xword_t             rr_rs1_data, rr_rs2_data;
  logic               op_start, op_done;
  gid_t               op_gid;
  xword_t [N_IN-1:0]  op_in;
  xword_t [N_OUT-1:0] op_out;
  logic               wb_valid, wb_wen;
  preg_t              wb_prd;
  rob_idx_t           wb_rob_idx;
  xword_t             wb_data;
  logic               iss_valid;
  smix_uop_t          iss_uop;
  logic [N_GROUPS-1:0][CNT_W-1:0] iq_inst_counter, iq_lec_p1;

  smix_top dut (.*);

  smix_op_model #(.LAT(OP_LAT)) u_op (
    .clk(clk), .rst_n(rst_n), .start(op_start), .gid(op_gid), .in(op_in),
    .done(op_done), .out(op_out));

  // ------------------------------------------------ physical register file
  xword_t prf [NTAGS];
  xword_t host_data [2];
  assign rr_rs1_data = prf[rr_prs1];
  assign rr_rs2_data = prf[rr_prs2];

  always @(posedge clk) begin
    if (wb_wen) prf[wb_prd] <= wb_data;
    for (int h = 0; h < 2; h++) if (host_wake_valid[h]) prf[host_wake_tag[h]] <= host_data[h];
  end

  // ------------------------------------------------ model state
  typedef struct {
    rob_idx_t rob;
    gid_t     gid;
    smix_op_e op;
    preg_t    prs1, prs2;
    bit       issued, completed, flushed, stalled_opnd;
  } rec_t;

  rec_t   recs[$];
  xword_t gold [NTAGS];       // value each tag will hold
  bit     gvalid [NTAGS];     // tag holds (or will hold) a defined value
  bit     busy [NTAGS];       // value not yet in the register file
  bit     host_tag [NTAGS];   // produced by a host instruction
  xword_t mi [N_GROUPS][N_IN],  mo [N_GROUPS][N_OUT];
  xword_t si [N_GROUPS][N_IN],  so [N_GROUPS][N_OUT];   // snapshot at branch
  int     host_due [NTAGS];
  logic [N_FILL_SLOTS-1:0] filled [N_GROUPS], sfilled [N_GROUPS];  // pairs filled since the last exec
  int     next_tag;
  int     cyc = 0, checks = 0, failures = 0;
  int     n_inter = 0, n_intra = 0, n_pre = 0, n_wake_host = 0, n_wake_fu = 0;
  int     n_wait = 0, n_flush = 0, n_full = 0, n_op [4];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic preg_t pick_src();
    int t;
    do t = $urandom_range(next_tag - 1); while (!gvalid[t]);
    return preg_t'(t);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rob_idx_t  next_rob, branch;
    bit        have_branch, pending, do_flush, resolve, disp_acc;
    smix_uop_t nu;
    int        round_left, idle, branch_tag;
    xword_t    a, b;
    xword_t [N_IN-1:0]  iv;
    xword_t [N_OUT-1:0] ov;

    foreach (n_op[k]) n_op[k] = 0;
    disp_valid = 0; disp_uop = '0; disp_rs1_rdy = 0; disp_rs2_rdy = 0;
    host_wake_valid = '0; host_wake_tag = '0; host_data[0] = '0; host_data[1] = '0;
    flush_valid = 0; flush_rob_idx = '0; rob_head = '0; wait_ptr = '1;
    for (int g = 0; g < N_GROUPS; g++) begin
      filled[g] = '0;
      foreach (mi[g][i]) mi[g][i] = '0;
      foreach (mo[g][k]) mo[g][k] = '0;
    end
    foreach (prf[t]) prf[t] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int round = 0; round < 200; round++) begin
      // fresh registers: NPRE ready ones, the rest unallocated
      foreach (gvalid[t]) begin
        gvalid[t] = 0; busy[t] = 0; host_tag[t] = 0; host_due[t] = -1;
      end
      for (int t = 0; t < NPRE; t++) begin
        gold[t] = rand64();
        prf[t]  = gold[t];
        gvalid[t] = 1;
      end
      next_tag = NPRE;
      rob_head = rob_idx_t'($urandom());
      wait_ptr = rob_head - 1'b1;
      next_rob = rob_head;
      have_branch = 0;
      pending = 0;
      recs.delete();
      round_left = $urandom_range(50, 20);
      idle = 0;
      while (round_left > 0 || idle < 40) begin
        @(negedge clk);
        // ---------------- observe write-back
        if (wb_valid) begin
          automatic int hit = 0;
          foreach (recs[j]) if (recs[j].rob == wb_rob_idx && !recs[j].flushed) begin
            check(recs[j].issued && !recs[j].completed, "completes once, after issue");
            recs[j].completed = 1;
            hit++;
          end
          check(hit == 1, "write-back of a live instruction");
          if (hit != 1) $display("hit=%0d rob=%0d wen=%0d prd=%0d nrecs=%0d", hit, wb_rob_idx, wb_wen, wb_prd, recs.size());
          if (wb_wen) begin
            check(gvalid[wb_prd] && busy[wb_prd] && !host_tag[wb_prd], "write-back tag");
            check(wb_data == gold[wb_prd], "write-back data");
            if (gvalid[wb_prd]) busy[wb_prd] = 0;
          end
        end
        // ---------------- observe issue
        if (iss_valid) begin
          foreach (recs[j]) if (recs[j].rob == iss_uop.rob_idx && !recs[j].flushed) begin
            automatic bit inter = 0, intra = 0;
            foreach (recs[k])
              if (!recs[k].issued && !recs[k].flushed &&
                  rob_age(recs[k].rob, rob_head) < rob_age(recs[j].rob, rob_head)) begin
                if (recs[k].gid == recs[j].gid) intra = 1; else inter = 1;
              end
            n_inter += inter;
            n_intra += intra;
            check(!recs[j].issued, "issues once");
            check(rob_age(recs[j].rob, rob_head) <= rob_age(wait_ptr, rob_head),
                  "no issue past wait_ptr");
            recs[j].issued = 1;
            if (recs[j].stalled_opnd) begin
              if (host_tag[iss_uop.prs1] || host_tag[iss_uop.prs2]) n_wake_host++;
              else n_wake_fu++;
            end
          end
        end
        // ---------------- statistics on waiting entries
        foreach (recs[j]) if (!recs[j].issued && !recs[j].flushed) begin
          automatic bit wait_ok = rob_age(recs[j].rob, rob_head) <= rob_age(wait_ptr, rob_head);
          automatic bit opnd_ok = (recs[j].op == SMIX_PICK) ||
                                  (!busy[recs[j].prs1] && !busy[recs[j].prs2]);
          automatic bit held = 0;
          if (!wait_ok) n_wait++;
          // ready in every other respect, but an older instruction of the
          // same group that it depends on has not issued: pre_counter != 0
          foreach (recs[k])
            if (k < j && !recs[k].issued && !recs[k].flushed && recs[k].gid == recs[j].gid &&
                (recs[j].op == SMIX_EXEC || recs[k].op == SMIX_EXEC)) held = 1;
          if (wait_ok && opnd_ok && held) n_pre++;
        end

        // ---------------- host instructions finish
        host_wake_valid = '0;
        for (int h = 0; h < 2; h++) begin
          for (int t = NPRE; t < next_tag; t++)
            if (host_due[t] >= 0 && host_due[t] <= cyc && busy[t] &&
                !(h == 1 && host_wake_valid[0] && host_wake_tag[0] == preg_t'(t))) begin
              host_wake_valid[h] = 1;
              host_wake_tag[h]   = preg_t'(t);
              host_data[h]       = gold[t];
              break;
            end
        end

        // ---------------- branch resolve / flush
        flush_valid = 0;
        do_flush = 0;
        resolve  = 0;
        if (have_branch && ($urandom_range(15) == 0 || round_left == 0)) begin
          if ($urandom_range(1) == 0) begin
            do_flush = 1;
            flush_valid = 1;
            flush_rob_idx = branch;
          end else resolve = 1;
        end

        // ---------------- dispatch
        if (!pending && round_left > 0 && next_tag < NTAGS - 4 &&
            rob_age(next_rob, rob_head) < 60) begin
          automatic int kind = $urandom_range(99);
          if (kind < 10) begin
            // a host instruction producing a register later
            gold[next_tag] = rand64();
            gvalid[next_tag] = 1;
            busy[next_tag] = 1;
            host_tag[next_tag] = 1;
            host_due[next_tag] = cyc + $urandom_range(25, 2);
            next_tag++;
          end else if (kind < 14 && !have_branch && !do_flush && !resolve) begin
            have_branch = 1;
            branch = next_rob;
            branch_tag = next_tag;
            next_rob = next_rob + 1'b1;
            wait_ptr = branch;
            si = mi;
            so = mo;
            sfilled = filled;
          end else begin
            pending = 1;
            kind = $urandom_range(99);
            nu.op = (kind < 35) ? SMIX_FILL : (kind < 60) ? SMIX_EXEC :
                    (kind < 80) ? SMIX_PICK : SMIX_FILLPICK;
            nu.gid     = gid_t'($urandom_range(N_GROUPS - 1));
            nu.idx_in  = idx_in_t'($urandom_range(N_FILL_SLOTS - 1));
            // usage rule: an input pair is filled at most once between two
            // execs of a group, since such fills may issue in any order
            if (nu.op == SMIX_FILL || nu.op == SMIX_FILLPICK) begin
              if (&filled[nu.gid]) nu.op = SMIX_PICK;
              else while (filled[nu.gid][nu.idx_in]) nu.idx_in = idx_in_t'($urandom_range(N_FILL_SLOTS - 1));
            end
            if (nu.op == SMIX_FILL || nu.op == SMIX_FILLPICK) filled[nu.gid][nu.idx_in] = 1'b1;
            if (nu.op == SMIX_EXEC) filled[nu.gid] = '0;
            nu.idx_out = idx_out_t'($urandom_range(N_OUT - 1));
            nu.prs1    = (nu.op == SMIX_PICK) ? preg_t'(0) : pick_src();
            nu.prs2    = (nu.op == SMIX_PICK) ? preg_t'(0) : pick_src();
            nu.prd     = (nu.op == SMIX_FILL) ? preg_t'(0) : preg_t'(next_tag);
          end
        end
        disp_valid = pending && !flush_valid;
        if (pending) begin
          nu.rob_idx   = next_rob;
          disp_uop     = nu;
          disp_rs1_rdy = (nu.op == SMIX_PICK) || !busy[nu.prs1];
          disp_rs2_rdy = (nu.op == SMIX_PICK) || !busy[nu.prs2];
          if (disp_valid && !disp_ready) n_full++;
        end

        // ---------------- clock edge: commit the model
        #1 disp_acc = disp_valid && disp_ready;
        @(posedge clk);
        #1;
        if (disp_acc) begin
          rec_t r;
          r.rob = nu.rob_idx; r.gid = nu.gid; r.op = nu.op;
          r.prs1 = nu.prs1; r.prs2 = nu.prs2;
          r.issued = 0; r.completed = 0; r.flushed = 0;
          r.stalled_opnd = (nu.op != SMIX_PICK) && (busy[nu.prs1] || busy[nu.prs2]);
          recs.push_back(r);
          n_op[nu.op]++;
          // golden, in program order
          a = gold[nu.prs1];
          b = gold[nu.prs2];
          if (nu.op != SMIX_PICK) begin
            mi[nu.gid][2*nu.idx_in]   = a;
            mi[nu.gid][2*nu.idx_in+1] = b;
          end
          if (nu.op == SMIX_EXEC) begin
            for (int i = 0; i < N_IN; i++) iv[i] = mi[nu.gid][i];
            ov = op_ref(nu.gid, iv);
            for (int k = 0; k < N_OUT; k++) mo[nu.gid][k] = ov[k];
          end
          if (nu.op != SMIX_FILL) begin
            gold[next_tag]   = mo[nu.gid][nu.idx_out];
            gvalid[next_tag] = 1;
            busy[next_tag]   = 1;
            next_tag++;
          end
          next_rob = next_rob + 1'b1;
          round_left--;
          pending = 0;
        end
        for (int h = 0; h < 2; h++) if (host_wake_valid[h]) busy[host_wake_tag[h]] = 0;
        if (do_flush) begin
          foreach (recs[j])
            if (rob_age(recs[j].rob, rob_head) > rob_age(branch, rob_head)) begin
              check(!recs[j].issued, "flushed instruction never issued");
              recs[j].flushed = 1;
            end
          for (int t = branch_tag; t < next_tag; t++)
            if (!host_tag[t]) gvalid[t] = 0;
          mi = si;
          mo = so;
          filled = sfilled;
          next_rob = branch + 1'b1;
          pending = 0;
          n_flush++;
        end
        if (do_flush || resolve) begin
          have_branch = 0;
          wait_ptr = rob_head - 1'b1;
        end
        // idle counter: nothing left in flight
        begin
          automatic bit busy_any = 0;
          foreach (recs[j]) if (!recs[j].flushed && !recs[j].completed) busy_any = 1;
          for (int t = NPRE; t < next_tag; t++) if (gvalid[t] && busy[t]) busy_any = 1;
          idle = (round_left == 0 && !busy_any && !have_branch) ? idle + 1 : 0;
        end
      end
      foreach (recs[j]) check(recs[j].flushed || recs[j].completed, "every instruction completed");
      for (int g = 0; g < N_GROUPS; g++) check(iq_inst_counter[g] == 0, "queues empty");
    end
    $display("inter-group ooo=%0d intra-group ooo=%0d pre_counter waits=%0d host wake=%0d fu wake=%0d",
             n_inter, n_intra, n_pre, n_wake_host, n_wake_fu);
    $display("wait_ptr stalls=%0d flushes=%0d full=%0d fill=%0d pick=%0d fillpick=%0d exec=%0d",
             n_wait, n_flush, n_full, n_op[SMIX_FILL], n_op[SMIX_PICK], n_op[SMIX_FILLPICK], n_op[SMIX_EXEC]);
    check(n_inter > 0, "inter-group out-of-order issue");
    check(n_intra > 0, "intra-group out-of-order issue");
    check(n_pre > 0, "pre_counter wait");
    check(n_wake_host > 0, "wake-up from host");
    check(n_wake_fu > 0, "wake-up from SMIX write-back");
    check(n_wait > 0, "wait_ptr stall");
    check(n_flush > 0, "flush");
    check(n_full > 0, "full issue queue");
    foreach (n_op[k]) check(n_op[k] > 0, "each SMIX instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
