// tb_smix_opa_loop: a software-pipelined loop of one three-input, two-output
// operator through the out-of-order SMIX unit.
//
// Each loop iteration computes (r0, r1) = OpA(a0, a1, a2, a2) on register
// group (iteration mod 2), in the merged form a compiler produces:
//   fillpick p0, a2, a2, g, 1, 0   fills I2/I3 and picks O0 of the previous
//                                  iteration that used group g
//   exec     r1, a0, a1, g, 0, 1   fills I0/I1, runs OpA, returns O1
// and a final pick per group collects the last O0. The three inputs of each
// iteration are produced by "load" instructions of the host core that finish
// after a random 1 to 40 cycles and wake their tags on the host wake-up port,
// so an iteration whose loads are slow must not hold back the other group.
// Every result is compared with OpA evaluated in the testbench; the number of
// cycles, the number of issues that overtook an older instruction of the
// other group, and the instruction count are reported. The ROB is modelled
// as 64 entries retiring in order on completion (wait_ptr stays open).
module tb_smix_opa_loop;
  import smix_pkg::*;
  import smix_tb_pkg::*;

  localparam int NITER = 300;
  localparam int NTAGS = 1 << PREG_W;

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
  logic [N_GROUPS-1:0][3:0] iq_inst_counter, iq_lec_p1;

  smix_top dut (.*);

  smix_op_model #(.LAT(2)) u_op (
    .clk(clk), .rst_n(rst_n), .start(op_start), .gid(op_gid), .in(op_in),
    .done(op_done), .out(op_out));

  xword_t prf [NTAGS];
  xword_t host_data [2];
  assign rr_rs1_data = prf[rr_prs1];
  assign rr_rs2_data = prf[rr_prs2];
  always @(posedge clk) begin
    if (wb_wen) prf[wb_prd] <= wb_data;
    for (int h = 0; h < 2; h++) if (host_wake_valid[h]) prf[host_wake_tag[h]] <= host_data[h];
  end

  // physical register bookkeeping: tags are recycled round robin
  bit     busy [NTAGS];
  int     load_due [NTAGS];   // -1: not a pending load
  // in-flight SMIX instructions, by ROB index
  bit     inflight [1 << ROB_W];
  bit     issued [1 << ROB_W];
  gid_t   rgid [1 << ROB_W];
  int     cyc = 0, checks = 0, failures = 0, n_inter = 0, n_instr = 0, n_results = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program generation and golden values, in program order
  smix_uop_t prog[$];
  xword_t    pval[$];              // per program entry: load value or expected result
  xword_t    lval [NTAGS];         // value a pending load will deliver
  xword_t    rexp [1 << ROB_W];    // expected result by ROB index
  int        next_tag = 0;

  function automatic preg_t alloc();
    preg_t t = preg_t'(next_tag);
    next_tag = (next_tag + 1) % NTAGS;
    return t;
  endfunction

  initial begin
    xword_t mi [N_GROUPS][N_IN], mo [N_GROUPS][N_OUT];
    xword_t [N_IN-1:0]  iv;
    xword_t [N_OUT-1:0] ov;
    preg_t a0, a1, a2;
    xword_t va0, va1, va2;
    smix_uop_t u;
    rob_idx_t next_rob;
    int pc, start_cyc, loads_issued;
    bit disp_acc, done, wb_free;
    preg_t wb_tag;

    foreach (prf[t]) begin prf[t] = '0; busy[t] = 0; load_due[t] = -1; end
    foreach (inflight[r]) begin inflight[r] = 0; issued[r] = 0; end
    for (int g = 0; g < N_GROUPS; g++) begin
      foreach (mi[g][i]) mi[g][i] = '0;
      foreach (mo[g][k]) mo[g][k] = '0;
    end
    disp_valid = 0; disp_uop = '0; disp_rs1_rdy = 0; disp_rs2_rdy = 0;
    host_wake_valid = '0; host_wake_tag = '0; host_data[0] = '0; host_data[1] = '0;
    flush_valid = 0; flush_rob_idx = '0; rob_head = '0; wait_ptr = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // build the program: per iteration three loads, a fillpick and an exec
    for (int it = 0; it < NITER + 2; it++) begin
      automatic gid_t g = gid_t'(it % 2);
      u = '0;
      u.gid = g;
      if (it < NITER) begin
        a0 = alloc(); a1 = alloc(); a2 = alloc();
        va0 = rand64(); va1 = rand64(); va2 = rand64();
        // loads are listed as FILL entries (the loop itself has no plain fill)
        u.op = SMIX_FILL; u.prd = a0; prog.push_back(u); pval.push_back(va0);
        u.prd = a1; prog.push_back(u); pval.push_back(va1);
        u.prd = a2; prog.push_back(u); pval.push_back(va2);
        // fillpick p0, a2, a2, g, 1, 0
        u.op = SMIX_FILLPICK; u.prs1 = a2; u.prs2 = a2; u.idx_in = 1; u.idx_out = 0;
        u.prd = alloc();
        pval.push_back(mo[g][0]);
        mi[g][2] = va2; mi[g][3] = va2;
        prog.push_back(u);
        // exec r1, a0, a1, g, 0, 1
        u.op = SMIX_EXEC; u.prs1 = a0; u.prs2 = a1; u.idx_in = 0; u.idx_out = 1;
        u.prd = alloc();
        mi[g][0] = va0; mi[g][1] = va1;
        for (int i = 0; i < N_IN; i++) iv[i] = mi[g][i];
        ov = op_ref(g, iv);
        for (int k = 0; k < N_OUT; k++) mo[g][k] = ov[k];
        pval.push_back(mo[g][1]);
        prog.push_back(u);
      end else begin
        // drain: pick the last O0 of each group
        u.op = SMIX_PICK; u.idx_out = 0; u.prd = alloc();
        pval.push_back(mo[g][0]);
        prog.push_back(u);
      end
    end

    // run it
    next_rob = '0;
    pc = 0;
    start_cyc = cyc;
    done = 0;
    while (!done) begin
      @(negedge clk);
      // write-back check
      wb_free = wb_valid && wb_wen;
      wb_tag  = wb_prd;
      if (wb_valid) begin
        check(inflight[wb_rob_idx] && issued[wb_rob_idx], "completion of a live instruction");
        inflight[wb_rob_idx] = 0;
        if (wb_wen) begin
          check(wb_data == rexp[wb_rob_idx], "result value");
          n_results++;
        end
      end
      // issue observation
      if (iss_valid) begin
        for (rob_idx_t r = rob_head; r != iss_uop.rob_idx; r++)
          if (inflight[r] && !issued[r] && rgid[r] != iss_uop.gid) begin
            n_inter++;
            break;
          end
        issued[iss_uop.rob_idx] = 1;
      end
      // in-order retirement of completed SMIX instructions
      while (rob_head != next_rob && !inflight[rob_head]) rob_head++;
      wait_ptr = rob_head - 1'b1;
      // loads finishing
      host_wake_valid = '0;
      for (int h = 0; h < 2; h++)
        for (int t = 0; t < NTAGS; t++)
          if (load_due[t] >= 0 && load_due[t] <= cyc) begin
            host_wake_valid[h] = 1;
            host_wake_tag[h] = preg_t'(t);
            host_data[h] = lval[t];
            load_due[t] = -1;
            break;
          end
      // issue loads (any number per cycle) and dispatch one SMIX instruction
      disp_valid = 0;
      while (pc < prog.size() && prog[pc].op == SMIX_FILL) begin
        busy[prog[pc].prd] = 1;
        load_due[prog[pc].prd] = cyc + $urandom_range(40, 1);
        lval[prog[pc].prd] = pval[pc];
        pc++;
      end
      if (pc < prog.size() && rob_age(next_rob, rob_head) < 40) begin
        disp_uop = prog[pc];
        disp_uop.rob_idx = next_rob;
        disp_valid = 1;
        disp_rs1_rdy = (prog[pc].op == SMIX_PICK) || !busy[prog[pc].prs1];
        disp_rs2_rdy = (prog[pc].op == SMIX_PICK) || !busy[prog[pc].prs2];
      end
      #1 disp_acc = disp_valid && disp_ready;
      @(posedge clk);
      #1;
      for (int h = 0; h < 2; h++) if (host_wake_valid[h]) busy[host_wake_tag[h]] = 0;
      if (wb_free) busy[wb_tag] = 0;
      if (disp_acc) begin
        inflight[next_rob] = 1;
        issued[next_rob] = 0;
        rgid[next_rob] = disp_uop.gid;
        rexp[next_rob] = pval[pc];
        if (prog[pc].op != SMIX_FILL) busy[prog[pc].prd] = 1;
        next_rob++;
        pc++;
        n_instr++;
      end
      done = (pc == prog.size()) && (rob_head == next_rob);
    end
    $display("OpA loop: %0d iterations, %0d SMIX instructions in %0d cycles, %0d issued ahead of the other group",
             NITER, n_instr, cyc - start_cyc, n_inter);
    check(n_results == 2 * NITER + 2, "every result returned");
    check(n_inter > 0, "inter-group out-of-order issue happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
