// smix_fu_tester: random instruction stream through one pipelined SMIX FU
// built with operator latency OP_LAT (used by tb_smix_fu).
//
// Issues a random mix of fill, pick, fillpick and exec over all groups, with
// random gaps, into the FU connected to the test operator. A sequential
// reference model (input and output registers per group, op_ref for exec)
// predicts every response; the test checks its data, its write enable, its
// destination tag and ROB index, and that it arrives exactly OP_LAT cycles
// after issue. Back-to-back exec/pick pairs of one group are forced often,
// since they are the case the pipeline ordering must get right.
module smix_fu_tester
  import smix_pkg::*;
  import smix_tb_pkg::*;
#(
  parameter int unsigned OP_LAT = 2
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);

  logic rst_n = 0;

  logic               iss_valid;
  smix_uop_t          iss_uop;
  xword_t             iss_rs1, iss_rs2;
  logic               op_start, op_done;
  gid_t               op_gid;
  xword_t [N_IN-1:0]  op_in;
  xword_t [N_OUT-1:0] op_out;
  logic               resp_valid, resp_wen;
  preg_t              resp_prd;
  rob_idx_t           resp_rob_idx;
  xword_t             resp_data;

  smix_fu #(.OP_LAT(OP_LAT)) dut (.*);
  smix_op_model #(.LAT(OP_LAT)) u_op (
    .clk(clk), .rst_n(rst_n), .start(op_start), .gid(op_gid), .in(op_in),
    .done(op_done), .out(op_out));

  typedef struct {
    int       due;
    logic     wen;
    preg_t    prd;
    rob_idx_t rob;
    xword_t   data;
  } exp_t;

  exp_t   expq[$];
  xword_t mi [N_GROUPS][N_IN];
  xword_t mo [N_GROUPS][N_OUT];
  int cyc = 0, n_exec = 0, n_pick_after_exec = 0;
  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (OP_LAT=%0d) %s at cycle %0d", OP_LAT, what, cyc);
    end
  endtask

  function automatic exp_t model(smix_uop_t u, xword_t a, xword_t b, int now);
    exp_t e;
    xword_t [N_IN-1:0]  iv;
    xword_t [N_OUT-1:0] ov;
    e.due = now + OP_LAT;
    e.wen = op_writes_gpr(u.op);
    e.prd = u.prd;
    e.rob = u.rob_idx;
    e.data = '0;
    if (u.op != SMIX_PICK) begin
      mi[u.gid][2*u.idx_in]   = a;
      mi[u.gid][2*u.idx_in+1] = b;
    end
    if (u.op == SMIX_EXEC) begin
      for (int i = 0; i < N_IN; i++) iv[i] = mi[u.gid][i];
      ov = op_ref(u.gid, iv);
      for (int k = 0; k < N_OUT; k++) mo[u.gid][k] = ov[k];
    end
    if (e.wen) e.data = mo[u.gid][u.idx_out];
    return e;
  endfunction

  initial begin
    smix_op_e last_op;
    gid_t     last_gid;
    exp_t     e;
    last_op = SMIX_FILL;
    last_gid = '0;
    for (int g = 0; g < N_GROUPS; g++) begin
      foreach (mi[g][i]) mi[g][i] = '0;
      foreach (mo[g][k]) mo[g][k] = '0;
    end
    iss_valid = 0;
    iss_uop = '0;
    iss_rs1 = '0;
    iss_rs2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // response check for this cycle
      if (resp_valid) begin
        if (expq.size() == 0) check(0, "unexpected response");
        else begin
          e = expq.pop_front();
          check(e.due == cyc, "response latency");
          check(resp_wen == e.wen, "write enable");
          check(resp_rob_idx == e.rob, "rob index");
          if (e.wen) begin
            check(resp_prd == e.prd, "destination tag");
            check(resp_data == e.data, "response data");
          end
        end
      end else if (expq.size() != 0) begin
        check(expq[0].due != cyc, "missing response");
      end
      // next issue
      iss_valid = ($urandom_range(3) != 0);
      iss_uop.op      = smix_op_e'($urandom_range(3));
      iss_uop.gid     = gid_t'($urandom_range(N_GROUPS - 1));
      if (last_op == SMIX_EXEC && $urandom_range(1) == 1) begin
        iss_uop.op  = ($urandom_range(1) == 1) ? SMIX_PICK : SMIX_FILLPICK;
        iss_uop.gid = last_gid;
        iss_valid   = 1;
        n_pick_after_exec++;
      end
      iss_uop.idx_in  = idx_in_t'($urandom_range(N_FILL_SLOTS - 1));
      iss_uop.idx_out = idx_out_t'($urandom_range(N_OUT - 1));
      iss_uop.prs1    = preg_t'($urandom());
      iss_uop.prs2    = preg_t'($urandom());
      iss_uop.prd     = preg_t'($urandom());
      iss_uop.rob_idx = rob_idx_t'(n);
      iss_rs1 = rand64();
      iss_rs2 = rand64();
      if (iss_valid) begin
        expq.push_back(model(iss_uop, iss_rs1, iss_rs2, cyc));
        last_op  = iss_uop.op;
        last_gid = iss_uop.gid;
        if (iss_uop.op == SMIX_EXEC) n_exec++;
      end else last_op = SMIX_FILL;
    end
    repeat (OP_LAT + 2) begin
      @(negedge clk);
      if (resp_valid) begin
        e = expq.pop_front();
        check(e.due == cyc && (!e.wen || resp_data == e.data), "drain response");
      end
      iss_valid = 0;
    end
    check(expq.size() == 0, "all responses seen");
    check(n_exec > 100 && n_pick_after_exec > 100, "coverage of exec and exec-then-pick");
    $display("OP_LAT=%0d: execs=%0d picks right after exec=%0d", OP_LAT, n_exec, n_pick_after_exec);
    done = 1;
  end
endmodule
