// tb_smix_issue_arbiter: random test of the oldest-first SMIX issue arbiter.
//
// Applies random request vectors with distinct random ROB ages and checks
// that exactly the oldest requesting queue is granted, that its micro-op is
// forwarded, and that nothing is granted without a request.
module tb_smix_issue_arbiter;
  import smix_pkg::*;

  localparam int unsigned NQ = N_GROUPS;

  logic [NQ-1:0] req_valid, grant;
  smix_uop_t     req_uop [NQ];
  rob_idx_t      req_age [NQ];
  logic          iss_valid;
  smix_uop_t     iss_uop;

  smix_issue_arbiter #(.NQ(NQ)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    for (int n = 0; n < 5000; n++) begin
      for (int q = 0; q < NQ; q++) begin
        req_valid[q] = $urandom_range(2) != 0;
        req_uop[q]   = smix_uop_t'({$urandom(), $urandom()});
        // distinct ages: queue q uses ages congruent to q modulo NQ
        req_age[q]   = rob_idx_t'($urandom_range(((1 << ROB_W) / NQ) - 1) * NQ + q);
      end
      #1;
      best = -1;
      for (int q = 0; q < NQ; q++)
        if (req_valid[q] && (best < 0 || req_age[q] < req_age[best])) best = q;
      check(iss_valid == (best >= 0), "issue valid");
      if (best >= 0) begin
        check(grant == (NQ'(1) << best), "grant to oldest");
        check(iss_uop == req_uop[best], "forwarded micro-op");
      end else check(grant == '0, "no grant without request");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
