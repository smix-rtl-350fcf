// tb_smix_fu: random instruction streams through the pipelined SMIX FU.
//
// Runs smix_fu_tester for operator latencies 1, 2 (the default) and 3 side by
// side. Each tester issues a random mix of fill, pick, fillpick and exec over
// all groups, with random gaps, into an FU connected to the test operator. A
// sequential reference model (input and output registers per group, op_ref
// for exec) predicts every response; the tester checks its data, write
// enable, destination tag and ROB index, and that it arrives exactly OP_LAT
// cycles after issue. An exec immediately followed by a pick or fillpick of
// the same group is forced often, since that is the case the pipeline
// ordering must get right.
module tb_smix_fu;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NT = 3;
  int   chk [NT], fl [NT];
  logic dn [NT];

  smix_fu_tester #(.OP_LAT(1)) u_lat1 (.clk(clk), .checks(chk[0]), .failures(fl[0]), .done(dn[0]));
  smix_fu_tester #(.OP_LAT(2)) u_lat2 (.clk(clk), .checks(chk[1]), .failures(fl[1]), .done(dn[1]));
  smix_fu_tester #(.OP_LAT(3)) u_lat3 (.clk(clk), .checks(chk[2]), .failures(fl[2]), .done(dn[2]));

  function automatic int total(int v [NT]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    fork
      begin
        wait (dn[0] && dn[1] && dn[2]);
        $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fl));
      end
      begin
        #400000;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fl) + 1);
      end
    join_any
    $finish;
  end
endmodule
