// tb_smix_crf: random test of the grouped custom register file.
//
// Drives random fill writes, output-register writes and reads of both kinds
// every cycle and compares each read with a plain array model that is
// updated at the same clock edges. Checks the reset value first.
module tb_smix_crf;
  import smix_pkg::*;
  import smix_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              fill_we, out_we;
  gid_t              fill_gid, in_rd_gid, out_wgid, out_rd_gid;
  idx_in_t           fill_slot;
  idx_out_t          out_rd_idx;
  xword_t            fill_data0, fill_data1, out_rd_data;
  xword_t [N_IN-1:0]  in_rd_data;
  xword_t [N_OUT-1:0] out_wdata;

  smix_crf dut (.*);

  xword_t mi [N_GROUPS][N_IN];
  xword_t mo [N_GROUPS][N_OUT];
  int checks = 0, failures = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic drive_random();
    fill_we    = $urandom_range(1, 0) == 1;
    fill_gid   = gid_t'($urandom_range(N_GROUPS - 1));
    fill_slot  = idx_in_t'($urandom_range(N_FILL_SLOTS - 1));
    fill_data0 = rand64();
    fill_data1 = rand64();
    out_we     = $urandom_range(3) == 0;
    out_wgid   = gid_t'($urandom_range(N_GROUPS - 1));
    for (int k = 0; k < N_OUT; k++) out_wdata[k] = rand64();
    in_rd_gid  = gid_t'($urandom_range(N_GROUPS - 1));
    out_rd_gid = gid_t'($urandom_range(N_GROUPS - 1));
    out_rd_idx = idx_out_t'($urandom_range(N_OUT - 1));
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < N_GROUPS; g++) begin
      foreach (mi[g][i]) mi[g][i] = '0;
      foreach (mo[g][k]) mo[g][k] = '0;
    end
    drive_random();
    fill_we = 0; out_we = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // reset contents
    for (int g = 0; g < N_GROUPS; g++) begin
      in_rd_gid = gid_t'(g);
      out_rd_gid = gid_t'(g);
      #1;
      for (int i = 0; i < N_IN; i++) check(in_rd_data[i] == '0, "input reset");
      for (int k = 0; k < N_OUT; k++) begin
        out_rd_idx = idx_out_t'(k);
        #1 check(out_rd_data == '0, "output reset");
      end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      drive_random();
      #1;
      for (int i = 0; i < N_IN; i++)
        check(in_rd_data[i] == mi[in_rd_gid][i], "input read");
      check(out_rd_data == mo[out_rd_gid][out_rd_idx], "output read");
      @(posedge clk);
      if (fill_we) begin
        mi[fill_gid][2*fill_slot]   = fill_data0;
        mi[fill_gid][2*fill_slot+1] = fill_data1;
      end
      if (out_we) for (int k = 0; k < N_OUT; k++) mo[out_wgid][k] = out_wdata[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
