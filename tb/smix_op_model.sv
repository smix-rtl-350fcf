// smix_op_model: test operator for the SMIX functional unit.
//
// A fixed-latency, fully pipelined operator: a launch in cycle t (start with
// the group number and all input registers) is answered in cycle t+LAT with
// done and the outputs of smix_tb_pkg::op_ref. Any number of launches may be
// in flight, one per cycle.
module smix_op_model
  import smix_pkg::*;
  import smix_tb_pkg::*;
#(
  parameter int unsigned LAT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  gid_t               gid,
  input  xword_t [N_IN-1:0]  in,
  output logic               done,
  output xword_t [N_OUT-1:0] out
);
  logic               v [LAT];
  xword_t [N_OUT-1:0] r [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) v[k] <= 1'b0;
    end else begin
      v[0] <= start;
      r[0] <= op_ref(gid, in);
      for (int k = 1; k < LAT; k++) begin
        v[k] <= v[k-1];
        r[k] <= r[k-1];
      end
    end
  end

  assign done = v[LAT-1];
  assign out  = r[LAT-1];
endmodule
