// smix_crf: grouped custom register file (CRF) of the SMIX interface.
//
// The CRF holds N_GROUPS independent groups. Each group has N_IN input
// registers I[0..N_IN-1] and N_OUT output registers O[0..N_OUT-1]. A fill
// writes one pair of input registers, I[2*slot] and I[2*slot+1], from the two
// GPR operands of an instruction. The operator of a group reads all its input
// registers at once, and its result overwrites all output registers of that
// group at once. A pick reads one output register.
//
// Ports:
//   fill_*   write port for one input pair (one group, one slot)
//   in_rd_*  combinational read of all input registers of one group
//   out_w*   write port for all output registers of one group
//   out_rd_* combinational read of one output register
// Timing: writes take effect at the rising clock edge; reads are
// combinational and show the registers as they are before that edge (no
// write-to-read bypass; the FU adds the bypass it needs).
// Reset (active low, synchronous to clk) clears every register to zero. The
// reset value and the absence of a bypass are this design's choices; the
// grouping and the pair-wise fill follow the SMIX instruction definitions.
module smix_crf
  import smix_pkg::*;
#(
  parameter int unsigned NG   = N_GROUPS,
  parameter int unsigned NI   = N_IN,
  parameter int unsigned NO   = N_OUT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fill port
  input  logic                 fill_we,
  input  gid_t                 fill_gid,
  input  idx_in_t              fill_slot,
  input  xword_t               fill_data0,   // to I[2*slot]
  input  xword_t               fill_data1,   // to I[2*slot+1]
  // input-register read (operator launch)
  input  gid_t                 in_rd_gid,
  output xword_t [NI-1:0]      in_rd_data,
  // output-register write (operator result)
  input  logic                 out_we,
  input  gid_t                 out_wgid,
  input  xword_t [NO-1:0]      out_wdata,
  // output-register read (pick)
  input  gid_t                 out_rd_gid,
  input  idx_out_t             out_rd_idx,
  output xword_t               out_rd_data
);

  xword_t [NI-1:0] iregs [NG];
  xword_t [NO-1:0] oregs [NG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int g = 0; g < NG; g++) begin
        iregs[g] <= '0;
        oregs[g] <= '0;
      end
    end else begin
      if (fill_we) begin
        iregs[fill_gid][2*fill_slot]   <= fill_data0;
        iregs[fill_gid][2*fill_slot+1] <= fill_data1;
      end
      if (out_we) oregs[out_wgid] <= out_wdata;
    end
  end

  assign in_rd_data  = iregs[in_rd_gid];
  assign out_rd_data = oregs[out_rd_gid][out_rd_idx];

endmodule
