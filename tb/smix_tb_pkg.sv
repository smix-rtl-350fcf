// smix_tb_pkg: reference functions shared by the SMIX testbenches.
//
// The SMIX interface does not fix what an operator computes; that depends on
// the kernel. For testing, every group's operator is the arbitrary mixing
// function op_ref below, chosen so that each output depends on every input,
// on the input order and on the group number.
package smix_tb_pkg;
  import smix_pkg::*;

  function automatic xword_t [N_OUT-1:0] op_ref(gid_t g, xword_t [N_IN-1:0] in);
    xword_t [N_OUT-1:0] o;
    for (int k = 0; k < N_OUT; k++) begin
      o[k] = xword_t'(g) * 64'h9E37_79B9_7F4A_7C15 + xword_t'(k);
      for (int i = 0; i < N_IN; i++)
        o[k] = (o[k] * 64'd31) ^ (in[i] + xword_t'(i * 7) + xword_t'(k));
    end
    return o;
  endfunction

  function automatic xword_t rand64();
    return {$urandom(), $urandom()};
  endfunction
endpackage
