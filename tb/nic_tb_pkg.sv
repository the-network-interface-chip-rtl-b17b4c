// nic_tb_pkg: reference helpers shared by the NIC testbenches.
//
// ref_word() gives word i of the PaRC packet that carries message m. It is
// written from the packet byte map as a table of {message word, byte} per
// packet byte, independently of the packing functions in the RTL package,
// so that the testbenches can check those functions.
package nic_tb_pkg;
  import nic_pkg::*;

  // Words 1..10: source {message word, byte} of the upper and lower byte.
  localparam int UP_W[11] = '{0, 0, 0, 1, 1, 3, 3, 4, 4, 2, 2};
  localparam int UP_B[11] = '{0, 1, 3, 1, 3, 0, 2, 0, 2, 1, 2};
  localparam int LO_W[11] = '{0, 0, 0, 1, 1, 2, 3, 3, 4, 4, 2};
  localparam int LO_B[11] = '{0, 0, 2, 0, 2, 0, 1, 3, 1, 3, 3};

  function automatic logic [7:0] byte_of(nic_msg_t m, int w, int b);
    return m.w[w][8*b +: 8];
  endfunction

  function automatic logic [15:0] ref_word(nic_msg_t m, int i);
    if (i == 0)  return {1'b1, m.csp, 1'b1, m.mtype, m.w[0][31:24]};
    if (i >= 11) return 16'h5555;
    return {byte_of(m, UP_W[i], UP_B[i]), byte_of(m, LO_W[i], LO_B[i])};
  endfunction

  function automatic nic_msg_t rand_msg();
    nic_msg_t m;
    m.csp   = 1'($urandom);
    m.mtype = 5'($urandom);
    for (int k = 0; k < 5; k++) m.w[k] = $urandom;
    return m;
  endfunction
endpackage
