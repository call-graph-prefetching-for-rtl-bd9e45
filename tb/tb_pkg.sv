// tb_pkg: helpers shared by the testbenches.
package tb_pkg;
  import cgp_pkg::*;

  // contents of a line in the L2 model: word k = {line, k} scrambled
  function automatic line_data_t line_pattern(line_t l);
    line_data_t d;
    for (int k = 0; k < 8; k++)
      d[32*k +: 32] = {l[26:0], 5'(k)} ^ 32'h5A3C_96E1;
    return d;
  endfunction
endpackage
