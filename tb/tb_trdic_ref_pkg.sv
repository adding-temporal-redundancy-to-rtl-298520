// tb_trdic_ref_pkg: reference values for the TRDIC testbenches.
// ref_code() is the 1-of-4 to 2-of-5 conversion table written as a rule:
// distinct tokens give their two rails with the extra rail low; a repeated
// token gives its rail plus the extra rail (rail 4). For instance
// (prev 0001, cur 0010) -> 00011 and (0001, 0001) -> 10001.
package tb_trdic_ref_pkg;

  function automatic logic [3:0] rand_token();
    return 4'b0001 << ($urandom % 4);
  endfunction

  function automatic logic [4:0] ref_code(input logic [3:0] prev,
                                          input logic [3:0] cur);
    if (prev == cur) return {1'b1, cur};
    return {1'b0, prev | cur};
  endfunction

  function automatic int popcount5(input logic [4:0] v);
    int n = 0;
    for (int i = 0; i < 5; i++) n += int'(v[i]);
    return n;
  endfunction

endpackage
