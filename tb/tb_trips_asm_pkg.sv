// tb_trips_asm_pkg: instruction and block-header encoders for the testbenches.
//
// Builds 32-bit TRIPS instructions in the six formats (G, I, L, S, B, C),
// 9-bit targets and block-header words exactly as described in trips_pkg, so
// testbenches can write small programs without hand-assembled hex.
package tb_trips_asm_pkg;
  import trips_pkg::*;

  // targets
  function automatic logic [8:0] t_op(logic [1:0] slot, int r, int c, int f);
    return {slot, 2'(r), 2'(c), 3'(f)};
  endfunction
  function automatic logic [8:0] t_left(int r, int c, int f);  return t_op(SL_LEFT, r, c, f);  endfunction
  function automatic logic [8:0] t_right(int r, int c, int f); return t_op(SL_RIGHT, r, c, f); endfunction
  function automatic logic [8:0] t_pred(int r, int c, int f);  return t_op(SL_PRED, r, c, f);  endfunction
  function automatic logic [8:0] t_wr(int bank, int wid);
    return {2'b00, 2'b00, 2'(bank), 3'(wid)};
  endfunction
  function automatic logic [8:0] t_st(int lsid);
    return {2'b00, 2'b01, 5'(lsid)};
  endfunction

  // instruction formats
  function automatic logic [31:0] i_g(opcode_e op, logic [1:0] pr, logic [8:0] t1, logic [8:0] t2 = '0);
    return {op, pr, 5'd0, t2, t1};
  endfunction
  function automatic logic [31:0] i_i(opcode_e op, logic [1:0] pr, int imm, logic [8:0] t1);
    return {op, pr, 5'd0, 9'(imm), t1};
  endfunction
  function automatic logic [31:0] i_l(opcode_e op, logic [1:0] pr, int lsid, int imm, logic [8:0] t1);
    return {op, pr, 5'(lsid), 9'(imm), t1};
  endfunction
  function automatic logic [31:0] i_s(opcode_e op, logic [1:0] pr, int lsid, int imm);
    return {op, pr, 5'(lsid), 9'(imm), 9'd0};
  endfunction
  function automatic logic [31:0] i_b(opcode_e op, logic [1:0] pr, int ex, int off);
    return {op, pr, 3'(ex), 20'(off)};
  endfunction
  function automatic logic [31:0] i_c(opcode_e op, int k, logic [8:0] t1);
    return {op, 16'(k), t1};
  endfunction

  // header read / write fields (placed into bits 26:6 and 5:0 of a header word)
  function automatic logic [20:0] h_rd(int gr, logic [8:0] t, bit keep = 0);
    return {1'b1, 5'(gr), t, keep, 5'd0};
  endfunction
  function automatic logic [5:0] h_wr(int gr);
    return {1'b1, 5'(gr)};
  endfunction
endpackage
