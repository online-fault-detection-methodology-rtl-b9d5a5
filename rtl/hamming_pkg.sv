// Layout of the extended Hamming (SECDED) code for 32-bit data.
//
// Codeword positions 1..38 hold six Hamming check bits at the powers of two (1, 2, 4, 8,
// 16, 32). The 32 data bits fill the other positions in order: d0 at 3, d1 at 5, d2 at 6,
// d3 at 7, d4 at 9, and so on up to d31 at 38. Check bit Pi is the even parity of the
// data bits whose position has bit i set. P0, for instance, covers d0, d1, d3, d4, d6,
// d8, d10, d11, d13, d15, d17, d19, d21, d23, d25, d26, d28 and d30. A seventh bit, P6, is
// the overall even parity of the 32 data bits and P0..P5. It tells single errors from
// double ones. Both tables below are constants worked out at elaboration.
package hamming_pkg;

  localparam int unsigned HDATA_W  = 32;
  localparam int unsigned HCHECK_W = 6;            // Hamming bits P0..P5
  localparam int unsigned HCODE_W  = HCHECK_W + 1; // plus overall parity P6

  typedef logic [HDATA_W-1:0][HCHECK_W-1:0] pos_tab_t;
  typedef logic [HCHECK_W-1:0][HDATA_W-1:0] mask_tab_t;

  // Codeword position (1-based) of every data bit: the positions that are not powers of 2.
  function automatic pos_tab_t data_positions();
    pos_tab_t t;
    int unsigned pos;
    pos = 2;
    for (int unsigned i = 0; i < HDATA_W; i++) begin
      pos++;
      while ((pos & (pos - 1)) == 0) pos++;
      t[i] = HCHECK_W'(pos);
    end
    return t;
  endfunction

  localparam pos_tab_t DPOS = data_positions();

  // For each check bit, the mask of data bits it covers.
  function automatic mask_tab_t check_masks();
    mask_tab_t m;
    for (int unsigned b = 0; b < HCHECK_W; b++)
      for (int unsigned i = 0; i < HDATA_W; i++)
        m[b][i] = DPOS[i][b];
    return m;
  endfunction

  localparam mask_tab_t HMASK = check_masks();

  // The six Hamming check bits of a data word.
  function automatic logic [HCHECK_W-1:0] hamming_bits(logic [HDATA_W-1:0] d);
    logic [HCHECK_W-1:0] p;
    for (int unsigned b = 0; b < HCHECK_W; b++) p[b] = ^(d & HMASK[b]);
    return p;
  endfunction

endpackage
