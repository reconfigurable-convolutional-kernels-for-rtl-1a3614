// conv_pkg: constants and size functions shared by the reconfigurable
// convolution kernel.
//
// The kernel splits every B-bit input x_n into K chunks of L = 4 bits. Each
// chunk addresses a row of run-time reconfigurable LUTs (CFGLUTs) holding
// chunk * c_n. One CFGLUT used as a dual-output 4-input LUT gives two product
// bits, so one row needs ceil((B+4)/2) of them. Loading one CFGLUT takes 32
// shift cycles, which is the reconfiguration time of one coefficient.
package conv_pkg;

  // Width of one x chunk (the LUT address width used per CFGLUT).
  localparam int unsigned CHUNK_W = 4;
  // Number of table bits in one CFGLUT and hence the shift cycles to load it.
  localparam int unsigned CFG_BITS = 32;

  // Number of 4-bit chunks an input of b bits is cut into.
  function automatic int unsigned num_chunks(input int unsigned b);
    return (b + CHUNK_W - 1) / CHUNK_W;
  endfunction

  // Width of one partial-product row: chunk (4 bits, signed or unsigned)
  // times a b-bit signed coefficient needs b+4 bits; rounded up to even
  // because every CFGLUT delivers two bits (O6 and O5).
  function automatic int unsigned row_width(input int unsigned b);
    return 2 * ((b + CHUNK_W + 1) / 2);
  endfunction

  // Width of the generator bus of the configuration circuit: the largest
  // entry is 15 * (2c), which needs b+5 bits.
  function automatic int unsigned gen_width(input int unsigned b);
    return b + 5;
  endfunction

  // Exact width of the full-precision sum of n products of two b-bit signed
  // numbers, with one spare bit so rounding can never overflow.
  function automatic int unsigned full_width(input int unsigned b, input int unsigned n);
    return 2 * b + ((n > 1) ? $clog2(n) : 0);
  endfunction

  // Guard bits kept below the output LSB so that the cut rows of a
  // rows-row sum still round faithfully: the smallest g with rows < 2^g.
  function automatic int unsigned guard_bits(input int unsigned rows);
    return $clog2(rows + 1);
  endfunction

  // Bit position below which every row is cut before summation.
  function automatic int unsigned cut_pos(input int unsigned w, input int unsigned b_o,
                                          input int unsigned g);
    return (w > b_o + g) ? w - b_o - g : 0;
  endfunction

  // CFGLUTs at the bottom of row k (weight 2^(4k)) whose two product bits
  // both lie below the cut and are therefore not built.
  function automatic int unsigned skipped_luts(input int unsigned cut, input int unsigned k,
                                               input int unsigned rw);
    int unsigned s;
    s = (cut > CHUNK_W * k) ? (cut - CHUNK_W * k) / 2 : 0;
    return (s < rw / 2) ? s : rw / 2;
  endfunction

endpackage
