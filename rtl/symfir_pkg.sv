// symfir_pkg: types and constants shared by the parallel linear-phase FIR filters.
//
// The sub-filter adders come in four kinds (carry-save, carry-select, square-root
// carry-select and carry-select with binary-to-excess-1 conversion), selected by an
// enum parameter. A sub-filter's coefficient set is either general, even-symmetric
// (c(k) = c(M-1-k)) or odd-symmetric (c(k) = -c(M-1-k)).
// The default sizes (16-bit samples and coefficients, 24 taps) are those of the
// evaluated filters; the 40-bit accumulation width is this design's own choice and
// holds every full-precision intermediate value of the 2-, 3- and 4-parallel forms.
package symfir_pkg;

  typedef enum logic [1:0] {
    ADD_CSA       = 2'd0,  // carry-save delay line, ripple-carry merge at the output
    ADD_CSLA      = 2'd1,  // uniform carry-select adder
    ADD_SQRT_CSLA = 2'd2,  // square-root carry-select adder
    ADD_BEC       = 2'd3   // carry-select adder with binary-to-excess-1 converters
  } adder_kind_e;

  typedef enum logic [1:0] {
    SYM_NONE = 2'd0,
    SYM_EVEN = 2'd1,
    SYM_ODD  = 2'd2
  } sym_e;

  localparam int unsigned DATA_W = 16;  // input sample width
  localparam int unsigned COEF_W = 16;  // coefficient width
  localparam int unsigned TAPS   = 24;  // filter length N
  localparam int unsigned ACC_W  = 40;  // accumulation / output width

  // Square-root carry-select grouping: block sizes 2,2,3,4,5,...
  // Lowest bit of block g.
  function automatic int unsigned sqrt_grp_lo(input int unsigned g);
    return (g == 0) ? 0 : 2 + ((g - 1) * (g + 2)) / 2;
  endfunction

  // Number of blocks needed to cover w bits.
  function automatic int unsigned sqrt_grp_count(input int unsigned w);
    int unsigned g;
    g = 0;
    while (sqrt_grp_lo(g) < w) g++;
    return g;
  endfunction

  // Width of block g when the adder is w bits wide (the last block may be short).
  function automatic int unsigned sqrt_grp_w(input int unsigned g, input int unsigned w);
    int unsigned hi;
    hi = sqrt_grp_lo(g + 1);
    if (hi > w) hi = w;
    return hi - sqrt_grp_lo(g);
  endfunction

endpackage
