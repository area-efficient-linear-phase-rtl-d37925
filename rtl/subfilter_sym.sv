// subfilter_sym: length-M sub-filter whose coefficients are symmetric or antisymmetric.
// With SYM_EVEN, c(j) = c(M-1-j); with SYM_ODD, c(j) = -c(M-1-j). Only the first
// MH = ceil(M/2) coefficients are given, and only MH multipliers are built: the
// product of multiplier i serves two taps of a transposed (reordered) direct-form
// delay line, tap i and tap M-1-i; with SYM_ODD the mirrored tap subtracts it. This
// halves the multipliers while keeping M-1 adders, the saving the parallel structures
// are built to exploit. Adders are of the kind KIND.
// y(k) = sum_{j<M} c(j) * x(k-j), combinational from x; the chain advances with en.
// Both symmetries and the shared-product transposed form follow the filter structure
// described for symmetric sub-filter blocks; odd M (a single centre multiplier) is
// this design's addition.
module subfilter_sym #(
  parameter int unsigned           M    = 12,
  parameter int unsigned           XW   = symfir_pkg::DATA_W + 1,
  parameter int unsigned           CW   = symfir_pkg::COEF_W + 1,
  parameter int unsigned           AW   = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND = symfir_pkg::ADD_BEC,
  parameter symfir_pkg::sym_e      SYM  = symfir_pkg::SYM_EVEN,
  localparam int unsigned          MH   = (M + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  input  logic signed [CW-1:0] c [MH],
  output logic signed [AW-1:0] y
);
  import symfir_pkg::*;

  // taps in the second half subtract when the set is antisymmetric
  function automatic logic [M-1:0] neg_mask();
    logic [M-1:0] m;
    m = '0;
    for (int j = 0; j < M; j++) m[j] = (SYM == SYM_ODD) && (j > M - 1 - j);
    return m;
  endfunction
  localparam logic [M-1:0] NEG = neg_mask();

  logic [AW-1:0] p [MH];
  logic [AW-1:0] q [M];
  logic [AW-1:0] yc;

  for (genvar i = 0; i < MH; i++) begin : g_mul
    logic signed [XW+CW-1:0] pr;
    assign pr   = x * c[i];
    assign p[i] = AW'(pr);
  end

  for (genvar j = 0; j < M; j++) begin : g_tap
    localparam int unsigned I = (j < M - 1 - j) ? j : M - 1 - j;
    assign q[j] = p[I];
  end

  tdf_chain #(.M(M), .AW(AW), .KIND(KIND), .NEG(NEG)) u_chain (
    .clk(clk), .rst_n(rst_n), .en(en), .q(q), .y(yc)
  );
  assign y = yc;

  initial assert (SYM == SYM_EVEN || SYM == SYM_ODD)
    else $fatal(1, "subfilter_sym needs SYM_EVEN or SYM_ODD");
endmodule
