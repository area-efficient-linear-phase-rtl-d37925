// subfilter_fir: length-M FIR sub-filter with a general coefficient set.
// y(k) = sum_{j<M} c[j] * x(k-j), where k counts block periods (one sample of this
// sub-filter per cycle with en high). One full-precision XW x CW multiplier per tap;
// the products, sign-extended to AW bits, feed a transposed direct-form chain whose
// adders are of the kind KIND. This serves the sub-filters of a fast FIR structure
// that have no coefficient symmetry. y is combinational from x and c; the chain
// registers advance with en. The transposed form is this design's choice.
module subfilter_fir #(
  parameter int unsigned           M    = 12,
  parameter int unsigned           XW   = symfir_pkg::DATA_W + 1,
  parameter int unsigned           CW   = symfir_pkg::COEF_W + 1,
  parameter int unsigned           AW   = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND = symfir_pkg::ADD_BEC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  input  logic signed [CW-1:0] c [M],
  output logic signed [AW-1:0] y
);
  logic [AW-1:0] q [M];
  logic [AW-1:0] yc;

  for (genvar j = 0; j < M; j++) begin : g_mul
    logic signed [XW+CW-1:0] p;
    assign p    = x * c[j];
    assign q[j] = AW'(p);  // sign-extends p
  end

  tdf_chain #(.M(M), .AW(AW), .KIND(KIND), .NEG('0)) u_chain (
    .clk(clk), .rst_n(rst_n), .en(en), .q(q), .y(yc)
  );
  assign y = yc;
endmodule
