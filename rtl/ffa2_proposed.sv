// ffa2_proposed: 2-parallel FIR structure for a filter with symmetric coefficients.
// Each cycle with en high it takes the block x = {x(2k), x(2k+1)} and produces
// y = {y(2k), y(2k+1)} of the length-T filter g. With the even phase H0 = g(0),g(2),...
// and the odd phase H1 = g(1),g(3),..., and A = (H0+H1)(X0+X1), B = (H0-H1)(X0-X1):
//   Y1 = (A - B)/2
//   Y0 = (A + B)/2 - H1X1 + z^-1 H1X1        (z^-1: one block period)
// Three length-T/2 sub-filters. When g is even-symmetric, H0+H1 is even-symmetric and
// H0-H1 odd-symmetric, so both are built with half the multipliers (subfilter_sym);
// only H1 needs a full sub-filter. With PSYM = SYM_ODD (an antisymmetric g, as in the
// second level of the 4-parallel cascade) the two symmetries swap. Pre-processing: two
// adders; post-processing: four adders and one register.
// A+B and A-B are always even, so the halvings are exact shifts: the output is the
// exact full-precision convolution. With OUT_REG = 1 the outputs are registered
// (latency one cycle, out_vld marks them); with OUT_REG = 0 y is combinational from x.
// The equations and sub-filter symmetries follow the proposed 2-parallel structure;
// the exact halving, the register placement and the enable are this design's choices.
module ffa2_proposed #(
  parameter int unsigned             T       = symfir_pkg::TAPS,
  parameter int unsigned             XW      = symfir_pkg::DATA_W,
  parameter int unsigned             CW      = symfir_pkg::COEF_W,
  parameter int unsigned             AW      = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND    = symfir_pkg::ADD_BEC,
  parameter symfir_pkg::sym_e        PSYM    = symfir_pkg::SYM_EVEN,
  parameter bit                      OUT_REG = 1'b1,
  localparam int unsigned            M       = T / 2,
  localparam int unsigned            MH      = (M + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x [2],
  input  logic signed [CW-1:0] g [T],
  output logic signed [AW-1:0] y [2],
  output logic                 out_vld
);
  import symfir_pkg::*;

  localparam sym_e SYM_S = (PSYM == SYM_ODD) ? SYM_ODD : SYM_EVEN;  // H0+H1
  localparam sym_e SYM_D = (PSYM == SYM_ODD) ? SYM_EVEN : SYM_ODD;  // H0-H1

  // pre-processing
  logic signed [XW:0] xs, xd;
  assign xs = (XW+1)'(x[0]) + x[1];
  assign xd = (XW+1)'(x[0]) - x[1];

  // sub-filter coefficients (first halves of the symmetric sets)
  logic signed [CW:0]   cs [MH];
  logic signed [CW:0]   cd [MH];
  logic signed [CW-1:0] h1 [M];
  for (genvar i = 0; i < MH; i++) begin : g_cs
    assign cs[i] = (CW+1)'(g[2*i]) + g[2*i+1];
    assign cd[i] = (CW+1)'(g[2*i]) - g[2*i+1];
  end
  for (genvar j = 0; j < M; j++) begin : g_h1
    assign h1[j] = g[2*j+1];
  end

  logic signed [AW-1:0] sa, sb, sc;
  subfilter_sym #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .SYM(SYM_S)) u_sum (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xs), .c(cs), .y(sa)
  );
  subfilter_sym #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .SYM(SYM_D)) u_dif (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xd), .c(cd), .y(sb)
  );
  subfilter_fir #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND)) u_h1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x[1]), .c(h1), .y(sc)
  );

  // post-processing
  logic signed [AW-1:0] pab, qab, sc_d;
  logic signed [AW-1:0] yc [2];
  assign pab   = sa + sb;
  assign qab   = sa - sb;
  assign yc[0] = (pab >>> 1) - sc + sc_d;
  assign yc[1] = qab >>> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sc_d <= '0;
    else if (en) sc_d <= sc;
  end

  if (OUT_REG) begin : g_oreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        y[0]    <= '0;
        y[1]    <= '0;
        out_vld <= 1'b0;
      end else begin
        out_vld <= en;
        if (en) begin
          y[0] <= yc[0];
          y[1] <= yc[1];
        end
      end
    end
  end else begin : g_ocomb
    assign y       = yc;
    assign out_vld = en;
  end

  // the coefficient set must have the symmetry the structure relies on
  function automatic logic sym_ok(input logic signed [CW-1:0] gg [T]);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < T; i++)
      if (PSYM == SYM_ODD) ok &= (gg[i] == -gg[T-1-i]);
      else                 ok &= (gg[i] ==  gg[T-1-i]);
    return ok;
  endfunction

  a_sym : assert property (@(posedge clk) disable iff (!rst_n) en |-> sym_ok(g))
    else $error("ffa2_proposed: coefficients lack the expected symmetry");

  initial assert (T % 2 == 0 && T >= 4 && PSYM != SYM_NONE)
    else $fatal(1, "ffa2_proposed: T must be even and >= 4, PSYM even or odd");
endmodule
