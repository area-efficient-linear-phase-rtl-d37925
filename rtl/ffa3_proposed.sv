// ffa3_proposed: 3-parallel FIR structure for a symmetric filter whose length N is a
// multiple of 3 (even-symmetric, or antisymmetric with PSYM = SYM_ODD, the form used
// inside the 6-parallel cascade). Each cycle with en high it takes {x(3k), x(3k+1), x(3k+2)} and
// produces {y(3k), y(3k+1), y(3k+2)}. With the polyphase parts H0 = g(3i),
// H1 = g(3i+1), H2 = g(3i+2) and the six length-N/3 sub-filter outputs
//   A01 = (H0+H1)(X0+X1)   B01 = (H0-H1)(X0-X1)   C = H1X1
//   S   = (H0+H1+H2)(X0+X1+X2)
//   A02 = (H0+H2)(X0+X2)   B02 = (H0-H2)(X0-X2)
// and P01 = (A01+B01)/2, Q01 = (A01-B01)/2, P02 = (A02+B02)/2, Q02 = (A02-B02)/2:
//   Y0 = P01 - C + z^-1 (S - A02 - Q01 - C)
//   Y1 = Q01     + z^-1 (P02 - P01 + C)
//   Y2 = Q02 + C
// For an even-symmetric g, H1, H0+H2 and H0+H1+H2 are even-symmetric and H0-H2
// odd-symmetric; for an antisymmetric g the four symmetries swap. Either way four of
// the six sub-filters use half the multipliers (subfilter_sym); H0+H1, H0-H1 are general.
// Halvings are exact, the output is the exact convolution. Outputs registered
// (latency one cycle) with OUT_REG = 1.
// The sub-filter set and the Y0 equation follow the proposed 3-parallel structure;
// Y1 is written with a + before its delayed term and Y2 is derived from
// Y2 = H0X2 + H1X1 + H2X0 with the same six sub-filters (see the README).
module ffa3_proposed #(
  parameter int unsigned             N       = symfir_pkg::TAPS,
  parameter int unsigned             XW      = symfir_pkg::DATA_W,
  parameter int unsigned             CW      = symfir_pkg::COEF_W,
  parameter int unsigned             AW      = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND    = symfir_pkg::ADD_BEC,
  parameter symfir_pkg::sym_e        PSYM    = symfir_pkg::SYM_EVEN,
  parameter bit                      OUT_REG = 1'b1,
  localparam int unsigned            M       = N / 3,
  localparam int unsigned            MH      = (M + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x [3],
  input  logic signed [CW-1:0] g [N],
  output logic signed [AW-1:0] y [3],
  output logic                 out_vld
);
  import symfir_pkg::*;

  localparam sym_e SYM_P = (PSYM == SYM_ODD) ? SYM_ODD : SYM_EVEN;  // H1, H0+H2, H0+H1+H2
  localparam sym_e SYM_M = (PSYM == SYM_ODD) ? SYM_EVEN : SYM_ODD;  // H0-H2

  // pre-processing: five adders
  logic signed [XW:0]   x01s, x01d, x02s, x02d;
  logic signed [XW+1:0] x012;
  assign x01s = (XW+1)'(x[0]) + x[1];
  assign x01d = (XW+1)'(x[0]) - x[1];
  assign x02s = (XW+1)'(x[0]) + x[2];
  assign x02d = (XW+1)'(x[0]) - x[2];
  assign x012 = (XW+2)'(x02s) + (XW+2)'(x[1]);

  // sub-filter coefficients
  logic signed [CW:0]   c01s [M];
  logic signed [CW:0]   c01d [M];
  logic signed [CW-1:0] c1   [MH];
  logic signed [CW+1:0] c012 [MH];
  logic signed [CW:0]   c02s [MH];
  logic signed [CW:0]   c02d [MH];
  for (genvar j = 0; j < M; j++) begin : g_cg
    assign c01s[j] = (CW+1)'(g[3*j]) + g[3*j+1];
    assign c01d[j] = (CW+1)'(g[3*j]) - g[3*j+1];
  end
  for (genvar i = 0; i < MH; i++) begin : g_cs
    assign c1[i]   = g[3*i+1];
    assign c02s[i] = (CW+1)'(g[3*i]) + g[3*i+2];
    assign c02d[i] = (CW+1)'(g[3*i]) - g[3*i+2];
    assign c012[i] = (CW+2)'(c02s[i]) + (CW+2)'(g[3*i+1]);
  end

  logic signed [AW-1:0] a01, b01, cc, ss, a02, b02;
  subfilter_fir #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND)) u_a01 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x01s), .c(c01s), .y(a01)
  );
  subfilter_fir #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND)) u_b01 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x01d), .c(c01d), .y(b01)
  );
  subfilter_sym #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND), .SYM(SYM_P)) u_c1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x[1]), .c(c1), .y(cc)
  );
  subfilter_sym #(.M(M), .XW(XW+2), .CW(CW+2), .AW(AW), .KIND(KIND), .SYM(SYM_P)) u_s012 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x012), .c(c012), .y(ss)
  );
  subfilter_sym #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .SYM(SYM_P)) u_a02 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x02s), .c(c02s), .y(a02)
  );
  subfilter_sym #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .SYM(SYM_M)) u_b02 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x02d), .c(c02d), .y(b02)
  );

  // post-processing
  logic signed [AW-1:0] s01p, s01m, s02p, s02m;
  logic signed [AW-1:0] p01, q01, p02, q02;
  logic signed [AW-1:0] u0, u1, u0_d, u1_d;
  logic signed [AW-1:0] yc [3];
  assign s01p = a01 + b01;
  assign s01m = a01 - b01;
  assign s02p = a02 + b02;
  assign s02m = a02 - b02;
  assign p01  = s01p >>> 1;
  assign q01  = s01m >>> 1;
  assign p02  = s02p >>> 1;
  assign q02  = s02m >>> 1;
  assign u0   = ss - a02 - q01 - cc;   // H1X2 + H2X1
  assign u1   = p02 - p01 + cc;        // H2X2
  assign yc[0] = p01 - cc + u0_d;
  assign yc[1] = q01 + u1_d;
  assign yc[2] = q02 + cc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u0_d <= '0;
      u1_d <= '0;
    end else if (en) begin
      u0_d <= u0;
      u1_d <= u1;
    end
  end

  if (OUT_REG) begin : g_oreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < 3; i++) y[i] <= '0;
        out_vld <= 1'b0;
      end else begin
        out_vld <= en;
        if (en) for (int i = 0; i < 3; i++) y[i] <= yc[i];
      end
    end
  end else begin : g_ocomb
    assign y       = yc;
    assign out_vld = en;
  end

  initial assert (N % 3 == 0 && N >= 6 && PSYM != SYM_NONE) else $fatal(1, "ffa3_proposed: N must be a multiple of 3, >= 6");
endmodule
