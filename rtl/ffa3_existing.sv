// ffa3_existing: 3-parallel fast FIR structure (3x3 FFA) for a general filter.
// Each cycle with en high it takes {x(3k), x(3k+1), x(3k+2)} and produces
// {y(3k), y(3k+1), y(3k+2)} of the length-N filter g from six length-N/3 sub-filters
// H0, H1, H2, H0+H1, H1+H2 and H0+H1+H2 (H0 = g(3i), H1 = g(3i+1), H2 = g(3i+2)):
//   D  = H0X0 - z^-1 H2X2
//   E  = (H0+H1)(X0+X1) - H1X1       F = (H1+H2)(X1+X2) - H1X1
//   Y0 = D + z^-1 F     Y1 = E - D     Y2 = (H0+H1+H2)(X0+X1+X2) - E - F
// None of the sub-filters is assumed symmetric. In this design it serves the branch
// without symmetry inside the 6-parallel cascade. Outputs registered (latency one
// cycle) with OUT_REG = 1, combinational with OUT_REG = 0.
module ffa3_existing #(
  parameter int unsigned             N       = symfir_pkg::TAPS / 2,
  parameter int unsigned             XW      = symfir_pkg::DATA_W,
  parameter int unsigned             CW      = symfir_pkg::COEF_W,
  parameter int unsigned             AW      = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND    = symfir_pkg::ADD_BEC,
  parameter bit                      OUT_REG = 1'b1,
  localparam int unsigned            M       = N / 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x [3],
  input  logic signed [CW-1:0] g [N],
  output logic signed [AW-1:0] y [3],
  output logic                 out_vld
);
  // pre-processing: three adders
  logic signed [XW:0]   x01, x12;
  logic signed [XW+1:0] x012;
  assign x01  = (XW+1)'(x[0]) + x[1];
  assign x12  = (XW+1)'(x[1]) + x[2];
  assign x012 = (XW+2)'(x01) + (XW+2)'(x[2]);

  logic signed [CW-1:0] h0 [M];
  logic signed [CW-1:0] h1 [M];
  logic signed [CW-1:0] h2 [M];
  logic signed [CW:0]   h01 [M];
  logic signed [CW:0]   h12 [M];
  logic signed [CW+1:0] h012 [M];
  for (genvar j = 0; j < M; j++) begin : g_coef
    assign h0[j]   = g[3*j];
    assign h1[j]   = g[3*j+1];
    assign h2[j]   = g[3*j+2];
    assign h01[j]  = (CW+1)'(g[3*j]) + g[3*j+1];
    assign h12[j]  = (CW+1)'(g[3*j+1]) + g[3*j+2];
    assign h012[j] = (CW+2)'(h01[j]) + (CW+2)'(g[3*j+2]);
  end

  logic signed [AW-1:0] s0, s1, s2, s01, s12, s012;
  subfilter_fir #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND)) u_h0 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x[0]), .c(h0), .y(s0)
  );
  subfilter_fir #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND)) u_h1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x[1]), .c(h1), .y(s1)
  );
  subfilter_fir #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND)) u_h2 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x[2]), .c(h2), .y(s2)
  );
  subfilter_fir #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND)) u_h01 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x01), .c(h01), .y(s01)
  );
  subfilter_fir #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND)) u_h12 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x12), .c(h12), .y(s12)
  );
  subfilter_fir #(.M(M), .XW(XW+2), .CW(CW+2), .AW(AW), .KIND(KIND)) u_h012 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x012), .c(h012), .y(s012)
  );

  // post-processing
  logic signed [AW-1:0] s2_d, f_d, d, e, f;
  logic signed [AW-1:0] yc [3];
  assign d     = s0 - s2_d;
  assign e     = s01 - s1;
  assign f     = s12 - s1;
  assign yc[0] = d + f_d;
  assign yc[1] = e - d;
  assign yc[2] = s012 - e - f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_d <= '0;
      f_d  <= '0;
    end else if (en) begin
      s2_d <= s2;
      f_d  <= f;
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

  initial assert (N % 3 == 0 && N >= 6) else $fatal(1, "ffa3_existing: N must be a multiple of 3, >= 6");
endmodule
