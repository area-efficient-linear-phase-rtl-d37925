// ffa2_existing: 2-parallel fast FIR structure (2x2 FFA) for a general filter.
// Each cycle with en high it takes {x(2k), x(2k+1)} and produces {y(2k), y(2k+1)} of
// the length-T filter g, from three length-T/2 sub-filters H0 (even phase), H1 (odd
// phase) and H0+H1:
//   Y0 = H0X0 + z^-1 H1X1
//   Y1 = (H0+H1)(X0+X1) - H0X0 - H1X1
// One pre-processing adder, three post-processing adders, one register. None of the
// sub-filters is assumed symmetric. In this design it is the building block for the
// sub-filter without symmetry inside the 4-parallel cascade. Outputs are registered
// (latency one cycle) with OUT_REG = 1, combinational with OUT_REG = 0.
module ffa2_existing #(
  parameter int unsigned             T       = symfir_pkg::TAPS / 2,
  parameter int unsigned             XW      = symfir_pkg::DATA_W,
  parameter int unsigned             CW      = symfir_pkg::COEF_W,
  parameter int unsigned             AW      = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND    = symfir_pkg::ADD_BEC,
  parameter bit                      OUT_REG = 1'b1,
  localparam int unsigned            M       = T / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x [2],
  input  logic signed [CW-1:0] g [T],
  output logic signed [AW-1:0] y [2],
  output logic                 out_vld
);
  logic signed [XW:0]   xs;
  logic signed [CW-1:0] h0 [M];
  logic signed [CW-1:0] h1 [M];
  logic signed [CW:0]   hs [M];

  assign xs = (XW+1)'(x[0]) + x[1];
  for (genvar j = 0; j < M; j++) begin : g_coef
    assign h0[j] = g[2*j];
    assign h1[j] = g[2*j+1];
    assign hs[j] = (CW+1)'(g[2*j]) + g[2*j+1];
  end

  logic signed [AW-1:0] s0, s1, ss, s1_d;
  subfilter_fir #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND)) u_h0 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x[0]), .c(h0), .y(s0)
  );
  subfilter_fir #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND)) u_h1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x[1]), .c(h1), .y(s1)
  );
  subfilter_fir #(.M(M), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND)) u_hs (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xs), .c(hs), .y(ss)
  );

  logic signed [AW-1:0] yc [2];
  assign yc[0] = s0 + s1_d;
  assign yc[1] = ss - s0 - s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s1_d <= '0;
    else if (en) s1_d <= s1;
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

  initial assert (T % 2 == 0 && T >= 4) else $fatal(1, "ffa2_existing: T must be even and >= 4");
endmodule
