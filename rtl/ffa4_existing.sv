// ffa4_existing: 4-parallel fast FIR structure for a general filter, the 2x2 FFA
// applied twice. First level on the sample-pair streams X0' = {x(4k), x(4k+2)} and
// X1' = {x(4k+1), x(4k+3)} with the even and odd phases H0', H1' of g:
//   Y0' = H0'X0' + z'^-1 H1'X1'      Y1' = (H0'+H1')(X0'+X1') - H0'X0' - H1'X1'
// where each product is a 2-parallel filter of length N/2 built with ffa2_existing,
// and z'^-1 delays a 2-parallel signal by one sample pair ({s(2k), s(2k+1)} becomes
// {s(2k-1), s(2k)}). Nine length-N/4 sub-filters, none assumed symmetric. In this
// design it serves the branch without symmetry inside the 8-parallel cascade.
// Outputs registered (latency one cycle) with OUT_REG = 1, combinational otherwise.
module ffa4_existing #(
  parameter int unsigned             N       = symfir_pkg::TAPS / 2,
  parameter int unsigned             XW      = symfir_pkg::DATA_W,
  parameter int unsigned             CW      = symfir_pkg::COEF_W,
  parameter int unsigned             AW      = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND    = symfir_pkg::ADD_BEC,
  parameter bit                      OUT_REG = 1'b1,
  localparam int unsigned            T       = N / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x [4],
  input  logic signed [CW-1:0] g [N],
  output logic signed [AW-1:0] y [4],
  output logic                 out_vld
);
  logic signed [XW-1:0] xe [2];
  logic signed [XW-1:0] xo [2];
  logic signed [XW:0]   xs [2];
  for (genvar i = 0; i < 2; i++) begin : g_pre
    assign xe[i] = x[2*i];
    assign xo[i] = x[2*i+1];
    assign xs[i] = (XW+1)'(x[2*i]) + x[2*i+1];
  end

  logic signed [CW-1:0] ge [T];
  logic signed [CW-1:0] go [T];
  logic signed [CW:0]   gs [T];
  for (genvar j = 0; j < T; j++) begin : g_coef
    assign ge[j] = g[2*j];
    assign go[j] = g[2*j+1];
    assign gs[j] = (CW+1)'(g[2*j]) + g[2*j+1];
  end

  logic signed [AW-1:0] re [2];
  logic signed [AW-1:0] ro [2];
  logic signed [AW-1:0] rs [2];
  logic                 ve, vo, vs;
  ffa2_existing #(.T(T), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND), .OUT_REG(1'b0)) u_even (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xe), .g(ge), .y(re), .out_vld(ve)
  );
  ffa2_existing #(.T(T), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND), .OUT_REG(1'b0)) u_odd (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xo), .g(go), .y(ro), .out_vld(vo)
  );
  ffa2_existing #(.T(T), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .OUT_REG(1'b0)) u_sum (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xs), .g(gs), .y(rs), .out_vld(vs)
  );

  logic signed [AW-1:0] ro1_d;
  logic signed [AW-1:0] yc [4];
  assign yc[0] = re[0] + ro1_d;
  assign yc[2] = re[1] + ro[0];
  assign yc[1] = rs[0] - re[0] - ro[0];
  assign yc[3] = rs[1] - re[1] - ro[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  ro1_d <= '0;
    else if (en) ro1_d <= ro[1];
  end

  if (OUT_REG) begin : g_oreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < 4; i++) y[i] <= '0;
        out_vld <= 1'b0;
      end else begin
        out_vld <= en;
        if (en) for (int i = 0; i < 4; i++) y[i] <= yc[i];
      end
    end
  end else begin : g_ocomb
    assign y       = yc;
    assign out_vld = en;
  end

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) (ve == en) && (vo == en) && (vs == en))
    else $error("ffa4_existing: branch enables diverged");

  initial assert (N % 4 == 0 && N >= 8) else $fatal(1, "ffa4_existing: N must be a multiple of 4, >= 8");
endmodule
