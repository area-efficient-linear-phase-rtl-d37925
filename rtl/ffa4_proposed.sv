// ffa4_proposed: 4-parallel FIR structure for a symmetric filter (N a multiple of 4),
// built by cascading 2-parallel structures. PSYM = SYM_ODD serves an antisymmetric
// filter (the form used inside the 8-parallel cascade): the two symmetries swap. Each cycle with en high it takes
// {x(4k) .. x(4k+3)} and produces {y(4k) .. y(4k+3)}.
// First level: the proposed 2x2 structure on the sample pairs. The even stream
// X0' = {x(4k), x(4k+2)} and odd stream X1' = {x(4k+1), x(4k+3)} are themselves
// 2-parallel signals; H0', H1' are the even and odd phases of g (length N/2 each).
//   A' = (H0'+H1')(X0'+X1')   B' = (H0'-H1')(X0'-X1')   C' = H1'X1'
//   Y1' = (A' - B')/2         Y0' = (A' + B')/2 - C' + z'^-1 C'
// Second level: each product above is a 2-parallel filter of length N/2. For an
// even-symmetric g, H0'+H1' is even-symmetric and H0'-H1' odd-symmetric, so both use the proposed 2x2 structure
// (ffa2_proposed); H1' has no symmetry and uses the existing 2x2 FFA (ffa2_existing).
// Of the nine length-N/4 sub-filters, four are built with half the multipliers.
// z'^-1 delays a 2-parallel signal by one sample pair: {s(2k), s(2k+1)} becomes
// {s(2k-1), s(2k)}, one register. Outputs registered (latency one cycle) with
// OUT_REG = 1. The choice of structure per branch follows the cascading rule of the
// proposed design (proposed 2x2 where symmetry exists, existing FFA elsewhere).
module ffa4_proposed #(
  parameter int unsigned             N       = symfir_pkg::TAPS,
  parameter int unsigned             XW      = symfir_pkg::DATA_W,
  parameter int unsigned             CW      = symfir_pkg::COEF_W,
  parameter int unsigned             AW      = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND    = symfir_pkg::ADD_BEC,
  parameter symfir_pkg::sym_e        PSYM    = symfir_pkg::SYM_EVEN,
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
  import symfir_pkg::*;

  localparam sym_e SYM_S = (PSYM == SYM_ODD) ? SYM_ODD : SYM_EVEN;  // H0'+H1'
  localparam sym_e SYM_D = (PSYM == SYM_ODD) ? SYM_EVEN : SYM_ODD;  // H0'-H1'

  // first-level pre-processing on 2-parallel signals
  logic signed [XW:0]   xs [2];
  logic signed [XW:0]   xd [2];
  logic signed [XW-1:0] xo [2];
  for (genvar i = 0; i < 2; i++) begin : g_pre
    assign xs[i] = (XW+1)'(x[2*i]) + x[2*i+1];
    assign xd[i] = (XW+1)'(x[2*i]) - x[2*i+1];
    assign xo[i] = x[2*i+1];
  end

  // first-level coefficient sets (length N/2)
  logic signed [CW:0]   gs [T];
  logic signed [CW:0]   gd [T];
  logic signed [CW-1:0] go [T];
  for (genvar j = 0; j < T; j++) begin : g_coef
    assign gs[j] = (CW+1)'(g[2*j]) + g[2*j+1];
    assign gd[j] = (CW+1)'(g[2*j]) - g[2*j+1];
    assign go[j] = g[2*j+1];
  end

  logic signed [AW-1:0] ra [2];
  logic signed [AW-1:0] rb [2];
  logic signed [AW-1:0] rc [2];
  logic                 va, vb, vc;

  ffa2_proposed #(.T(T), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .PSYM(SYM_S),
                  .OUT_REG(1'b0)) u_sum (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xs), .g(gs), .y(ra), .out_vld(va)
  );
  ffa2_proposed #(.T(T), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .PSYM(SYM_D),
                  .OUT_REG(1'b0)) u_dif (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xd), .g(gd), .y(rb), .out_vld(vb)
  );
  ffa2_existing #(.T(T), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND), .OUT_REG(1'b0)) u_odd (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xo), .g(go), .y(rc), .out_vld(vc)
  );

  // first-level post-processing
  logic signed [AW-1:0] sp [2];
  logic signed [AW-1:0] sm [2];
  logic signed [AW-1:0] rc1_d;
  logic signed [AW-1:0] yc [4];
  for (genvar i = 0; i < 2; i++) begin : g_post
    assign sp[i] = ra[i] + rb[i];
    assign sm[i] = ra[i] - rb[i];
    assign yc[2*i+1] = sm[i] >>> 1;       // Y1'
  end
  assign yc[0] = (sp[0] >>> 1) - rc[0] + rc1_d;  // Y0', even sample pair element
  assign yc[2] = (sp[1] >>> 1) - rc[1] + rc[0];  // Y0', odd sample pair element

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rc1_d <= '0;
    else if (en) rc1_d <= rc[1];
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

  // the three branches run in lock step
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) (va == en) && (vb == en) && (vc == en))
    else $error("ffa4_proposed: branch enables diverged");

  initial assert (N % 4 == 0 && N >= 8 && PSYM != SYM_NONE) else $fatal(1, "ffa4_proposed: N must be a multiple of 4, >= 8");
endmodule
