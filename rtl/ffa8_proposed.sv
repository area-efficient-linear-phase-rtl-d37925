// ffa8_proposed: 8-parallel FIR structure for an even-symmetric filter (N a
// multiple of 8), the proposed 2x2 structure cascaded with the 4-parallel ones.
// Each cycle with en high it takes {x(8k) .. x(8k+7)} and produces the same
// output block.
// First level: the proposed 2x2 equations on the 4-parallel streams
// X0' = {x(8k), x(8k+2), ..} and X1' = {x(8k+1), x(8k+3), ..}, with the even and
// odd phases H0', H1' of g (length N/2):
//   Y1' = (A' - B')/2      Y0' = (A' + B')/2 - C' + z'^-1 C'
// A' = (H0'+H1')(X0'+X1') and B' = (H0'-H1')(X0'-X1') come from 4-parallel proposed
// structures (H0'+H1' even-symmetric, H0'-H1' antisymmetric: ffa4_proposed with
// PSYM even and odd); C' = H1'X1' has no symmetry and uses the 4-parallel fast FIR
// structure ffa4_existing. z'^-1 delays a 4-parallel signal by one sample:
// {s(4k), .., s(4k+3)} becomes {s(4k-1), s(4k), .., s(4k+2)}: one register.
// This gives 27 sub-filters of length N/8, 8 of them with symmetry, against one
// for the fast FIR structure without the rearrangement. Outputs registered (latency
// one cycle) with OUT_REG = 1. The cascade order (2x2 first, then 4-parallel) and the
// choice per branch follow the cascading rule of the proposed design.
module ffa8_proposed #(
  parameter int unsigned             N       = symfir_pkg::TAPS,
  parameter int unsigned             XW      = symfir_pkg::DATA_W,
  parameter int unsigned             CW      = symfir_pkg::COEF_W,
  parameter int unsigned             AW      = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND    = symfir_pkg::ADD_BEC,
  parameter bit                      OUT_REG = 1'b1,
  localparam int unsigned            P       = 4,
  localparam int unsigned            T       = N / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW-1:0] x [2*P],
  input  logic signed [CW-1:0] g [N],
  output logic signed [AW-1:0] y [2*P],
  output logic                 out_vld
);
  import symfir_pkg::*;

  // first-level pre-processing on P-parallel signals
  logic signed [XW:0]   xs [P];
  logic signed [XW:0]   xd [P];
  logic signed [XW-1:0] xo [P];
  for (genvar i = 0; i < P; i++) begin : g_pre
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

  logic signed [AW-1:0] ra [P];
  logic signed [AW-1:0] rb [P];
  logic signed [AW-1:0] rc [P];
  logic                 va, vb, vc;

  ffa4_proposed #(.N(T), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .PSYM(SYM_EVEN),
                  .OUT_REG(1'b0)) u_sum (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xs), .g(gs), .y(ra), .out_vld(va)
  );
  ffa4_proposed #(.N(T), .XW(XW+1), .CW(CW+1), .AW(AW), .KIND(KIND), .PSYM(SYM_ODD),
                  .OUT_REG(1'b0)) u_dif (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xd), .g(gd), .y(rb), .out_vld(vb)
  );
  ffa4_existing #(.N(T), .XW(XW), .CW(CW), .AW(AW), .KIND(KIND), .OUT_REG(1'b0)) u_odd (
    .clk(clk), .rst_n(rst_n), .en(en), .x(xo), .g(go), .y(rc), .out_vld(vc)
  );

  // first-level post-processing
  logic signed [AW-1:0] sp [P];
  logic signed [AW-1:0] sm [P];
  logic signed [AW-1:0] zc [P];  // z'^-1 C'
  logic signed [AW-1:0] rc_last_d;
  logic signed [AW-1:0] yc [2*P];
  assign zc[0] = rc_last_d;
  for (genvar i = 0; i < P; i++) begin : g_post
    if (i > 0) begin : g_z
      assign zc[i] = rc[i-1];
    end
    assign sp[i]     = ra[i] + rb[i];
    assign sm[i]     = ra[i] - rb[i];
    assign yc[2*i]   = (sp[i] >>> 1) - rc[i] + zc[i];  // Y0'
    assign yc[2*i+1] = sm[i] >>> 1;                    // Y1'
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rc_last_d <= '0;
    else if (en) rc_last_d <= rc[P-1];
  end

  if (OUT_REG) begin : g_oreg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < 2 * P; i++) y[i] <= '0;
        out_vld <= 1'b0;
      end else begin
        out_vld <= en;
        if (en) for (int i = 0; i < 2 * P; i++) y[i] <= yc[i];
      end
    end
  end else begin : g_ocomb
    assign y       = yc;
    assign out_vld = en;
  end

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) (va == en) && (vb == en) && (vc == en))
    else $error("ffa8_proposed: branch enables diverged");

  initial assert (N % 8 == 0 && N >= 16) else $fatal(1, "ffa8_proposed: N must be a multiple of 8");
endmodule
