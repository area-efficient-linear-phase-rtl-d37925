// symfir_top: 2-, 3-, 4-, 6- and 8-parallel linear-phase FIR filters built on the fast FIR
// structures that exploit coefficient symmetry.
// All five filters implement the same even-symmetric N-tap filter h, h(N-1-i) = h(i),
// given as its first half h_half = h(0..N/2-1) (run-time inputs, so the multipliers are
// full W x W multipliers). Each filter has its own block input, enable and output:
//   L=2: ffa2_proposed, x2 = {x(2k), x(2k+1)}     (3 sub-filters, 2 symmetric)
//   L=3: ffa3_proposed, x3 = {x(3k) .. x(3k+2)}   (6 sub-filters, 4 symmetric)
//   L=4: ffa4_proposed, x4 = {x(4k) .. x(4k+3)}   (9 sub-filters, 4 symmetric)
//   L=6: ffa6_proposed, x6 = {x(6k) .. x(6k+5)}   (18 sub-filters, 8 symmetric)
//   L=8: ffa8_proposed, x8 = {x(8k) .. x(8k+7)}   (27 sub-filters, 8 symmetric)
// A block is accepted each cycle its enable is high; the output block appears one
// cycle later with its valid high. Outputs are exact AW-bit convolutions. KIND selects
// the adder used inside all sub-filters. Which parallel factor is the main one is not
// fixed by the structure; all five are provided side by side.
module symfir_top #(
  parameter int unsigned             N    = symfir_pkg::TAPS,
  parameter int unsigned             W    = symfir_pkg::DATA_W,
  parameter int unsigned             AW   = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND = symfir_pkg::ADD_BEC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] h_half [N/2],
  // 2-parallel
  input  logic                en2,
  input  logic signed [W-1:0] x2 [2],
  output logic signed [AW-1:0] y2 [2],
  output logic                vld2,
  // 3-parallel
  input  logic                en3,
  input  logic signed [W-1:0] x3 [3],
  output logic signed [AW-1:0] y3 [3],
  output logic                vld3,
  // 4-parallel
  input  logic                en4,
  input  logic signed [W-1:0] x4 [4],
  output logic signed [AW-1:0] y4 [4],
  output logic                vld4,
  // 6-parallel
  input  logic                en6,
  input  logic signed [W-1:0] x6 [6],
  output logic signed [AW-1:0] y6 [6],
  output logic                vld6,
  // 8-parallel
  input  logic                en8,
  input  logic signed [W-1:0] x8 [8],
  output logic signed [AW-1:0] y8 [8],
  output logic                vld8
);
  import symfir_pkg::*;

  logic signed [W-1:0] h [N];
  for (genvar i = 0; i < N; i++) begin : g_h
    localparam int unsigned SRC = (i < N / 2) ? i : N - 1 - i;
    assign h[i] = h_half[SRC];
  end

  ffa2_proposed #(.T(N), .XW(W), .CW(W), .AW(AW), .KIND(KIND), .PSYM(SYM_EVEN)) u_p2 (
    .clk(clk), .rst_n(rst_n), .en(en2), .x(x2), .g(h), .y(y2), .out_vld(vld2)
  );
  ffa3_proposed #(.N(N), .XW(W), .CW(W), .AW(AW), .KIND(KIND)) u_p3 (
    .clk(clk), .rst_n(rst_n), .en(en3), .x(x3), .g(h), .y(y3), .out_vld(vld3)
  );
  ffa4_proposed #(.N(N), .XW(W), .CW(W), .AW(AW), .KIND(KIND)) u_p4 (
    .clk(clk), .rst_n(rst_n), .en(en4), .x(x4), .g(h), .y(y4), .out_vld(vld4)
  );

  ffa6_proposed #(.N(N), .XW(W), .CW(W), .AW(AW), .KIND(KIND)) u_p6 (
    .clk(clk), .rst_n(rst_n), .en(en6), .x(x6), .g(h), .y(y6), .out_vld(vld6)
  );
  ffa8_proposed #(.N(N), .XW(W), .CW(W), .AW(AW), .KIND(KIND)) u_p8 (
    .clk(clk), .rst_n(rst_n), .en(en8), .x(x8), .g(h), .y(y8), .out_vld(vld8)
  );

  initial assert (N % 24 == 0) else $fatal(1, "symfir_top: N must be a multiple of 24");
endmodule
