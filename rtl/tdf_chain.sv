// tdf_chain: the adder/register chain of a transposed direct-form FIR sub-filter.
// Inputs are the M tap products q[j] of the current sample; NEG[j] says whether tap j
// subtracts its product. The output is y(k) = sum_j (+/-) q_j(k-j): tap 0 is added
// combinationally, taps 1..M-1 reach the output through j registers.
// With KIND = ADD_CSA every register holds a sum and a carry vector and each tap is a
// 3:2 carry-save adder; one ripple-carry adder merges the pair at the output. With the
// other kinds the registers hold binary words and each tap is one carry-propagate adder
// of that kind. A subtraction adds the inverted product with carry-in 1.
// Timing: y is combinational from q; registers advance when en is high; rst_n clears
// them (asynchronous, active low). Requires M >= 2.
module tdf_chain #(
  parameter int unsigned           M    = 12,
  parameter int unsigned           AW   = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND = symfir_pkg::ADD_BEC,
  parameter logic [M-1:0]          NEG  = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [AW-1:0] q [M],
  output logic [AW-1:0] y
);
  import symfir_pkg::*;

  // operand of each tap, inverted when the tap subtracts
  logic [AW-1:0] qx [M];
  for (genvar j = 0; j < M; j++) begin : g_qx
    assign qx[j] = NEG[j] ? ~q[j] : q[j];
  end

  if (KIND == ADD_CSA) begin : g_cs
    logic [AW-1:0] rs [1:M-1];  // sum vectors
    logic [AW-1:0] rc [1:M-1];  // carry vectors
    logic [AW-1:0] ns [0:M-2];
    logic [AW-1:0] nc [0:M-2];

    for (genvar j = 0; j < M - 1; j++) begin : g_tap
      csa_3to2 #(.W(AW)) u_csa (
        .a(qx[j]), .b(rs[j+1]), .c(rc[j+1]), .cin(NEG[j]), .s(ns[j]), .cy(nc[j])
      );
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 1; j < M; j++) begin
          rs[j] <= '0;
          rc[j] <= '0;
        end
      end else if (en) begin
        for (int j = 1; j < M - 1; j++) begin
          rs[j] <= ns[j];
          rc[j] <= nc[j];
        end
        rs[M-1] <= qx[M-1];
        rc[M-1] <= AW'(NEG[M-1]);
      end
    end

    logic cout_unused;
    rca_adder #(.W(AW)) u_merge (
      .a(ns[0]), .b(nc[0]), .cin(1'b0), .s(y), .cout(cout_unused)
    );
  end else begin : g_cp
    logic [AW-1:0] r  [1:M-1];
    logic [AW-1:0] nr [0:M-1];

    for (genvar j = 0; j < M - 1; j++) begin : g_tap
      cpa_adder #(.W(AW), .KIND(KIND)) u_add (
        .a(r[j+1]), .b(qx[j]), .cin(NEG[j]), .s(nr[j])
      );
    end
    if (NEG[M-1]) begin : g_last_neg
      cpa_adder #(.W(AW), .KIND(KIND)) u_add (
        .a('0), .b(qx[M-1]), .cin(1'b1), .s(nr[M-1])
      );
    end else begin : g_last_pos
      assign nr[M-1] = qx[M-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 1; j < M; j++) r[j] <= '0;
      end else if (en) begin
        for (int j = 1; j < M; j++) r[j] <= nr[j];
      end
    end

    assign y = nr[0];
  end

  initial assert (M >= 2) else $fatal(1, "tdf_chain needs M >= 2");
endmodule
