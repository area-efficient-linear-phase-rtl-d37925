// cpa_adder: carry-propagate adder of the kind chosen by KIND.
// Selects, at elaboration, the uniform carry-select, square-root carry-select or
// binary-to-excess-1 carry-select adder; ADD_CSA (which has no two-operand adder of
// its own) maps to a ripple-carry adder, the merge adder of the carry-save delay line.
// Combinational; s = a + b + cin modulo 2^W.
module cpa_adder #(
  parameter int unsigned           W    = symfir_pkg::ACC_W,
  parameter symfir_pkg::adder_kind_e KIND = symfir_pkg::ADD_BEC
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);
  import symfir_pkg::*;
  logic cout_unused;

  if (KIND == ADD_CSLA) begin : g_csla
    csla_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout_unused));
  end else if (KIND == ADD_SQRT_CSLA) begin : g_sqrt
    sqrt_csla_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout_unused));
  end else if (KIND == ADD_BEC) begin : g_bec
    bec_csla_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout_unused));
  end else begin : g_rca
    rca_adder #(.W(W)) u_add (.a(a), .b(b), .cin(cin), .s(s), .cout(cout_unused));
  end
endmodule
