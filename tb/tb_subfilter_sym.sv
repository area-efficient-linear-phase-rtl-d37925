// tb_subfilter_sym: self-checking test of the symmetric / antisymmetric sub-filter.
// Ten instances: even and odd symmetry for each of the four adder kinds at M = 12,
// plus even and odd symmetry at the odd length M = 7. They share the input x, the
// enable and a random first half of the coefficients; the full sets c(j) = +/-c(M-1-j)
// are formed here. x changes every cycle and en is high about three cycles in four,
// so held cycles (no advance) are exercised. Before each rising edge every output is
// compared with sum_j c[j] * x(k-j) computed here from the history of accepted
// samples (zero before reset ends). Extreme values (most negative x and c) are
// included. A second phase resets the filters and loads new coefficients.
module tb_subfilter_sym;
  import symfir_pkg::*;
  localparam int unsigned M  = 12;
  localparam int unsigned XW = DATA_W + 1;
  localparam int unsigned CW = COEF_W + 1;
  localparam int unsigned AW = ACC_W;
  localparam int          NK = 10;
  localparam int unsigned MH = (M + 1) / 2;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 en = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic signed [CW-1:0] c [MH];
  logic signed [AW-1:0] y [NK];
  int                   checks = 0;
  int                   failures = 0;
  longint               hist [M];  // hist[j] = x(k-j), hist[0] is the current input

  localparam adder_kind_e KINDS [4] = '{ADD_CSA, ADD_CSLA, ADD_SQRT_CSLA, ADD_BEC};
  for (genvar k = 0; k < 8; k++) begin : g_dut
    subfilter_sym #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KINDS[k/2]),
                    .SYM((k % 2) ? SYM_ODD : SYM_EVEN)) u_dut (
      .clk(clk), .rst_n(rst_n), .en(en), .x(x), .c(c), .y(y[k])
    );
  end
  // odd length 7 uses the first four coefficients
  logic signed [CW-1:0] c7 [4];
  for (genvar i = 0; i < 4; i++) begin : g_c7
    assign c7[i] = c[i];
  end
  for (genvar k = 8; k < 10; k++) begin : g_dut7
    subfilter_sym #(.M(7), .XW(XW), .CW(CW), .AW(AW), .KIND(ADD_BEC),
                    .SYM((k % 2) ? SYM_ODD : SYM_EVEN)) u_dut (
      .clk(clk), .rst_n(rst_n), .en(en), .x(x), .c(c7), .y(y[k])
    );
  end

  // coefficient j of instance k
  function automatic longint coef(input int k, input int j);
    int mm;
    mm = (k < 8) ? M : 7;
    if (j >= mm) return 0;
    if (j < mm - 1 - j) return longint'(c[j]);
    if (j == mm - 1 - j) return longint'(c[j]);  // centre tap (zero for a true antisymmetric set)
    return (k % 2) ? -longint'(c[mm-1-j]) : longint'(c[mm-1-j]);
  endfunction

  always #5 clk = ~clk;

  function automatic logic signed [XW-1:0] rnd_x();
    case ($urandom % 8)
      0:       return {1'b1, {(XW-1){1'b0}}};  // most negative
      1:       return {1'b0, {(XW-1){1'b1}}};  // most positive
      default: return XW'($urandom);
    endcase
  endfunction

  task automatic run_phase(input int cycles, input bit extreme);
    rst_n = 1'b0;
    for (int j = 0; j < MH; j++) c[j] = extreme ? {1'b1, {(CW-1){1'b0}}} : CW'($urandom);
    for (int j = 0; j < M; j++) hist[j] = 0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < cycles; n++) begin
      longint ref_y;
      x  = extreme ? {1'b1, {(XW-1){1'b0}}} : rnd_x();
      en = ($urandom % 4) != 0;
      hist[0] = longint'(x);
      @(negedge clk);
      for (int k = 0; k < NK; k++) begin
        ref_y = 0;
        for (int j = 0; j < M; j++) ref_y += coef(k, j) * hist[j];
        checks++;
        if (longint'(y[k]) != ref_y) begin
          failures++;
          if (failures < 10) $display("FAIL kind=%0d n=%0d y=%0d expected %0d", k, n, y[k], ref_y);
        end
      end
      @(posedge clk);
      if (en) for (int j = M - 1; j > 0; j--) hist[j] = hist[j-1];
      #1;
    end
  endtask

  initial begin
    run_phase(300, 1'b0);
    run_phase(300, 1'b0);
    run_phase(40, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
