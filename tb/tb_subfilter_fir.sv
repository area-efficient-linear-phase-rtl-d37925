// tb_subfilter_fir: self-checking test of the general FIR sub-filter.
// Four instances, one per adder kind, share the input x, the enable and a random
// coefficient set. x changes every cycle and en is high about three cycles in four,
// so held cycles (no advance) are exercised. Before each rising edge every output is
// compared with sum_j c[j] * x(k-j) computed here from the history of accepted
// samples (zero before reset ends). Extreme values (most negative x and c) are
// included. A second phase resets the filters and loads new coefficients.
module tb_subfilter_fir;
  import symfir_pkg::*;
  localparam int unsigned M  = 12;
  localparam int unsigned XW = DATA_W + 1;
  localparam int unsigned CW = COEF_W + 1;
  localparam int unsigned AW = ACC_W;
  localparam int          NK = 4;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 en = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic signed [CW-1:0] c [M];
  logic signed [AW-1:0] y [NK];
  int                   checks = 0;
  int                   failures = 0;
  longint               hist [M];  // hist[j] = x(k-j), hist[0] is the current input

  localparam adder_kind_e KINDS [NK] = '{ADD_CSA, ADD_CSLA, ADD_SQRT_CSLA, ADD_BEC};
  for (genvar k = 0; k < NK; k++) begin : g_dut
    subfilter_fir #(.M(M), .XW(XW), .CW(CW), .AW(AW), .KIND(KINDS[k])) u_dut (
      .clk(clk), .rst_n(rst_n), .en(en), .x(x), .c(c), .y(y[k])
    );
  end

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
    for (int j = 0; j < M; j++) begin
      c[j]    = extreme ? {1'b1, {(CW-1){1'b0}}} : CW'($urandom);
      hist[j] = 0;
    end
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < cycles; n++) begin
      longint ref_y;
      x  = extreme ? {1'b1, {(XW-1){1'b0}}} : rnd_x();
      en = ($urandom % 4) != 0;
      hist[0] = longint'(x);
      ref_y = 0;
      for (int j = 0; j < M; j++) ref_y += longint'(c[j]) * hist[j];
      @(negedge clk);
      for (int k = 0; k < NK; k++) begin
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
