// tb_ffa2_proposed: self-checking test of the proposed 2-parallel structure.
// Instances: the even-symmetric 24-tap filter with each of the four adder kinds, and an
// antisymmetric 24-tap filter (PSYM = SYM_ODD, the form used inside the 4-parallel
// cascade). Each gets random coefficients of its symmetry; all share the input blocks
// {x(2k), x(2k+1)} and an enable that is low about one cycle in four. One cycle after
// each accepted block the registered outputs are compared with the direct convolution
// y(n) = sum_i g(i) x(n-i) computed here, and out_vld must follow en with a latency of
// one cycle. A last phase uses full-scale values to check that no intermediate word
// overflows.
module tb_ffa2_proposed;
  import symfir_pkg::*;
  localparam int unsigned L  = 2;
  localparam int unsigned T  = 24;
  localparam int unsigned W  = DATA_W;
  localparam int unsigned AW = ACC_W;
  localparam int          NI = 5;
  localparam sym_e        SYMS [NI] = '{SYM_EVEN, SYM_EVEN, SYM_EVEN, SYM_EVEN, SYM_ODD};
  localparam int          HL = 8 * T;  // history kept, in samples

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                en = 1'b0;
  logic signed [W-1:0] x [L];
  logic signed [W-1:0] g [NI][T];
  logic signed [AW-1:0] y [NI][L];
  logic [NI-1:0]       vld;
  int                  checks = 0;
  int                  failures = 0;
  int                  blocks = 0;
  int                  stalls = 0;
  longint              hist [HL];  // hist[0] = newest sample
  longint              expv [L];
  bit                  exp_vld = 1'b0;

  ffa2_proposed #(.T(T), .KIND(ADD_CSA), .PSYM(SYM_EVEN)) u_dut0 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .g(g[0]), .y(y[0]), .out_vld(vld[0])
  );
  ffa2_proposed #(.T(T), .KIND(ADD_CSLA), .PSYM(SYM_EVEN)) u_dut1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .g(g[1]), .y(y[1]), .out_vld(vld[1])
  );
  ffa2_proposed #(.T(T), .KIND(ADD_SQRT_CSLA), .PSYM(SYM_EVEN)) u_dut2 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .g(g[2]), .y(y[2]), .out_vld(vld[2])
  );
  ffa2_proposed #(.T(T), .KIND(ADD_BEC), .PSYM(SYM_EVEN)) u_dut3 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .g(g[3]), .y(y[3]), .out_vld(vld[3])
  );
  ffa2_proposed #(.T(T), .KIND(ADD_BEC), .PSYM(SYM_ODD)) u_dut4 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .g(g[4]), .y(y[4]), .out_vld(vld[4])
  );

  always #5 clk = ~clk;

  function automatic logic signed [W-1:0] rnd(input bit full);
    if (full) return {1'b1, {(W-1){1'b0}}};
    case ($urandom % 8)
      0:       return {1'b1, {(W-1){1'b0}}};
      1:       return {1'b0, {(W-1){1'b1}}};
      default: return W'($urandom);
    endcase
  endfunction

  task automatic load_coefs(input bit full);
    for (int k = 0; k < NI; k++)
      for (int i = 0; i < T; i++) begin
        if (SYMS[k] == SYM_NONE || i < T / 2) begin
          g[k][i] = rnd(full);
          if (SYMS[k] == SYM_ODD && g[k][i] == {1'b1, {(W-1){1'b0}}}) g[k][i] = -(2**(W-1) - 1);
        end else if (SYMS[k] == SYM_EVEN) g[k][i] = g[k][T-1-i];
        else g[k][i] = -g[k][T-1-i];
      end
  endtask

  // direct convolution for output sample n of the newest block (offset back from newest)
  function automatic longint conv(input int k, input int back);
    longint acc;
    acc = 0;
    for (int i = 0; i < T; i++) acc += longint'(g[k][i]) * hist[back + i];
    return acc;
  endfunction

  task automatic run_phase(input int cycles, input bit full);
    rst_n = 1'b0;
    en    = 1'b0;
    load_coefs(full);
    for (int i = 0; i < HL; i++) hist[i] = 0;
    exp_vld = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < cycles; n++) begin
      for (int p = 0; p < L; p++) x[p] = rnd(full);
      en = ($urandom % 4) != 0;
      @(posedge clk);
      if (en) begin
        blocks++;
        for (int i = HL - 1; i >= L; i--) hist[i] = hist[i-L];
        for (int p = 0; p < L; p++) hist[L-1-p] = longint'(x[p]);
      end else stalls++;
      #1;
      for (int k = 0; k < NI; k++) begin
        checks++;
        if (vld[k] != en) begin
          failures++;
          $display("FAIL inst %0d: out_vld=%0d one cycle after en=%0d", k, vld[k], en);
        end
        if (en) for (int p = 0; p < L; p++) begin
          longint e;
          e = conv(k, L - 1 - p);
          checks++;
          if (longint'(y[k][p]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL inst %0d cycle %0d y[%0d]=%0d expected %0d", k, n, p, y[k][p], e);
          end
        end
      end
    end
  endtask

  initial begin
    for (int p = 0; p < L; p++) x[p] = '0;
    run_phase(200, 1'b0);
    run_phase(200, 1'b0);
    run_phase(3 * T, 1'b1);
    if (blocks == 0 || stalls == 0) begin
      failures++;
      $display("FAIL: blocks=%0d stalls=%0d, both must occur", blocks, stalls);
    end
    $display("blocks=%0d stalls=%0d", blocks, stalls);
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
