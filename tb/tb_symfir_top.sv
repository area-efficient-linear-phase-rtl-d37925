// tb_symfir_top: end-to-end test of the top at its default parameters (24 taps,
// 16-bit samples and coefficients, binary-to-excess-1 adders).
// The 2-, 3-, 4-, 6- and 8-parallel filters run at the same time on independent random sample
// streams, each with its own enable that is low about one cycle in four, and all use
// the coefficients given as h(0..11). One cycle after each accepted block the outputs
// of each filter are compared with the direct convolution y(n) = sum_i h(i) x(n-i)
// computed here over that filter's own sample history; each valid must follow its
// enable by one cycle. Three phases: two with random coefficients and data (each
// starting from reset) and one at full scale (every sample and coefficient at the most
// negative value), which drives the largest intermediate words.
// Counted mechanisms, each of which must occur: accepted blocks and held cycles per
// filter, resets, and outputs of both signs.
module tb_symfir_top;
  import symfir_pkg::*;
  localparam int unsigned N  = TAPS;
  localparam int unsigned W  = DATA_W;
  localparam int unsigned AW = ACC_W;
  localparam int          HL = 4 * N;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic signed [W-1:0]  h_half [N/2];
  logic                 en2 = 1'b0, en3 = 1'b0, en4 = 1'b0;
  logic signed [W-1:0]  x2 [2];
  logic signed [W-1:0]  x3 [3];
  logic signed [W-1:0]  x4 [4];
  logic signed [W-1:0]  x6 [6];
  logic signed [W-1:0]  x8 [8];
  logic                 en6 = 1'b0, en8 = 1'b0;
  logic signed [AW-1:0] y6 [6];
  logic signed [AW-1:0] y8 [8];
  logic                 vld6, vld8;
  logic signed [AW-1:0] y2 [2];
  logic signed [AW-1:0] y3 [3];
  logic signed [AW-1:0] y4 [4];
  logic                 vld2, vld3, vld4;

  int     checks = 0;
  int     failures = 0;
  localparam int NF = 5;
  localparam int LS [NF] = '{2, 3, 4, 6, 8};
  int     blocks [NF] = '{0, 0, 0, 0, 0};
  int     stalls [NF] = '{0, 0, 0, 0, 0};
  int     resets = 0;
  int     n_neg = 0;
  int     n_pos = 0;
  longint hist [NF][HL];  // per filter, hist[f][0] = newest sample

  symfir_top u_dut (
    .clk(clk), .rst_n(rst_n), .h_half(h_half),
    .en2(en2), .x2(x2), .y2(y2), .vld2(vld2),
    .en3(en3), .x3(x3), .y3(y3), .vld3(vld3),
    .en4(en4), .x4(x4), .y4(y4), .vld4(vld4),
    .en6(en6), .x6(x6), .y6(y6), .vld6(vld6),
    .en8(en8), .x8(x8), .y8(y8), .vld8(vld8)
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

  function automatic longint coef(input int i);
    return longint'(h_half[(i < N / 2) ? i : N - 1 - i]);
  endfunction

  function automatic longint conv(input int f, input int back);
    longint acc;
    acc = 0;
    for (int i = 0; i < N; i++) acc += coef(i) * hist[f][back + i];
    return acc;
  endfunction

  task automatic push(input int f, input int L, input longint s [8]);
    for (int i = HL - 1; i >= L; i--) hist[f][i] = hist[f][i-L];
    for (int p = 0; p < L; p++) hist[f][L-1-p] = s[p];
  endtask

  task automatic check_out(input int f, input int L, input logic en, input logic vld,
                           input longint got [8]);
    checks++;
    if (vld != en) begin
      failures++;
      $display("FAIL L=%0d: valid=%0d one cycle after enable=%0d", L, vld, en);
    end
    if (en) for (int p = 0; p < L; p++) begin
      longint e;
      e = conv(f, L - 1 - p);
      checks++;
      if (e < 0) n_neg++;
      if (e > 0) n_pos++;
      if (got[p] != e) begin
        failures++;
        if (failures < 10) $display("FAIL L=%0d y[%0d]=%0d expected %0d", L, p, got[p], e);
      end
    end
  endtask

  task automatic run_phase(input int cycles, input bit full);
    longint s [8];
    longint got [8];
    rst_n = 1'b0;
    en2 = 1'b0; en3 = 1'b0; en4 = 1'b0; en6 = 1'b0; en8 = 1'b0;
    resets++;
    for (int i = 0; i < N / 2; i++) h_half[i] = rnd(full);
    for (int f = 0; f < NF; f++) for (int i = 0; i < HL; i++) hist[f][i] = 0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < cycles; n++) begin
      foreach (x2[p]) x2[p] = rnd(full);
      foreach (x3[p]) x3[p] = rnd(full);
      foreach (x4[p]) x4[p] = rnd(full);
      foreach (x6[p]) x6[p] = rnd(full);
      foreach (x8[p]) x8[p] = rnd(full);
      en6 = ($urandom % 4) != 0;
      en8 = ($urandom % 4) != 0;
      en2 = ($urandom % 4) != 0;
      en3 = ($urandom % 4) != 0;
      en4 = ($urandom % 4) != 0;
      @(posedge clk);
      if (en2) begin
        blocks[0]++;
        foreach (x2[p]) s[p] = longint'(x2[p]);
        push(0, 2, s);
      end else stalls[0]++;
      if (en3) begin
        blocks[1]++;
        foreach (x3[p]) s[p] = longint'(x3[p]);
        push(1, 3, s);
      end else stalls[1]++;
      if (en4) begin
        blocks[2]++;
        foreach (x4[p]) s[p] = longint'(x4[p]);
        push(2, 4, s);
      end else stalls[2]++;
      if (en6) begin
        blocks[3]++;
        foreach (x6[p]) s[p] = longint'(x6[p]);
        push(3, 6, s);
      end else stalls[3]++;
      if (en8) begin
        blocks[4]++;
        foreach (x8[p]) s[p] = longint'(x8[p]);
        push(4, 8, s);
      end else stalls[4]++;
      #1;
      foreach (y2[p]) got[p] = longint'(y2[p]);
      check_out(0, 2, en2, vld2, got);
      foreach (y3[p]) got[p] = longint'(y3[p]);
      check_out(1, 3, en3, vld3, got);
      foreach (y4[p]) got[p] = longint'(y4[p]);
      check_out(2, 4, en4, vld4, got);
      foreach (y6[p]) got[p] = longint'(y6[p]);
      check_out(3, 6, en6, vld6, got);
      foreach (y8[p]) got[p] = longint'(y8[p]);
      check_out(4, 8, en8, vld8, got);
    end
  endtask

  initial begin
    foreach (x2[p]) x2[p] = '0;
    foreach (x3[p]) x3[p] = '0;
    foreach (x4[p]) x4[p] = '0;
    foreach (x6[p]) x6[p] = '0;
    foreach (x8[p]) x8[p] = '0;
    run_phase(150, 1'b0);
    run_phase(150, 1'b0);
    run_phase(2 * N, 1'b1);
    for (int f = 0; f < NF; f++) begin
      $display("L=%0d: blocks=%0d held cycles=%0d", LS[f], blocks[f], stalls[f]);
      if (blocks[f] == 0 || stalls[f] == 0) begin
        failures++;
        $display("FAIL: L=%0d did not both accept and hold", LS[f]);
      end
    end
    $display("resets=%0d negative outputs=%0d positive outputs=%0d", resets, n_neg, n_pos);
    if (resets < 2 || n_neg == 0 || n_pos == 0) begin
      failures++;
      $display("FAIL: a counted mechanism did not occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
