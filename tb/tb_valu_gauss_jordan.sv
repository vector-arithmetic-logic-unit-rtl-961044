// Gauss-Jordan inversion on the vector ALU at its default size (16-word
// banks), for two matrices:
//   1. a 16 x 16 diagonally dominant matrix (2 on the diagonal, random
//      values within +-0.05 elsewhere);
//   2. the 31 x 31 correlation matrix R of a length-31 m-sequence (1 on the
//      diagonal, -1/31 elsewhere), followed by the Wiener-Hopf solution
//      w = inv(R) p for a shifted copy p of the sequence.
// Values are signed fixed point with 13 fraction bits (range +-4). The
// augmented matrix [A | I] has rows of 2M words, handled as chunks of 16
// (zero-padded). For each pivot k the host computes 1/A(k,k), which the
// ALU has no hardware for; then:
//   - row k is scaled: MAC_VMUL of each chunk by the broadcast reciprocal;
//   - every other row i loses A(i,k) times row k: MAC_VMUL of row k by the
//     broadcast factor, then ADD_VSUB of row i minus that product.
// Products are 32-bit with 26 fraction bits; the host rounds them back to
// 13 fraction bits, as the datapath keeps full products. w is formed by
// dot products of 31 elements, each split into two MAC_VMAC operations
// (16 words, then 15 and a zero) with the second continuing the
// accumulator. Every operation result is compared bit for bit with the same
// fixed-point arithmetic done in integers; every entry of A * inv(A) - I
// must be within 0.01 and w must match the exact solution within 0.02.
module tb_valu_gauss_jordan
  import valu_pkg::*;
;
  localparam int N = 16, W = 16, F = 13;
  localparam int MAXM = 31, MAXC = (2 * MAXM + N - 1) / N;

  logic clk = 0, rst_n = 0;
  logic x_we = 0, y_we = 0;
  logic [3:0] xy_waddr = 0;
  logic [W-1:0] xy_wdata = 0;
  logic add_start = 0, add_acc_clear = 0;
  add_op_e add_op = ADD_VADD;
  logic add_busy, add_done;
  logic [W-1:0] z_words [N];
  logic [W-1:0] add_acc;
  logic mac_start = 0, mac_sgn = 0, mac_acc_clear = 0;
  mac_op_e mac_op = MAC_VMUL;
  logic mac_busy, mac_done;
  logic [2*W-1:0] mac_acc [N];

  valu dut (.*);

  int checks = 0, failures = 0, n_vmul = 0, n_vsub = 0, n_vmac_cont = 0;

  always #5 clk = ~clk;

  task automatic load(logic [W-1:0] xv [N], logic [W-1:0] yv [N]);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      x_we = 1; y_we = 0; xy_waddr = 4'(i); xy_wdata = xv[i];
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      x_we = 0; y_we = 1; xy_waddr = 4'(i); xy_wdata = yv[i];
    end
    @(negedge clk);
    y_we = 0;
  endtask

  // Element-wise signed product, rescaled to F fraction bits by the host.
  task automatic vmul(logic [W-1:0] xv [N], logic [W-1:0] yv [N], output logic [W-1:0] r [N]);
    load(xv, yv);
    mac_op = MAC_VMUL; mac_sgn = 1; mac_acc_clear = 0; mac_start = 1;
    @(negedge clk);
    mac_start = 0;
    while (!mac_done) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      logic signed [2*W-1:0] expp;
      expp = (2*W)'($signed(xv[i]) * $signed(yv[i]));
      checks++;
      if (mac_acc[i] !== expp) begin
        failures++; $display("FAIL vmul word %0d: %h expected %h", i, mac_acc[i], expp);
      end
      r[i] = W'(($signed(mac_acc[i]) + (1 <<< (F - 1))) >>> F);  // round to nearest
    end
    n_vmul++;
  endtask

  task automatic vsub(logic [W-1:0] xv [N], logic [W-1:0] yv [N], output logic [W-1:0] r [N]);
    load(xv, yv);
    add_op = ADD_VSUB; add_acc_clear = 0; add_start = 1;
    @(negedge clk);
    add_start = 0;
    while (!add_done) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (z_words[i] !== W'(xv[i] - yv[i])) begin
        failures++; $display("FAIL vsub word %0d", i);
      end
      r[i] = z_words[i];
    end
    n_vsub++;
  endtask

  // Signed dot product of 16 words; continues the accumulator unless clr.
  task automatic vmac(logic [W-1:0] xv [N], logic [W-1:0] yv [N], logic clr,
                      inout logic [2*W-1:0] model);
    load(xv, yv);
    mac_op = MAC_VMAC; mac_sgn = 1; mac_acc_clear = clr; mac_start = 1;
    @(negedge clk);
    mac_start = 0;
    while (!mac_done) @(negedge clk);
    if (clr) model = '0;
    else n_vmac_cont++;
    for (int i = 0; i < N; i++) model += (2*W)'($signed(xv[i]) * $signed(yv[i]));
    checks++;
    if (mac_acc[0] !== model) begin
      failures++; $display("FAIL vmac: %h expected %h", mac_acc[0], model);
    end
  endtask

  logic [W-1:0] a0 [MAXM][MAXM];          // original matrix
  logic [W-1:0] m  [MAXM][MAXC * N];      // augmented matrix being reduced

  // Inverts the top-left M x M of a0; inv(A) ends in m[i][M + j].
  task automatic invert(int M);
    logic [W-1:0] xh [N], yh [N], ph [N], rh [N];
    logic [W-1:0] recip, factor;
    int C;
    C = (2 * M + N - 1) / N;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < C * N; j++)
        m[i][j] = (j < M) ? a0[i][j] : ((j - M == i) ? W'(1 << F) : '0);
    for (int k = 0; k < M; k++) begin
      recip = W'((1 << (2 * F)) / int'($signed(m[k][k])));
      for (int h = 0; h < C; h++) begin
        for (int n = 0; n < N; n++) begin
          xh[n] = m[k][h * N + n];
          yh[n] = recip;
        end
        vmul(xh, yh, rh);
        for (int n = 0; n < N; n++) m[k][h * N + n] = rh[n];
      end
      for (int i = 0; i < M; i++) begin
        if (i == k) continue;
        factor = m[i][k];   // taken before the first chunk overwrites it
        for (int h = 0; h < C; h++) begin
          for (int n = 0; n < N; n++) begin
            xh[n] = m[k][h * N + n];
            yh[n] = factor;
          end
          vmul(xh, yh, ph);
          for (int n = 0; n < N; n++) xh[n] = m[i][h * N + n];
          vsub(xh, ph, rh);
          for (int n = 0; n < N; n++) m[i][h * N + n] = rh[n];
        end
      end
    end
  endtask

  // Largest |(A * inv(A) - I)(i,j)|.
  function automatic real identity_error(int M);
    real worst, s;
    worst = 0.0;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) begin
        s = 0.0;
        for (int n = 0; n < M; n++)
          s += real'($signed(a0[i][n])) * real'($signed(m[n][M + j]));
        s = s / real'(1 << (2 * F)) - ((i == j) ? 1.0 : 0.0);
        if (s < 0) s = -s;
        if (s > worst) worst = s;
      end
    end
    return worst;
  endfunction

  initial begin
    real err, werr, wexp, psum;
    logic [W-1:0] xh [N], yh [N];
    logic [2*W-1:0] acc_model;
    logic [4:0] lfsr;
    logic [W-1:0] pv [MAXM];
    int seq [MAXM];

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 1: 16 x 16 ----
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        a0[i][j] = (i == j) ? W'(2 << F) : W'($urandom_range(0, 800) - 400);
    invert(N);
    err = identity_error(N);
    $display("16 x 16: largest deviation of A * inv(A) from I: %f", err);
    checks++;
    if (err > 0.01) begin
      failures++; $display("FAIL 16 x 16 inverse off by %f", err);
    end

    // ---- 2: Wiener-Hopf, chip length 31 ----
    // m-sequence from the 5-stage shift register x^5 + x^3 + 1, as +-1.
    lfsr = 5'b00001;
    for (int n = 0; n < MAXM; n++) begin
      seq[n] = lfsr[0] ? 1 : -1;
      lfsr = {lfsr[0] ^ lfsr[3], lfsr[4:1]};
    end
    // Periodic autocorrelation: 31 at shift 0, -1 elsewhere; R is it / 31.
    for (int i = 0; i < MAXM; i++)
      for (int j = 0; j < MAXM; j++) begin
        int c;
        c = 0;
        for (int n = 0; n < MAXM; n++) c += seq[(n + i) % MAXM] * seq[(n + j) % MAXM];
        a0[i][j] = W'((c * (1 << F)) / MAXM);
      end
    invert(MAXM);
    err = identity_error(MAXM);
    $display("31 x 31: largest deviation of R * inv(R) from I: %f", err);
    checks++;
    if (err > 0.01) begin
      failures++; $display("FAIL 31 x 31 inverse off by %f", err);
    end
    // p: the sequence shifted by 3 chips, scaled by 1/4.
    psum = 0.0;
    for (int n = 0; n < MAXM; n++) begin
      pv[n] = W'(seq[(n + 3) % MAXM] * (1 << (F - 2)));
      psum += real'(seq[(n + 3) % MAXM]) / 4.0;
    end
    // w = inv(R) p, each element a 31-element dot product in two parts.
    werr = 0.0;
    for (int i = 0; i < MAXM; i++) begin
      real wv;
      for (int n = 0; n < N; n++) begin
        xh[n] = m[i][MAXM + n];
        yh[n] = pv[n];
      end
      vmac(xh, yh, 1, acc_model);
      for (int n = 0; n < N; n++) begin
        xh[n] = (N + n < MAXM) ? m[i][MAXM + N + n] : '0;
        yh[n] = (N + n < MAXM) ? pv[N + n] : '0;
      end
      vmac(xh, yh, 0, acc_model);
      // Exact solution: inv(R) = (31/32)(I + J), so w = (31/32)(p + sum(p)).
      wexp = (31.0 / 32.0) * (real'(seq[(i + 3) % MAXM]) / 4.0 + psum);
      wv = real'($signed(mac_acc[0])) / real'(1 << (2 * F));
      if (wv - wexp > werr) werr = wv - wexp;
      if (wexp - wv > werr) werr = wexp - wv;
    end
    $display("Wiener-Hopf w: largest error %f", werr);
    checks++;
    if (werr > 0.02 || n_vmul == 0 || n_vsub == 0 || n_vmac_cont == 0) begin
      failures++; $display("FAIL w off by %f", werr);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
