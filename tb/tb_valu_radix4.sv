// End-to-end test of the radix-4 build of the vector ALU (16 words of 16
// bits, radix-4 digit adders and the radix-4 multiplier).
//
// Part 1 exercises every operation through the host interface: element-wise
// add and subtract, integration from zero and continued, signed and
// unsigned element-wise products, dot products from zero and continued. It
// also makes the adder and the multiplier-accumulator run at the same time,
// rewrites X and Y while the multiplier-accumulator is busy (its input
// latches must hide this), and gives a start while a unit is busy (it must
// be ignored). Each of these mechanisms is counted and must occur.
//
// Part 2 multiplies two 16 x 16 signed matrices: for every result element
// a row of the first matrix is loaded into X and a column of the second
// into Y, and a dot product is started. The next row and column are loaded
// while the previous dot product runs. Every element is checked, and the
// whole product must take no more than 256 times the longer of one dot
// product and one operand load (32 writes of two clocks), plus a few clocks
// of issue each.
module tb_valu_radix4
  import valu_pkg::*;
;
  localparam int N = 16, W = 16;
  localparam int ADD_T = 8 + N;         // adder start to done (8 radix-4 digits)
  localparam int MAC_T = N + 5 + 16;    // multiplier-accumulator start to done

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

  valu #(.RADIX4(1)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  logic [W-1:0] xm [N], ym [N];   // model of the X and Y banks
  logic [W-1:0] acc_model;
  logic [2*W-1:0] dot_model;

  // Mechanism counters.
  int n_vadd = 0, n_vsub = 0, n_vacc = 0, n_vacc_cont = 0, n_vmul_s = 0, n_vmul_u = 0;
  int n_vmac = 0, n_vmac_cont = 0, n_parallel = 0, n_latch_hide = 0, n_busy_ignored = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (add_busy && mac_busy) n_parallel++;

  // Clock count at which each unit's done pulse was last seen.
  int add_done_t = -1, mac_done_t = -1;
  always @(posedge clk) begin
    #1;
    if (add_done) add_done_t = cycle;
    if (mac_done) mac_done_t = cycle;
  end

  task automatic check(logic [2*W-1:0] got, logic [2*W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [2*W-1:0] prod(logic [W-1:0] a, logic [W-1:0] b, logic s);
    if (s) return (2*W)'($signed(a) * $signed(b));
    return (2*W)'({{W{1'b0}}, a} * {{W{1'b0}}, b});
  endfunction

  task automatic write_x(int i, logic [W-1:0] v);
    @(negedge clk);
    x_we = 1; y_we = 0; xy_waddr = 4'(i); xy_wdata = v;
    @(negedge clk);
    x_we = 0;
    xm[i] = v;
  endtask

  task automatic write_y(int i, logic [W-1:0] v);
    @(negedge clk);
    y_we = 1; x_we = 0; xy_waddr = 4'(i); xy_wdata = v;
    @(negedge clk);
    y_we = 0;
    ym[i] = v;
  endtask

  task automatic load_random();
    for (int i = 0; i < N; i++) write_x(i, W'($urandom));
    for (int i = 0; i < N; i++) write_y(i, W'($urandom));
  endtask

  // Start a unit; returns the clock count at the start edge.
  task automatic start_add(add_op_e o, logic clr, output int t0);
    @(negedge clk);
    add_op = o; add_acc_clear = clr; add_start = 1;
    @(posedge clk);
    #1 t0 = cycle;
    @(negedge clk);
    add_start = 0;
  endtask

  task automatic start_mac(mac_op_e o, logic s, logic clr, output int t0);
    @(negedge clk);
    mac_op = o; mac_sgn = s; mac_acc_clear = clr; mac_start = 1;
    @(posedge clk);
    #1 t0 = cycle;
    @(negedge clk);
    mac_start = 0;
  endtask

  task automatic wait_add(int t0);
    int t1;
    do begin @(posedge clk); #2; end while (add_done_t <= t0);
    t1 = add_done_t;
    checks++;
    if (t1 - t0 != ADD_T) begin
      failures++; $display("FAIL adder took %0d clocks", t1 - t0);
    end
  endtask

  task automatic wait_mac(int t0);
    int t1;
    do begin @(posedge clk); #2; end while (mac_done_t <= t0);
    t1 = mac_done_t;
    checks++;
    if (t1 - t0 != MAC_T) begin
      failures++; $display("FAIL multiplier-accumulator took %0d clocks", t1 - t0);
    end
  endtask

  // Matrices of the workload.
  logic [W-1:0] ma [N][N], mb [N][N];
  logic [2*W-1:0] mc [N][N];

  initial begin
    int ta, tm, t_mm0, t_mm1;
    logic [W-1:0] xs [N], ys [N];
    logic [2*W-1:0] ref_c;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- Part 1: operations and mechanisms ----
    for (int rep = 0; rep < 3; rep++) begin
      load_random();
      // Adder and multiplier-accumulator in parallel.
      start_add(ADD_VADD, 0, ta);
      start_mac(MAC_VMUL, rep[0], 0, tm);
      xs = xm; ys = ym;
      // A start while busy must be ignored.
      @(negedge clk);
      mac_op = MAC_VMAC; mac_acc_clear = 1; mac_start = 1;
      @(negedge clk);
      mac_start = 0;
      n_busy_ignored++;
      wait_add(ta);
      foreach (z_words[i]) check(z_words[i], W'(xs[i] + ys[i]), "vadd");
      n_vadd++;
      // Overwrite X and Y while the multiplier-accumulator still works.
      if (mac_busy) begin
        write_x(0, ~xs[0]);
        write_y(0, ~ys[0]);
        if (mac_busy) n_latch_hide++;
        load_random();
      end
      wait_mac(tm);
      foreach (mac_acc[i]) check(mac_acc[i], prod(xs[i], ys[i], rep[0]), "vmul");
      if (rep[0]) n_vmul_s++; else n_vmul_u++;

      start_add(ADD_VSUB, 0, ta);
      wait_add(ta);
      foreach (z_words[i]) check(z_words[i], W'(xm[i] - ym[i]), "vsub");
      n_vsub++;

      start_add(ADD_VACC, rep == 0, ta);
      wait_add(ta);
      if (rep == 0) acc_model = '0; else n_vacc_cont++;
      foreach (xm[i]) acc_model += xm[i];
      check(add_acc, acc_model, "vacc");
      n_vacc++;

      start_mac(MAC_VMAC, 1, 1, tm);
      wait_mac(tm);
      dot_model = '0;
      foreach (xm[i]) dot_model += prod(xm[i], ym[i], 1);
      check(mac_acc[0], dot_model, "vmac");
      n_vmac++;
      load_random();
      start_mac(MAC_VMAC, 1, 0, tm);
      wait_mac(tm);
      foreach (xm[i]) dot_model += prod(xm[i], ym[i], 1);
      check(mac_acc[0], dot_model, "vmac continued");
      n_vmac_cont++;
    end

    // ---- Part 2: 16 x 16 signed matrix multiplication ----
    foreach (ma[i, j]) begin
      ma[i][j] = W'($urandom);
      mb[i][j] = W'($urandom);
    end
    @(negedge clk);
    t_mm0 = cycle;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        // Load row i and column j; the previous dot product may still run.
        for (int n = 0; n < N; n++) write_x(n, ma[i][n]);
        for (int n = 0; n < N; n++) write_y(n, mb[n][j]);
        if (i != 0 || j != 0) do begin @(posedge clk); #2; end while (mac_done_t <= tm);
        if (i != 0 || j != 0) mc[(i * N + j - 1) / N][(i * N + j - 1) % N] = mac_acc[0];
        start_mac(MAC_VMAC, 1, 1, tm);
      end
    end
    wait_mac(tm);
    mc[N-1][N-1] = mac_acc[0];
    t_mm1 = cycle;
    foreach (mc[i, j]) begin
      ref_c = '0;
      for (int n = 0; n < N; n++) ref_c += prod(ma[i][n], mb[n][j], 1);
      check(mc[i][j], ref_c, "matrix element");
    end
    checks++;
    if (t_mm1 - t_mm0 > N * N * ((MAC_T > 4 * N ? MAC_T : 4 * N) + 4)) begin
      failures++; $display("FAIL matrix product took %0d clocks", t_mm1 - t_mm0);
    end
    $display("16x16 matrix product: %0d clocks", t_mm1 - t_mm0);

    // ---- Every mechanism must have happened ----
    begin
      int counts [11];
      string names [11];
      counts = '{n_vadd, n_vsub, n_vacc, n_vacc_cont, n_vmul_s, n_vmul_u,
                          n_vmac, n_vmac_cont, n_parallel, n_latch_hide, n_busy_ignored};
      names = '{"vadd", "vsub", "vacc", "vacc continued", "vmul signed",
                            "vmul unsigned", "vmac", "vmac continued", "units in parallel",
                            "input latch hides rewrite", "start while busy ignored"};
      foreach (counts[k]) begin
        $display("mechanism %-26s %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin
          failures++; $display("FAIL mechanism %s never happened", names[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
