// End-to-end testbench for pio_top at a reduced size (D = 3 dimensions,
// NP = 4 pigeons), which builds quickly; tb_pio_top runs the same test at
// the default size.
//
// Runs the whole optimisation twice from random initial positions in
// [0, 15]: once with R = 0.2, iter1 = 15, iter2 = 15, and once more with
// iter2 = 10. Alongside the hardware it runs a software model of the same
// algorithm in which every arithmetic step is rounded to single precision
// in the hardware's order, the random numbers come from models of each
// pigeon slot's shift registers, and the sort is a stable ascending sort.
// After every sort-and-best-update step it compares the whole population
// memory (positions, velocities, fitness) and the best fitness bit-exactly
// with the model, and at the end the best fitness and position.
//
// It also counts how often each mechanism of the design occurred and
// fails if one never did: map-and-compass iterations, landmark iterations,
// halving of the population, halving stopped at one pigeon, a best pigeon
// replaced, a best pigeon kept, and a sort that changed the order.
module tb_pio_top_small;
  import pio_pkg::*;
  import fp_ref_pkg::*;

  localparam int D = 3;
  localparam int NP = 4;

  logic clk = 0, rst = 1, start = 0;
  f32_t r = 32'h3E4C_CCCC;
  logic [5:0] iter1 = 15, iter2 = 15;
  f32_t init_pos [NP][D];
  logic busy, done;
  f32_t bestvalue;
  f32_t best_pos [D];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_compass = 0, n_landmark = 0, n_halve = 0, n_floor = 0;
  int n_best_new = 0, n_best_kept = 0, n_sorted = 0;

  pio_top #(.D(D), .NP(NP)) dut (.clk, .rst, .start, .r, .iter1, .iter2, .init_pos, .busy, .done,
               .bestvalue, .best_pos);

  always #5 clk = ~clk;

  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- software model ----------------
  f32_t m_pos [NP][D];
  f32_t m_vel [NP][D];
  f32_t m_fit [NP];
  f32_t m_best;
  f32_t m_best_pos [D];
  int   m_np, m_t1, m_t2;
  logic [7:0] m_vsr [NP];
  logic [7:0] m_lsr [NP];

  function automatic logic [7:0] seed_of(int i, int mul, int add);
    logic [7:0] s;
    s = 8'((i * mul + add) % 256);
    return (s == 0) ? 8'd1 : s;
  endfunction

  // Evaluate, sort, reorder and update the best pigeon.
  task automatic model_rank();
    f32_t key [NP];
    int   idx [NP];
    f32_t p [NP][D];
    f32_t v [NP][D];
    f32_t f [NP];
    bit   moved;
    for (int i = 0; i < NP; i++) begin
      logic [31:0] xv [];
      xv = new[D];
      for (int d = 0; d < D; d++) xv[d] = m_pos[i][d];
      m_fit[i] = fitness(xv, D);
      key[i] = (i < m_np) ? m_fit[i] : F_INF;
      idx[i] = i;
    end
    // stable insertion sort, ascending
    for (int i = 1; i < NP; i++)
      for (int j = i; j > 0 && f_lt(key[j], key[j-1]); j--) begin
        f32_t tk; int ti;
        tk = key[j]; key[j] = key[j-1]; key[j-1] = tk;
        ti = idx[j]; idx[j] = idx[j-1]; idx[j-1] = ti;
      end
    moved = 0;
    for (int i = 0; i < NP; i++) begin
      p[i] = m_pos[idx[i]];
      v[i] = m_vel[idx[i]];
      f[i] = m_fit[idx[i]];
      if (idx[i] != i) moved = 1;
    end
    m_pos = p;
    m_vel = v;
    m_fit = f;
    if (moved) n_sorted++;
    if (f_lt(m_fit[0], m_best)) begin
      m_best = m_fit[0];
      m_best_pos = m_pos[0];
      n_best_new++;
    end else begin
      n_best_kept++;
    end
  endtask

  // One step of the operator that follows; returns 1 when the run is over.
  function automatic bit model_move();
    if (m_t1 < iter1) begin
      f32_t e, rt, rn;
      m_t1++;
      n_compass++;
      rt = fmul(r, f_from_uint(24'(m_t1)));
      e = texp({~rt[31], rt[30:0]});
      for (int i = 0; i < NP; i++) begin
        rn = rnd_of(lfsr_word(m_vsr[i]));
        for (int d = 0; d < D; d++) begin
          m_vel[i][d] = fadd(fmul(e, m_vel[i][d]), fmul(rn, fsub(m_best_pos[d], m_pos[i][d])));
          m_pos[i][d] = fadd(m_pos[i][d], m_vel[i][d]);
        end
      end
      return 0;
    end else if (m_t2 < iter2) begin
      f32_t fsum, den, rn;
      f32_t xc [D];
      int old_np;
      m_t2++;
      n_landmark++;
      old_np = m_np;
      m_np = (m_np > 1) ? m_np / 2 : 1;
      if (m_np < old_np) n_halve++;
      else n_floor++;
      fsum = m_fit[0];
      for (int i = 1; i < m_np; i++) fsum = fadd(fsum, m_fit[i]);
      den = fmul(fsum, f_from_uint(24'(NP)));
      for (int d = 0; d < D; d++) begin
        f32_t num;
        num = fmul(m_pos[0][d], m_fit[0]);
        for (int i = 1; i < m_np; i++) num = fadd(num, fmul(m_pos[i][d], m_fit[i]));
        xc[d] = fdiv(num, den);
      end
      for (int i = 0; i < m_np; i++) begin
        rn = rnd_of(lfsr_word(m_lsr[i]));
        for (int d = 0; d < D; d++)
          m_pos[i][d] = fadd(m_pos[i][d], fmul(rn, fsub(xc[d], m_pos[i][d])));
      end
      return 0;
    end
    return 1;
  endfunction

  task automatic compare_state(input string where);
    int bad;
    bad = 0;
    for (int i = 0; i < NP; i++) begin
      if (!f_same(dut.fit[i], m_fit[i])) bad++;
      for (int d = 0; d < D; d++) begin
        if (!f_same(dut.pos[i][d], m_pos[i][d])) bad++;
        if (!f_same(dut.vel[i][d], m_vel[i][d])) bad++;
      end
    end
    check(bad == 0, $sformatf("%s: %0d population words differ", where, bad));
    check(bestvalue == m_best, $sformatf("%s: best %h model %h", where, bestvalue, m_best));
  endtask

  task automatic run(input int it1, input int it2);
    int steps;
    bit over;
    f32_t first_best;
    int c0;
    iter1 <= 6'(it1);
    iter2 <= 6'(it2);
    for (int i = 0; i < NP; i++)
      for (int d = 0; d < D; d++) begin
        init_pos[i][d] = r2f(15.0 * ($urandom_range(0, 1000000) / 1000000.0));
        m_pos[i][d] = init_pos[i][d];
        m_vel[i][d] = F_ZERO;
      end
    m_best = F_INF;
    m_np = NP;
    m_t1 = 0;
    m_t2 = 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    c0 = cycles;
    steps = 0;
    over = 0;
    while (!over) begin
      @(posedge clk);
      if (dut.best_done) begin
        model_rank();
        compare_state($sformatf("step %0d", steps));
        if (steps == 0) first_best = bestvalue;
        if (steps == 0)
          $display("best fitness after initialisation: %f", f2r(bestvalue));
        if (steps == it1)
          $display("best fitness after map and compass operator: %f", f2r(bestvalue));
        steps++;
        over = model_move();
      end
    end
    while (!done) @(posedge clk);
    $display("best fitness after landmark operator: %f (run took %0d clocks)",
             f2r(bestvalue), cycles - c0);
    check(steps == it1 + it2 + 1, $sformatf("%0d ranking steps", steps));
    check(bestvalue == m_best, "final best value");
    for (int d = 0; d < D; d++) check(best_pos[d] == m_best_pos[d], "final best position");
    check(!f_lt(first_best, bestvalue), "best fitness never rises");
    check(!f_lt(bestvalue, r2f(0.25 * D)), "best fitness not below the minimum D / 4");
    @(posedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    for (int i = 0; i < NP; i++)
      for (int d = 0; d < D; d++) init_pos[i][d] = 0;
    // the random generators are seeded by reset only and keep running
    // from one optimisation run to the next
    for (int i = 0; i < NP; i++) begin
      m_vsr[i] = seed_of(i, 37, 1);
      m_lsr[i] = seed_of(i, 53, 101);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    run(15, 15);
    run(15, 10);
    $display("mechanisms: compass %0d landmark %0d halving %0d floor %0d best-new %0d best-kept %0d reordered %0d",
             n_compass, n_landmark, n_halve, n_floor, n_best_new, n_best_kept, n_sorted);
    check(n_compass > 0, "map-and-compass iterations happened");
    check(n_landmark > 0, "landmark iterations happened");
    check(n_halve > 0, "population halving happened");
    check(n_floor > 0, "population held at one pigeon");
    check(n_best_new > 0, "best pigeon replaced");
    check(n_best_kept > 0, "best pigeon kept");
    check(n_sorted > 0, "sort changed the order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
