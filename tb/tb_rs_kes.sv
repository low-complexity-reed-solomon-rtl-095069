// tb_rs_kes: self-checking test of the serial key-equation solver.
//
// Each case builds a received word (reference encoder plus chosen errors),
// computes its syndromes with the reference model, starts the solver and
// compares, once out_valid rises:
//   - deg_o with the Berlekamp-Massey degree, fail_o with (degree > t),
//     noerr_o with "all syndromes zero";
//   - lam_o[j] = c * Lambda_j * (alpha^io)^j and omg_o[j] = c * Omega_j *
//     (alpha^io)^j for one common nonzero scale c (the solver is
//     inversionless), with Lambda, Omega from the reference;
//   - the cycle count from start to out_valid against the schedule of the
//     serial design (sum of max(delta_i,1)+1 per iteration, plus the Omega
//     phase), and against the document's bound of 2t(t+1) steps for Lambda
//     plus delta(delta+1)/2 for Omega (plus 4 cycles of start, compensator
//     and hand-over overhead).
// Cases: the seven special codewords of the document's verification plan
// for (255,239,8) (8 arbitrary errors; 4 errors with S_0 = S_1 = 0; no
// error; 8 errors of value 1; 2 equal errors; 2 arbitrary errors; 1 error),
// then random cases over n and t with 0..t errors and some with t+1 errors.
// Syndrome sets with only one nonzero value S_{2t-r} (r = 1..t) give a
// locator degree of 2t-r+1 > t and must raise fail_o.
// out_ready is held low for a few cycles on some cases to check the hold.
module tb_rs_kes;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  localparam int TM = 8;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  gf_t        syn [2*TM];
  logic [3:0] t_i = 4'd8;
  gf_t        alpha_io = 8'd1;
  logic       busy, out_valid, out_ready = 1'b1, fail_o, noerr_o;
  gf_t        lam_o [TM+1];
  gf_t        omg_o [TM];
  logic [4:0] deg_o;

  int checks = 0, failures = 0;
  int n_cases = 0, n_fail_cases = 0, n_noerr = 0;

  always #5 clk = ~clk;

  rs_kes dut (
    .clk(clk), .rst_n(rst_n), .start(start), .syn(syn), .t_i(t_i),
    .alpha_io_i(alpha_io), .busy(busy), .out_valid(out_valid),
    .out_ready(out_ready), .lam_o(lam_o), .omg_o(omg_o), .deg_o(deg_o),
    .fail_o(fail_o), .noerr_o(noerr_o)
  );

  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("ERROR: %s", msg);
    end
  endfunction

  // ne errors at random places; vals[e] gives the value (0 = random)
  task automatic run_case(int n, int t, int ne, sym_t vals [16], bit s01zero, string name,
                         input int raw = 0);
    word_t w;
    sym_t  s [16];
    sym_t  lam [17];
    sym_t  om [16];
    int    dseq [17];
    int    deg, cyc, exp_cyc, bound, k, maxd;
    int    pos [16];
    sym_t  ev [16];
    sym_t  aio, c, cp;
    bit    noerr, over;
    k = n - 2 * t;
    for (int p = 0; p < 255; p++) w[p] = '0;
    for (int p = 0; p < k; p++) w[p] = 8'($urandom);
    encode(n, t, w);
    // distinct positions
    for (int e = 0; e < ne; e++) begin
      bit dup;
      do begin
        pos[e] = $urandom_range(0, n - 1);
        dup = 0;
        for (int q = 0; q < e; q++) if (pos[q] == pos[e]) dup = 1;
      end while (dup);
      ev[e] = vals[e];
      while (ev[e] == 0) ev[e] = 8'($urandom);
    end
    if (s01zero) begin
      // choose the last two values so that S_0 = S_1 = 0 (ne = 4)
      sym_t a, b, x2, x3, d;
      do begin
        a = ev[0] ^ ev[1];
        b = rmul(ev[0], ralpha(n - 1 - pos[0])) ^ rmul(ev[1], ralpha(n - 1 - pos[1]));
        x2 = ralpha(n - 1 - pos[2]);
        x3 = ralpha(n - 1 - pos[3]);
        d  = rmul(b ^ rmul(a, x3), rinv(x2 ^ x3));
        ev[2] = d;
        ev[3] = a ^ d;
        if (ev[2] == 0 || ev[3] == 0) begin
          ev[0] = 8'($urandom_range(1, 255));
        end
      end while (ev[2] == 0 || ev[3] == 0);
    end
    for (int e = 0; e < ne; e++) w[pos[e]] ^= ev[e];
    syndromes(n, w, s);
    // raw syndromes: only S_{2t-raw} nonzero, linear complexity 2t-raw+1 > t
    if (raw > 0) begin
      for (int i = 0; i < 16; i++) s[i] = '0;
      s[2 * t - raw] = 8'($urandom_range(1, 255));
    end
    if (s01zero) check(s[0] == 0 && s[1] == 0, "special case: S0/S1 not zero");
    bm(t, s, lam, deg, dseq);
    omega(t, lam, s, om);
    noerr = 1;
    for (int i = 0; i < 2 * t; i++) if (s[i] != 0) noerr = 0;
    maxd = 0;
    for (int i = 1; i <= 2 * t; i++) if (dseq[i] > maxd) maxd = dseq[i];
    over = (deg > t);
    exp_cyc = kes_cycles(t, dseq, deg, noerr);
    bound   = 2 * t * (t + 1) + ((deg > 8 ? 8 : deg) * ((deg > 8 ? 8 : deg) + 1)) / 2 + 4;
    aio = ralpha(255 - n);

    // drive
    for (int i = 0; i < 16; i++) syn[i] = (i < 2 * t) ? s[i] : 8'($urandom);
    t_i      = 4'(t);
    alpha_io = aio;
    start    = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc   = 1;
    while (!out_valid) begin
      @(negedge clk);
      cyc++;
      if (cyc > 1000) break;
    end
    n_cases++;
    if (over) n_fail_cases++;
    if (noerr) n_noerr++;
    check(out_valid, $sformatf("%s: no result", name));
    check(noerr_o == noerr, $sformatf("%s: noerr %0d exp %0d", name, noerr_o, noerr));
    check(fail_o == over, $sformatf("%s: fail %0d exp %0d (deg %0d t %0d)", name, fail_o, over, deg, t));
    if (maxd <= TM) begin
      check(cyc == exp_cyc, $sformatf("%s: %0d cycles, schedule %0d", name, cyc, exp_cyc));
      check(cyc <= bound, $sformatf("%s: %0d cycles over bound %0d", name, cyc, bound));
    end
    if (!over) begin
      check(32'(deg_o) == deg, $sformatf("%s: degree %0d exp %0d", name, deg_o, deg));
      c = lam_o[0];
      check(c != 0, $sformatf("%s: Lambda_0 = 0", name));
      for (int j = 0; j <= TM; j++) begin
        cp = rmul(c, rmul(lam[j], rpow(aio, j)));
        check(lam_o[j] === cp, $sformatf("%s: Lambda_%0d %02h exp %02h", name, j, lam_o[j], cp));
      end
      for (int j = 0; j < TM; j++) begin
        cp = (j < deg) ? rmul(c, rmul(om[j], rpow(aio, j))) : 8'd0;
        check(omg_o[j] === cp, $sformatf("%s: Omega_%0d %02h exp %02h", name, j, omg_o[j], cp));
      end
    end
    // hold check: result stays while out_ready is low
    if (n_cases % 5 == 0) begin
      sym_t l0;
      l0 = lam_o[0];
      out_ready = 1'b0;
      repeat (3) @(negedge clk);
      check(out_valid && lam_o[0] == l0, $sformatf("%s: result not held", name));
      out_ready = 1'b1;
    end
    @(negedge clk);
    check(!out_valid && !busy, $sformatf("%s: not idle after hand-over", name));
  endtask

  initial begin
    sym_t v [16];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // the seven special codewords, (255,239,8)
    for (int e = 0; e < 16; e++) v[e] = 0;
    run_case(255, 8, 8, v, 0, "case1 eight errors");
    v[0] = 8'd1; v[1] = 8'd2;
    run_case(255, 8, 4, v, 1, "case2 S0=S1=0");
    run_case(255, 8, 0, v, 0, "case3 no error");
    for (int e = 0; e < 8; e++) v[e] = 8'd1;
    run_case(255, 8, 8, v, 0, "case4 equal values");
    run_case(255, 8, 2, v, 0, "case5 two equal values");
    for (int e = 0; e < 16; e++) v[e] = 0;
    run_case(255, 8, 2, v, 0, "case6 two errors");
    run_case(255, 8, 1, v, 0, "case7 one error");
    // random
    for (int r = 0; r < 300; r++) begin
      int t, n, ne;
      t  = $urandom_range(1, 8);
      n  = $urandom_range(2 * t + 2, 255);
      ne = $urandom_range(0, t);
      if (r % 10 == 9) ne = t + 1;
      run_case(n, t, ne, v, 0, $sformatf("random %0d (n=%0d t=%0d e=%0d)", r, n, t, ne));
    end
    for (int r = 0; r < 20; r++) begin
      int t, n, raw;
      t   = $urandom_range(1, 8);
      n   = $urandom_range(2 * t + 2, 255);
      raw = $urandom_range(1, t);
      run_case(n, t, 0, v, 0, $sformatf("raw %0d (n=%0d t=%0d S_%0d)", r, n, t, 2 * t - raw), raw);
    end
    $display("solver: %0d cases, %0d beyond t, %0d without errors", n_cases, n_fail_cases, n_noerr);
    check(n_fail_cases > 0 && n_noerr > 0, "mechanism (fail / skip) not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
