// tb_rs_csee: check of the Chien search / Forney error evaluator.
//
// For random (n, t) and 0..t errors the reference model gives Lambda and
// Omega; they are scaled by a random nonzero constant and by (alpha^io)^j
// (what the solver delivers) and loaded. Checks:
//   - err_val for cycle p equals the error value at codeword position p
//     (0 where there is no error), err_valid for exactly n cycles;
//   - timing: first value 4 cycles after the load cycle, err_first and
//     err_last on the first and n-th value; ready low for exactly n cycles
//     after the load (the next load can follow n+1 cycles after it);
//   - fail_o low for a good word; high when the solver's flag is set (the
//     values are then forced to 0) and when the declared degree does not
//     match the number of roots found.
module tb_rs_csee;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       load = 1'b0, ready, fail_i = 1'b0;
  gf_t        lam_in [9];
  gf_t        omg_in [8];
  logic [7:0] n_i = 8'd255;
  logic [4:0] deg_i = '0;
  logic       err_valid, err_first, err_last, root_o, fail_o;
  gf_t        err_val;
  int checks = 0, failures = 0, n_fail_seen = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // busy time: cycles from the load edge to ready rising again
  longint t_load = 0, busy_len = 0;
  logic   ready_q = 1'b1;
  always @(negedge clk) begin
    if (ready && !ready_q) busy_len = cyc - t_load;
    ready_q = ready;
  end

  rs_csee dut (
    .clk(clk), .rst_n(rst_n), .load(load), .ready(ready), .lam_in(lam_in),
    .omg_in(omg_in), .n_i(n_i), .deg_i(deg_i), .fail_i(fail_i),
    .err_valid(err_valid), .err_val(err_val), .err_first(err_first),
    .err_last(err_last), .root_o(root_o), .fail_o(fail_o)
  );

  function automatic void check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("ERROR: %s", msg); end
  endfunction

  // mode 0: normal, 1: solver flag set, 2: wrong degree declared
  task automatic run(int n, int t, int ne, int mode);
    word_t w, e;
    sym_t  s [16];
    sym_t  lam [17];
    sym_t  om [16];
    int    dseq [17];
    int    deg, k;
    sym_t  c, aio;
    longint t0;
    k = n - 2 * t;
    for (int p = 0; p < 255; p++) begin w[p] = '0; e[p] = '0; end
    for (int p = 0; p < k; p++) w[p] = 8'($urandom);
    rs_ref_pkg::encode(n, t, w);
    for (int q = 0; q < ne; q++) begin
      int p;
      do p = $urandom_range(0, n - 1); while (e[p] != 0);
      e[p] = 8'($urandom_range(1, 255));
      w[p] ^= e[p];
    end
    syndromes(n, w, s);
    bm(t, s, lam, deg, dseq);
    omega(t, lam, s, om);
    c   = 8'($urandom_range(1, 255));
    aio = ralpha(255 - n);
    for (int j = 0; j <= 8; j++) lam_in[j] = rmul(c, rmul(lam[j], rpow(aio, j)));
    for (int j = 0; j < 8; j++)  omg_in[j] = (j < deg) ? rmul(c, rmul(om[j], rpow(aio, j))) : 8'd0;
    n_i    = 8'(n);
    deg_i  = 5'((mode == 2) ? deg + 1 : deg);
    fail_i = (mode == 1);
    // wait for ready, then load
    #1;
    while (!ready) begin @(negedge clk); #1; end
    load   = 1'b1;
    t0     = cyc;
    t_load = cyc;
    @(negedge clk);
    load = 1'b0;
    #1;
    check(!ready, "ready high right after load");
    // values
    for (int p = 0; p < n; p++) begin
      while (!err_valid) begin
        @(negedge clk);
        if (cyc - t0 > 10) break;
      end
      #1;
      if (p == 0) check(cyc - t0 == 4, $sformatf("first value after %0d cycles", cyc - t0));
      check(err_valid, $sformatf("n=%0d pos %0d: no value", n, p));
      check(err_first === (p == 0) && err_last === (p == n - 1), $sformatf("n=%0d pos %0d: first/last flags", n, p));
      check(err_val === ((mode == 1) ? 8'd0 : e[p]), $sformatf("n=%0d t=%0d pos %0d: value %02h exp %02h (mode %0d)", n, t, p, err_val, e[p], mode));
      if (p == n - 1) begin
        bit f;
        f = (mode != 0);
        check(fail_o === f, $sformatf("n=%0d t=%0d e=%0d mode %0d: fail %0d", n, t, ne, mode, fail_o));
        if (fail_o) n_fail_seen++;
      end
      @(negedge clk);
    end
    // load cycle + n evaluation cycles, then ready again
    check(busy_len == longint'(n + 1), $sformatf("n=%0d: ready back after %0d cycles", n, busy_len));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      int t, n;
      t = $urandom_range(1, 8);
      n = $urandom_range(2 * t + 2, 255);
      run(n, t, $urandom_range(0, t), 0);
    end
    run(255, 8, 8, 1);
    run(100, 4, 3, 2);
    run(60, 8, 0, 2);
    $display("csee: %0d failure verdicts seen", n_fail_seen);
    check(n_fail_seen == 3, "failure cases not all flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
