// rs_csee: Chien search and Forney error evaluator (CSEE).
//
// On `load` it takes the compensated coefficients Lambda_j (alpha^io)^j and
// Omega_j (alpha^io)^j from the key-equation solver. Each cycle every term
// register is multiplied by its constant alpha^j and the products are
// summed, so cycle p (p = 0..n-1) evaluates
//   Lambda(x), Lambda_odd(x) (sum of the odd terms) and Omega(x)
// at x = alpha^(io+1+p) = alpha^-(n-1-p), the inverse locator of codeword
// position n-1-p. The first symbol received is tested first.
//
// Three registers split the output path, so that no path holds more than
// one of: the term multipliers and sum tree, the inverter, the Forney
// multiplier. Stage 1 registers the zero test of Lambda(x) and
// Lambda_odd(x); stage 2 registers the inverse of Lambda_odd(x) and
// Omega(x); stage 3 registers the Forney value
//   e = Omega(x) / Lambda_odd(x)     (b = 0, so no extra x^b factor).
// The Omega term registers start stepping one cycle after the Lambda ones,
// so Omega(x) for a position is summed one cycle after its root test, in
// time for stage 2. Positions that are not roots give e = 0. The error
// value for the first position appears three cycles after the first
// evaluation cycle, one per cycle, n in all.
//
// fail_o (valid with err_last) reports an uncorrectable word: the solver
// flagged it, or the number of roots found differs from the locator degree,
// or a root had Lambda_odd = 0. When the solver flagged the word, all error
// values are forced to zero so the received word passes unchanged.
//
// Interface: `load` is accepted when ready = 1 (idle); the block is busy for
// n evaluation cycles and then ready again (one free cycle between
// codewords). The term-register loop, the three pipeline registers and the
// one-cycle-late Omega evaluation follow the document's CSEE; what each
// register holds and the failure checks are this design's own choices.
module rs_csee
  import rs_pkg::*;
#(
  parameter int unsigned TM = TMAX
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  output logic                      ready,
  input  gf_t                       lam_in [TM+1],
  input  gf_t                       omg_in [TM],
  input  logic [7:0]                n_i,
  input  logic [$clog2(2*TM+2)-1:0] deg_i,
  input  logic                      fail_i,
  output logic                      err_valid,
  output gf_t                       err_val,
  output logic                      err_first,
  output logic                      err_last,
  output logic                      root_o,     // this position is an error
  output logic                      fail_o      // with err_last
);

  localparam int unsigned DW = $clog2(2 * TM + 2);

  gf_t        lr [TM+1];
  gf_t        orr [TM];
  gf_t        lp [TM+1];
  gf_t        op [TM];
  logic       busy;
  logic [7:0] cnt;            // evaluation cycles left
  logic [7:0] n_r;
  logic [DW-1:0] deg_r;
  logic       kfail_r;

  gf_t  lam_sum, odd_sum, omg_sum;

  always_comb begin
    lam_sum = '0;
    odd_sum = '0;
    omg_sum = '0;
    for (int unsigned j = 0; j <= TM; j++) begin
      lp[j]   = gf_mul(lr[j], gf_alpha(8'(j)));
      lam_sum ^= lp[j];
      if (j % 2 == 1) odd_sum ^= lp[j];
    end
    for (int unsigned j = 0; j < TM; j++) begin
      op[j]   = gf_mul(orr[j], gf_alpha(8'(j)));
      omg_sum ^= op[j];
    end
  end

  // stage 1
  logic s1_valid, s1_first, s1_last, s1_root;
  gf_t  s1_odd;
  // stage 2
  logic s2_valid, s2_first, s2_last, s2_root, s2_kfail, s2_fail;
  gf_t  s2_inv, s2_omg;
  // root bookkeeping
  logic [7:0] roots;
  logic       bad_root;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      n_r       <= '0;
      deg_r     <= '0;
      kfail_r   <= 1'b0;
      for (int unsigned j = 0; j <= TM; j++) lr[j] <= '0;
      for (int unsigned j = 0; j < TM; j++) orr[j] <= '0;
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      s1_root   <= 1'b0;
      s1_odd    <= '0;
      s2_valid  <= 1'b0;
      s2_first  <= 1'b0;
      s2_last   <= 1'b0;
      s2_root   <= 1'b0;
      s2_kfail  <= 1'b0;
      s2_fail   <= 1'b0;
      s2_inv    <= '0;
      s2_omg    <= '0;
      err_valid <= 1'b0;
      err_val   <= '0;
      err_first <= 1'b0;
      err_last  <= 1'b0;
      root_o    <= 1'b0;
      fail_o    <= 1'b0;
      roots     <= '0;
      bad_root  <= 1'b0;
    end else begin
      // evaluation loop
      if (load && !busy) begin
        lr      <= lam_in;
        orr     <= omg_in;
        n_r     <= n_i;
        deg_r   <= deg_i;
        kfail_r <= fail_i;
        cnt     <= n_i;
        busy    <= 1'b1;
      end else if (busy) begin
        lr  <= lp;
        if (cnt != n_r) orr <= op;   // Omega runs one position behind
        cnt <= cnt - 8'd1;
        if (cnt == 8'd1) busy <= 1'b0;
      end

      // stage 1: zero test and odd sum
      s1_valid <= busy;
      s1_first <= busy && (cnt == n_r);
      s1_last  <= busy && (cnt == 8'd1);
      s1_root  <= busy && (lam_sum == '0);
      s1_odd   <= odd_sum;

      // stage 2: inverse and Omega of the same position
      s2_valid <= s1_valid;
      s2_first <= s1_valid && s1_first;
      s2_last  <= s1_valid && s1_last;
      s2_root  <= s1_valid && s1_root;
      s2_kfail <= kfail_r;
      s2_inv   <= gf_inv(s1_odd);
      s2_omg   <= omg_sum;

      // stage 3: Forney value
      err_valid <= s2_valid;
      err_first <= s2_first;
      err_last  <= s2_last;
      root_o    <= s2_root;
      err_val   <= (s2_root && !s2_kfail) ? gf_mul(s2_omg, s2_inv) : '0;
      fail_o    <= s2_last && s2_fail;
      if (s1_valid) begin
        if (s1_first) begin
          roots    <= s1_root ? 8'd1 : 8'd0;
          bad_root <= s1_root && (s1_odd == '0);
        end else begin
          roots    <= roots + (s1_root ? 8'd1 : 8'd0);
          bad_root <= bad_root || (s1_root && (s1_odd == '0));
        end
      end
      // verdict, one stage ahead of the last error value
      s2_fail <= s1_valid && s1_last &&
                (kfail_r || bad_root || (s1_root && s1_odd == '0) ||
                 ((s1_first ? 8'd0 : roots) + (s1_root ? 8'd1 : 8'd0) != 8'(deg_r)));
    end
  end

endmodule
