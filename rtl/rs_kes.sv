// rs_kes: serial inversionless Berlekamp-Massey (SiBM) key-equation solver
// with the common shortened-code compensator.
//
// From the syndromes S_0..S_{2t-1} it finds the error locator Lambda(x) (a
// scalar multiple of it, as in every inversionless BM) and the error
// evaluator Omega(x) = Lambda(x) S(x) mod x^2t, both multiplied term by term
// by (alpha^io)^j so that Chien search can start at position n-1 of a
// shortened codeword (io = 255 - n).
//
// Iterations i = 1..2t, one coefficient j per cycle (steps j = 0..J_i):
//   Lambda_j^(i) = Dc * Lambda_j^(i-1) + D^(i-1) * C_{j-1}^(i-1)
//   D^(i)        = sum_j Lambda_j^(i) S_{i-j}   (one product per cycle)
// Two multipliers update Lambda; a third, behind a syndrome multiplexer
// whose select starts at i and counts down, accumulates the discrepancy one
// cycle behind the Lambda coefficient it uses (registered Lambda and select,
// partial sum cleared at j = 1). The last product of D^(i) is added in step
// j = 0 of the next iteration, which needs no discrepancy
// (C_{-1} = 0), so D^(i-1) is ready in a register at j = 1.
//
// Decision retiming: the BM decision
//   keep = (D^(i-1) == 0) || (i <= 2*delta_{i-1})
// and the new degree delta_i = keep ? delta_{i-1} : i - delta_{i-1} are
// formed at j = 1, not at j = 0, which keeps the decision off the
// multiplier path. The iteration ends at j = max(delta_i, 1): step j = 0 is
// never the last one, and {j, delta} = {1, 0} ends it.
//
// Storage: two arrays of TM+1 symbols hold Lambda and x*C(x) (the
// correction polynomial stored one place up, so that the word read at
// address j is C_{j-1}). No coefficient is written at j = 0; the decision
// known at j = 1 then routes Lambda_0 and every later Lambda_j either back
// into the Lambda array (keep: C <- x*C, done by shifting the C array one
// place at the end of the iteration) or into the old C array (update:
// C <- Lambda^(i-1); the untouched old Lambda array is shifted one place
// and becomes the C array, the arrays swap roles, Dc <- D^(i-1)). This
// register-array organisation with a role-swap bit is this design's own
// form of the document's address-line controlled storage.
//
// After iteration 2t, Omega_k = sum_{q<=k} Lambda_q S_{k-q} for
// k = 0..delta-1 reuses the discrepancy multiplier and the same
// count-down syndrome select. The compensator (rs_compensator) scales
// Lambda_k when its row k starts being visited at q = k and Omega_{k-1}
// when it completes, with (alpha^io)^k held between them; row delta only
// visits q = 0 and q = delta. This phase takes delta(delta+1)/2 + 2 cycles
// (1 when delta = 0).
//
// If all syndromes are zero the iterations are skipped (Lambda = 1,
// Omega = 0). fail_o is set when the final degree exceeds t (more errors
// than the code can correct).
//
// Interface: `start` (one cycle, while idle) samples syn[], t_i and
// alpha_io_i; syn[] must stay stable until out_valid && out_ready. Results
// are held with out_valid until out_ready.
module rs_kes
  import rs_pkg::*;
#(
  parameter int unsigned TM = TMAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  gf_t                     syn [2*TM],
  input  logic [$clog2(TM+1)-1:0] t_i,
  input  gf_t                     alpha_io_i,
  output logic                    busy,
  output logic                    out_valid,
  input  logic                    out_ready,
  output gf_t                     lam_o [TM+1],
  output gf_t                     omg_o [TM],
  output logic [$clog2(2*TM+2)-1:0] deg_o,
  output logic                    fail_o,
  output logic                    noerr_o
);

  localparam int unsigned NS = 2 * TM;
  localparam int unsigned IW = $clog2(2 * TM + 2);
  localparam int unsigned TW = $clog2(TM + 1);
  localparam int unsigned AW = $clog2(TM + 1);
  localparam int unsigned OW = $clog2(TM);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_OMEGA, S_DONE} state_t;
  state_t state;

  gf_t            arr [2][TM+1];   // Lambda and x*C, roles chosen by lsel
  logic           lsel;            // array holding Lambda
  logic [IW-1:0]  i_r, j_r;        // iteration and step
  logic [IW-1:0]  dprev;           // delta_{i-1}
  logic [IW-1:0]  dcur;            // delta_i, valid from j = 2
  logic           keep_r;          // decision of this iteration, from j = 2
  logic           first_r;         // step j = 0 of iteration 1
  logic [IW-1:0]  tt;              // 2t
  logic [TW-1:0]  t_r;
  gf_t            a_io;
  gf_t            dc;              // Delta_c, last nonzero discrepancy
  gf_t            disc;            // D^(i-1)
  gf_t            acc;             // partial discrepancy / partial Omega
  gf_t            lam_new_d;       // Lambda_j^(i) one cycle late
  logic [IW-1:0]  sel_d;           // syndrome select, one cycle late
  logic [IW-1:0]  dfin;            // final degree (clamped to TM)
  logic [IW-1:0]  oi, ok;          // Omega row and term
  gf_t            omg_pend;        // Omega row waiting for compensation
  gf_t            lam_c [TM+1];
  gf_t            omg_c [TM];
  logic           fail_r, noerr_r;

  // ---------------------------------------------------------------- datapath
  gf_t            lam_old, cval, lam_new;
  gf_t            ffm_a, ffm_s, ffm_p;
  logic [IW-1:0]  ffm_sel;
  logic           keep_c, keep_now, last_step;
  logic [IW-1:0]  dnew, dnow, jend;
  gf_t            osum;
  logic           comp_step, comp_sel_omega;
  gf_t            comp_lam_in, comp_out;
  logic           syn_zero;
  logic [AW-1:0]  ja, oa, ka;

  always_comb begin
    ja = (j_r > IW'(TM)) ? AW'(TM) : AW'(j_r);
    oa = (oi  > IW'(TM)) ? AW'(TM) : AW'(oi);
    ka = (ok  > IW'(TM)) ? AW'(TM) : AW'(ok);

    // Lambda update (two multipliers)
    lam_old = (j_r > IW'(TM)) ? '0 : arr[lsel][ja];
    cval    = (j_r > IW'(TM)) ? '0 : arr[~lsel][ja];
    lam_new = gf_mul(dc, lam_old) ^ gf_mul(disc, cval);

    // decision, formed at j = 1
    keep_c   = (disc == '0) || ({dprev[IW-2:0], 1'b0} >= i_r);
    dnew     = keep_c ? dprev : (i_r - dprev);
    keep_now = (j_r == IW'(1)) ? keep_c : keep_r;
    dnow     = (j_r == IW'(1)) ? dnew : dcur;
    jend     = (dnow == '0) ? IW'(1) : ((dnow > IW'(TM)) ? IW'(TM) : dnow);
    last_step = (j_r != '0) && (j_r >= jend);

    // shared discrepancy / Omega multiplier with syndrome select
    if (state == S_OMEGA) begin
      ffm_a   = arr[lsel][ka];
      ffm_sel = oi - ok;
    end else begin
      ffm_a   = lam_new_d;
      ffm_sel = sel_d;
    end
    ffm_s = '0;
    for (int unsigned s = 0; s < NS; s++)
      if (ffm_sel == IW'(s) && ffm_sel < tt) ffm_s = syn[s];
    ffm_p = gf_mul(ffm_a, ffm_s);
    osum  = ((ok == '0) ? '0 : acc) ^ ffm_p;

    // compensator control
    comp_sel_omega = (ok == '0) && (oi != '0);
    comp_step      = (state == S_OMEGA) && comp_sel_omega;
    comp_lam_in    = arr[lsel][oa];

    syn_zero = 1'b1;
    for (int unsigned s = 0; s < NS; s++)
      if (IW'(s) < IW'({t_i, 1'b0}) && syn[s] != '0) syn_zero = 1'b0;
  end

  rs_compensator u_comp (
    .clk       (clk),
    .rst_n     (rst_n),
    .alpha_io  (a_io),
    .init      (state != S_OMEGA),
    .step      (comp_step),
    .sel_omega (comp_sel_omega),
    .lam_in    (comp_lam_in),
    .omg_in    (omg_pend),
    .coef_out  (comp_out)
  );

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      lsel      <= 1'b0;
      i_r       <= '0;
      j_r       <= '0;
      dprev     <= '0;
      dcur      <= '0;
      keep_r    <= 1'b1;
      first_r   <= 1'b0;
      tt        <= '0;
      t_r       <= '0;
      a_io      <= 8'd1;
      dc        <= 8'd1;
      disc      <= '0;
      acc       <= '0;
      lam_new_d <= '0;
      sel_d     <= '0;
      dfin      <= '0;
      oi        <= '0;
      ok        <= '0;
      omg_pend  <= '0;
      fail_r    <= 1'b0;
      noerr_r   <= 1'b0;
      for (int unsigned p = 0; p <= TM; p++) begin
        arr[0][p] <= '0;
        arr[1][p] <= '0;
        lam_c[p]  <= '0;
      end
      for (int unsigned p = 0; p < TM; p++) omg_c[p] <= '0;
    end else begin
      // the discrepancy pipeline never selects a syndrome beyond S_2t
      a_sel_range: assert (state != S_ITER || sel_d <= tt);
      unique case (state)
        S_IDLE: if (start) begin
          t_r     <= t_i;
          tt      <= IW'({t_i, 1'b0});
          a_io    <= alpha_io_i;
          lsel    <= 1'b0;
          for (int unsigned p = 0; p <= TM; p++) begin
            arr[0][p] <= (p == 0) ? 8'd1 : 8'd0;   // Lambda^(0) = 1
            arr[1][p] <= (p == 1) ? 8'd1 : 8'd0;   // x*C^(0) = x
            lam_c[p]  <= '0;
          end
          for (int unsigned p = 0; p < TM; p++) omg_c[p] <= '0;
          dc      <= 8'd1;
          disc    <= syn[0];                       // D^(0) = S_0
          dprev   <= '0;
          dcur    <= '0;
          keep_r  <= 1'b1;
          i_r     <= IW'(1);
          j_r     <= '0;
          first_r <= 1'b1;
          sel_d   <= '0;
          oi      <= '0;
          ok      <= '0;
          fail_r  <= 1'b0;
          noerr_r <= syn_zero;
          if (syn_zero) begin
            dfin  <= '0;
            state <= S_OMEGA;
          end else begin
            state <= S_ITER;
          end
        end

        S_ITER: begin
          lam_new_d <= lam_new;
          sel_d     <= i_r - j_r;
          first_r   <= 1'b0;
          if (j_r == '0) begin
            if (!first_r) disc <= acc ^ ffm_p;      // last term of D^(i-1)
          end else begin
            acc <= ((j_r == IW'(1)) ? '0 : acc) ^ ffm_p;
            if (j_r <= IW'(TM))
              arr[keep_now ? lsel : ~lsel][ja] <= lam_new;
            if (j_r == IW'(1))
              arr[keep_now ? lsel : ~lsel][0] <= lam_new_d;
          end
          if (j_r == IW'(1)) begin
            keep_r <= keep_c;
            dcur   <= dnew;
          end
          if (last_step) begin
            // C(x) <- x*C(x) (keep) or x*Lambda^(i-1) (update): shift the
            // array that becomes the correction array one place up.
            for (int unsigned p = 1; p <= TM; p++)
              arr[keep_now ? ~lsel : lsel][p] <= arr[keep_now ? ~lsel : lsel][p-1];
            arr[keep_now ? ~lsel : lsel][0] <= '0;
            if (!keep_now) begin
              lsel <= ~lsel;
              dc   <= disc;
            end
            dprev <= dnow;
            j_r   <= '0;
            if (i_r == tt) begin
              dfin   <= (dnow > IW'(TM)) ? IW'(TM) : dnow;
              fail_r <= (dnow > IW'({1'b0, t_r}));
              oi     <= '0;
              ok     <= '0;
              state  <= S_OMEGA;
            end else begin
              i_r <= i_r + IW'(1);
            end
          end else begin
            j_r <= j_r + IW'(1);
          end
        end

        S_OMEGA: begin
          acc <= osum;
          if (ok == oi && oi < dfin) omg_pend <= osum;
          if (comp_sel_omega) omg_c[OW'(oa - AW'(1))] <= comp_out;
          if (ok == oi)       lam_c[oa] <= comp_out;
          if (oi == dfin) begin
            if (ok == oi) state <= S_DONE;
            else          ok    <= dfin;
          end else if (ok == oi) begin
            oi <= oi + IW'(1);
            ok <= '0;
          end else begin
            ok <= ok + IW'(1);
          end
        end

        S_DONE: if (out_ready) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign out_valid = (state == S_DONE);
  assign lam_o     = lam_c;
  assign omg_o     = omg_c;
  assign deg_o     = dfin;
  assign fail_o    = fail_r;
  assign noerr_o   = noerr_r;

endmodule
