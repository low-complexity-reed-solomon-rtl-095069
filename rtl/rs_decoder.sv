// rs_decoder: multi-mode Reed-Solomon decoder, errors only, GF(2^8),
// n <= 255, t <= TM = 8, b = 0.
//
// Three pipeline stages work on three codewords at once:
//   1. syndrome calculator (rs_enc_sc, syndrome mode): n cycles per word;
//      on the last symbol the 2t syndromes are latched into the bank;
//   2. key-equation solver (rs_kes): starts one cycle later, finds the
//      compensated Lambda(x) and Omega(x);
//   3. Chien search / Forney (rs_csee): n cycles, one error value per
//      cycle, added to the buffered received symbol (rs_rx_buffer).
// The receive controller (this module's counter) samples the mode (n_i,
// t_i) with the first symbol of each codeword, so every codeword may use a
// different mode; the mode travels with the syndromes and alpha^(255-n)
// for the shortened-code compensator is formed here.
//
// Stall: the syndrome bank stays occupied until the solver hands its
// result to the Chien block. If the next codeword reaches its last symbol
// before that, in_ready drops and the last symbol waits. This happens when
// n is small compared with the solver's cycle count (for example short
// codewords with t = 8), or when the Chien block is still busy.
//
// Interface: input valid/ready, one symbol per cycle. Output: out_valid for
// n consecutive cycles per codeword, with out_sop/out_eop, out_fail on the
// eop cycle (uncorrectable word) and out_corr marking corrected symbols.
// The output has no back-pressure. Latency from the last input symbol of a
// word to its first output symbol is the solver time plus 4 cycles.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int unsigned TM    = TMAX,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  gf_t                     in_data,
  input  logic [7:0]              n_i,
  input  logic [$clog2(TM+1)-1:0] t_i,
  output logic                    out_valid,
  output gf_t                     out_data,
  output logic                    out_sop,
  output logic                    out_eop,
  output logic                    out_fail,
  output logic                    out_corr,
  output logic                    stall_o,      // last symbol held back this cycle
  output logic                    kes_skip_o    // solver found all syndromes zero
);
  localparam int unsigned TW = $clog2(TM + 1);
  localparam int unsigned DW = $clog2(2 * TM + 2);

  // ------------------------------------------------------------ controller
  logic [7:0]    pos, n_r, n_cur;
  logic [TW-1:0] t_r, t_cur;
  logic          first, last, acc;
  logic          bank_valid, kes_start;
  logic [7:0]    bank_n;
  logic [TW-1:0] bank_t;
  gf_t           bank_aio;

  assign first    = (pos == 8'd0);
  assign n_cur    = first ? n_i : n_r;
  assign t_cur    = first ? t_i : t_r;
  assign last     = (pos == n_cur - 8'd1);
  assign in_ready = !(last && bank_valid);
  assign acc      = in_valid && in_ready;
  assign stall_o  = in_valid && last && bank_valid;

  // stage 3 status, used by the checks in the controller
  logic err_valid, err_first, err_last, csee_fail, csee_root;
  logic [$clog2(DEPTH):0] buf_count;

  // ------------------------------------------------------------ stage 1
  gf_t syn [2*TM];
  gf_t tx_unused;

  rs_enc_sc #(.TM(TM)) u_sc (
    .clk     (clk),
    .rst_n   (rst_n),
    .encode  (1'b0),
    .control (1'b0),
    .active  (acc),
    .first   (first),
    .last    (last),
    .t       (t_cur),
    .tx_in   ('0),
    .rx_in   (in_data),
    .tx_out  (tx_unused),
    .syn     (syn)
  );

  // ------------------------------------------------------------ stage 2
  logic          kes_valid, kes_fail, kes_noerr;
  gf_t           lam [TM+1];
  gf_t           omg [TM];
  logic [DW-1:0] kes_deg;
  logic          csee_ready, handoff, kes_busy;

  rs_kes #(.TM(TM)) u_kes (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (kes_start),
    .syn        (syn),
    .t_i        (bank_t),
    .alpha_io_i (bank_aio),
    .busy       (kes_busy),
    .out_valid  (kes_valid),
    .out_ready  (csee_ready),
    .lam_o      (lam),
    .omg_o      (omg),
    .deg_o      (kes_deg),
    .fail_o     (kes_fail),
    .noerr_o    (kes_noerr)
  );

  assign handoff = kes_valid && csee_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      n_r        <= '0;
      t_r        <= '0;
      bank_valid <= 1'b0;
      kes_start  <= 1'b0;
      bank_n     <= '0;
      bank_t     <= '0;
      bank_aio   <= 8'd1;
      kes_skip_o <= 1'b0;
    end else begin
      // a new syndrome bank only starts the solver when it is idle
      a_kes_idle: assert (!(kes_start && kes_busy));
      // symbols are corrected only at roots of the error locator
      a_corr_at_root: assert (!out_corr || csee_root);
      // each codeword arrives with a codable mode
      a_mode: assert (!(acc && first) || mode_ok(n_i, 4'(t_i)));
      // at most three codewords are in flight (one per stage)
      a_buf_words: assert (buf_count <= ($clog2(DEPTH)+1)'(3 * 255));
      kes_start  <= acc && last;
      kes_skip_o <= handoff && kes_noerr;
      if (acc) begin
        if (first) begin
          n_r <= n_i;
          t_r <= t_i;
        end
        pos <= last ? 8'd0 : pos + 8'd1;
        if (last) begin
          bank_valid <= 1'b1;
          bank_n     <= n_cur;
          bank_t     <= t_cur;
          bank_aio   <= gf_alpha(8'd255 - n_cur);
        end
      end
      if (handoff) bank_valid <= 1'b0;
    end
  end

  // ------------------------------------------------------------ stage 3
  gf_t  err_val, rd_data;

  rs_csee #(.TM(TM)) u_csee (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (kes_valid),
    .ready     (csee_ready),
    .lam_in    (lam),
    .omg_in    (omg),
    .n_i       (bank_n),
    .deg_i     (kes_deg),
    .fail_i    (kes_fail),
    .err_valid (err_valid),
    .err_val   (err_val),
    .err_first (err_first),
    .err_last  (err_last),
    .root_o    (csee_root),
    .fail_o    (csee_fail)
  );

  rs_rx_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (acc),
    .wr_data (in_data),
    .rd_en   (err_valid),
    .rd_data (rd_data),
    .count_o (buf_count)
  );

  assign out_valid = err_valid;
  assign out_data  = rd_data ^ err_val;
  assign out_sop   = err_first;
  assign out_eop   = err_last;
  assign out_fail  = csee_fail;
  assign out_corr  = err_valid && (err_val != '0);

endmodule
