// rs_codec_top: multi-mode Reed-Solomon codec with its self-test channel.
//
// Message symbols enter the encoder (rs_encoder), which appends 2t parity
// symbols; each codeword symbol passes the noise model (rs_noise_model),
// which may add a random error (at most t per codeword), and then enters
// the three-stage decoder (rs_decoder), whose output should equal the
// encoder output. The mode (n, t) is sampled by the encoder with the first
// message symbol of each codeword and carried to the decoder with that
// codeword's first symbol, so consecutive codewords may use different modes.
// k = n - 2t is implied by n and t.
//
// Interface: tx_valid/tx_ready for the k message symbols of each codeword;
// the decoder output (data_out, with valid, sop, eop, fail) has no
// back-pressure. The random location, SNR and noise values come from
// outside, as in the document's system figure. enc_* (data, valid, sop,
// eop), noise_err and noise_count (errors already put into the codeword)
// expose the channel for observation.
module rs_codec_top
  import rs_pkg::*;
#(
  parameter int unsigned TM    = TMAX,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned LW    = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // mode
  input  logic [7:0]              n_i,
  input  logic [$clog2(TM+1)-1:0] t_i,
  // message input
  input  logic                    tx_valid,
  output logic                    tx_ready,
  input  gf_t                     tx_data,
  // noise model
  input  logic                    noise_en,
  input  logic [LW-1:0]           snr,
  input  logic [LW-1:0]           rand_loc,
  input  gf_t                     rand_val,
  // channel observation
  output logic                    enc_valid,
  output gf_t                     enc_data,
  output logic                    enc_sop,
  output logic                    enc_eop,
  output logic                    noise_err,
  output logic [$clog2(TM+1)-1:0] noise_count,
  // decoded output
  output logic                    out_valid,
  output gf_t                     data_out,
  output logic                    out_sop,
  output logic                    out_eop,
  output logic                    out_fail,
  output logic                    out_corr,
  output logic                    stall_o,
  output logic                    kes_skip_o
);
  logic          enc_ready;
  gf_t           rx_data;

  // mode carried alongside the first symbol of each codeword
  logic [7:0]              mode_n;
  logic [$clog2(TM+1)-1:0] mode_t;

  rs_encoder #(.TM(TM)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .n_i       (n_i),
    .t_i       (t_i),
    .in_valid  (tx_valid),
    .in_ready  (tx_ready),
    .in_data   (tx_data),
    .out_valid (enc_valid),
    .out_ready (enc_ready),
    .out_data  (enc_data),
    .out_sop   (enc_sop),
    .out_eop   (enc_eop)
  );

  // The encoder samples the mode with its first symbol; the decoder samples
  // it with the same symbol, so both see the same n and t.
  assign mode_n = n_i;
  assign mode_t = t_i;

  rs_noise_model #(.TM(TM), .LW(LW)) u_noise (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_valid),
    .in_ready  (enc_ready),
    .in_sop    (enc_sop),
    .in_data   (enc_data),
    .in_ctrl   (noise_en),
    .t_i       (mode_t),
    .snr       (snr),
    .rand_loc  (rand_loc),
    .rand_val  (rand_val),
    .out_data  (rx_data),
    .err_o     (noise_err),
    .err_count (noise_count)
  );

  rs_decoder #(.TM(TM), .DEPTH(DEPTH)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (enc_valid),
    .in_ready   (enc_ready),
    .in_data    (rx_data),
    .n_i        (mode_n),
    .t_i        (mode_t),
    .out_valid  (out_valid),
    .out_data   (data_out),
    .out_sop    (out_sop),
    .out_eop    (out_eop),
    .out_fail   (out_fail),
    .out_corr   (out_corr),
    .stall_o    (stall_o),
    .kes_skip_o (kes_skip_o)
  );

endmodule
