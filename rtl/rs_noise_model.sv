// rs_noise_model: random symbol-error injector placed between encoder and
// decoder for self-test.
//
// A symbol is corrupted (out = in XOR rand_val) when all three conditions
// of the AND gate hold: injection is enabled (in_ctrl), the random location
// value equals the SNR setting (rand_loc == snr), and fewer than t errors
// have been injected into the current codeword (err_count < t). With a
// 5-bit location value each symbol is hit with probability 1/32. The error
// counter restarts at the first symbol of each codeword (in_sop), and t is
// sampled with that symbol, so a mode change takes effect at a codeword
// boundary. A rand_val of zero still counts as an injection but changes
// nothing.
//
// Timing: out_data and err_o are combinational; the counter updates on
// accepted symbols (in_valid && in_ready). The random values come from
// outside (a generator or testbench), as in the document's figure.
module rs_noise_model
  import rs_pkg::*;
#(
  parameter int unsigned TM = TMAX,
  parameter int unsigned LW = 5                  // width of SNR / location value
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_ready,
  input  logic                    in_sop,
  input  gf_t                     in_data,
  input  logic                    in_ctrl,
  input  logic [$clog2(TM+1)-1:0] t_i,
  input  logic [LW-1:0]           snr,
  input  logic [LW-1:0]           rand_loc,
  input  gf_t                     rand_val,
  output gf_t                     out_data,
  output logic                    err_o,
  output logic [$clog2(TM+1)-1:0] err_count
);
  logic [$clog2(TM+1)-1:0] cnt_eff, t_r, t_eff;

  always_comb begin
    cnt_eff  = in_sop ? '0 : err_count;
    t_eff    = in_sop ? t_i : t_r;
    err_o    = in_ctrl && (cnt_eff < t_eff) && (rand_loc == snr);
    out_data = in_data ^ (err_o ? rand_val : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_count <= '0;
      t_r       <= '0;
    end else if (in_valid && in_ready) begin
      err_count <= cnt_eff + ($clog2(TM+1))'(err_o);
      t_r       <= t_eff;
    end
  end
endmodule
