// rs_enc_sc: the 2*TM alpha^i cells shared by the multi-mode encoder and the
// syndrome calculator (SC).
//
// Cell i holds one symbol register r_i and a constant multiplier by alpha^i
// (i = 0..2*TM-1, so 1, 2, 4, ..., alpha^15 = 38). Cells 2k-2 and 2k-1 are
// enabled by line t<k> of the t-decoder ANDed with `active`, so a mode with
// correction capability t uses cells 0..2t-1 and leaves the others idle.
//
// Syndrome mode (encode = 0): each cell runs Horner's rule on the received
// stream, r_i <= alpha^i * r_i + rx_in, so after the n-th symbol
// r_i = R(alpha^i) = S_i. On the last symbol (`last`) the values are copied
// into the syndrome bank syn[], which feeds the key-equation solver, while
// the cells are already free for the next codeword.
//
// Encode mode (encode = 1): the cells form the factored form of the
// generator, 1/g(z) = prod 1/(1 + alpha^i z^-1). A chain of adders sums the
// products alpha^l * r_l from cell 0 upward; cell i stores
// tx_out + sum_{l<=i} alpha^l r_l. While `control` = 0 the message symbol
// tx_in is passed to tx_out; while `control` = 1 the sum of all products
// (`feedback`) is sent out as the next parity symbol, which drives the last
// stage of the cascade to zero, so after 2t parity symbols the codeword is a
// multiple of g(x) and every cell is back at zero. The multiplexers that
// cut the adder chain in syndrome mode are the "Encode" multiplexers of the
// combined architecture.
//
// `first` marks the first symbol of a codeword: the cells then act as if
// their state were zero, so codewords can follow each other with no idle
// cycle. Disabled cells are masked out of the chain and read as zero.
// The cell registers, the chain and the output multiplexer follow the
// combined encoder/SC figure; the `first` restart and the masking of idle
// cells are this design's choices.
//
// Timing: one symbol per cycle while active; tx_out is combinational from
// tx_in/feedback; syn[] is valid from the cycle after `last`.
module rs_enc_sc
  import rs_pkg::*;
#(
  parameter int unsigned TM = TMAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    encode,    // 1: encoder, 0: syndrome calculator
  input  logic                    control,   // encoder: 1 = send parity (feedback)
  input  logic                    active,    // a symbol is processed this cycle
  input  logic                    first,     // first symbol of a codeword
  input  logic                    last,      // last symbol: load syndrome bank
  input  logic [$clog2(TM+1)-1:0] t,         // correction capability of this codeword
  input  gf_t                     tx_in,     // message symbol (encoder)
  input  gf_t                     rx_in,     // received symbol (SC)
  output gf_t                     tx_out,    // codeword symbol (encoder)
  output gf_t                     syn [2*TM] // syndrome bank S_0..S_{2TM-1}
);

  localparam int unsigned NC = 2 * TM;

  logic [TM-1:0] t_en;
  t_decoder #(.TM(TM)) u_tdec (.t(t), .t_en(t_en));

  gf_t r      [NC];
  gf_t r_eff  [NC];
  gf_t prod   [NC];
  gf_t chain  [NC];
  gf_t nxt    [NC];
  gf_t din;
  gf_t feedback;

  always_comb begin
    gf_t run;
    run = '0;
    for (int unsigned i = 0; i < NC; i++) begin
      r_eff[i] = (first || !t_en[i/2]) ? '0 : r[i];
      prod[i]  = gf_mul(r_eff[i], gf_alpha(8'(i)));
      run      = run ^ prod[i];
      chain[i] = run;
    end
    feedback = run;
    din      = encode ? (control ? feedback : tx_in) : rx_in;
    for (int unsigned i = 0; i < NC; i++)
      nxt[i] = din ^ (encode ? chain[i] : prod[i]);
  end

  assign tx_out = din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NC; i++) begin
        r[i]   <= '0;
        syn[i] <= '0;
      end
    end else begin
      for (int unsigned i = 0; i < NC; i++) begin
        if (active && t_en[i/2]) r[i] <= nxt[i];
        if (active && last) syn[i] <= t_en[i/2] ? nxt[i] : '0;
      end
    end
  end

endmodule
