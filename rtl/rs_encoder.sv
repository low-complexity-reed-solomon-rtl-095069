// rs_encoder: multi-mode systematic RS encoder (factored-form, alpha^i-based
// structure) with its symbol counter.
//
// For each codeword the mode (n, t) is sampled with the first message
// symbol; k = n - 2t. The first k accepted symbols are message symbols and
// pass straight to the output; then the encoder drives `control` high and
// emits the 2t parity symbols from the shared cell array (rs_enc_sc in
// encode mode), one per cycle, while in_ready is low. The result is
// C(x) = I(x) x^2t + (I(x) x^2t mod g(x)) with g(x) = prod_{i<2t}(x + alpha^i).
//
// Interface: valid/ready on both sides. out_data is combinational from
// in_data during the message phase. out_sop / out_eop mark the first and
// last symbol of a codeword. A stalled output (out_ready = 0) freezes the
// cells. The counter and handshake are this design's own; the cells and the
// message/parity multiplexer follow the document's encoder.
module rs_encoder
  import rs_pkg::*;
#(
  parameter int unsigned TM = TMAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [7:0]              n_i,       // codeword length, 2t < n <= 255
  input  logic [$clog2(TM+1)-1:0] t_i,       // correction capability 1..TM
  input  logic                    in_valid,
  output logic                    in_ready,
  input  gf_t                     in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output gf_t                     out_data,
  output logic                    out_sop,
  output logic                    out_eop
);

  logic [7:0]              pos;        // index of the next symbol in the codeword
  logic [7:0]              n_r;
  logic [$clog2(TM+1)-1:0] t_r;
  logic                    first;
  logic [7:0]              n_cur, k_cur;
  logic [$clog2(TM+1)-1:0] t_cur;
  logic                    parity;
  logic                    xfer;
  gf_t                     syn_unused [2*TM];

  assign first  = (pos == 8'd0);
  assign n_cur  = first ? n_i : n_r;
  assign t_cur  = first ? t_i : t_r;
  assign k_cur  = n_cur - 8'(2 * t_cur);
  assign parity = (pos >= k_cur);

  assign in_ready  = !parity && out_ready;
  assign out_valid = parity || in_valid;
  assign xfer      = out_valid && out_ready;
  assign out_sop   = first;
  assign out_eop   = (pos == n_cur - 8'd1);

  rs_enc_sc #(.TM(TM)) u_cells (
    .clk     (clk),
    .rst_n   (rst_n),
    .encode  (1'b1),
    .control (parity),
    .active  (xfer),
    .first   (first),
    .last    (1'b0),
    .t       (t_cur),
    .tx_in   (in_data),
    .rx_in   ('0),
    .tx_out  (out_data),
    .syn     (syn_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0;
      n_r <= '0;
      t_r <= '0;
    end else if (xfer) begin
      // each codeword starts with a codable mode
      a_mode: assert (!first || mode_ok(n_i, 4'(t_i)));
      if (first) begin
        n_r <= n_i;
        t_r <= t_i;
      end
      pos <= out_eop ? 8'd0 : pos + 8'd1;
    end
  end

endmodule
