// tb_rs_encoder: check of the multi-mode encoder with its handshake.
//
// Messages of random modes (application sizes and random n, t) are offered
// with random gaps while the output is randomly back-pressured. The output
// stream must equal the reference systematic codewords, with out_sop and
// out_eop on the first and n-th symbol, and in_ready must stay low for the
// 2t parity cycles. Without gaps or back-pressure a codeword must take
// exactly n cycles (one symbol per clock), also across a mode change.
module tb_rs_encoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] n_i = 8'd255;
  logic [3:0] t_i = 4'd8;
  logic       in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_sop, out_eop;
  gf_t        in_data = '0, out_data;
  int checks = 0, failures = 0;
  bit bp = 1'b0;            // random back-pressure on
  word_t exp_w [$];
  int    exp_n [$], exp_k [$];
  int    words_out = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  rs_encoder dut (
    .clk(clk), .rst_n(rst_n), .n_i(n_i), .t_i(t_i), .in_valid(in_valid),
    .in_ready(in_ready), .in_data(in_data), .out_valid(out_valid),
    .out_ready(out_ready), .out_data(out_data), .out_sop(out_sop), .out_eop(out_eop)
  );

  always @(negedge clk) out_ready <= bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  // output monitor
  word_t cw;
  int    cn = 0, ck = 0, pos = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (pos == 0) begin
      cw = exp_w[0]; cn = exp_n[0]; ck = exp_k[0];
      exp_w.delete(0); exp_n.delete(0); exp_k.delete(0);
    end
    checks++;
    if (out_data !== cw[pos] || out_sop !== (pos == 0) || out_eop !== (pos == cn - 1)) begin
      failures++;
      if (failures < 20) $display("ERROR: word %0d pos %0d got %02h exp %02h sop %0d eop %0d",
                                  words_out, pos, out_data, cw[pos], out_sop, out_eop);
    end
    if (pos >= ck) begin
      checks++;
      if (in_ready) begin failures++; $display("ERROR: in_ready high in parity phase"); end
    end
    pos++;
    if (pos == cn) begin pos = 0; words_out++; end
  end

  task automatic send(int n, int t, bit gaps);
    word_t w;
    int k;
    k = n - 2 * t;
    for (int p = 0; p < 255; p++) w[p] = '0;
    for (int p = 0; p < k; p++) w[p] = 8'($urandom);
    encode(n, t, w);
    exp_w.push_back(w); exp_n.push_back(n); exp_k.push_back(k);
    for (int p = 0; p < k; p++) begin
      if (gaps && $urandom_range(0, 7) == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1; in_data = w[p]; n_i = 8'(n); t_i = 4'(t);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    longint c0;
    int tot;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // back-pressure and gaps
    bp = 1'b1;
    for (int r = 0; r < 80; r++) begin
      int t, n;
      t = $urandom_range(1, 8);
      n = $urandom_range(2 * t + 1, 255);
      send(n, t, 1'b1);
    end
    wait (words_out == 80);
    @(negedge clk);
    // rate: one symbol per cycle, back to back, mode changes between words
    bp  = 1'b0;
    @(negedge clk);
    c0  = cyc;
    tot = 0;
    send(255, 8, 0); tot += 255;
    send(204, 8, 0); tot += 204;
    send(72, 4, 0);  tot += 72;
    send(32, 2, 0);  tot += 32;
    send(182, 5, 0); tot += 182;
    wait (words_out == 85);
    checks++;
    if (cyc - c0 != longint'(tot)) begin
      failures++;
      $display("ERROR: %0d symbols took %0d cycles", tot, cyc - c0);
    end
    $display("encoder: %0d codeword symbols in %0d cycles", tot, cyc - c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
