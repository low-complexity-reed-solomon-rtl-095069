// tb_rs_decoder: self-checking test of the three-stage decoder.
//
// Codewords of several modes (the RS parameters of Table-style applications:
// (255,239,8), (204,188,8), (208,192,8), (182,172,5), (72,64,4), (36,32,2),
// (32,28,2), (28,24,2), short CCSDS-like (40,24,8) and t = 1, 3, 6, 7) are
// encoded by the reference model, hit by 0..t random symbol errors, and
// streamed back to back (with occasional idle cycles) into the decoder. The
// output must equal the transmitted codeword, with out_fail low, in order.
// Special patterns from the decoder's verification plan are included:
// words whose S_0 = 0 and S_1 = 0, and words with equal error values.
// Also counted: stalls, skipped solver runs (no errors), corrected symbols.
module tb_rs_decoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic       in_ready;
  gf_t        in_data = '0;
  logic [7:0] n_i = 8'd255;
  logic [3:0] t_i = 4'd8;
  logic       out_valid, out_sop, out_eop, out_fail, out_corr, stall, skip;
  gf_t        out_data;

  int checks = 0, failures = 0;
  int n_stall = 0, n_skip = 0, n_corr = 0, n_words_out = 0;

  always #5 clk = ~clk;

  rs_decoder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_data(in_data), .n_i(n_i), .t_i(t_i), .out_valid(out_valid),
    .out_data(out_data), .out_sop(out_sop), .out_eop(out_eop),
    .out_fail(out_fail), .out_corr(out_corr), .stall_o(stall), .kes_skip_o(skip)
  );

  // expected words
  word_t exp_w [$];
  int    exp_n [$];
  word_t cur_w;
  int    cur_n = 0, pos = 0;
  bit    in_word = 0;

  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (skip)  n_skip++;
    if (out_valid && out_corr) n_corr++;
    if (out_valid) begin
      if (out_sop) begin
        checks++;
        if (in_word || exp_w.size() == 0) begin
          failures++;
          $display("ERROR: unexpected start of word");
        end else begin
          cur_w = exp_w[0];
          cur_n = exp_n[0];
          exp_w.delete(0);
          exp_n.delete(0);
          pos = 0;
          in_word = 1;
        end
      end
      checks++;
      if (!in_word || out_data !== cur_w[pos]) begin
        failures++;
        if (failures < 20)
          $display("ERROR: word %0d pos %0d got %02h exp %02h", n_words_out, pos, out_data, cur_w[pos]);
      end
      if (out_eop) begin
        checks++;
        if (pos != cur_n - 1 || out_fail) begin
          failures++;
          $display("ERROR: word %0d end at pos %0d of %0d, fail=%0d", n_words_out, pos, cur_n, out_fail);
        end
        in_word = 0;
        n_words_out++;
      end
      pos++;
    end
  end

  task automatic send(int n, int t, const ref word_t w, input bit gaps);
    for (int p = 0; p < n; p++) begin
      if (gaps && $urandom_range(0, 15) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = w[p];
      n_i      = 8'(n);
      t_i      = 4'(t);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  // build a codeword of mode (n,t), with `ne` errors; kind 1: equal error
  // values 1; kind 2: errors chosen so that S_0 = 0 (pairs of equal values)
  task automatic make_word(int n, int t, int ne, int kind, output word_t tx, output word_t rx);
    int k;
    int used [255];
    k = n - 2 * t;
    for (int p = 0; p < 255; p++) begin tx[p] = '0; used[p] = 0; end
    for (int p = 0; p < k; p++) tx[p] = 8'($urandom);
    encode(n, t, tx);
    rx = tx;
    for (int e = 0; e < ne; e++) begin
      int p;
      sym_t v;
      do p = $urandom_range(0, n - 1); while (used[p] != 0);
      used[p] = 1;
      case (kind)
        1: v = 8'd1;
        2: v = (e % 2 == 0) ? 8'd1 + 8'(e) : 8'd1 + 8'(e - 1);
        default: do v = 8'($urandom); while (v == 0);
      endcase
      rx[p] ^= v;
    end
  endtask

  int modes_n [14] = '{255, 204, 208, 182, 72, 36, 32, 28, 40, 255, 100, 255, 60, 255};
  int modes_t [14] = '{8,   8,   8,   5,   4,  2,  2,  2,  8,  1,   3,   6,   7,  8};

  initial begin
    word_t tx, rx;
    sym_t  s [16];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int w = 0; w < 60; w++) begin
      int mi, n, t, ne, kind;
      mi   = w % 14;
      n    = modes_n[mi];
      t    = modes_t[mi];
      kind = 0;
      ne   = $urandom_range(0, t);
      if (w % 7 == 3) ne = 0;
      if (w % 9 == 4) begin kind = 1; ne = t; end
      if (w % 11 == 5) begin kind = 2; ne = (t >= 2) ? 2 * (t / 2) : 0; end
      make_word(n, t, ne, kind, tx, rx);
      syndromes(n, rx, s);
      exp_w.push_back(tx);
      exp_n.push_back(n);
      send(n, t, rx, (w % 5 == 2));
    end
    // drain
    repeat (3000) @(negedge clk);
    checks++;
    if (n_words_out != 60) begin
      failures++;
      $display("ERROR: %0d words out of 60", n_words_out);
    end
    checks++;
    if (n_skip == 0 || n_stall == 0 || n_corr == 0) begin
      failures++;
      $display("ERROR: mechanism not exercised: skip=%0d stall=%0d corr=%0d", n_skip, n_stall, n_corr);
    end
    $display("decoder: words=%0d corrected symbols=%0d stalls=%0d solver skips=%0d",
             n_words_out, n_corr, n_stall, n_skip);
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
