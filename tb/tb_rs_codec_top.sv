// tb_rs_codec_top: end-to-end, full-size test of the codec (default
// parameters: t up to 8, 1024-symbol receive buffer, 5-bit noise location).
//
// Phase A repeats the document's pipeline example: 40 back-to-back
// (255,239,8) codewords with the noise model on (SNR setting 11111, so about
// one symbol in 32 is hit, at most t per word). The whole run, from the
// first message symbol to the last decoded symbol, must take no more than
// the 10751 cycles quoted for the three-stage pipeline, and no stall may
// occur (the solver must keep up with 255-symbol words).
//
// Phase B sends codewords of the application modes (HDD, CD, DVD, DVB,
// STM-16, CCSDS with variable n, xDSL with t = 1..8, WiMAX), switching mode
// from word to word, some with noise off (the solver then skips its
// iterations) and some short t = 8 words that force input stalls.
//
// Checks: every encoder output symbol against a reference encoder; every
// decoded symbol against the transmitted codeword; out_fail never set;
// noise never puts more than t errors in a word. Each mechanism (stall,
// solver skip, mode switch, shortened code, noise injection, correction)
// is counted and a mechanism that never happens counts as a failure.
module tb_rs_codec_top;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] n_i = 8'd255;
  logic [3:0] t_i = 4'd8;
  logic       tx_valid = 1'b0, tx_ready;
  gf_t        tx_data = '0;
  logic       noise_en = 1'b0;
  logic [4:0] snr = 5'b11111, rand_loc = '0;
  gf_t        rand_val = '0;
  logic       enc_valid, enc_sop, enc_eop, noise_err;
  logic [3:0] noise_count;
  gf_t        enc_data, data_out;
  logic       out_valid, out_sop, out_eop, out_fail, out_corr, stall, skip;

  int checks = 0, failures = 0;
  int n_stall = 0, n_skip = 0, n_corr = 0, n_noise = 0;
  int n_switch = 0, n_short = 0, n_words_out = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  rs_codec_top dut (
    .clk(clk), .rst_n(rst_n), .n_i(n_i), .t_i(t_i),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_data(tx_data),
    .noise_en(noise_en), .snr(snr), .rand_loc(rand_loc), .rand_val(rand_val),
    .enc_valid(enc_valid), .enc_data(enc_data), .enc_sop(enc_sop), .enc_eop(enc_eop),
    .noise_err(noise_err), .noise_count(noise_count),
    .out_valid(out_valid), .data_out(data_out), .out_sop(out_sop),
    .out_eop(out_eop), .out_fail(out_fail), .out_corr(out_corr),
    .stall_o(stall), .kes_skip_o(skip)
  );

  // random noise inputs, new values every cycle
  always @(negedge clk) begin
    rand_loc <= 5'($urandom);
    rand_val <= 8'($urandom);
  end

  // ------------------------------------------------------------ expected
  word_t exp_w [$];      // for the encoder monitor
  int    exp_n [$], exp_t [$];
  word_t dex_w [$];      // for the decoder monitor
  int    dex_n [$];

  // encoder-side monitor
  word_t ew;
  int    en = 0, et = 0, epos = 0, eerr = 0;
  bit    ein = 0;
  always @(posedge clk) if (rst_n && enc_valid && tx_ready_dec()) begin
    if (!ein) begin
      checks++;
      if (exp_w.size() == 0) begin
        failures++;
        $display("ERROR: encoder output with no word expected");
      end else begin
        ew = exp_w[0]; en = exp_n[0]; et = exp_t[0];
        exp_w.delete(0); exp_n.delete(0); exp_t.delete(0);
      end
      ein = 1; epos = 0; eerr = 0;
    end
    checks++;
    if (enc_data !== ew[epos]) begin
      failures++;
      if (failures < 20) $display("ERROR: encoder word n=%0d t=%0d pos %0d got %02h exp %02h (cycle %0d)", en, et, epos, enc_data, ew[epos], cyc);
    end
    if (noise_err) begin eerr++; n_noise++; end
    checks++;
    if (enc_sop !== (epos == 0) || enc_eop !== (epos == en - 1)) begin
      failures++;
      $display("ERROR: encoder sop/eop wrong at pos %0d of %0d", epos, en);
    end
    if (epos > 0) begin
      checks++;
      if (32'(noise_count) != eerr - (noise_err ? 1 : 0)) begin
        failures++;
        $display("ERROR: noise counter %0d, injected %0d", noise_count, eerr);
      end
    end
    epos++;
    if (epos == en) begin
      checks++;
      if (eerr > et) begin
        failures++;
        $display("ERROR: noise put %0d errors in a t=%0d word", eerr, et);
      end
      ein = 0;
    end
  end

  // the decoder input handshake inside the top (encoder out_ready)
  function automatic bit tx_ready_dec();
    return dut.enc_ready;
  endfunction

  // decoder-side monitor
  word_t dw;
  int    dn = 0, dpos = 0;
  bit    din = 0;
  longint t_last_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (skip)  n_skip++;
    if (out_valid) begin
      if (out_sop) begin
        checks++;
        if (din || dex_w.size() == 0) begin
          failures++;
          $display("ERROR: unexpected start of decoded word");
        end else begin
          dw = dex_w[0]; dn = dex_n[0];
          dex_w.delete(0); dex_n.delete(0);
        end
        din = 1; dpos = 0;
      end
      if (out_corr) n_corr++;
      checks++;
      if (data_out !== dw[dpos]) begin
        failures++;
        if (failures < 20) $display("ERROR: word %0d pos %0d got %02h exp %02h", n_words_out, dpos, data_out, dw[dpos]);
      end
      if (out_eop) begin
        checks++;
        if (dpos != dn - 1 || out_fail) begin
          failures++;
          $display("ERROR: word %0d ended at %0d of %0d, fail=%0d", n_words_out, dpos, dn, out_fail);
        end
        din = 0;
        n_words_out++;
        t_last_out = cyc;
      end
      dpos++;
    end
  end

  // ------------------------------------------------------------ driver
  int prev_n = 0, prev_t = 0;
  longint t_first_in = -1;

  task automatic send_word(int n, int t, bit noise);
    word_t w;
    int k;
    k = n - 2 * t;
    for (int p = 0; p < 255; p++) w[p] = '0;
    for (int p = 0; p < k; p++) w[p] = 8'($urandom);
    encode(n, t, w);
    exp_w.push_back(w); exp_n.push_back(n); exp_t.push_back(t);
    dex_w.push_back(w); dex_n.push_back(n);
    if (prev_n != 0 && (n != prev_n || t != prev_t)) n_switch++;
    if (n < 255) n_short++;
    prev_n = n; prev_t = t;
    for (int p = 0; p < k; p++) begin
      tx_valid = 1'b1;
      tx_data  = w[p];
      n_i      = 8'(n);
      t_i      = 4'(t);
      noise_en = noise;
      #1;
      while (!tx_ready) begin @(negedge clk); #1; end
      if (t_first_in < 0) t_first_in = cyc;
      @(negedge clk);
    end
    tx_valid = 1'b0;
  endtask

  // application modes (n, t); n = 0 means "choose n at random"
  int app_n [10] = '{72, 36, 32, 28, 208, 182, 204, 255, 0, 0};
  int app_t [10] = '{4,  2,  2,  2,  8,   5,   8,   8,   8, 0};

  initial begin
    int stall_a;
    longint span;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---------------- phase A: 40 x (255,239,8), noise on
    for (int w = 0; w < 40; w++) send_word(255, 8, 1'b1);
    wait (n_words_out == 40);
    @(negedge clk);
    span    = t_last_out - t_first_in + 1;
    stall_a = n_stall;
    $display("phase A: 40 words (255,239,8) in %0d cycles (document: 10751), %0d noise errors",
             span, n_noise);
    checks++;
    if (span > 10751) begin
      failures++;
      $display("ERROR: pipeline slower than the document's 10751 cycles");
    end
    checks++;
    if (stall_a != 0) begin
      failures++;
      $display("ERROR: %0d stall cycles on 255-symbol words", stall_a);
    end

    // ---------------- phase B: mode switching
    for (int w = 0; w < 160; w++) begin
      int a, n, t;
      bit noise;
      a = $urandom_range(0, 9);
      n = app_n[a];
      t = app_t[a];
      if (a == 8) n = $urandom_range(17, 255);          // CCSDS: n-16 message symbols
      if (a == 9) begin                                 // xDSL: t = 1..8
        t = $urandom_range(1, 8);
        n = $urandom_range(2 * t + 1, 255);
      end
      if (w % 10 == 7) begin n = 24; t = 8; end          // short word: stalls
      noise = ($urandom_range(0, 3) != 0);
      send_word(n, t, noise);
    end
    wait (n_words_out == 200);
    repeat (10) @(negedge clk);

    $display("words=%0d noise errors=%0d corrected=%0d stall cycles=%0d solver skips=%0d mode switches=%0d shortened=%0d",
             n_words_out, n_noise, n_corr, n_stall, n_skip, n_switch, n_short);
    checks++; if (n_stall  == 0) begin failures++; $display("ERROR: no stall"); end
    checks++; if (n_skip   == 0) begin failures++; $display("ERROR: no solver skip"); end
    checks++; if (n_switch == 0) begin failures++; $display("ERROR: no mode switch"); end
    checks++; if (n_short  == 0) begin failures++; $display("ERROR: no shortened code"); end
    checks++; if (n_noise  == 0) begin failures++; $display("ERROR: no noise injected"); end
    checks++; if (n_corr   == 0) begin failures++; $display("ERROR: no correction"); end
    checks++; if (exp_w.size() != 0 || dex_w.size() != 0) begin failures++; $display("ERROR: words left over"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog, %0d words decoded", n_words_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
