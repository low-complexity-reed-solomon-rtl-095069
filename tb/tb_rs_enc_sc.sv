// tb_rs_enc_sc: check of the alpha^i cell array in both of its uses.
//
// Syndrome mode: words of random (n, t), some with errors, are streamed
// back to back (`first` on the first symbol, `last` on the n-th); one cycle
// after `last`, syn[i] must equal S_i = R(alpha^i) from the reference model
// for i < 2t, and 0 for the idle cells. Encode mode: k message symbols on
// tx_in with control = 0, then 2t cycles with control = 1; tx_out must
// reproduce the reference systematic codeword (message, then the
// remainder of x^2t I(x) divided by g(x)). Idle cycles (active = 0) are
// mixed in and must not disturb either mode.
module tb_rs_enc_sc;
  import rs_pkg::*;
  import rs_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       encode = 1'b0, control = 1'b0, active = 1'b0, first = 1'b0, last = 1'b0;
  logic [3:0] t = 4'd8;
  gf_t        tx_in = '0, rx_in = '0, tx_out;
  gf_t        syn [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs_enc_sc dut (
    .clk(clk), .rst_n(rst_n), .encode(encode), .control(control),
    .active(active), .first(first), .last(last), .t(t), .tx_in(tx_in),
    .rx_in(rx_in), .tx_out(tx_out), .syn(syn)
  );

  task automatic idle();
    active = 1'b0; first = 1'b0; last = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    word_t w;
    sym_t  s [16];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---------------- syndrome mode
    encode = 1'b0;
    for (int r = 0; r < 60; r++) begin
      int n, tt, k;
      tt = $urandom_range(1, 8);
      n  = $urandom_range(2 * tt + 1, 255);
      k  = n - 2 * tt;
      for (int p = 0; p < 255; p++) w[p] = '0;
      for (int p = 0; p < k; p++) w[p] = 8'($urandom);
      rs_ref_pkg::encode(n, tt, w);
      if (r % 3 != 0) for (int e = 0; e < tt; e++) w[$urandom_range(0, n - 1)] ^= 8'($urandom);
      syndromes(n, w, s);
      for (int p = 0; p < n; p++) begin
        if ($urandom_range(0, 9) == 0) idle();
        active = 1'b1;
        first  = (p == 0);
        last   = (p == n - 1);
        t      = 4'(tt);
        rx_in  = w[p];
        @(negedge clk);
      end
      active = 1'b0; first = 1'b0; last = 1'b0;
      for (int i = 0; i < 16; i++) begin
        sym_t e;
        e = (i < 2 * tt) ? s[i] : 8'd0;
        checks++;
        if (syn[i] !== e) begin
          failures++;
          $display("ERROR: word %0d n=%0d t=%0d S_%0d=%02h exp %02h", r, n, tt, i, syn[i], e);
        end
      end
    end
    // ---------------- encode mode
    encode = 1'b1;
    for (int r = 0; r < 60; r++) begin
      int n, tt, k;
      tt = $urandom_range(1, 8);
      n  = $urandom_range(2 * tt + 1, 255);
      k  = n - 2 * tt;
      for (int p = 0; p < 255; p++) w[p] = '0;
      for (int p = 0; p < k; p++) w[p] = 8'($urandom);
      rs_ref_pkg::encode(n, tt, w);
      for (int p = 0; p < n; p++) begin
        if ($urandom_range(0, 9) == 0) idle();
        active  = 1'b1;
        first   = (p == 0);
        t       = 4'(tt);
        control = (p >= k);
        tx_in   = (p < k) ? w[p] : 8'($urandom);
        #1;
        checks++;
        if (tx_out !== w[p]) begin
          failures++;
          if (failures < 20) $display("ERROR: enc word %0d n=%0d t=%0d pos %0d got %02h exp %02h", r, n, tt, p, tx_out, w[p]);
        end
        @(negedge clk);
      end
      active = 1'b0; first = 1'b0; control = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
