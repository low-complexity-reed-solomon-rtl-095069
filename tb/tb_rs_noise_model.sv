// tb_rs_noise_model: check of the random error injector.
//
// Random symbols, random location values and random gaps are applied with
// codewords of random length and t. A model of the gate
// (enable AND count < t AND location == SNR) predicts err_o, out_data and
// err_count every cycle. With SNR 11111 and a 5-bit location the hit rate
// must come out near 1/32 while below the limit; no codeword may take more
// than t errors; with injection disabled nothing changes.
module tb_rs_noise_model;
  import rs_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid = 1'b0, in_ready = 1'b1, in_sop = 1'b0, in_ctrl = 1'b0;
  gf_t        in_data = '0, rand_val = '0, out_data;
  logic [3:0] t_i = 4'd8, err_count;
  logic [4:0] snr = 5'b11111, rand_loc = '0;
  logic       err_o;
  int checks = 0, failures = 0;
  int hits = 0, tries = 0, m_cnt = 0, m_t = 0;

  always #5 clk = ~clk;

  rs_noise_model dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_sop(in_sop), .in_data(in_data), .in_ctrl(in_ctrl), .t_i(t_i),
    .snr(snr), .rand_loc(rand_loc), .rand_val(rand_val), .out_data(out_data),
    .err_o(err_o), .err_count(err_count)
  );

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 400; w++) begin
      int n, t;
      n       = $urandom_range(20, 255);
      t       = $urandom_range(1, 8);
      in_ctrl = (w % 8 != 3);
      for (int p = 0; p < n; p++) begin
        bit e_exp;
        int c_eff, t_eff;
        in_valid = ($urandom_range(0, 7) != 0);
        in_ready = ($urandom_range(0, 7) != 0);
        while (!(in_valid && in_ready)) begin
          // idle cycle: no count change
          in_sop   = (p == 0);
          t_i      = 4'(t);
          rand_loc = 5'($urandom);
          @(negedge clk);
          in_valid = ($urandom_range(0, 3) != 0);
          in_ready = ($urandom_range(0, 3) != 0);
        end
        in_sop   = (p == 0);
        t_i      = (p == 0) ? 4'(t) : 4'($urandom_range(0, 8));  // t sampled at sop only
        in_data  = 8'($urandom);
        rand_val = 8'($urandom);
        rand_loc = 5'($urandom);
        #1;
        c_eff = (p == 0) ? 0 : m_cnt;
        t_eff = t;
        e_exp = in_ctrl && (c_eff < t_eff) && (rand_loc == snr);
        checks++;
        if (err_o !== e_exp || out_data !== (in_data ^ (e_exp ? rand_val : 8'd0))) begin
          failures++;
          $display("ERROR: word %0d pos %0d err %0d exp %0d", w, p, err_o, e_exp);
        end
        if (p > 0) begin
          checks++;
          if (32'(err_count) != m_cnt) begin
            failures++;
            $display("ERROR: count %0d exp %0d", err_count, m_cnt);
          end
        end
        if (in_ctrl && c_eff < t_eff) begin tries++; if (e_exp) hits++; end
        m_cnt = c_eff + (e_exp ? 1 : 0);
        checks++;
        if (m_cnt > t) begin failures++; $display("ERROR: %0d errors in t=%0d word", m_cnt, t); end
        @(negedge clk);
      end
    end
    $display("noise: %0d hits in %0d eligible symbols (1/32 expected: %0d)", hits, tries, tries / 32);
    checks++;
    if (hits * 32 < tries * 3 / 4 || hits * 32 > tries * 5 / 4) begin
      failures++;
      $display("ERROR: hit rate off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
